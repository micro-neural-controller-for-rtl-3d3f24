// mnc_ram - data RAM of the microcontroller, DEPTH bytes (128 by default).
//
// One port, written on the rising edge when we is high, read synchronously:
// the byte at addr appears on rdata one clock after re is high (rdata holds
// otherwise). As the document requires, every byte reads as zero after
// reset: the reset clears a valid bit per byte instead of the array itself,
// so the array can still map onto block or distributed RAM.
module mnc_ram
  import mnc_pkg::*;
#(
  parameter int unsigned DEPTH = RAM_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     re,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  data_t                    wdata,
  output data_t                    rdata
);

  data_t            mem [DEPTH];
  logic [DEPTH-1:0] written;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written <= '0;
      rdata   <= '0;
    end else begin
      if (we) written[addr] <= 1'b1;
      if (re) rdata <= written[addr] ? mem[addr] : '0;
    end
  end

endmodule
