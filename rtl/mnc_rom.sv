// mnc_rom - code memory: 128 16-bit instruction words.
//
// The program is part of the hardware description: the CONTENT parameter
// defaults to the 1-digit calculator built in mnc_pkg::calc_program(), and a
// different program can be passed in as a parameter. Read synchronously:
// the word at addr appears on rdata one clock after re is high, and rdata
// holds otherwise (it reads as a NOP after reset).
module mnc_rom
  import mnc_pkg::*;
#(
  parameter rom_image_t CONTENT = calc_program()
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   re,
  input  pc_t    addr,
  output instr_t rdata
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= CONTENT[addr];
  end

endmodule
