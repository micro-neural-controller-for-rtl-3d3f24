// mnc_pc_reg - program counter register.
//
// Holds the ROM address of the next instruction. The control unit pulses
// inc after an instruction has executed, or load (with load_val) when a jump
// is taken; load has priority. Cleared to 0 by the active-low reset, so the
// program starts at ROM word 0. Updates on the rising clock edge.
module mnc_pc_reg
  import mnc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic inc,
  input  logic load,
  input  pc_t  load_val,
  output pc_t  pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pc <= '0;
    else if (load) pc <= load_val;
    else if (inc)  pc <= pc + 1'b1;
  end

endmodule
