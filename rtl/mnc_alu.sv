// mnc_alu - arithmetic and logic unit of the microcontroller.
//
// Purely combinational. Computes y = a (op) b for ADD, SUB, AND, OR and XOR
// on DATA_W-bit operands and reports the status flags the control unit uses
// for conditional jumps: z (result zero), c (carry out of ADD, borrow of
// SUB, cleared by the logic operations) and n (result bit 7). AND, OR, ADD
// and SUBTRACT are the operations the document names; XOR and the flag set
// are this design's additions.
module mnc_alu
  import mnc_pkg::*;
(
  input  alu_op_t op,
  input  data_t   a,
  input  data_t   b,
  output data_t   y,
  output logic    z,
  output logic    c,
  output logic    n
);

  logic [DATA_W:0] wide;

  always_comb begin
    wide = '0;
    unique case (op)
      ALU_ADD: wide = {1'b0, a} + {1'b0, b};
      ALU_SUB: wide = {1'b0, a} - {1'b0, b};
      ALU_AND: wide = {1'b0, a & b};
      ALU_OR:  wide = {1'b0, a | b};
      ALU_XOR: wide = {1'b0, a ^ b};
      default: wide = '0;
    endcase
    y = wide[DATA_W-1:0];
    c = wide[DATA_W];
    z = (y == '0);
    n = y[DATA_W-1];
  end

endmodule
