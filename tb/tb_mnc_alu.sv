// tb_mnc_alu - self-checking test of the ALU.
// Applies every operation to corner values and random operands and compares
// result and flags with values computed here from plain integer arithmetic.
module tb_mnc_alu;
  import mnc_pkg::*;

  alu_op_t op;
  data_t   a, b, y;
  logic    z, c, n;
  int      checks = 0, failures = 0;

  mnc_alu dut (.op, .a, .b, .y, .z, .c, .n);

  task automatic check(alu_op_t o, int ai, int bi);
    int exp_y, exp_c;
    op = o; a = 8'(ai); b = 8'(bi);
    #1;
    case (o)
      ALU_ADD: begin exp_y = (ai + bi) % 256; exp_c = (ai + bi) > 255; end
      ALU_SUB: begin exp_y = (ai - bi + 256) % 256; exp_c = ai < bi; end
      ALU_AND: begin exp_y = ai & bi; exp_c = 0; end
      ALU_OR:  begin exp_y = ai | bi; exp_c = 0; end
      default: begin exp_y = ai ^ bi; exp_c = 0; end
    endcase
    checks++;
    if (int'(y) != exp_y || int'(c) != exp_c || z != (exp_y == 0) || n != (exp_y >= 128)) begin
      failures++;
      $display("FAIL op=%0d a=%0d b=%0d y=%0d c=%0b z=%0b n=%0b exp y=%0d c=%0d",
               o, ai, bi, y, c, z, n, exp_y, exp_c);
    end
  endtask

  initial begin
    alu_op_t ops [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR};
    int corners [6] = '{0, 1, 127, 128, 254, 255};
    foreach (ops[k])
      foreach (corners[i])
        foreach (corners[j])
          check(ops[k], corners[i], corners[j]);
    repeat (500) check(ops[$urandom_range(4)], int'($urandom_range(255)), int'($urandom_range(255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
