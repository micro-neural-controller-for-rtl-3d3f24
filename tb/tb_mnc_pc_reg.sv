// tb_mnc_pc_reg - self-checking test of the program counter.
// Checks reset to 0, increment, wrap at 127, jump load and that load wins
// over increment, against a counter kept in the testbench.
module tb_mnc_pc_reg;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, inc = 0, load = 0;
  pc_t  load_val = '0, pc;
  int   model = 0, checks = 0, failures = 0;

  mnc_pc_reg dut (.clk, .rst_n, .inc, .load, .load_val, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%0d", pc); end
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      inc = $urandom_range(1); load = ($urandom_range(7) == 0); load_val = pc_t'($urandom);
      if (k > 200 && k < 340) begin inc = 1; load = 0; end   // run through the wrap
      @(posedge clk);
      if (load) model = int'(load_val);
      else if (inc) model = (model + 1) % 128;
      #1 checks++;
      if (int'(pc) != model) begin failures++; $display("FAIL k=%0d pc=%0d exp=%0d", k, pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
