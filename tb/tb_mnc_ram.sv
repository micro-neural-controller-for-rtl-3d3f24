// tb_mnc_ram - self-checking test of the data RAM.
// After reset every byte must read 0 (the array itself starts random in
// simulation). Random writes and reads are then compared with a reference
// array, checking the one-clock read latency and that rdata holds while
// re is low. A second reset must clear the contents again.
module tb_mnc_ram;
  import mnc_pkg::*;

  logic       clk = 0, rst_n = 0, re = 0, we = 0;
  logic [6:0] addr = '0;
  data_t      wdata = '0, rdata;
  int         ref_mem [128];
  int         checks = 0, failures = 0;

  mnc_ram dut (.clk, .rst_n, .re, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic rd(int a, int expv);
    @(negedge clk); re = 1; we = 0; addr = 7'(a);
    @(negedge clk); re = 0;
    checks++;
    if (int'(rdata) != expv) begin failures++; $display("FAIL read %0d = %0d exp %0d", a, rdata, expv); end
  endtask

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 128; a++) rd(a, 0);
    for (int k = 0; k < 600; k++) begin
      int a;
      a = int'($urandom_range(127));
      if ($urandom_range(1)) begin
        @(negedge clk); we = 1; re = 0; addr = 7'(a); wdata = data_t'($urandom);
        ref_mem[a] = int'(wdata);
        @(negedge clk); we = 0;
      end else rd(a, ref_mem[a]);
    end
    // rdata holds with re low
    rd(5, ref_mem[5]);
    @(negedge clk); addr = 7'd6; @(negedge clk);
    checks++; if (int'(rdata) != ref_mem[5]) begin failures++; $display("FAIL hold"); end
    // second reset clears
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int a = 0; a < 128; a++) rd(a, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
