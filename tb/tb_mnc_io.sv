// tb_mnc_io - self-checking test of the I/O system.
// Drives active-low board lines and checks that the program sees them
// inverted and latched one clock later, that every register reads back what
// the testbench expects (one-clock read latency), that output ports and the
// network input register take writes, and that a write to the high pixel
// register gives exactly one ann_start pulse.
module tb_mnc_io;
  import mnc_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic [N_BTN-1:0] btn_raw = '1;
  pixels_t          m0_raw = '1, m1_raw = '1;
  data_t            out0, out1;
  logic             re = 0, we = 0;
  logic [3:0]       addr = '0;
  data_t            wdata = '0, rdata;
  pixels_t          ann_pixels;
  logic             ann_start;
  logic             ann_busy = 0, ann_valid = 0;
  logic [CLS_W-1:0] ann_class = '0;
  int               checks = 0, failures = 0, starts = 0;

  mnc_io dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (ann_start) starts++;

  task automatic expect_eq(string what, int got, int expv);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s = %0h exp %0h", what, got, expv); end
  endtask

  task automatic rd(int a, int expv);
    @(negedge clk); re = 1; we = 0; addr = 4'(a);
    @(negedge clk); re = 0;
    expect_eq($sformatf("reg %0h", a), int'(rdata), expv);
  endtask

  task automatic wr(int a, int v);
    @(negedge clk); we = 1; re = 0; addr = 4'(a); wdata = 8'(v);
    @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      logic [3:0] b;
      logic [14:0] p0, p1;
      b = 4'($urandom); p0 = 15'($urandom); p1 = 15'($urandom);
      @(negedge clk); btn_raw = ~b; m0_raw = ~p0; m1_raw = ~p1;
      @(negedge clk);
      rd(0, int'(b));
      rd(1, int'(p0[7:0]));  rd(2, int'(p0[14:8]));
      rd(3, int'(p1[7:0]));  rd(4, int'(p1[14:8]));
    end
    // latch timing: a change is not visible to a read issued in the same cycle
    @(negedge clk); btn_raw = 4'b1111;
    @(negedge clk); @(negedge clk);
    btn_raw = 4'b1110; re = 1; addr = 4'h0;
    @(negedge clk); re = 0; expect_eq("latch delay", int'(rdata), 0);
    rd(0, 1);
    @(negedge clk); btn_raw = 4'b1111;
    @(negedge clk);
    rd(0, 0);
    // network input and start pulse
    starts = 0;
    wr(5, 'hA5);
    expect_eq("no start on low write", starts, 0);
    wr(6, 'h5A);
    @(negedge clk);
    expect_eq("one start", starts, 1);
    expect_eq("pixels", int'(ann_pixels), 'h5AA5);
    rd(5, 'hA5); rd(6, 'h5A);
    // status register
    ann_busy = 1; ann_valid = 0; ann_class = 4'd7; rd(7, 'h87);
    ann_busy = 0; ann_valid = 1; ann_class = 4'd3; rd(7, 'h13);
    // output ports
    wr(8, 'h3C); wr(9, 'hC3);
    expect_eq("out0", int'(out0), 'h3C); expect_eq("out1", int'(out1), 'hC3);
    rd(8, 'h3C); rd(9, 'hC3);
    rd(15, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
