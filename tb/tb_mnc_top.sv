// tb_mnc_top - end-to-end test of the micro neural-controller, all
// parameters at their defaults.
//
// Plays the 1-digit calculator on the board interface: draws a digit on
// each 3x5 push-button matrix (active low), presses add, subtract or
// multiply, and checks the two characters the network reports on the text
// output, then the result on output port 0 (8-bit two's complement) and the
// operation on port 1. Expected digits and results come from this
// testbench's own font and arithmetic. Some digits carry one corrupted pixel
// chosen so that the nearest digit stays the intended one. Counts each
// mechanism (add, subtract, negative result, multiply loop, multiply by
// zero, noisy input, every digit recognised) and fails if one never ran.
// Checks that a character takes exactly 322 clocks of network time after
// its start.
module tb_mnc_top;
  import mnc_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic [N_BTN-1:0] btn_n = '1;
  pixels_t          m0_n = '1, m1_n = '1;
  data_t            out0, out1;
  logic [7:0]       char_o, char_count;
  logic             char_valid, halted;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_neg = 0, n_mul = 0, n_mul0 = 0, n_noisy = 0;
  int seen_digit [10];
  byte chars [$];

  mnc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && char_valid) chars.push_back(char_o);

  function automatic pixels_t font(int d);
    string rows [10][5] = '{
      '{"###", "#.#", "#.#", "#.#", "###"}, '{".#.", ".#.", ".#.", ".#.", ".#."},
      '{"###", "..#", "###", "#..", "###"}, '{"###", "..#", "###", "..#", "###"},
      '{"#.#", "#.#", "###", "..#", "..#"}, '{"###", "#..", "###", "..#", "###"},
      '{"###", "#..", "###", "#.#", "###"}, '{"###", "..#", "..#", "..#", "..#"},
      '{"###", "#.#", "###", "#.#", "###"}, '{"###", "#.#", "###", "..#", "###"}};
    pixels_t p;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 3; c++) p[3*r+c] = (rows[d][r][c] == "#");
    return p;
  endfunction

  // Digit d with one pixel flipped, such that d is still strictly nearest.
  function automatic pixels_t noisy(int d);
    pixels_t p;
    int best, second;
    forever begin
      p = font(d);
      p[$urandom_range(14)] ^= 1'b1;
      best = $countones(p ^ font(d));
      second = 99;
      for (int o = 0; o < 10; o++)
        if (o != d && $countones(p ^ font(o)) < second) second = $countones(p ^ font(o));
      if (best < second) return p;
    end
  endfunction

  task automatic expect_eq(string what, int got, int expv);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s = %0d exp %0d", what, got, expv); end
  endtask

  task automatic calc(int x, int y, int op, bit noise);
    pixels_t px, py;
    int expv, waited;
    px = noise ? noisy(x) : font(x);
    py = font(y);
    if (noise) n_noisy++;
    chars.delete();
    @(negedge clk); m0_n = ~px; m1_n = ~py;
    repeat (3) @(negedge clk);
    btn_n = ~(4'(1) << op);
    waited = 0;
    while (chars.size() < 2 && waited < 5000) begin @(negedge clk); waited++; end
    repeat (1200) @(negedge clk);          // longest path: 9 multiply passes
    expect_eq("characters", chars.size(), 2);
    if (chars.size() == 2) begin
      expect_eq("first char", int'(chars[0]), 48 + x);
      expect_eq("second char", int'(chars[1]), 48 + y);
    end
    case (op)
      BTN_ADD: begin expv = x + y; n_add++; end
      BTN_SUB: begin expv = x - y; n_sub++; if (expv < 0) n_neg++; end
      default: begin expv = x * y; n_mul++; if (y == 0) n_mul0++; end
    endcase
    expect_eq($sformatf("%0d op%0d %0d", x, op, y), int'($signed(out0)), expv);
    expect_eq("operation shown", int'(out1), 1 << op);
    seen_digit[x]++; seen_digit[y]++;
    btn_n = '1;
    repeat (100) @(negedge clk);
    expect_eq("not halted", int'(halted), 0);
  endtask

  // network latency seen from the top: start pulse to done
  int lat_start = -1, lat_checks = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.ann_start) lat_start = cyc;
    if (dut.ann_done && lat_start >= 0) begin
      lat_checks++; checks++;
      if (cyc - lat_start != ANN_LATENCY + 1) begin
        failures++; $display("FAIL network latency %0d", cyc - lat_start - 1);
      end
    end
  end

  initial begin
    foreach (seen_digit[i]) seen_digit[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    expect_eq("idle output", int'(out0), 0);
    calc(3, 4, BTN_ADD, 0);
    calc(9, 9, BTN_MUL, 0);
    calc(2, 7, BTN_SUB, 0);
    calc(8, 0, BTN_MUL, 0);
    calc(6, 5, BTN_SUB, 0);
    calc(1, 8, BTN_ADD, 1);
    calc(7, 6, BTN_MUL, 1);
    calc(0, 1, BTN_SUB, 1);
    for (int k = 0; k < 6; k++)
      calc(int'($urandom_range(9)), int'($urandom_range(9)), int'($urandom_range(2)), 1'($urandom_range(1)));
    // mechanisms
    checks += 6;
    if (n_add == 0)   begin failures++; $display("FAIL no addition"); end
    if (n_sub == 0)   begin failures++; $display("FAIL no subtraction"); end
    if (n_neg == 0)   begin failures++; $display("FAIL no negative result"); end
    if (n_mul == 0)   begin failures++; $display("FAIL no multiplication"); end
    if (n_mul0 == 0)  begin failures++; $display("FAIL no multiply by zero"); end
    if (n_noisy == 0) begin failures++; $display("FAIL no noisy input"); end
    for (int d = 0; d < 10; d++) begin
      checks++;
      if (seen_digit[d] == 0) begin failures++; $display("FAIL digit %0d never used", d); end
    end
    $display("add %0d, sub %0d (negative %0d), mul %0d (by zero %0d), noisy %0d, latency checks %0d",
             n_add, n_sub, n_neg, n_mul, n_mul0, n_noisy, lat_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
