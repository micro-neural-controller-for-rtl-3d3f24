// tb_mnc_ann - self-checking test of the neural network.
// Presents the ten clean digits and many noisy ones (1 to 3 flipped pixels).
// For each, the expected output scores come from a reference computation in
// this testbench that uses its own copy of the digit font: with the default
// weights, score[o] = 2 * max(0, 40 - 8 * Hamming(x, digit o)). The class
// must be the first maximum, done must come ANN_LATENCY (322) clocks after
// start, and valid must drop while a classification runs. A run with
// 2 or 3 corrupted pixels reports the recognition rate (informative only).
module tb_mnc_ann;
  import mnc_pkg::*;

  logic             clk = 0, rst_n = 0, start = 0;
  pixels_t          pixels = '0;
  logic             busy, done, valid;
  logic [CLS_W-1:0] class_o;
  act_t             scores [N_OUT];
  int               checks = 0, failures = 0;
  int               noisy = 0, noisy_ok = 0;

  mnc_ann dut (.*);

  always #5 clk = ~clk;

  // 3x5 font, rows top to bottom, "#" dark.
  function automatic logic [14:0] font(int d);
    string rows [10][5] = '{
      '{"###", "#.#", "#.#", "#.#", "###"}, '{".#.", ".#.", ".#.", ".#.", ".#."},
      '{"###", "..#", "###", "#..", "###"}, '{"###", "..#", "###", "..#", "###"},
      '{"#.#", "#.#", "###", "..#", "..#"}, '{"###", "#..", "###", "..#", "###"},
      '{"###", "#..", "###", "#.#", "###"}, '{"###", "..#", "..#", "..#", "..#"},
      '{"###", "#.#", "###", "#.#", "###"}, '{"###", "#.#", "###", "..#", "###"}};
    logic [14:0] p;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 3; c++) p[3*r+c] = (rows[d][r][c] == "#");
    return p;
  endfunction

  task automatic classify(logic [14:0] x, int truth);
    int exp_s [10];
    int best = -1, best_c = 0, cycles = 0;
    for (int o = 0; o < 10; o++) begin
      int ham = $countones(x ^ font(o));
      exp_s[o] = 2 * ((40 - 8 * ham) > 0 ? (40 - 8 * ham) : 0);
      if (exp_s[o] > best) begin best = exp_s[o]; best_c = o; end
    end
    @(negedge clk); start = 1; pixels = x;
    @(posedge clk); #1 start = 0; pixels = '0;
    checks++; if (!busy || valid) begin failures++; $display("FAIL busy/valid after start"); end
    while (!done) begin @(posedge clk); #1 cycles++; end
    checks++;
    if (cycles != ANN_LATENCY) begin failures++; $display("FAIL latency %0d exp %0d", cycles, ANN_LATENCY); end
    checks++;
    if (int'(class_o) != best_c || !valid) begin
      failures++; $display("FAIL x=%b class=%0d exp %0d", x, class_o, best_c);
    end
    for (int o = 0; o < 10; o++) begin
      checks++;
      if (int'(scores[o]) != exp_s[o]) begin failures++; $display("FAIL x=%b score[%0d]=%0d exp %0d", x, o, scores[o], exp_s[o]); end
    end
    if (truth >= 0 && int'(class_o) == truth) noisy_ok++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 10; d++) begin
      classify(font(d), -1);
      checks++; if (int'(class_o) != d) begin failures++; $display("FAIL clean digit %0d -> %0d", d, class_o); end
    end
    // start while busy is ignored
    @(negedge clk); start = 1; pixels = font(4);
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    start = 1; pixels = font(7);
    @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    checks++; if (class_o != 4) begin failures++; $display("FAIL start while busy changed the job"); end
    // noisy digits: 1..3 random flipped pixels
    for (int k = 0; k < 200; k++) begin
      int d, nflip;
      logic [14:0] x, m;
      d = int'($urandom_range(9));
      nflip = (k < 40) ? 1 : 2 + int'($urandom_range(1));
      x = font(d);
      m = '0;
      while ($countones(m) < nflip) m[$urandom_range(14)] = 1'b1;
      if (nflip >= 2) noisy++;
      classify(x ^ m, (nflip >= 2) ? d : -2);
    end
    $display("noisy digits with 2-3 flipped pixels: %0d of %0d recognised", noisy_ok, noisy);
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
