// tb_mnc_noise_workload - the noisy-character recognition test, run
// exhaustively on the neural network at its default parameters.
//
// Every digit is presented with every possible set of 2 and of 3 corrupted
// pixels (105 + 455 cases per digit, 5600 classifications). Each answer is
// checked against a reference nearest-template classifier written here
// (scores 2 * max(0, 40 - 8 * Hamming distance), first maximum wins) and the
// latency of every classification is checked. The recognition rate, i.e.
// how often the class equals the digit that was corrupted, is printed for
// 2 and for 3 corrupted pixels; it describes the default weights and is not
// a pass criterion.
module tb_mnc_noise_workload;
  import mnc_pkg::*;

  logic             clk = 0, rst_n = 0, start = 0;
  pixels_t          pixels = '0;
  logic             busy, done, valid;
  logic [CLS_W-1:0] class_o;
  act_t             scores [N_OUT];
  int               checks = 0, failures = 0;
  int               total [4], correct [4];

  mnc_ann dut (.*);

  always #5 clk = ~clk;

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

  function automatic int reference(logic [14:0] x);
    int best = -1, best_c = 0, s, ham;
    for (int o = 0; o < 10; o++) begin
      ham = $countones(x ^ font(o));
      s = 2 * ((40 - 8 * ham) > 0 ? (40 - 8 * ham) : 0);
      if (s > best) begin best = s; best_c = o; end
    end
    return best_c;
  endfunction

  task automatic run(logic [14:0] x, int truth, int nflip);
    int cycles;
    cycles = 0;
    @(negedge clk); start = 1; pixels = x;
    @(posedge clk); #1 start = 0;
    while (!done && cycles < 1000) begin @(posedge clk); #1 cycles++; end
    checks++;
    if (cycles != ANN_LATENCY || int'(class_o) != reference(x)) begin
      failures++;
      $display("FAIL x=%b class=%0d exp %0d cycles=%0d", x, class_o, reference(x), cycles);
    end
    total[nflip]++;
    if (int'(class_o) == truth) correct[nflip]++;
  endtask

  initial begin
    foreach (total[i]) begin total[i] = 0; correct[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 10; d++)
      for (int a = 0; a < 15; a++)
        for (int b = a + 1; b < 15; b++) begin
          logic [14:0] m2;
          m2 = '0; m2[a] = 1'b1; m2[b] = 1'b1;
          run(font(d) ^ m2, d, 2);
          for (int c = b + 1; c < 15; c++) begin
            logic [14:0] m3;
            m3 = m2; m3[c] = 1'b1;
            run(font(d) ^ m3, d, 3);
          end
        end
    checks++;
    if (total[2] != 1050 || total[3] != 4550) begin failures++; $display("FAIL case count"); end
    $display("2 corrupted pixels: %0d of %0d recognised (%0d.%0d%%)", correct[2], total[2],
             correct[2] * 100 / total[2], (correct[2] * 1000 / total[2]) % 10);
    $display("3 corrupted pixels: %0d of %0d recognised (%0d.%0d%%)", correct[3], total[3],
             correct[3] * 100 / total[3], (correct[3] * 1000 / total[3]) % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
