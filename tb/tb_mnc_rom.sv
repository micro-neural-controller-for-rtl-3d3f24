// tb_mnc_rom - self-checking test of the code ROM.
// Reads the default calculator program and compares words against hand-
// encoded instruction values (opcode, destination, operand in hex), checks
// the one-clock read latency, and loads a second ROM with a counting
// pattern through the CONTENT parameter.
module tb_mnc_rom;
  import mnc_pkg::*;

  function automatic rom_image_t ramp_image();
    rom_image_t m;
    for (int k = 0; k < 128; k++) m[k] = 16'(k * 257 + 3);
    return m;
  endfunction

  logic   clk = 0, rst_n = 0, re = 0;
  pc_t    addr = '0;
  instr_t rdata, rdata2;
  int     checks = 0, failures = 0;

  mnc_rom dut (.clk, .rst_n, .re, .addr, .rdata);
  mnc_rom #(.CONTENT(ramp_image())) dut2 (.clk, .rst_n, .re, .addr, .rdata(rdata2));

  always #5 clk = ~clk;

  task automatic rd(int a, int expv, int exp2);
    @(negedge clk); re = 1; addr = pc_t'(a);
    @(negedge clk); re = 0;
    checks++;
    if (int'(rdata) != expv || int'(rdata2) != exp2) begin
      failures++;
      $display("FAIL word %0d = %h / %h exp %h / %h", a, rdata, rdata2, expv[15:0], exp2[15:0]);
    end
  endtask

  initial begin
    // expected calculator words: {opcode, dst, operand}
    int addrs [8] = '{0, 1, 3, 8, 15, 55, 76, 100};
    int words [8] = '{'h2080, 'h1107, 'hCF00, 'h3086, 'h6211, 'h4213, 'hBF00, 'hBF00};
    @(negedge clk);
    checks++; if (rdata !== 0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    foreach (addrs[i]) rd(addrs[i], words[i], (addrs[i] * 257 + 3) % 65536);
    for (int k = 0; k < 128; k++) rd(k, int'(calc_program_word(k)), (k * 257 + 3) % 65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t calc_program_word(int k);
    rom_image_t m = calc_program();
    return m[k];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
