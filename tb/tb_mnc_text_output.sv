// tb_mnc_text_output - self-checking test of the text output.
// Every class strobe must give the ASCII digit one clock later with a
// single-clock char_valid, and the character counter must follow.
module tb_mnc_text_output;
  import mnc_pkg::*;

  logic             clk = 0, rst_n = 0, ann_done = 0;
  logic [CLS_W-1:0] ann_class = '0;
  logic [7:0]       char_o, char_count;
  logic             char_valid;
  int               checks = 0, failures = 0, valids = 0;

  mnc_text_output dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (char_valid) valids++;

  initial begin
    string digits = "0123456789";
    repeat (2) @(posedge clk);
    checks++; if (char_o != " " || char_count != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      int d = (k < 10) ? k : int'($urandom_range(9));
      @(negedge clk); ann_done = 1; ann_class = 4'(d);
      @(negedge clk); ann_done = 0; ann_class = 4'($urandom);
      checks++;
      if (!char_valid || char_o != digits[d] || int'(char_count) != k + 1) begin
        failures++; $display("FAIL k=%0d d=%0d char=%c valid=%0b count=%0d", k, d, char_o, char_valid, char_count);
      end
      @(negedge clk);
      checks++; if (char_valid || char_o != digits[d]) begin failures++; $display("FAIL hold k=%0d", k); end
    end
    @(negedge clk); ann_done = 1; ann_class = 4'd12;
    @(negedge clk); ann_done = 0;
    checks++; if (char_o != "?") begin failures++; $display("FAIL out of range"); end
    checks++; if (valids != 31) begin failures++; $display("FAIL valids=%0d", valids); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
