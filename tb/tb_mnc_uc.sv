// tb_mnc_uc - self-checking test of the whole microcontroller.
// Runs a short program from a ROM image given as a parameter. The program
// copies matrix 0 into the network input registers (which starts the
// network), polls the network status, stores the class in RAM, then writes
// it to output port 0 and the button state to output port 1, reads a RAM
// byte nobody wrote (must be 0 after reset) into port 0 of a second pass,
// and halts. The network is modelled here: it answers 20 clocks after
// start with class = (number of dark pixels) mod 10.
module tb_mnc_uc;
  import mnc_pkg::*;

  function automatic rom_image_t test_program();
    rom_image_t m;
    for (int k = 0; k < 128; k++) m[k] = instr(OP_HALT, DST_NONE, 8'h00);
    m[0]  = instr(OP_LD,  DST_A, IO_M0_LO);
    m[1]  = instr(OP_ST,  DST_A, IO_ANN_LO);
    m[2]  = instr(OP_LD,  DST_A, IO_M0_HI);
    m[3]  = instr(OP_ST,  DST_A, IO_ANN_HI);
    m[4]  = instr(OP_LDI, DST_B, 8'h10);
    m[5]  = instr(OP_LD,  DST_A, IO_ANN_STAT);
    m[6]  = instr(OP_AND, DST_A, 8'h00);
    m[7]  = instr(OP_JZ,  DST_NONE, 8'd5);
    m[8]  = instr(OP_LD,  DST_A, IO_ANN_STAT);
    m[9]  = instr(OP_LDI, DST_B, 8'h0F);
    m[10] = instr(OP_AND, DST_MEM, 8'h30);
    m[11] = instr(OP_LD,  DST_A, 8'h30);
    m[12] = instr(OP_ST,  DST_A, IO_OUT0);
    m[13] = instr(OP_LD,  DST_A, IO_BTN);
    m[14] = instr(OP_ST,  DST_A, IO_OUT1);
    m[15] = instr(OP_LD,  DST_B, 8'h7F);
    m[16] = instr(OP_ST,  DST_B, 8'h31);
    m[17] = instr(OP_HALT, DST_NONE, 8'h00);
    return m;
  endfunction

  logic             clk = 0, rst_n = 0;
  logic [N_BTN-1:0] btn_raw;
  pixels_t          m0_raw, m1_raw;
  data_t            out0, out1;
  pixels_t          ann_pixels;
  logic             ann_start;
  logic             ann_busy = 0, ann_valid = 0;
  logic [CLS_W-1:0] ann_class = '0;
  pc_t              pc;
  cu_state_t        cu_state;
  data_t            reg_a, reg_b;
  logic             halted;
  int               checks = 0, failures = 0, starts = 0, cycles = 0;
  pixels_t          seen;

  mnc_uc #(.PROGRAM(test_program())) dut (.*);

  always #5 clk = ~clk;

  // network model
  always @(posedge clk) begin
    if (rst_n && ann_start) begin
      starts++;
      seen = ann_pixels;
      ann_busy  <= 1'b1;
      ann_valid <= 1'b0;
      repeat (20) @(posedge clk);
      ann_class <= 4'($countones(seen) % 10);
      ann_busy  <= 1'b0;
      ann_valid <= 1'b1;
    end
  end

  task automatic expect_eq(string what, int got, int expv);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s = %0h exp %0h", what, got, expv); end
  endtask

  initial begin
    for (int run = 0; run < 6; run++) begin
      pixels_t p;
      logic [3:0] b;
      p = pixels_t'($urandom); b = 4'($urandom);
      m0_raw = ~p; m1_raw = pixels_t'($urandom); btn_raw = ~b;
      rst_n = 0; cycles = 0; starts = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      while (!halted && cycles < 2000) begin @(posedge clk); #1 cycles++; end
      expect_eq("halted", int'(halted), 1);
      expect_eq("one network start", starts, 1);
      expect_eq("pixels to network", int'(seen), int'(p));
      expect_eq("out0 = class", int'(out0), $countones(p) % 10);
      expect_eq("out1 = buttons", int'(out1), int'(b));
      expect_eq("unwritten RAM reads 0", int'(reg_b), 0);
      expect_eq("pc at halt", int'(pc), 17);
      // 18 instructions plus 4 per extra pass of the 3-instruction poll loop
      expect_eq("cycle count multiple of 4", cycles % CYCLES_PER_INSTR, 0);
      checks++;
      if (cycles < 18 * 4 || cycles > 18 * 4 + 12 * 12) begin
        failures++; $display("FAIL cycles %0d", cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
