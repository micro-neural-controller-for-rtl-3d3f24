// mnc_pkg - shared types and constants of the micro neural-controller.
//
// The controller pairs a small Von Neumann microcontroller with a 15-12-10
// feedforward neural network that classifies 3x5 pixel digits. This package
// holds what several modules share:
//   * the 16-bit instruction format: opcode in bits 15:12, destination code in
//     bits 11:8 and an 8-bit operand (immediate value or address) in bits 7:0,
//     as the document lays it out; the opcode values and destination codes
//     are this design's own choice;
//   * the data address map (RAM 0x00-0x7F, I/O registers 0x80-0x8F);
//   * the network sizes (15 inputs, 12 hidden, 10 outputs, from the document)
//     and its fixed-point formats (8-bit weights, chosen here);
//   * the ten 3x5 digit bitmaps and the default network weights computed
//     from them (a template-matching network; the document's trained weights
//     are not published);
//   * a tiny assembler (instr) and the 1-digit calculator program held in the
//     code ROM.
package mnc_pkg;

  // ---------------------------------------------------------------------
  // Microcontroller
  // ---------------------------------------------------------------------
  localparam int unsigned INSTR_W   = 16;   // one instruction word
  localparam int unsigned DATA_W    = 8;    // data bus, registers, RAM bytes
  localparam int unsigned ADDR_W    = 8;    // data address bus
  localparam int unsigned ROM_DEPTH = 128;  // 128 16-bit words
  localparam int unsigned RAM_DEPTH = 128;  // 128 bytes
  localparam int unsigned PC_W      = $clog2(ROM_DEPTH);

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef instr_t rom_image_t [ROM_DEPTH];

  // Sixteen instructions (4-bit operation field).
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,  // no operation
    OP_LDI  = 4'h1,  // reg[dst] <= imm
    OP_LD   = 4'h2,  // reg[dst] <= mem[imm]
    OP_ST   = 4'h3,  // mem[imm] <= reg[dst]   (dst names the source register)
    OP_ADD  = 4'h4,  // dst <= A + B, flags
    OP_SUB  = 4'h5,  // dst <= A - B, flags
    OP_AND  = 4'h6,  // dst <= A & B, flags
    OP_OR   = 4'h7,  // dst <= A | B, flags
    OP_XOR  = 4'h8,  // dst <= A ^ B, flags
    OP_CMP  = 4'h9,  // flags of A - B, nothing stored
    OP_MOV  = 4'hA,  // A <= B (dst A) or B <= A (dst B)
    OP_JMP  = 4'hB,  // PC <= imm
    OP_JZ   = 4'hC,  // PC <= imm if Z
    OP_JNZ  = 4'hD,  // PC <= imm if not Z
    OP_JC   = 4'hE,  // PC <= imm if C (carry of ADD, borrow of SUB/CMP)
    OP_HALT = 4'hF   // stop until reset
  } opcode_t;

  // Destination field (instruction bits 11:8).
  typedef enum logic [3:0] {
    DST_A    = 4'h0,
    DST_B    = 4'h1,
    DST_MEM  = 4'h2,  // ALU result written to mem[imm]
    DST_NONE = 4'hF
  } dst_t;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_t;

  // Control-unit machine cycle: one state per stage, four clocks per
  // instruction.
  typedef enum logic [2:0] {
    CU_FETCH   = 3'd0,
    CU_DECODE  = 3'd1,
    CU_EXECUTE = 3'd2,
    CU_STORE   = 3'd3,
    CU_HALTED  = 3'd4
  } cu_state_t;

  localparam int unsigned CYCLES_PER_INSTR = 4;

  // Data address map. Addresses with bit 7 clear are RAM.
  localparam addr_t IO_BTN      = 8'h80;  // R : auxiliary buttons, active high
  localparam addr_t IO_M0_LO    = 8'h81;  // R : matrix 0 pixels 7:0
  localparam addr_t IO_M0_HI    = 8'h82;  // R : matrix 0 pixels 14:8
  localparam addr_t IO_M1_LO    = 8'h83;  // R : matrix 1 pixels 7:0
  localparam addr_t IO_M1_HI    = 8'h84;  // R : matrix 1 pixels 14:8
  localparam addr_t IO_ANN_LO   = 8'h85;  // RW: network input pixels 7:0
  localparam addr_t IO_ANN_HI   = 8'h86;  // RW: pixels 14:8; a write starts the network
  localparam addr_t IO_ANN_STAT = 8'h87;  // R : [7] busy, [4] valid, [3:0] class
  localparam addr_t IO_OUT0     = 8'h88;  // RW: output port 0 (calculator result)
  localparam addr_t IO_OUT1     = 8'h89;  // RW: output port 1 (operation shown)

  // Auxiliary button bits in IO_BTN.
  localparam int unsigned BTN_ADD = 0;
  localparam int unsigned BTN_SUB = 1;
  localparam int unsigned BTN_MUL = 2;
  localparam int unsigned N_BTN   = 4;

  function automatic instr_t instr(opcode_t op, dst_t dst, logic [7:0] imm);
    return {op, dst, imm};
  endfunction

  // ---------------------------------------------------------------------
  // Neural network
  // ---------------------------------------------------------------------
  localparam int unsigned N_IN  = 15;  // 3x5 pixels
  localparam int unsigned N_HID = 12;  // round(sqrt(15*10))
  localparam int unsigned N_OUT = 10;  // decimal digits
  localparam int unsigned W_W   = 8;   // signed weight and bias width
  localparam int unsigned ACT_W = 8;   // unsigned activation width
  localparam int unsigned ACC_W = 20;  // signed accumulator width
  localparam int unsigned CLS_W = $clog2(N_OUT);

  typedef logic signed [W_W-1:0] weight_t;
  typedef logic [ACT_W-1:0]      act_t;
  typedef logic [N_IN-1:0]       pixels_t;
  // Weight tables are packed so that constant functions can build them;
  // index as W1[hidden][input], W2[output][hidden].
  typedef weight_t [N_IN-1:0]  w1_row_t;
  typedef w1_row_t [N_HID-1:0] w1_t;
  typedef weight_t [N_HID-1:0] b1_t;
  typedef weight_t [N_HID-1:0] w2_row_t;
  typedef w2_row_t [N_OUT-1:0] w2_t;
  typedef weight_t [N_OUT-1:0] b2_t;

  // Cycles from the clock edge that samples start to the one that raises
  // done: one per multiply-accumulate, one per neuron for bias and ramp.
  localparam int unsigned ANN_LATENCY = N_HID * (N_IN + 1) + N_OUT * (N_HID + 1);

  // 3x5 digit bitmaps. Pixel p = 3*row + col, row 0 at the top, col 0 at the
  // left; bit p set = dark pixel.
  function automatic pixels_t digit_pattern(int unsigned d);
    logic [2:0] rows [5];
    pixels_t p;
    case (d)
      0: rows = '{3'b111, 3'b101, 3'b101, 3'b101, 3'b111};
      1: rows = '{3'b010, 3'b010, 3'b010, 3'b010, 3'b010};
      2: rows = '{3'b111, 3'b001, 3'b111, 3'b100, 3'b111};
      3: rows = '{3'b111, 3'b001, 3'b111, 3'b001, 3'b111};
      4: rows = '{3'b101, 3'b101, 3'b111, 3'b001, 3'b001};
      5: rows = '{3'b111, 3'b100, 3'b111, 3'b001, 3'b111};
      6: rows = '{3'b111, 3'b100, 3'b111, 3'b101, 3'b111};
      7: rows = '{3'b111, 3'b001, 3'b001, 3'b001, 3'b001};
      8: rows = '{3'b111, 3'b101, 3'b111, 3'b101, 3'b111};
      default: rows = '{3'b111, 3'b101, 3'b111, 3'b001, 3'b111};
    endcase
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 3; c++)
        p[3*r+c] = rows[r][2-c];
    return p;
  endfunction

  // Default weights. Hidden neuron h < 10 matches digit h: weight +8 for a
  // dark template pixel, -8 for a light one, bias 40 - 8*(dark pixels of
  // the digit). For a 0/1 input x its sum is then 40 - 8*Hamming(x, digit),
  // so its ramp output falls by 8 per differing pixel and reaches 0 at five.
  // Hidden neurons 10 and 11 are unused (zero weights and bias). Output
  // neuron o takes 2x hidden neuron o.
  function automatic w1_row_t default_w1_row(int unsigned h);
    w1_row_t r;
    pixels_t t = (h < N_OUT) ? digit_pattern(h) : '0;
    for (int i = 0; i < N_IN; i++)
      r[i] = (h >= N_OUT) ? weight_t'(0) : (t[i] ? weight_t'(8) : weight_t'(-8));
    return r;
  endfunction

  function automatic w1_t default_w1();
    w1_t w;
    for (int h = 0; h < N_HID; h++) w[h] = default_w1_row(h);
    return w;
  endfunction

  function automatic b1_t default_b1();
    b1_t b;
    for (int h = 0; h < N_HID; h++)
      b[h] = (h < N_OUT) ? weight_t'(40 - 8 * $countones(digit_pattern(h))) : weight_t'(0);
    return b;
  endfunction

  function automatic w2_row_t default_w2_row(int unsigned o);
    w2_row_t r;
    for (int h = 0; h < N_HID; h++)
      r[h] = (o == h) ? weight_t'(2) : weight_t'(0);
    return r;
  endfunction

  function automatic w2_t default_w2();
    w2_t w;
    for (int o = 0; o < N_OUT; o++) w[o] = default_w2_row(o);
    return w;
  endfunction

  function automatic b2_t default_b2();
    b2_t b;
    for (int o = 0; o < N_OUT; o++) b[o] = '0;
    return b;
  endfunction

  // Positive ramp: negative sums give 0, large sums saturate.
  function automatic act_t ramp(logic signed [ACC_W-1:0] x);
    if (x < 0) return '0;
    if (x > ACC_W'(2**ACT_W - 1)) return '1;
    return act_t'(x);
  endfunction

  // ---------------------------------------------------------------------
  // Demonstration program: 1-digit calculator.
  //   RAM 0x10 operation buttons, 0x11 first digit, 0x12 second digit,
  //   0x13 result, 0x14 loop counter.
  // Wait for an operation button, classify both matrices with the network,
  // compute first (op) second, show the 8-bit two's-complement result on
  // OUT0 and the operation buttons on OUT1, wait for release, repeat.
  // ---------------------------------------------------------------------
  localparam logic [7:0] CALC_WAIT   = 8'd0;
  localparam logic [7:0] CALC_POLL0  = 8'd10;
  localparam logic [7:0] CALC_POLL1  = 8'd23;
  localparam logic [7:0] CALC_MUL    = 8'd43;
  localparam logic [7:0] CALC_MLOOP  = 8'd47;
  localparam logic [7:0] CALC_ADD    = 8'd59;
  localparam logic [7:0] CALC_SUB    = 8'd64;
  localparam logic [7:0] CALC_OUT    = 8'd69;
  localparam logic [7:0] CALC_REL    = 8'd73;

  function automatic rom_image_t calc_program();
    rom_image_t m;
    for (int k = 0; k < ROM_DEPTH; k++) m[k] = instr(OP_JMP, DST_NONE, CALC_WAIT);
    // wait for an operation button
    m[0]  = instr(OP_LD,  DST_A,   IO_BTN);
    m[1]  = instr(OP_LDI, DST_B,   8'h07);
    m[2]  = instr(OP_AND, DST_A,   8'h00);
    m[3]  = instr(OP_JZ,  DST_NONE, CALC_WAIT);
    m[4]  = instr(OP_ST,  DST_A,   8'h10);
    // classify matrix 0
    m[5]  = instr(OP_LD,  DST_A,   IO_M0_LO);
    m[6]  = instr(OP_ST,  DST_A,   IO_ANN_LO);
    m[7]  = instr(OP_LD,  DST_A,   IO_M0_HI);
    m[8]  = instr(OP_ST,  DST_A,   IO_ANN_HI);
    m[9]  = instr(OP_LDI, DST_B,   8'h10);
    m[10] = instr(OP_LD,  DST_A,   IO_ANN_STAT);   // CALC_POLL0
    m[11] = instr(OP_AND, DST_A,   8'h00);
    m[12] = instr(OP_JZ,  DST_NONE, CALC_POLL0);
    m[13] = instr(OP_LD,  DST_A,   IO_ANN_STAT);
    m[14] = instr(OP_LDI, DST_B,   8'h0F);
    m[15] = instr(OP_AND, DST_MEM, 8'h11);
    // classify matrix 1
    m[16] = instr(OP_NOP, DST_NONE, 8'h00);
    m[17] = instr(OP_NOP, DST_NONE, 8'h00);
    m[18] = instr(OP_LD,  DST_A,   IO_M1_LO);
    m[19] = instr(OP_ST,  DST_A,   IO_ANN_LO);
    m[20] = instr(OP_LD,  DST_A,   IO_M1_HI);
    m[21] = instr(OP_ST,  DST_A,   IO_ANN_HI);
    m[22] = instr(OP_LDI, DST_B,   8'h10);
    m[23] = instr(OP_LD,  DST_A,   IO_ANN_STAT);   // CALC_POLL1
    m[24] = instr(OP_AND, DST_A,   8'h00);
    m[25] = instr(OP_JZ,  DST_NONE, CALC_POLL1);
    m[26] = instr(OP_LD,  DST_A,   IO_ANN_STAT);
    m[27] = instr(OP_LDI, DST_B,   8'h0F);
    m[28] = instr(OP_AND, DST_MEM, 8'h12);
    // dispatch on the operation
    m[29] = instr(OP_LD,  DST_A,   8'h10);
    m[30] = instr(OP_ST,  DST_A,   IO_OUT1);
    m[31] = instr(OP_LDI, DST_B,   8'h01 << BTN_ADD);
    m[32] = instr(OP_AND, DST_NONE, 8'h00);
    m[33] = instr(OP_JNZ, DST_NONE, CALC_ADD);
    m[34] = instr(OP_LDI, DST_B,   8'h01 << BTN_SUB);
    m[35] = instr(OP_AND, DST_NONE, 8'h00);
    m[36] = instr(OP_JNZ, DST_NONE, CALC_SUB);
    m[37] = instr(OP_JMP, DST_NONE, CALC_MUL);
    for (int k = 38; k < 43; k++) m[k] = instr(OP_NOP, DST_NONE, 8'h00);
    // multiply by repeated addition: result = 0; count = second digit
    m[43] = instr(OP_LDI, DST_A,   8'h00);          // CALC_MUL
    m[44] = instr(OP_ST,  DST_A,   8'h13);
    m[45] = instr(OP_LD,  DST_A,   8'h12);
    m[46] = instr(OP_ST,  DST_A,   8'h14);
    m[47] = instr(OP_LD,  DST_A,   8'h14);          // CALC_MLOOP
    m[48] = instr(OP_LDI, DST_B,   8'h00);
    m[49] = instr(OP_OR,  DST_NONE, 8'h00);
    m[50] = instr(OP_JZ,  DST_NONE, CALC_OUT);
    m[51] = instr(OP_LDI, DST_B,   8'h01);
    m[52] = instr(OP_SUB, DST_MEM, 8'h14);
    m[53] = instr(OP_LD,  DST_A,   8'h13);
    m[54] = instr(OP_LD,  DST_B,   8'h11);
    m[55] = instr(OP_ADD, DST_MEM, 8'h13);
    m[56] = instr(OP_JMP, DST_NONE, CALC_MLOOP);
    m[57] = instr(OP_NOP, DST_NONE, 8'h00);
    m[58] = instr(OP_NOP, DST_NONE, 8'h00);
    // addition
    m[59] = instr(OP_LD,  DST_A,   8'h11);          // CALC_ADD
    m[60] = instr(OP_LD,  DST_B,   8'h12);
    m[61] = instr(OP_ADD, DST_MEM, 8'h13);
    m[62] = instr(OP_JMP, DST_NONE, CALC_OUT);
    m[63] = instr(OP_NOP, DST_NONE, 8'h00);
    // subtraction
    m[64] = instr(OP_LD,  DST_A,   8'h11);          // CALC_SUB
    m[65] = instr(OP_LD,  DST_B,   8'h12);
    m[66] = instr(OP_SUB, DST_MEM, 8'h13);
    m[67] = instr(OP_JMP, DST_NONE, CALC_OUT);
    m[68] = instr(OP_NOP, DST_NONE, 8'h00);
    // show the result, wait for the buttons to be released
    m[69] = instr(OP_LD,  DST_A,   8'h13);          // CALC_OUT
    m[70] = instr(OP_ST,  DST_A,   IO_OUT0);
    m[71] = instr(OP_LDI, DST_B,   8'h07);
    m[72] = instr(OP_NOP, DST_NONE, 8'h00);
    m[73] = instr(OP_LD,  DST_A,   IO_BTN);         // CALC_REL
    m[74] = instr(OP_AND, DST_NONE, 8'h00);
    m[75] = instr(OP_JNZ, DST_NONE, CALC_REL);
    m[76] = instr(OP_JMP, DST_NONE, CALC_WAIT);
    return m;
  endfunction

endpackage
