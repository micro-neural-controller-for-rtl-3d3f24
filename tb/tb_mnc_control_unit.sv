// tb_mnc_control_unit - self-checking test of the control unit.
// The unit runs with the real ALU and PC register against a memory model
// kept here (synchronous read, one clock, like the real memories). The
// program uses all sixteen instructions, taken and untaken jumps of every
// kind, and a count-down loop. Expected memory, registers, PC, number of
// fetches and the cycle count (4 clocks per instruction) were worked out by
// hand from the program.
module tb_mnc_control_unit;
  import mnc_pkg::*;

  logic      clk = 0, rst_n = 0;
  addr_t     bus_addr;
  logic      bus_code, bus_re, bus_we;
  data_t     bus_wdata;
  instr_t    bus_rdata;
  alu_op_t   alu_op;
  data_t     alu_a, alu_b, alu_y;
  logic      alu_z, alu_c, alu_n;
  pc_t       pc, pc_load_val;
  logic      pc_inc, pc_load;
  cu_state_t state;
  instr_t    ir;
  data_t     reg_a, reg_b;
  logic      flag_z, flag_c, halted;

  instr_t rom [128];
  data_t  ram [256];
  int     checks = 0, failures = 0, fetches = 0, cycles = 0;

  mnc_control_unit dut (.*);
  mnc_alu  u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .z(alu_z), .c(alu_c), .n(alu_n));
  mnc_pc_reg u_pc (.clk, .rst_n, .inc(pc_inc), .load(pc_load), .load_val(pc_load_val), .pc);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (bus_re) bus_rdata <= bus_code ? rom[bus_addr[6:0]] : {8'h00, ram[bus_addr]};
    if (bus_we) ram[bus_addr] <= bus_wdata;
    if (rst_n && bus_re && bus_code) fetches++;
  end

  task automatic expect_eq(string what, int got, int expv);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s = %0h exp %0h", what, got, expv); end
  endtask

  initial begin
    foreach (rom[k]) rom[k] = 16'hF000;      // HALT everywhere else
    foreach (ram[k]) ram[k] = 8'h00;
    rom[0]  = 16'h1035;  // LDI A,35
    rom[1]  = 16'h110F;  // LDI B,0F
    rom[2]  = 16'h4220;  // ADD [20]      = 44
    rom[3]  = 16'h5000;  // SUB A         A = 26
    rom[4]  = 16'h6100;  // AND B         B = 06
    rom[5]  = 16'h7221;  // OR  [21]      = 26
    rom[6]  = 16'h8222;  // XOR [22]      = 20
    rom[7]  = 16'h3023;  // ST A,[23]
    rom[8]  = 16'h3124;  // ST B,[24]
    rom[9]  = 16'h2020;  // LD A,[20]     A = 44
    rom[10] = 16'hA100;  // MOV B         B = 44
    rom[11] = 16'h9F00;  // CMP           Z=1
    rom[12] = 16'hCF0F;  // JZ 15         taken
    rom[13] = 16'h10EE;  // (skipped)
    rom[14] = 16'hF000;
    rom[15] = 16'hDF0D;  // JNZ 13        not taken
    rom[16] = 16'h1145;  // LDI B,45
    rom[17] = 16'h9F00;  // CMP           C=1 Z=0
    rom[18] = 16'hEF15;  // JC 21         taken
    rom[19] = 16'h3025;
    rom[20] = 16'hF000;
    rom[21] = 16'hDF17;  // JNZ 23        taken
    rom[22] = 16'hF000;
    rom[23] = 16'h0000;  // NOP
    rom[24] = 16'h1080;  // LDI A,80
    rom[25] = 16'h1180;  // LDI B,80
    rom[26] = 16'h4000;  // ADD A         A = 00, C=1, Z=1
    rom[27] = 16'hEF1D;  // JC 29         taken
    rom[28] = 16'hF000;
    rom[29] = 16'hA000;  // MOV A         A = 80
    rom[30] = 16'h3026;  // ST A,[26]
    rom[31] = 16'hBF21;  // JMP 33
    rom[32] = 16'hF000;
    rom[33] = 16'h3127;  // ST B,[27]
    rom[34] = 16'h1003;  // LDI A,3
    rom[35] = 16'h1101;  // LDI B,1
    rom[36] = 16'h5000;  // SUB A
    rom[37] = 16'hDF24;  // JNZ 36        taken twice; 37 instructions run in all
    rom[38] = 16'h3028;  // ST A,[28]
    rom[39] = 16'hF000;  // HALT
    ram[8'h28] = 8'h55;

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!halted && cycles < 1000) begin @(posedge clk); #1 cycles++; end
    expect_eq("cycles", cycles, 37 * CYCLES_PER_INSTR);
    expect_eq("fetches", fetches, 37);
    expect_eq("[20]", int'(ram[8'h20]), 'h44);
    expect_eq("[21]", int'(ram[8'h21]), 'h26);
    expect_eq("[22]", int'(ram[8'h22]), 'h20);
    expect_eq("[23]", int'(ram[8'h23]), 'h26);
    expect_eq("[24]", int'(ram[8'h24]), 'h06);
    expect_eq("[25]", int'(ram[8'h25]), 'h00);
    expect_eq("[26]", int'(ram[8'h26]), 'h80);
    expect_eq("[27]", int'(ram[8'h27]), 'h80);
    expect_eq("[28]", int'(ram[8'h28]), 'h00);
    expect_eq("A", int'(reg_a), 'h00);
    expect_eq("B", int'(reg_b), 'h01);
    expect_eq("Z", int'(flag_z), 1);
    expect_eq("PC", int'(pc), 39);
    repeat (10) @(posedge clk);
    #1 expect_eq("stays halted", int'(halted), 1);
    expect_eq("no more fetches", fetches, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
