// mnc_uc - the custom microcontroller: control unit, ALU, PC register,
// memory (code ROM and data RAM) and I/O on shared buses.
//
// Follows the structure of the document's microcontroller figure: the
// control unit drives one address bus, one data bus and the control lines,
// and the memory, ALU, PC register and I/O hang off them. The buses are
// built from multiplexers rather than tri-state lines. Decoding: a fetch
// (bus_code=1) reads the code ROM at the PC; a data access goes to the RAM
// when address bit 7 is 0 and to the I/O registers when it is 1. All reads
// answer one clock after they are issued. The network is outside the
// microcontroller and reached through the I/O registers (ann_* ports).
module mnc_uc
  import mnc_pkg::*;
#(
  parameter rom_image_t PROGRAM    = calc_program(),
  parameter bit         ACTIVE_LOW = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // board
  input  logic [N_BTN-1:0] btn_raw,
  input  pixels_t          m0_raw,
  input  pixels_t          m1_raw,
  output data_t            out0,
  output data_t            out1,
  // network
  output pixels_t          ann_pixels,
  output logic             ann_start,
  input  logic             ann_busy,
  input  logic             ann_valid,
  input  logic [CLS_W-1:0] ann_class,
  // status
  output pc_t              pc,
  output cu_state_t        cu_state,
  output data_t            reg_a,
  output data_t            reg_b,
  output logic             halted
);

  addr_t   bus_addr;
  logic    bus_code, bus_re, bus_we;
  data_t   bus_wdata;
  instr_t  bus_rdata;

  alu_op_t alu_op;
  data_t   alu_a, alu_b, alu_y;
  logic    alu_z, alu_c, alu_n;

  logic    pc_inc, pc_load;
  pc_t     pc_load_val;
  instr_t  ir;
  logic    flag_z, flag_c;

  mnc_control_unit u_cu (
    .clk, .rst_n,
    .bus_addr, .bus_code, .bus_re, .bus_we, .bus_wdata, .bus_rdata,
    .alu_op, .alu_a, .alu_b, .alu_y, .alu_z, .alu_c,
    .pc, .pc_inc, .pc_load, .pc_load_val,
    .state(cu_state), .ir, .reg_a, .reg_b, .flag_z, .flag_c, .halted
  );

  mnc_alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .z(alu_z), .c(alu_c), .n(alu_n));

  mnc_pc_reg u_pc (.clk, .rst_n, .inc(pc_inc), .load(pc_load), .load_val(pc_load_val), .pc);

  // Address decoding.
  logic rom_re, ram_re, ram_we, io_re, io_we;
  assign rom_re = bus_re &&  bus_code;
  assign ram_re = bus_re && !bus_code && !bus_addr[ADDR_W-1];
  assign ram_we = bus_we &&              !bus_addr[ADDR_W-1];
  assign io_re  = bus_re && !bus_code &&  bus_addr[ADDR_W-1];
  assign io_we  = bus_we &&               bus_addr[ADDR_W-1];

  instr_t rom_rdata;
  data_t  ram_rdata, io_rdata;

  mnc_rom #(.CONTENT(PROGRAM)) u_rom (
    .clk, .rst_n, .re(rom_re), .addr(pc_t'(bus_addr)), .rdata(rom_rdata)
  );

  mnc_ram u_ram (
    .clk, .rst_n, .re(ram_re), .we(ram_we), .addr(bus_addr[$clog2(RAM_DEPTH)-1:0]),
    .wdata(bus_wdata), .rdata(ram_rdata)
  );

  mnc_io #(.ACTIVE_LOW(ACTIVE_LOW)) u_io (
    .clk, .rst_n, .btn_raw, .m0_raw, .m1_raw, .out0, .out1,
    .re(io_re), .we(io_we), .addr(bus_addr[3:0]), .wdata(bus_wdata), .rdata(io_rdata),
    .ann_pixels, .ann_start, .ann_busy, .ann_valid, .ann_class
  );

  // Read-data multiplexer: remembers which unit answered the last read.
  typedef enum logic [1:0] {SRC_ROM, SRC_RAM, SRC_IO} src_t;
  src_t src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      src <= SRC_ROM;
    else if (rom_re) src <= SRC_ROM;
    else if (ram_re) src <= SRC_RAM;
    else if (io_re)  src <= SRC_IO;
  end

  always_comb begin
    unique case (src)
      SRC_RAM: bus_rdata = instr_t'(ram_rdata);
      SRC_IO:  bus_rdata = instr_t'(io_rdata);
      default: bus_rdata = rom_rdata;
    endcase
  end

endmodule
