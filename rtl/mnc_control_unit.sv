// mnc_control_unit - control unit (CU) of the microcontroller.
//
// Runs the four-stage machine cycle of the document, one clock per stage, so
// every instruction takes four clocks (CYCLES_PER_INSTR):
//   FETCH   drive the PC onto the address bus with code=1 and re=1; the code
//           ROM answers on the data bus one clock later.
//   DECODE  load the 16-bit word into the instruction register and decode
//           its 4-bit operation field into a set of control signals.
//   EXECUTE read the data operand (LD: re=1 at address imm), or let the ALU
//           compute A (op) B and latch its result and flags, or evaluate a
//           jump condition on the flags.
//   STORE   write the result: register A or B, or memory/I-O (we=1 at
//           address imm); then load the PC (jump taken) or increment it.
// HALT parks the unit in a HALTED state until reset. Registers A and B are
// the two operand registers the document names; they and the flags reset
// to zero. Instruction set, destination codes and flags are listed in
// mnc_pkg; the split of work between the stages is this design's choice.
module mnc_control_unit
  import mnc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // shared address / data / control buses
  output addr_t     bus_addr,
  output logic      bus_code,   // 1: instruction fetch from the code ROM
  output logic      bus_re,
  output logic      bus_we,
  output data_t     bus_wdata,
  input  instr_t    bus_rdata,  // data reads use bits 7:0
  // ALU
  output alu_op_t   alu_op,
  output data_t     alu_a,
  output data_t     alu_b,
  input  data_t     alu_y,
  input  logic      alu_z,
  input  logic      alu_c,
  // PC register
  input  pc_t       pc,
  output logic      pc_inc,
  output logic      pc_load,
  output pc_t       pc_load_val,
  // status
  output cu_state_t state,
  output instr_t    ir,
  output data_t     reg_a,
  output data_t     reg_b,
  output logic      flag_z,
  output logic      flag_c,
  output logic      halted
);

  typedef struct packed {
    opcode_t    op;
    dst_t       dst;
    logic [7:0] imm;
    logic       is_alu;     // ADD/SUB/AND/OR/XOR/CMP
    alu_op_t    alu_op;
    logic       mem_rd;     // LD
    logic       is_jump;    // JMP/JZ/JNZ/JC
  } ctrl_t;

  function automatic ctrl_t decode(instr_t w);
    ctrl_t c;
    c.op      = opcode_t'(w[15:12]);
    c.dst     = dst_t'(w[11:8]);
    c.imm     = w[7:0];
    c.is_alu  = 1'b0;
    c.alu_op  = ALU_ADD;
    c.mem_rd  = 1'b0;
    c.is_jump = 1'b0;
    unique case (c.op)
      OP_ADD: begin c.is_alu = 1'b1; c.alu_op = ALU_ADD; end
      OP_SUB: begin c.is_alu = 1'b1; c.alu_op = ALU_SUB; end
      OP_AND: begin c.is_alu = 1'b1; c.alu_op = ALU_AND; end
      OP_OR:  begin c.is_alu = 1'b1; c.alu_op = ALU_OR;  end
      OP_XOR: begin c.is_alu = 1'b1; c.alu_op = ALU_XOR; end
      OP_CMP: begin c.is_alu = 1'b1; c.alu_op = ALU_SUB; end
      OP_LD:  c.mem_rd = 1'b1;
      OP_JMP, OP_JZ, OP_JNZ, OP_JC: c.is_jump = 1'b1;
      default: ;
    endcase
    return c;
  endfunction

  ctrl_t ctrl;
  data_t res;     // ALU result latched in EXECUTE
  logic  take;    // jump condition evaluated in EXECUTE

  assign alu_op = ctrl.alu_op;
  assign alu_a  = reg_a;
  assign alu_b  = reg_b;
  assign halted = (state == CU_HALTED);

  // Sequencing and registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= CU_FETCH;
      ir     <= '0;
      ctrl   <= decode('0);
      reg_a  <= '0;
      reg_b  <= '0;
      flag_z <= 1'b0;
      flag_c <= 1'b0;
      res    <= '0;
      take   <= 1'b0;
    end else begin
      unique case (state)
        CU_FETCH:  state <= CU_DECODE;
        CU_DECODE: begin
          ir    <= bus_rdata;
          ctrl  <= decode(bus_rdata);
          state <= CU_EXECUTE;
        end
        CU_EXECUTE: begin
          if (ctrl.is_alu) begin
            res    <= alu_y;
            flag_z <= alu_z;
            flag_c <= alu_c;
          end
          unique case (ctrl.op)
            OP_JMP:  take <= 1'b1;
            OP_JZ:   take <= flag_z;
            OP_JNZ:  take <= !flag_z;
            OP_JC:   take <= flag_c;
            default: take <= 1'b0;
          endcase
          state <= CU_STORE;
        end
        CU_STORE: begin
          unique case (ctrl.op)
            OP_LDI: begin
              if (ctrl.dst == DST_A) reg_a <= ctrl.imm;
              if (ctrl.dst == DST_B) reg_b <= ctrl.imm;
            end
            OP_LD: begin
              if (ctrl.dst == DST_A) reg_a <= bus_rdata[DATA_W-1:0];
              if (ctrl.dst == DST_B) reg_b <= bus_rdata[DATA_W-1:0];
            end
            OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR: begin
              if (ctrl.dst == DST_A) reg_a <= res;
              if (ctrl.dst == DST_B) reg_b <= res;
            end
            OP_MOV: begin
              if (ctrl.dst == DST_A) reg_a <= reg_b;
              if (ctrl.dst == DST_B) reg_b <= reg_a;
            end
            default: ;
          endcase
          state <= (ctrl.op == OP_HALT) ? CU_HALTED : CU_FETCH;
        end
        CU_HALTED: state <= CU_HALTED;
        default:   state <= CU_FETCH;
      endcase
    end
  end

  // Bus and PC control.
  always_comb begin
    bus_addr    = '0;
    bus_code    = 1'b0;
    bus_re      = 1'b0;
    bus_we      = 1'b0;
    bus_wdata   = '0;
    pc_inc      = 1'b0;
    pc_load     = 1'b0;
    pc_load_val = pc_t'(ctrl.imm);
    unique case (state)
      CU_FETCH: begin
        bus_addr = addr_t'(pc);
        bus_code = 1'b1;
        bus_re   = 1'b1;
      end
      CU_EXECUTE: begin
        if (ctrl.mem_rd) begin
          bus_addr = ctrl.imm;
          bus_re   = 1'b1;
        end
      end
      CU_STORE: begin
        bus_addr = ctrl.imm;
        if (ctrl.op == OP_ST) begin
          bus_we    = 1'b1;
          bus_wdata = (ctrl.dst == DST_B) ? reg_b : reg_a;
        end else if (ctrl.is_alu && ctrl.op != OP_CMP && ctrl.dst == DST_MEM) begin
          bus_we    = 1'b1;
          bus_wdata = res;
        end
        if (ctrl.op != OP_HALT) begin
          pc_load = take;
          pc_inc  = !take;
        end
      end
      default: ;
    endcase
  end

  // A read and a write never share a clock.
  assert property (@(posedge clk) disable iff (!rst_n) !(bus_re && bus_we));

endmodule
