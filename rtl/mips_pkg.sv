// mips_pkg - types and constants shared by the simplified MIPS processors.
//
// Holds the instruction-field encodings (opcodes and R-type funct codes),
// the ALU operation enum, the 2-bit ALUOp code that the controllers hand to
// the ALU control, and the control-signal bundles of the single-cycle and
// the multi-cycle datapaths.
//
// The instruction formats (R: op/rs/rt/rd/sa/funct, I: op/rs/rt/immediate,
// J: op/target with 6/5/5/5/5/6, 6/5/5/16 and 6/26 bits) and the names of the
// control signals follow the processor description. The numeric opcode and
// funct values are the standard MIPS ones; the description does not list them.
// ALUOp uses the values printed in the multi-cycle state diagrams:
// 00 add, 01 subtract, 10 "look at funct".
package mips_pkg;

  // Opcodes (IR[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type funct codes (IR[5:0])
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_SLT = 6'h2A;

  // ALU operations
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_fn_t;

  // ALUOp as produced by the controllers
  localparam logic [1:0] ALUOP_ADD   = 2'b00;
  localparam logic [1:0] ALUOP_SUB   = 2'b01;
  localparam logic [1:0] ALUOP_FUNCT = 2'b10;

  // Single-cycle controller outputs (columns of the control ROM table)
  typedef struct packed {
    logic       jump;
    logic       branch;
    logic       reg_dst;    // 1: write rd, 0: write rt
    logic       reg_write;
    logic       mem_write;
    logic       mem_to_reg; // 1: register write data from memory
    logic [1:0] alu_op;
    logic       alu_src;    // 1: second ALU operand from register, 0: immediate
  } sc_ctrl_t;

  // Multi-cycle datapath control signals
  typedef struct packed {
    logic       pc_write;
    logic       pc_write_cond;
    logic       iord;        // 1: memory address from ALUOut, 0: from PC
    logic       mem_read;
    logic       mem_write;
    logic       ir_write;
    logic       mem_to_reg;
    logic [1:0] pc_source;   // 00 ALU, 01 ALUOut, 10 jump target, 11 exception vector
    logic [1:0] alu_op;
    logic [1:0] alu_src_b;   // 00 B, 01 constant 4, 10 SignExt(imm), 11 SignExt(imm)<<2
    logic       alu_src_a;   // 0 PC, 1 A
    logic       reg_write;
    logic       reg_dst;     // 1: rd, 0: rt
    logic       int_cause;   // value written to Cause: 0 undefined insn, 1 overflow
    logic       cause_write;
    logic       epc_write;
  } mc_ctrl_t;

  // Multi-cycle controller states (numbers as in the state diagrams)
  typedef enum logic [3:0] {
    S_FETCH     = 4'd0,
    S_DECODE    = 4'd1,
    S_MEM_ADDR  = 4'd2,
    S_MEM_READ  = 4'd3,
    S_MEM_WB    = 4'd4,
    S_MEM_WRITE = 4'd5,
    S_R_EXEC    = 4'd6,
    S_R_WB      = 4'd7,
    S_UNUSED8   = 4'd8,
    S_ADDI_EXEC = 4'd9,
    S_I_WB      = 4'd10,
    S_UNUSED11  = 4'd11,
    S_BRANCH    = 4'd12,
    S_JUMP      = 4'd13,
    S_UNDEF     = 4'd14,
    S_OVF       = 4'd15
  } mc_state_t;

  // Multi-cycle controller implementations
  typedef enum logic [2:0] {
    CTRL_FSM    = 3'd0,  // hard-wired, binary state register
    CTRL_MICRO  = 3'd1,  // microprogrammed, horizontal microinstructions
    CTRL_NANO   = 3'd2,  // microprogrammed, nano-programmed control words
    CTRL_VERT   = 3'd3,  // microprogrammed, vertical microinstructions
    CTRL_ONEHOT = 3'd4   // hard-wired, one flip-flop per state
  } mc_ctrl_style_t;

  // Microsequencer next-address select (inputs of the address mux)
  localparam logic [1:0] AC_ZERO  = 2'd0;
  localparam logic [1:0] AC_DISP1 = 2'd1;
  localparam logic [1:0] AC_DISP2 = 2'd2;
  localparam logic [1:0] AC_SEQ   = 2'd3;

  // Control word of one state, shared by the hard-wired and the
  // microprogrammed controllers so that all produce identical datapath
  // control.
  function automatic mc_ctrl_t mc_state_ctrl(input logic [3:0] s);
    mc_ctrl_t c;
    c = '0;
    case (s)
      4'd0: begin  // IR <- Mem[PC]; PC <- PC + 4
        c.mem_read = 1'b1; c.iord = 1'b0; c.ir_write = 1'b1;
        c.alu_src_a = 1'b0; c.alu_src_b = 2'b01; c.alu_op = ALUOP_ADD;
        c.pc_write = 1'b1; c.pc_source = 2'b00;
      end
      4'd1: begin  // A, B <- Reg; ALUOut <- PC + (SignExt(imm) << 2)
        c.alu_src_a = 1'b0; c.alu_src_b = 2'b11; c.alu_op = ALUOP_ADD;
      end
      4'd2, 4'd9: begin  // ALUOut <- A + SignExt(imm)
        c.alu_src_a = 1'b1; c.alu_src_b = 2'b10; c.alu_op = ALUOP_ADD;
      end
      4'd3: begin  // DR <- Mem[ALUOut]
        c.mem_read = 1'b1; c.iord = 1'b1;
      end
      4'd4: begin  // Reg[rt] <- DR
        c.reg_write = 1'b1; c.mem_to_reg = 1'b1; c.reg_dst = 1'b0;
      end
      4'd5: begin  // Mem[ALUOut] <- B
        c.mem_write = 1'b1; c.iord = 1'b1;
      end
      4'd6: begin  // ALUOut <- A funct B
        c.alu_src_a = 1'b1; c.alu_src_b = 2'b00; c.alu_op = ALUOP_FUNCT;
      end
      4'd7: begin  // Reg[rd] <- ALUOut
        c.reg_dst = 1'b1; c.mem_to_reg = 1'b0; c.reg_write = 1'b1;
      end
      4'd10: begin // Reg[rt] <- ALUOut
        c.reg_dst = 1'b0; c.mem_to_reg = 1'b0; c.reg_write = 1'b1;
      end
      4'd12: begin // if (A == B) PC <- ALUOut
        c.alu_src_a = 1'b1; c.alu_src_b = 2'b00; c.alu_op = ALUOP_SUB;
        c.pc_write_cond = 1'b1; c.pc_source = 2'b01;
      end
      4'd13: begin // PC <- {PC[31:28], target, 00}
        c.pc_write = 1'b1; c.pc_source = 2'b10;
      end
      4'd14, 4'd15: begin // EPC <- PC - 4; Cause <- IntCause; PC <- vector
        c.alu_src_a = 1'b0; c.alu_src_b = 2'b01; c.alu_op = ALUOP_SUB;
        c.int_cause = (s == 4'd15); c.cause_write = 1'b1;
        c.pc_source = 2'b11; c.epc_write = 1'b1; c.pc_write = 1'b1;
      end
      default: ;
    endcase
    return c;
  endfunction

endpackage
