// mc_control_vert - multi-cycle controller with vertical (field-encoded)
// microinstructions.
//
// Sequencing is that of mc_control_useq: state register used as
// microprogram counter, +1 adder, dispatch ROMs 1 and 2, AddrCtl-driven
// address mux and the OvfTrap bit. The 19 control signals, however, are not
// stored directly. The microinstruction holds four encoded control fields,
// each naming one of a few mutually exclusive actions, and one decoder per
// field (onehot_decoder) turns it into lines that are ORed into the control
// signals:
//   ALU field, 3 bits:  0 idle, 1 PC + 4, 2 PC + (SignExt(imm) << 2),
//                       3 A + SignExt(imm), 4 A funct B, 5 A - B, 6 PC - 4
//   memory field, 2 bits: 0 idle, 1 fetch (MemRead, IorD=0, IRWrite),
//                       2 data read (MemRead, IorD=1), 3 write (MemWrite, IorD=1)
//   register field, 2 bits: 0 idle, 1 Reg[rt] <- DR, 2 Reg[rd] <- ALUOut,
//                       3 Reg[rt] <- ALUOut
//   PC field, 3 bits:   0 idle, 1 PC <- ALU, 2 if zero PC <- ALUOut,
//                       3 PC <- jump target, 4 exception (undefined
//                       instruction), 5 exception (overflow): EPC, Cause and
//                       PC <- vector
// A microinstruction is 10 + 3 = 13 bits, 208 bits for 16 words, against 22
// bits and 352 bits for horizontal microinstructions. The price is that only
// the combinations listed above can be expressed, and the decoders add delay.
// Splitting into several fields with one decoder each is the document's
// scheme; the choice of fields and codes is this design's own. The decoded
// word of each state equals mips_pkg::mc_state_ctrl. Timing and reset are as
// in mc_control_fsm. Decoder lines of unused codes (code 0 of each field,
// ALU code 7, PC codes 6 and 7) are left unconnected.
module mc_control_vert
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] opcode,
  input  logic       overflow,
  output mc_ctrl_t   ctrl,
  output logic [3:0] state
);
  typedef struct packed {
    logic [2:0] alu;
    logic [1:0] mem;
    logic [1:0] reg_f;
    logic [2:0] pc_f;
    logic [1:0] addr_ctl;
    logic       ovf_trap;
  } vinsn_t;

  function automatic vinsn_t micro_rom(input logic [3:0] a);
    vinsn_t v;
    v = '0;
    case (a)
      4'd0:  begin v.alu = 3'd1; v.mem = 2'd1; v.pc_f = 3'd1; end
      4'd1:  v.alu = 3'd2;
      4'd2:  v.alu = 3'd3;
      4'd3:  v.mem = 2'd2;
      4'd4:  v.reg_f = 2'd1;
      4'd5:  v.mem = 2'd3;
      4'd6:  v.alu = 3'd4;
      4'd7:  v.reg_f = 2'd2;
      4'd9:  v.alu = 3'd3;
      4'd10: v.reg_f = 2'd3;
      4'd12: begin v.alu = 3'd5; v.pc_f = 3'd2; end
      4'd13: v.pc_f = 3'd3;
      4'd14: begin v.alu = 3'd6; v.pc_f = 3'd4; end
      4'd15: begin v.alu = 3'd6; v.pc_f = 3'd5; end
      default: ;
    endcase
    case (a)
      4'd0, 4'd3, 4'd6, 4'd9: v.addr_ctl = AC_SEQ;
      4'd1:                   v.addr_ctl = AC_DISP1;
      4'd2:                   v.addr_ctl = AC_DISP2;
      default:                v.addr_ctl = AC_ZERO;
    endcase
    v.ovf_trap = (a == 4'd6) || (a == 4'd9);
    return v;
  endfunction

  function automatic logic [3:0] dispatch_rom1(input logic [5:0] op);
    case (op)
      OP_LW, OP_SW: return 4'd2;
      OP_RTYPE:     return 4'd6;
      OP_ADDI:      return 4'd9;
      OP_BEQ:       return 4'd12;
      OP_J:         return 4'd13;
      default:      return 4'd14;
    endcase
  endfunction

  function automatic logic [3:0] dispatch_rom2(input logic [5:0] op);
    return (op == OP_LW) ? 4'd3 : 4'd5;
  endfunction

  logic [3:0] upc, next_addr, selected;
  vinsn_t     vinsn;
  logic [3:0] sel_in [4];

  always_ff @(posedge clk) begin
    if (!rst_n) upc <= 4'd0;
    else        upc <= next_addr;
  end

  assign vinsn = micro_rom(upc);

  assign sel_in[AC_ZERO]  = 4'd0;
  assign sel_in[AC_DISP1] = dispatch_rom1(opcode);
  assign sel_in[AC_DISP2] = dispatch_rom2(opcode);
  assign sel_in[AC_SEQ]   = upc + 4'd1;

  mux_onehot #(.SEL_BITS(2), .WIDTH(4)) u_addr_mux (.s(vinsn.addr_ctl), .x(sel_in), .y(selected));

  assign next_addr = (vinsn.ovf_trap && overflow) ? 4'd15 : selected;

  // Field decoders
  logic [7:0] a;   // ALU field lines
  logic [3:0] m;   // memory field lines
  logic [3:0] r;   // register field lines
  logic [7:0] p;   // PC field lines

  onehot_decoder #(.N(3)) u_dec_alu (.b(vinsn.alu),   .h(a));
  onehot_decoder #(.N(2)) u_dec_mem (.b(vinsn.mem),   .h(m));
  onehot_decoder #(.N(2)) u_dec_reg (.b(vinsn.reg_f), .h(r));
  onehot_decoder #(.N(3)) u_dec_pc  (.b(vinsn.pc_f),  .h(p));

  always_comb begin
    ctrl = '0;
    // ALU operand selects and ALUOp (01 subtract, 10 funct)
    ctrl.alu_src_a    = a[3] | a[4] | a[5];
    ctrl.alu_src_b[0] = a[1] | a[2] | a[6];
    ctrl.alu_src_b[1] = a[2] | a[3];
    ctrl.alu_op[0]    = a[5] | a[6];
    ctrl.alu_op[1]    = a[4];
    // memory
    ctrl.mem_read     = m[1] | m[2];
    ctrl.ir_write     = m[1];
    ctrl.iord         = m[2] | m[3];
    ctrl.mem_write    = m[3];
    // register write
    ctrl.reg_write    = r[1] | r[2] | r[3];
    ctrl.mem_to_reg   = r[1];
    ctrl.reg_dst      = r[2];
    // PC, EPC, Cause
    ctrl.pc_write     = p[1] | p[3] | p[4] | p[5];
    ctrl.pc_write_cond = p[2];
    ctrl.pc_source[0] = p[2] | p[4] | p[5];
    ctrl.pc_source[1] = p[3] | p[4] | p[5];
    ctrl.epc_write    = p[4] | p[5];
    ctrl.cause_write  = p[4] | p[5];
    ctrl.int_cause    = p[5];
  end

  assign state = upc;
endmodule
