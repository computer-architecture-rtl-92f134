// mc_control_onehot - hard-wired multi-cycle controller with one flip-flop
// per state.
//
// The same state machine as mc_control_fsm (states 0..15 of the state
// diagrams, 8 and 11 unused), but the state is held in one flip-flop per
// state, exactly one of which is set. Each flip-flop's input is the OR of
// the transitions into it: the active bit is passed on through enabling
// gates whose conditions are the decoded opcode and the ALU overflow flag.
// Every control signal is simply the OR of the flip-flops of the states
// that assert it, so no state decoder is needed. The binary state number
// is encoded from the flip-flops for observation only.
// Building the controller this way is one of the implementation choices
// the description lists ("1 flip-flop per state, active state shifted
// through enabling gates"); the transitions and per-state signals are those
// of the state diagrams, with the overflow state 15 and the test at the end
// of states 6 and 9 chosen as in mc_control_fsm.
// Interface and timing: as mc_control_fsm. rst_n (active low, synchronous)
// sets the flip-flop of state 0 and clears all others.
module mc_control_onehot
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] opcode,
  input  logic       overflow,
  output mc_ctrl_t   ctrl,
  output logic [3:0] state
);
  logic [15:0] s, n;
  logic        is_lw, is_sw, is_r, is_addi, is_beq, is_j, is_undef;

  assign is_lw    = (opcode == OP_LW);
  assign is_sw    = (opcode == OP_SW);
  assign is_r     = (opcode == OP_RTYPE);
  assign is_addi  = (opcode == OP_ADDI);
  assign is_beq   = (opcode == OP_BEQ);
  assign is_j     = (opcode == OP_J);
  assign is_undef = !(is_lw || is_sw || is_r || is_addi || is_beq || is_j);

  // Transitions into each state
  always_comb begin
    n     = '0;
    n[0]  = s[4] | s[5] | s[7] | s[10] | s[12] | s[13] | s[14] | s[15] | s[8] | s[11];
    n[1]  = s[0];
    n[2]  = s[1] & (is_lw | is_sw);
    n[3]  = s[2] & is_lw;
    n[4]  = s[3];
    n[5]  = s[2] & !is_lw;
    n[6]  = s[1] & is_r;
    n[7]  = s[6] & !overflow;
    n[9]  = s[1] & is_addi;
    n[10] = s[9] & !overflow;
    n[12] = s[1] & is_beq;
    n[13] = s[1] & is_j;
    n[14] = s[1] & is_undef;
    n[15] = (s[6] | s[9]) & overflow;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) s <= 16'h0001;
    else        s <= n;
  end

  // Control signals: OR of the states that assert them
  always_comb begin
    ctrl = '0;
    ctrl.mem_read      = s[0] | s[3];
    ctrl.ir_write      = s[0];
    ctrl.iord          = s[3] | s[5];
    ctrl.mem_write     = s[5];
    ctrl.alu_src_a     = s[2] | s[6] | s[9] | s[12];
    ctrl.alu_src_b[0]  = s[0] | s[1] | s[14] | s[15];
    ctrl.alu_src_b[1]  = s[1] | s[2] | s[9];
    ctrl.alu_op[0]     = s[12] | s[14] | s[15];
    ctrl.alu_op[1]     = s[6];
    ctrl.pc_write      = s[0] | s[13] | s[14] | s[15];
    ctrl.pc_write_cond = s[12];
    ctrl.pc_source[0]  = s[12] | s[14] | s[15];
    ctrl.pc_source[1]  = s[13] | s[14] | s[15];
    ctrl.reg_write     = s[4] | s[7] | s[10];
    ctrl.mem_to_reg    = s[4];
    ctrl.reg_dst       = s[7];
    ctrl.epc_write     = s[14] | s[15];
    ctrl.cause_write   = s[14] | s[15];
    ctrl.int_cause     = s[15];
  end

  // Binary state number
  always_comb begin
    state = '0;
    for (int i = 0; i < 16; i++)
      if (s[i]) state = state | 4'(i);
  end
endmodule
