// mc_control_useq - microprogrammed controller of the multi-cycle processor.
//
// The state register addresses a control ROM whose words are horizontal
// microinstructions: the raw datapath control signals plus AddrCtl, the
// choice of the next microinstruction address. Address select logic picks,
// by AddrCtl, one of four sources:
//   0 - address 0 (back to instruction fetch)
//   1 - dispatch ROM 1, indexed by the opcode (used after decode)
//   2 - dispatch ROM 2, indexed by the opcode (lw/sw after address calc.)
//   3 - the current address plus 1 (sequential)
// The microprogram realises the same 16-state machine as mc_control_fsm,
// with the same state numbers, so the sequential steps 0->1, 3->4, 6->7 and
// 9->10 use the +1 adder. The address mux as described has no input for
// the ALU overflow; an extra microinstruction bit, OvfTrap (own addition),
// makes the next address 15 when it is set and the ALU overflows, so both
// controllers raise the overflow exception alike.
// The ROMs are computed by functions (the contents follow the state
// diagrams). Timing and reset are as in mc_control_fsm.
module mc_control_useq
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
    mc_ctrl_t   ctrl;
    logic [1:0] addr_ctl;
    logic       ovf_trap;
  } uinsn_t;

  function automatic uinsn_t control_rom(input logic [3:0] a);
    uinsn_t u;
    u.ctrl     = mc_state_ctrl(a);
    u.ovf_trap = (a == 4'd6) || (a == 4'd9);
    case (a)
      4'd0, 4'd3, 4'd6, 4'd9: u.addr_ctl = AC_SEQ;
      4'd1:                   u.addr_ctl = AC_DISP1;
      4'd2:                   u.addr_ctl = AC_DISP2;
      default:                u.addr_ctl = AC_ZERO;
    endcase
    return u;
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

  logic [3:0] upc, upc_inc, next_addr;
  uinsn_t     uinsn;
  logic [3:0] sel_in [4];

  always_ff @(posedge clk) begin
    if (!rst_n) upc <= 4'd0;
    else        upc <= next_addr;
  end

  assign uinsn   = control_rom(upc);
  assign upc_inc = upc + 4'd1;

  assign sel_in[AC_ZERO]  = 4'd0;
  assign sel_in[AC_DISP1] = dispatch_rom1(opcode);
  assign sel_in[AC_DISP2] = dispatch_rom2(opcode);
  assign sel_in[AC_SEQ]   = upc_inc;

  logic [3:0] selected;
  mux_onehot #(.SEL_BITS(2), .WIDTH(4)) u_addr_mux (.s(uinsn.addr_ctl), .x(sel_in), .y(selected));

  assign next_addr = (uinsn.ovf_trap && overflow) ? 4'd15 : selected;

  assign ctrl  = uinsn.ctrl;
  assign state = upc;
endmodule
