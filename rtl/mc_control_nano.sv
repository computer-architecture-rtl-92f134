// mc_control_nano - nano-programmed controller of the multi-cycle processor.
//
// Same sequencing as mc_control_useq (state register, +1 adder, dispatch
// ROMs 1 and 2, AddrCtl-driven address mux, OvfTrap bit), but the control
// store is split in two levels:
//   microprogram memory: 16 words, each holding AddrCtl, OvfTrap and a
//                        K-bit number of a control-signal combination;
//   nanoprogram memory:  NANO_WORDS words of the full 19-bit control word,
//                        one per distinct combination.
// The microinstruction is thus in vertical (encoded) form and the nano
// memory decodes it back to horizontal form, trading one more memory read
// in series for space. This microprogram has 14 distinct control words
// (states 2 and 9 share one, unused states 8 and 11 share the all-zero
// word), so K = 4. With only 16 microinstructions the split saves nothing
// here: 16 x (4+3) + 14 x 19 = 378 bits against 16 x (19+3) = 352 bits for
// the horizontal store; the technique pays off only when many
// microinstructions share few combinations. Both memories are constant
// tables computed by functions; applying the two-level store to this
// controller and its contents are own choices. Timing and reset are as in
// mc_control_fsm: the control word is valid during the whole state.
module mc_control_nano
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] opcode,
  input  logic       overflow,
  output mc_ctrl_t   ctrl,
  output logic [3:0] state
);
  localparam int unsigned NANO_WORDS = 14;
  localparam int unsigned K          = $clog2(NANO_WORDS);

  typedef struct packed {
    logic [K-1:0] nano_addr;
    logic [1:0]   addr_ctl;
    logic         ovf_trap;
  } vinsn_t;

  // Nanoprogram: the distinct control words, listed by a state that uses
  // each one (word 0 is the all-zero word of the unused states).
  function automatic mc_ctrl_t nano_rom(input logic [K-1:0] n);
    case (n)
      4'd0:  return '0;
      4'd1:  return mc_state_ctrl(4'd0);
      4'd2:  return mc_state_ctrl(4'd1);
      4'd3:  return mc_state_ctrl(4'd2);   // also state 9
      4'd4:  return mc_state_ctrl(4'd3);
      4'd5:  return mc_state_ctrl(4'd4);
      4'd6:  return mc_state_ctrl(4'd5);
      4'd7:  return mc_state_ctrl(4'd6);
      4'd8:  return mc_state_ctrl(4'd7);
      4'd9:  return mc_state_ctrl(4'd10);
      4'd10: return mc_state_ctrl(4'd12);
      4'd11: return mc_state_ctrl(4'd13);
      4'd12: return mc_state_ctrl(4'd14);
      4'd13: return mc_state_ctrl(4'd15);
      default: return '0;
    endcase
  endfunction

  // Microprogram: per state, the nanoword number and the sequencing fields.
  function automatic vinsn_t micro_rom(input logic [3:0] a);
    vinsn_t v;
    case (a)
      4'd0:  v.nano_addr = 4'd1;
      4'd1:  v.nano_addr = 4'd2;
      4'd2:  v.nano_addr = 4'd3;
      4'd3:  v.nano_addr = 4'd4;
      4'd4:  v.nano_addr = 4'd5;
      4'd5:  v.nano_addr = 4'd6;
      4'd6:  v.nano_addr = 4'd7;
      4'd7:  v.nano_addr = 4'd8;
      4'd9:  v.nano_addr = 4'd3;
      4'd10: v.nano_addr = 4'd9;
      4'd12: v.nano_addr = 4'd10;
      4'd13: v.nano_addr = 4'd11;
      4'd14: v.nano_addr = 4'd12;
      4'd15: v.nano_addr = 4'd13;
      default: v.nano_addr = 4'd0;
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

  assign ctrl  = nano_rom(vinsn.nano_addr);
  assign state = upc;
endmodule
