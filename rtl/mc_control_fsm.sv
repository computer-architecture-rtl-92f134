// mc_control_fsm - hard-wired controller of the multi-cycle processor.
//
// A Moore state machine: a 4-bit state register plus combinational logic
// that computes the datapath control signals from the state and the next
// state from the state, the opcode (IR[31:26]) and the ALU overflow flag.
// State numbers and the control values of states 2-7, 9, 10 and 12-14 are
// those of the state diagrams of the description:
//   0 fetch -> 1 decode/register fetch -> by opcode:
//     lw/sw: 2 address -> lw: 3 read -> 4 write rt;  sw: 5 write memory
//     R-type: 6 execute -> 7 write rd
//     addi:  9 execute -> 10 write rt
//     beq:   12 compare and branch;  j: 13 jump
//     unknown opcode: 14 undefined-instruction exception
//   every last state returns to 0.
// Own choices: the control values of states 0 and 1 (the classic ones that
// carry out "IR <- Mem[PC], PC <- PC+4" and "ALUOut <- PC + (imm << 2)"),
// state 15 for the overflow exception (outputs of state 14 with IntCause=1),
// and testing overflow at the end of states 6 and 9, so that an overflowing
// add/sub/addi goes to 15 and never writes its destination register. States
// 8 and 11 are unused and return to 0.
// Timing: ctrl and state change only at the rising clock edge; the next
// state depends combinationally on opcode and overflow. rst_n (active low,
// synchronous) enters state 0.
module mc_control_fsm
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] opcode,
  input  logic       overflow,
  output mc_ctrl_t   ctrl,
  output logic [3:0] state
);
  mc_state_t s, ns;

  always_ff @(posedge clk) begin
    if (!rst_n) s <= S_FETCH;
    else        s <= ns;
  end

  always_comb begin
    case (s)
      S_FETCH:  ns = S_DECODE;
      S_DECODE: begin
        case (opcode)
          OP_LW, OP_SW: ns = S_MEM_ADDR;
          OP_RTYPE:     ns = S_R_EXEC;
          OP_ADDI:      ns = S_ADDI_EXEC;
          OP_BEQ:       ns = S_BRANCH;
          OP_J:         ns = S_JUMP;
          default:      ns = S_UNDEF;
        endcase
      end
      S_MEM_ADDR:  ns = (opcode == OP_LW) ? S_MEM_READ : S_MEM_WRITE;
      S_MEM_READ:  ns = S_MEM_WB;
      S_R_EXEC:    ns = overflow ? S_OVF : S_R_WB;
      S_ADDI_EXEC: ns = overflow ? S_OVF : S_I_WB;
      default:     ns = S_FETCH;
    endcase
  end

  assign ctrl  = mc_state_ctrl(s);
  assign state = s;
endmodule
