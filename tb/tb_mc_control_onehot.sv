// tb_mc_control_onehot - checks the one-flip-flop-per-state multi-cycle
// controller.
// For random opcodes (all six instructions and undefined ones) and random
// ALU overflow, it walks the state machine from fetch back to fetch and
// compares the visited states with the paths of the state diagrams
// (lw 0-1-2-3-4, sw 0-1-2-5, R-type 0-1-6-7, addi 0-1-9-10, beq 0-1-12,
// j 0-1-13, undefined 0-1-14, overflow 0-1-6|9-15), which also checks the
// number of cycles per instruction, and compares the control signals of
// every state with the values listed for that state.
module tb_mc_control_onehot;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, overflow = 0;
  logic [5:0] opcode = 0;
  mc_ctrl_t ctrl; logic [3:0] state;
  int seen [16];

  mc_control_onehot dut (.*);
  always #5 clk = ~clk;

  // Control values per state; packed as in mc_ctrl_t:
  // pcw pcwc iord mrd mwr irw m2r pcsrc[2] aluop[2] srcb[2] srca rw rdst icause cwr epcw
  function automatic mc_ctrl_t expect_ctrl(input int s);
    mc_ctrl_t e; e = '0;
    case (s)
      0:  begin e.mem_read = 1; e.ir_write = 1; e.alu_src_b = 2'b01; e.pc_write = 1; end
      1:  begin e.alu_src_b = 2'b11; end
      2:  begin e.alu_src_a = 1; e.alu_src_b = 2'b10; e.alu_op = 2'b00; end
      3:  begin e.mem_read = 1; e.iord = 1; end
      4:  begin e.reg_write = 1; e.mem_to_reg = 1; e.reg_dst = 0; end
      5:  begin e.mem_write = 1; e.iord = 1; end
      6:  begin e.alu_src_a = 1; e.alu_src_b = 2'b00; e.alu_op = 2'b10; end
      7:  begin e.reg_dst = 1; e.mem_to_reg = 0; e.reg_write = 1; end
      9:  begin e.alu_src_a = 1; e.alu_src_b = 2'b10; e.alu_op = 2'b00; end
      10: begin e.reg_dst = 0; e.mem_to_reg = 0; e.reg_write = 1; end
      12: begin e.alu_src_a = 1; e.alu_src_b = 2'b00; e.alu_op = 2'b01; e.pc_write_cond = 1; e.pc_source = 2'b01; end
      13: begin e.pc_write = 1; e.pc_source = 2'b10; end
      14, 15: begin e.alu_src_a = 0; e.alu_src_b = 2'b01; e.alu_op = 2'b01; e.int_cause = (s == 15);
                e.cause_write = 1; e.pc_source = 2'b11; e.epc_write = 1; e.pc_write = 1; end
      default: ;
    endcase
    return e;
  endfunction

  initial begin
    logic [5:0] ops [8] = '{6'h23, 6'h2B, 6'h00, 6'h08, 6'h04, 6'h02, 6'h3F, 6'h11};
    int path [$];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic ovf_now;
      #1;
      opcode = ops[$urandom_range(7)];
      ovf_now = 1'($urandom);
      // expected path
      path = '{0, 1};
      case (opcode)
        6'h23: path = '{0, 1, 2, 3, 4};
        6'h2B: path = '{0, 1, 2, 5};
        6'h00: path = ovf_now ? '{0, 1, 6, 15} : '{0, 1, 6, 7};
        6'h08: path = ovf_now ? '{0, 1, 9, 15} : '{0, 1, 9, 10};
        6'h04: path = '{0, 1, 12};
        6'h02: path = '{0, 1, 13};
        default: path = '{0, 1, 14};
      endcase
      foreach (path[k]) begin
        // overflow is only meaningful in execute states; elsewhere random
        #1;
        overflow = (path[k] == 6 || path[k] == 9) ? ovf_now : 1'($urandom);
        checks++;
        if (state !== 4'(path[k])) begin failures++; $display("op=%h step %0d state=%0d exp %0d", opcode, k, state, path[k]); end
        checks++;
        if (ctrl !== expect_ctrl(path[k])) begin failures++; $display("state %0d ctrl=%b exp %b", path[k], ctrl, expect_ctrl(path[k])); end
        seen[path[k]]++;
        @(posedge clk);
      end
    end
    foreach (seen[s]) if (!(s inside {8, 11})) begin
      checks++; if (seen[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
