// mips_top - the simplified MIPS processors side by side.
//
// Seven independent processors share only the clock and reset:
//   sc_* : the single-cycle processor (sc_cpu) with the logic-based
//          controller, its own instruction memory and data memory
//          (Harvard organisation);
//   sr_* : the same single-cycle processor with the ROM-based controller;
//   mh_* : the multi-cycle processor (mc_cpu) with the hard-wired
//          state-machine controller and one unified memory;
//   mo_* : the multi-cycle processor with the hard-wired one-flip-flop-per-
//          state controller and one unified memory;
//   mu_* : the multi-cycle processor with the microprogrammed controller
//          (horizontal microinstructions) and one unified memory;
//   mv_* : the multi-cycle processor with the vertical-microinstruction
//          controller and one unified memory;
//   mn_* : the multi-cycle processor with the nano-programmed controller
//          and one unified memory.
// Each memory has a load port (*_ld_en/_ld_addr/_ld_data) to write a
// program and data while the processors are held in reset (rst_n = 0) or
// at any time. Program counter, controller state and the exception
// registers are brought out for observation. Memory sizes are parameters;
// their defaults are own choices.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned SC_IMEM_WORDS = 256,
  parameter int unsigned SC_DMEM_WORDS = 256,
  parameter int unsigned MC_MEM_WORDS  = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // single-cycle processor
  input  logic        sc_imem_ld_en,
  input  logic [31:0] sc_imem_ld_addr,
  input  logic [31:0] sc_imem_ld_data,
  input  logic        sc_dmem_ld_en,
  input  logic [31:0] sc_dmem_ld_addr,
  input  logic [31:0] sc_dmem_ld_data,
  output logic [31:0] sc_pc,
  // single-cycle processor, ROM-based controller
  input  logic        sr_imem_ld_en,
  input  logic [31:0] sr_imem_ld_addr,
  input  logic [31:0] sr_imem_ld_data,
  input  logic        sr_dmem_ld_en,
  input  logic [31:0] sr_dmem_ld_addr,
  input  logic [31:0] sr_dmem_ld_data,
  output logic [31:0] sr_pc,
  // multi-cycle processor, hard-wired controller
  input  logic        mh_ld_en,
  input  logic [31:0] mh_ld_addr,
  input  logic [31:0] mh_ld_data,
  output logic [31:0] mh_pc,
  output logic [3:0]  mh_state,
  output logic [31:0] mh_epc,
  output logic [31:0] mh_cause,
  // multi-cycle processor, one flip-flop per state
  input  logic        mo_ld_en,
  input  logic [31:0] mo_ld_addr,
  input  logic [31:0] mo_ld_data,
  output logic [31:0] mo_pc,
  output logic [3:0]  mo_state,
  output logic [31:0] mo_epc,
  output logic [31:0] mo_cause,
  // multi-cycle processor, microprogrammed controller
  input  logic        mu_ld_en,
  input  logic [31:0] mu_ld_addr,
  input  logic [31:0] mu_ld_data,
  output logic [31:0] mu_pc,
  output logic [3:0]  mu_state,
  output logic [31:0] mu_epc,
  output logic [31:0] mu_cause,
  // multi-cycle processor, vertical microinstructions
  input  logic        mv_ld_en,
  input  logic [31:0] mv_ld_addr,
  input  logic [31:0] mv_ld_data,
  output logic [31:0] mv_pc,
  output logic [3:0]  mv_state,
  output logic [31:0] mv_epc,
  output logic [31:0] mv_cause,
  // multi-cycle processor, nano-programmed controller
  input  logic        mn_ld_en,
  input  logic [31:0] mn_ld_addr,
  input  logic [31:0] mn_ld_data,
  output logic [31:0] mn_pc,
  output logic [3:0]  mn_state,
  output logic [31:0] mn_epc,
  output logic [31:0] mn_cause
);
  // ---- single-cycle ----
  logic [31:0] sc_iaddr, sc_insn, sc_daddr, sc_drdata, sc_dwdata;
  logic        sc_dwe;

  sc_cpu #(.ROM_CTRL(1'b0)) u_sc (
    .clk(clk), .rst_n(rst_n),
    .imem_addr(sc_iaddr), .imem_rdata(sc_insn),
    .dmem_addr(sc_daddr), .dmem_rdata(sc_drdata), .dmem_we(sc_dwe), .dmem_wdata(sc_dwdata),
    .pc(sc_pc)
  );

  word_mem #(.WORDS(SC_IMEM_WORDS)) u_sc_imem (
    .clk(clk), .addr(sc_iaddr), .rdata(sc_insn), .we(1'b0), .wdata(32'd0),
    .ld_en(sc_imem_ld_en), .ld_addr(sc_imem_ld_addr), .ld_data(sc_imem_ld_data)
  );

  word_mem #(.WORDS(SC_DMEM_WORDS)) u_sc_dmem (
    .clk(clk), .addr(sc_daddr), .rdata(sc_drdata), .we(sc_dwe), .wdata(sc_dwdata),
    .ld_en(sc_dmem_ld_en), .ld_addr(sc_dmem_ld_addr), .ld_data(sc_dmem_ld_data)
  );

  // ---- single-cycle, ROM-based control ----
  logic [31:0] sr_iaddr, sr_insn, sr_daddr, sr_drdata, sr_dwdata;
  logic        sr_dwe;

  sc_cpu #(.ROM_CTRL(1'b1)) u_sr (
    .clk(clk), .rst_n(rst_n),
    .imem_addr(sr_iaddr), .imem_rdata(sr_insn),
    .dmem_addr(sr_daddr), .dmem_rdata(sr_drdata), .dmem_we(sr_dwe), .dmem_wdata(sr_dwdata),
    .pc(sr_pc)
  );

  word_mem #(.WORDS(SC_IMEM_WORDS)) u_sr_imem (
    .clk(clk), .addr(sr_iaddr), .rdata(sr_insn), .we(1'b0), .wdata(32'd0),
    .ld_en(sr_imem_ld_en), .ld_addr(sr_imem_ld_addr), .ld_data(sr_imem_ld_data)
  );

  word_mem #(.WORDS(SC_DMEM_WORDS)) u_sr_dmem (
    .clk(clk), .addr(sr_daddr), .rdata(sr_drdata), .we(sr_dwe), .wdata(sr_dwdata),
    .ld_en(sr_dmem_ld_en), .ld_addr(sr_dmem_ld_addr), .ld_data(sr_dmem_ld_data)
  );

  // ---- multi-cycle, hard-wired control ----
  logic [31:0] mh_addr, mh_rdata, mh_wdata;
  logic        mh_we;

  mc_cpu #(.CTRL(CTRL_FSM)) u_mh (
    .clk(clk), .rst_n(rst_n),
    .mem_addr(mh_addr), .mem_rdata(mh_rdata), .mem_we(mh_we), .mem_wdata(mh_wdata),
    .pc(mh_pc), .state(mh_state), .epc(mh_epc), .cause(mh_cause)
  );

  word_mem #(.WORDS(MC_MEM_WORDS)) u_mh_mem (
    .clk(clk), .addr(mh_addr), .rdata(mh_rdata), .we(mh_we), .wdata(mh_wdata),
    .ld_en(mh_ld_en), .ld_addr(mh_ld_addr), .ld_data(mh_ld_data)
  );

  // ---- multi-cycle, one flip-flop per state ----
  logic [31:0] mo_addr, mo_rdata, mo_wdata;
  logic        mo_we;

  mc_cpu #(.CTRL(CTRL_ONEHOT)) u_mo (
    .clk(clk), .rst_n(rst_n),
    .mem_addr(mo_addr), .mem_rdata(mo_rdata), .mem_we(mo_we), .mem_wdata(mo_wdata),
    .pc(mo_pc), .state(mo_state), .epc(mo_epc), .cause(mo_cause)
  );

  word_mem #(.WORDS(MC_MEM_WORDS)) u_mo_mem (
    .clk(clk), .addr(mo_addr), .rdata(mo_rdata), .we(mo_we), .wdata(mo_wdata),
    .ld_en(mo_ld_en), .ld_addr(mo_ld_addr), .ld_data(mo_ld_data)
  );

  // ---- multi-cycle, microprogrammed control ----
  logic [31:0] mu_addr, mu_rdata, mu_wdata;
  logic        mu_we;

  mc_cpu #(.CTRL(CTRL_MICRO)) u_mu (
    .clk(clk), .rst_n(rst_n),
    .mem_addr(mu_addr), .mem_rdata(mu_rdata), .mem_we(mu_we), .mem_wdata(mu_wdata),
    .pc(mu_pc), .state(mu_state), .epc(mu_epc), .cause(mu_cause)
  );

  word_mem #(.WORDS(MC_MEM_WORDS)) u_mu_mem (
    .clk(clk), .addr(mu_addr), .rdata(mu_rdata), .we(mu_we), .wdata(mu_wdata),
    .ld_en(mu_ld_en), .ld_addr(mu_ld_addr), .ld_data(mu_ld_data)
  );

  // ---- multi-cycle, vertical microinstructions ----
  logic [31:0] mv_addr, mv_rdata, mv_wdata;
  logic        mv_we;

  mc_cpu #(.CTRL(CTRL_VERT)) u_mv (
    .clk(clk), .rst_n(rst_n),
    .mem_addr(mv_addr), .mem_rdata(mv_rdata), .mem_we(mv_we), .mem_wdata(mv_wdata),
    .pc(mv_pc), .state(mv_state), .epc(mv_epc), .cause(mv_cause)
  );

  word_mem #(.WORDS(MC_MEM_WORDS)) u_mv_mem (
    .clk(clk), .addr(mv_addr), .rdata(mv_rdata), .we(mv_we), .wdata(mv_wdata),
    .ld_en(mv_ld_en), .ld_addr(mv_ld_addr), .ld_data(mv_ld_data)
  );

  // ---- multi-cycle, nano-programmed control ----
  logic [31:0] mn_addr, mn_rdata, mn_wdata;
  logic        mn_we;

  mc_cpu #(.CTRL(CTRL_NANO)) u_mn (
    .clk(clk), .rst_n(rst_n),
    .mem_addr(mn_addr), .mem_rdata(mn_rdata), .mem_we(mn_we), .mem_wdata(mn_wdata),
    .pc(mn_pc), .state(mn_state), .epc(mn_epc), .cause(mn_cause)
  );

  word_mem #(.WORDS(MC_MEM_WORDS)) u_mn_mem (
    .clk(clk), .addr(mn_addr), .rdata(mn_rdata), .we(mn_we), .wdata(mn_wdata),
    .ld_en(mn_ld_en), .ld_addr(mn_ld_addr), .ld_data(mn_ld_data)
  );
endmodule
