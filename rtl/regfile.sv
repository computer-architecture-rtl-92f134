// regfile - 32 x 32-bit register file with two read ports and one write port.
//
// Read register 1/2 (rs, rt) give Register data 1/2 combinationally. When
// we (RegWrite) is 1, wd is written into register wa at the rising clock
// edge, so a value written by one instruction is seen by the next one.
// Register 0 always reads 0 and ignores writes, as in MIPS (own choice; the
// description only calls R0-R31 general-purpose). Synchronous active-low
// reset clears all registers.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [WIDTH-1:0]         wd
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
endmodule
