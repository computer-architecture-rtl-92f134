// word_mem - word-addressed memory with a combinational read port and a
// clocked write port.
//
// Serves as instruction memory and data memory of the single-cycle
// processor and as the single instruction-and-data memory of the multi-cycle
// processor. Only 4-byte aligned words are accessed: byte address bits 1:0
// are ignored and the bits above the memory size wrap. Reading is
// continuous (rdata follows addr within the cycle); a write with we=1 takes
// effect at the rising clock edge. The load port (ld_en, ld_addr, ld_data)
// is a second write port used to place a program and data into the memory
// from outside; it wins over a processor write to the same cycle. The load
// port and the size of WORDS words are own choices.
// Contents are not reset.
module word_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] wdata,
  input  logic        ld_en,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_en)   mem[ld_addr[AW+1:2]] <= ld_data;
    else if (we) mem[addr[AW+1:2]]    <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
