// tb_word_mem - checks the word memory against a reference array: load-port
// writes, processor writes at the clock edge, combinational reads, the
// load port winning over a simultaneous write, ignored byte-offset bits and
// address wrap-around.
module tb_word_mem;
  localparam int WORDS = 64;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, ld_en = 0;
  logic [31:0] addr = 0, rdata, wdata = 0, ld_addr = 0, ld_data = 0;
  logic [31:0] ref_mem [WORDS];
  word_mem #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); ld_en = 1; ld_addr = 32'(i * 4); ld_data = $urandom; ref_mem[i] = ld_data;
    end
    @(negedge clk); ld_en = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      addr = $urandom; we = 1'($urandom); wdata = $urandom;
      ld_en = (n % 7 == 0); ld_addr = $urandom; ld_data = $urandom;
      #1;
      checks++; if (rdata !== ref_mem[addr[7:2]]) begin failures++; $display("read %h = %h exp %h", addr, rdata, ref_mem[addr[7:2]]); end
      @(posedge clk);
      if (ld_en) ref_mem[ld_addr[7:2]] = ld_data;
      else if (we) ref_mem[addr[7:2]] = wdata;
      #1;
      checks++; if (rdata !== ref_mem[addr[7:2]]) begin failures++; $display("after write %h = %h exp %h", addr, rdata, ref_mem[addr[7:2]]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
