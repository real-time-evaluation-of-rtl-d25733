// tb_instr_mem: load random words, read them back, and read 0 past the end.
module tb_instr_mem;
  import nmpra_pkg::*;
  logic clk = 0, we = 0;
  logic [9:0] waddr;
  word_t wdata, raddr, rdata;
  word_t model [1024];
  int checks = 0, failures = 0;
  instr_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    fork begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1024; i++) begin
      raddr = word_t'(i * 4); #1; checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    raddr = 32'h1000; #1; checks++;
    if (rdata !== 0) begin failures++; $display("FAIL out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
