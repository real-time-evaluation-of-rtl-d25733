// tb_data_memory: writes to both the HT and the ST memory through the
// byte address map, read-back against a model, out-of-range reads 0.
module tb_data_memory;
  import nmpra_pkg::*;
  logic clk = 0, we = 0;
  word_t addr, wdata, rdata;
  word_t model [2048];
  int checks = 0, failures = 0;
  data_memory dut (.*);
  always #5 clk = ~clk;
  initial begin
    fork begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); we = 1; addr = word_t'(i * 4); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 1; addr = 32'h2000; wdata = 32'hDEAD;   // out of range: ignored
    @(negedge clk); we = 0;
    for (int i = 0; i < 2048; i++) begin
      addr = word_t'(i * 4); #1; checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    checks += 2;
    if (dut.ht_mem[3] !== model[3] || dut.st_mem[3] !== model[1024 + 3]) failures++;
    addr = 32'h2000; #1;
    if (rdata !== 0) begin failures++; $display("FAIL out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
