// tb_pc_bank: reset start addresses, writes to one task leave the others
// unchanged (compared with a model array).
module tb_pc_bank;
  import nmpra_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] tid = 0;
  word_t next_pc, pc;
  word_t model [16];
  int checks = 0, failures = 0;
  pc_bank dut (.*);
  always #5 clk = ~clk;
  initial begin
    fork begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      model[i] = i * 256; tid = 4'(i); #1; checks++;
      if (pc !== model[i]) begin failures++; $display("FAIL reset pc %0d = %h", i, pc); end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      tid = 4'($urandom); we = 1'($urandom); next_pc = $urandom;
      @(posedge clk); #1;
      if (we) model[tid] = next_pc;
      we = 0;
      for (int i = 0; i < 16; i++) begin
        tid = 4'(i); #0; checks++;
        if (pc !== model[i]) begin failures++; $display("FAIL pc %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
