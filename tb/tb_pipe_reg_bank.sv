// tb_pipe_reg_bank: an ID/EX-type bank; random writes to random task
// copies against a model, all copies cleared (bubbles) after reset.
module tb_pipe_reg_bank;
  import nmpra_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] tid = 0;
  exmem_t d, q;
  exmem_t model [16];
  int checks = 0, failures = 0;
  pipe_reg_bank #(.T(exmem_t), .NTASKS(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    fork begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      model[i] = '0; tid = 4'(i); #1; checks++;
      if (q !== '0) begin failures++; $display("FAIL reset copy %0d", i); end
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      tid = 4'($urandom); we = 1'($urandom);
      d = '{valid: 1'($urandom), alu_res: $urandom, store_data: $urandom, dest: 5'($urandom),
            reg_write: 1'($urandom), mem_read: 1'($urandom), mem_write: 1'($urandom)};
      @(posedge clk); #1;
      if (we) model[tid] = d;
      we = 0;
      for (int i = 0; i < 16; i++) begin
        tid = 4'(i); #0; checks++;
        if (q !== model[i]) begin failures++; $display("FAIL copy %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
