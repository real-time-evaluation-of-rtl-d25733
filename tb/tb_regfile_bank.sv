// tb_regfile_bank: random writes to random banks against a model; checks
// register 0, reads of 0 after reset, bank isolation and write-through.
module tb_regfile_bank;
  import nmpra_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] rtid, wtid;
  reg_idx_t ra1, ra2, wa;
  word_t rd1, rd2, wd;
  word_t model [16][32];
  int checks = 0, failures = 0;
  regfile_bank dut (.*);
  always #5 clk = ~clk;
  initial begin
    fork begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int t = 0; t < 16; t++) for (int r = 0; r < 32; r++) model[t][r] = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wtid = 4'($urandom % 3); wa = 5'($urandom % 8); wd = $urandom;
      rtid = 4'($urandom % 3); ra1 = 5'($urandom % 8); ra2 = wa;
      #1;
      checks += 2;
      if (rd1 !== ((we && wtid == rtid && wa == ra1 && ra1 != 0) ? wd : model[rtid][ra1])) begin
        failures++; $display("FAIL rd1 t%0d r%0d", rtid, ra1);
      end
      if (rd2 !== ((we && wtid == rtid && ra2 != 0) ? wd : model[rtid][ra2])) begin
        failures++; $display("FAIL rd2 t%0d r%0d", rtid, ra2);
      end
      @(posedge clk);
      if (we && wa != 0) model[wtid][wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
