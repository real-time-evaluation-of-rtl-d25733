// tb_hazard_unit: load-use detection on random cases against a reference.
module tb_hazard_unit;
  import nmpra_pkg::*;
  logic idex_valid, idex_mem_read, ifid_valid, stall;
  reg_idx_t idex_dest, ifid_rs, ifid_rt;
  int checks = 0, failures = 0, hits = 0;
  hazard_unit dut (.*);
  initial begin
    fork begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 3000; i++) begin
      logic e;
      idex_valid = 1'($urandom); idex_mem_read = 1'($urandom); ifid_valid = 1'($urandom);
      idex_dest = 5'($urandom % 4); ifid_rs = 5'($urandom % 4); ifid_rt = 5'($urandom % 4);
      #1;
      e = idex_valid & idex_mem_read & ifid_valid & (idex_dest != 0) &
          ((idex_dest == ifid_rs) | (idex_dest == ifid_rt));
      hits += e;
      checks++;
      if (stall !== e) begin failures++; $display("FAIL case %0d", i); end
    end
    checks++; if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
