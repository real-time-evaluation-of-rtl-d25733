// tb_forward_unit: random register numbers and write flags; the selection
// is compared with the priority rule EX/MEM over MEM/WB, never register 0.
module tb_forward_unit;
  import nmpra_pkg::*;
  reg_idx_t ex_rs, ex_rt, exmem_dest, memwb_dest;
  logic exmem_reg_write, memwb_reg_write;
  fwd_e fwd_a, fwd_b;
  int checks = 0, failures = 0;
  forward_unit dut (.*);

  function automatic fwd_e expect_sel(reg_idx_t s);
    if (s != 0 && exmem_reg_write && exmem_dest == s) return FWD_EXMEM;
    if (s != 0 && memwb_reg_write && memwb_dest == s) return FWD_MEMWB;
    return FWD_NONE;
  endfunction

  initial begin
    fork begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 3000; i++) begin
      ex_rs = 5'($urandom % 4); ex_rt = 5'($urandom % 4);
      exmem_dest = 5'($urandom % 4); memwb_dest = 5'($urandom % 4);
      exmem_reg_write = 1'($urandom); memwb_reg_write = 1'($urandom);
      #1;
      checks += 2;
      if (fwd_a != expect_sel(ex_rs)) begin failures++; $display("FAIL a"); end
      if (fwd_b != expect_sel(ex_rt)) begin failures++; $display("FAIL b"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
