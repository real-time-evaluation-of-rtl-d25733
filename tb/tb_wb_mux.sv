// tb_wb_mux: every selection with random data.
module tb_wb_mux;
  import nmpra_pkg::*;
  wb_sel_e sel; word_t mem_rdata, periph_rdata, alu_res, y;
  int checks = 0, failures = 0;
  wb_mux dut (.*);
  initial begin
    fork begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 300; i++) begin
      mem_rdata = $urandom; periph_rdata = $urandom; alu_res = $urandom;
      sel = wb_sel_e'(i % 3);
      #1; checks++;
      if (y !== (sel == WB_MEM ? mem_rdata : sel == WB_PERIPH ? periph_rdata : alu_res)) begin
        failures++; $display("FAIL sel=%0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
