// tb_mem_protect: random tasks, addresses and windows against the
// isolation rules (HT0 free, other HTs write only in their window, STs
// kept out of the HT memory, peripheral window passed on).
module tb_mem_protect;
  import nmpra_pkg::*;
  logic [3:0] tid;
  word_t addr, win_base, win_limit;
  logic re, we, periph, read_ok, write_ok, fault;
  int checks = 0, failures = 0;
  mem_protect dut (.*);
  initial begin
    fork begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 4000; i++) begin
      logic e_rok, e_wok;
      tid = 4'($urandom);
      case ($urandom % 3)
        0: addr = 32'h8000_0000 | ($urandom % 256);
        1: addr = ($urandom % 1024) * 4;
        default: addr = 4096 + ($urandom % 1024) * 4;
      endcase
      win_base = ($urandom % 2048) * 4; win_limit = win_base + ($urandom % 512) * 4;
      re = 1'($urandom); we = !re;
      #1;
      e_rok = 1; e_wok = 1;
      if (addr < 32'h8000_0000 && tid != 0) begin
        if (tid < 8) e_wok = (addr >= win_base) && (addr <= win_limit);
        else if (addr < 4096) begin e_rok = 0; e_wok = 0; end
      end
      checks += 4;
      if (read_ok !== e_rok)  begin failures++; $display("FAIL read_ok t%0d %h", tid, addr); end
      if (write_ok !== e_wok) begin failures++; $display("FAIL write_ok t%0d %h", tid, addr); end
      if (periph !== addr[31]) failures++;
      if (fault !== ((re && !e_rok) || (we && !e_wok))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
