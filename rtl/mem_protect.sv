// mem_protect: spatial isolation check of the MEM stage.
//
// Combinational. Tasks 0..NHT-1 are hard threads (HT), the rest soft
// threads (ST). Rules, for one access of task tid:
//   * peripheral window (addr[31] = 1): always passed on; the nHSE itself
//     refuses configuration writes from tasks other than HT0.
//   * HT0 may read and write all memory.
//   * other HTs read anywhere but write only inside their window
//     [win_base, win_limit] (inclusive byte addresses) set by HT0.
//   * STs may not touch the HT memory, neither read nor write; they write
//     the common ST memory freely.
// A refused write is dropped and a refused read returns 0; fault flags
// either. The HT write window and HT0's privilege follow the nMPRA-MT description; the ST
// rules and the inclusive window form are this design's choice.
module mem_protect
  import nmpra_pkg::*;
#(
  parameter int NTASKS   = 16,
  parameter int NHT      = 8,
  parameter int HT_WORDS = 1024,
  localparam int TW = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic [TW-1:0] tid,
  input  word_t         addr,
  input  logic          re,
  input  logic          we,
  input  word_t         win_base,
  input  word_t         win_limit,
  output logic          periph,
  output logic          read_ok,
  output logic          write_ok,
  output logic          fault
);
  logic is_ht, in_ht_mem, in_win;

  assign periph    = addr[XLEN-1];
  assign is_ht     = int'(tid) < NHT;
  assign in_ht_mem = !periph && addr[XLEN-1:2] < HT_WORDS;
  assign in_win    = addr >= win_base && addr <= win_limit;

  always_comb begin
    read_ok  = 1'b1;
    write_ok = 1'b1;
    if (!periph && tid != '0) begin
      if (is_ht) begin
        write_ok = in_win;
      end else if (in_ht_mem) begin
        read_ok  = 1'b0;
        write_ok = 1'b0;
      end
    end
  end

  assign fault = (re && !read_ok) || (we && !write_ok);
endmodule
