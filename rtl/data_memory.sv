// data_memory: the data memory of the processor.
//
// Two physical arrays: HT_WORDS words that belong to the hard threads and
// ST_WORDS words shared by the soft threads, so HT accesses never compete
// with ST data. Byte addresses [0, HT_WORDS*4) select the HT memory and the
// next ST_WORDS*4 bytes the ST memory; other addresses read 0 and ignore
// writes. Read is combinational (the load result is ready in the MEM stage);
// a write happens on the rising edge when we is set. Accesses are whole
// aligned words. The split into HT and common ST memory follows the nMPRA-MT description;
// sizes and address map are this design's choice.
module data_memory
  import nmpra_pkg::*;
#(
  parameter int HT_WORDS = 1024,
  parameter int ST_WORDS = 1024
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata
);
  localparam int HAW = $clog2(HT_WORDS);
  localparam int SAW = $clog2(ST_WORDS);

  word_t ht_mem [HT_WORDS];
  word_t st_mem [ST_WORDS];

  logic [XLEN-3:0] widx;
  logic [XLEN-3:0] sidx;
  logic            in_ht, in_st;

  assign widx  = addr[XLEN-1:2];
  assign sidx  = widx - (XLEN-2)'(HT_WORDS);
  assign in_ht = widx < HT_WORDS;
  assign in_st = !in_ht && sidx < ST_WORDS;

  always_ff @(posedge clk) begin
    if (we && in_ht) ht_mem[widx[HAW-1:0]] <= wdata;
    if (we && in_st) st_mem[sidx[SAW-1:0]] <= wdata;
  end

  always_comb begin
    if (in_ht)      rdata = ht_mem[widx[HAW-1:0]];
    else if (in_st) rdata = st_mem[sidx[SAW-1:0]];
    else            rdata = '0;
  end
endmodule
