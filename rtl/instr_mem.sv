// instr_mem: the instruction memory shared by all tasks.
//
// WORDS words of 32 bits. Read is combinational from the byte address
// raddr (word aligned; bits [1:0] ignored, addresses beyond the end read as
// 0, a NOP). A write port loads programs: on a rising edge with we set, word
// waddr takes wdata. The nMPRA-MT description only names this memory; its size
// and load port are this design's choice.
module instr_mem
  import nmpra_pkg::*;
#(
  parameter int WORDS = 1024,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  word_t         raddr,
  output word_t         rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    if (raddr[XLEN-1:2] < WORDS) rdata = mem[raddr[AW+1:2]];
    else                         rdata = '0;
  end
endmodule
