// pc_bank: the replicated program counter, one PC per task.
//
// pc is the PC of task tid (combinational read). On a rising edge with we
// set, the PC of task tid takes next_pc; the other tasks' PCs are untouched,
// so a task that is switched out resumes at exactly the instruction it would
// have fetched. After reset task i starts at i*STRIDE_BYTES, giving every
// task its own slice of the instruction memory (this design's choice; the
// architecture does not give start addresses).
module pc_bank
  import nmpra_pkg::*;
#(
  parameter int NTASKS       = 16,
  parameter int STRIDE_BYTES = 256,
  localparam int TW = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] tid,
  input  logic          we,
  input  word_t         next_pc,
  output word_t         pc
);
  word_t pcs [NTASKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTASKS; i++) pcs[i] <= word_t'(i * STRIDE_BYTES);
    end else if (we) begin
      pcs[tid] <= next_pc;
    end
  end

  assign pc = pcs[tid];
endmodule
