// pipe_reg_bank: a replicated pipeline register, one copy per task.
//
// Holds NTASKS values of type T (a packed pipeline-register struct). q is
// the copy of task tid (combinational). On a rising edge with we set the
// copy of task tid takes d; the copies of all other tasks keep their
// contents, so the instructions a preempted task had in flight wait in its
// own copies and continue when it is scheduled again. Reset clears every
// copy, which makes each one a bubble (valid = 0).
module pipe_reg_bank #(
  parameter type T      = logic [31:0],
  parameter int  NTASKS = 16,
  localparam int TW = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] tid,
  input  logic          we,
  input  T              d,
  output T              q
);
  T bank [NTASKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTASKS; i++) bank[i] <= '0;
    end else if (we) begin
      bank[tid] <= d;
    end
  end

  assign q = bank[tid];
endmodule
