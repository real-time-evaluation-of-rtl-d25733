// regfile_bank: general purpose registers with one bank per task.
//
// NTASKS banks of 32 registers of 32 bits; register 0 reads as 0. Two
// combinational read ports address bank rtid. One write port writes
// register wa of bank wtid on the rising edge when we is set. A write and a
// read of the same register of the same bank in one cycle return the new
// value (write-through), so an instruction in ID sees the result that WB
// retires in that cycle. The storage itself is a plain memory without
// reset; a reset-cleared valid bit per register makes every register read
// as 0 until it is first written, which keeps reset behaviour defined.
module regfile_bank
  import nmpra_pkg::*;
#(
  parameter int NTASKS = 16,
  localparam int TW = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] rtid,
  input  reg_idx_t      ra1,
  input  reg_idx_t      ra2,
  output word_t         rd1,
  output word_t         rd2,
  input  logic          we,
  input  logic [TW-1:0] wtid,
  input  reg_idx_t      wa,
  input  word_t         wd
);
  localparam int DEPTH = NTASKS * NREG;

  word_t             regs    [DEPTH];
  logic [DEPTH-1:0]  written;

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[{wtid, wa}] <= wd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                written <= '0;
    else if (we && wa != '0)   written[{wtid, wa}] <= 1'b1;
  end

  function automatic word_t rd(reg_idx_t a);
    if (a == '0)                            return '0;
    if (we && wtid == rtid && wa == a)      return wd;
    if (!written[{rtid, a}])                return '0;
    return regs[{rtid, a}];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);
endmodule
