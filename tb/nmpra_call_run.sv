// nmpra_call_run: runs the nested-call workload on one nmpra_mt_top built
// with NTASKS contexts and reports its own check counts.
//
// HT0 enables task 1 and MT mode, so both tasks interleave cycle by cycle.
// Each task calls a recursive function f(n) = n + f(n-1), f(0) = 0, that
// keeps its return address and argument in an 8-byte stack frame:
// HT0 computes f(5), six nested invocations (the nesting depth the
// architecture was evaluated with), task 1 computes f(4). Checked: both
// results (15 and 10), both stack pointers restored, deepest frame of HT0
// holding the right saved argument, and the cycle count.
`timescale 1ns/1ps
module nmpra_call_run
  import nmpra_pkg::*;
  import nmpra_asm_pkg::*;
#(
  parameter int NTASKS = 16
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int TW   = (NTASKS > 1) ? $clog2(NTASKS) : 1;
  localparam int BASE = 1024 / NTASKS;       // word index of task 1's code

  logic        rst_n = 1'b0, imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  word_t       imem_wdata = '0, gpio_out;
  logic [7:0]  ev_in = '0;
  logic [TW-1:0] cur_tid;
  logic        run, mt_en, dbg_stall, dbg_flush, dbg_fwd, dbg_retire, dbg_fault;
  logic [NTASKS-1:0] task_ready;

  nmpra_mt_top #(.NTASKS(NTASKS)) dut (
    .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata, .ev_in, .gpio_in(32'h0),
    .gpio_out, .cur_tid, .run, .task_ready, .mt_en,
    .dbg_stall, .dbg_flush, .dbg_fwd, .dbg_retire, .dbg_fault);

  word_t img [1024];

  // main program of one task followed by f at word b+16
  function automatic void put_task(int b, bit ht0, int sp, int n, int res);
    int k = b;
    if (ht0) begin
      img[k++] = lui_(1, 16'h8000);
      img[k++] = addi_(2, 0, 3);
      img[k++] = sw_(2, 16'h08, 1);          // TASK_EN = tasks 0, 1
      img[k++] = addi_(2, 0, 1);
      img[k++] = sw_(2, 16'h10, 1);          // MT_EN
    end
    img[k++] = addi_(29, 0, sp);
    img[k++] = addi_(4, 0, n);
    img[k++] = jal_(b + 16);
    img[k++] = sw_(2, res, 0);
    img[k++] = sw_(29, res + 4, 0);
    img[k]   = j_(k); k++;
    img[b+16] = addi_(29, 29, -8);            // f:
    img[b+17] = sw_(31, 0, 29);
    img[b+18] = sw_(4, 4, 29);
    img[b+19] = bne_(4, 0, 2);                // -> REC
    img[b+20] = addi_(2, 0, 0);
    img[b+21] = j_(b + 26);                   // -> RET
    img[b+22] = addi_(4, 4, -1);              // REC:
    img[b+23] = jal_(b + 16);
    img[b+24] = lw_(4, 4, 29);
    img[b+25] = add_(2, 2, 4);
    img[b+26] = lw_(31, 0, 29);               // RET:
    img[b+27] = addi_(29, 29, 8);
    img[b+28] = jr_(31);
    img[b+29] = nop_(); img[b+30] = nop_();
  endfunction

  int cycles;
  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL (NTASKS=%0d): %s", NTASKS, s); end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; cycles = 0;
    for (int i = 0; i < 1024; i++) img[i] = nop_();
    put_task(0, 1'b1, 16'h200, 5, 0);
    put_task(BASE, 1'b0, 16'h300, 4, 16);
    for (int i = 0; i < 1024; i++) begin
      dut.u_dmem.ht_mem[i] = '0;
      dut.u_dmem.st_mem[i] = '0;
    end
    wait (start);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = img[i];
    end
    @(negedge clk); imem_we = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    while (!(dut.u_dmem.ht_mem[1] == 32'h200 && dut.u_dmem.ht_mem[5] == 32'h300) && cycles < 5000) begin
      @(posedge clk); cycles++;
    end
    check(dut.u_dmem.ht_mem[0] == 15, $sformatf("HT0 f(5) = %0d", dut.u_dmem.ht_mem[0]));
    check(dut.u_dmem.ht_mem[1] == 32'h200, "HT0 stack pointer restored");
    check(dut.u_dmem.ht_mem[4] == 10, $sformatf("task 1 f(4) = %0d", dut.u_dmem.ht_mem[4]));
    check(dut.u_dmem.ht_mem[5] == 32'h300, "task 1 stack pointer restored");
    // sixth frame of HT0 lies 6*8 bytes below 0x200 and saved argument 0
    check(dut.u_dmem.ht_mem[(32'h200 - 48) / 4 + 1] == 0, "HT0 sixth frame holds n = 0");
    check(dut.u_dmem.ht_mem[(32'h200 - 40) / 4 + 1] == 1, "HT0 fifth frame holds n = 1");
    check(cycles < 5000, "workload finished");
    $display("NTASKS=%0d: both tasks done in %0d cycles", NTASKS, cycles);
    done = 1'b1;
  end
endmodule
