// tb_nmpra_mt_top: end-to-end test of the nMPRA-MT processor at its default
// size (16 tasks, 8 of them hard threads).
//
// Three tasks run real programs loaded into the instruction memory:
//   HT0 (task 0)  configures the nHSE (write window of task 1, TASK_EN),
//                 sums 1..10 in a loop (branches, forwarding), does a
//                 load-use pair (stall), a call/return (jal/jr), reads
//                 GPIO_IN, then waits four times for event 0 and writes an
//                 event count to GPIO_OUT after each, switches on MT mode,
//                 waits for event 1 and finally records the FAULT register.
//   task 1 (HT)   writes inside and outside its window, then counts.
//   task 8 (ST)   writes the common memory, tries the HT memory and a
//                 configuration register, then counts.
// Checked: memory results computed by hand, refused accesses, fault bits,
// a constant event-to-GPIO latency in cycles (no jitter), and that every
// mechanism (stall, flush, forwarding, preemption, wait/wake, MT
// interleave, protection fault, peripheral read) happened.
`timescale 1ns/1ps
module tb_nmpra_mt_top;
  import nmpra_pkg::*;
  import nmpra_asm_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  word_t       imem_wdata = '0;
  logic [7:0]  ev_in = '0;
  word_t       gpio_in = 32'hCAFE_1234;
  word_t       gpio_out;
  logic [3:0]  cur_tid;
  logic        run, mt_en;
  logic [15:0] task_ready;
  logic        dbg_stall, dbg_flush, dbg_fwd, dbg_retire, dbg_fault;

  nmpra_mt_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- program image ----------------
  word_t img [1024];
  initial begin
    for (int i = 0; i < 1024; i++) img[i] = nop_();
    // HT0 at word 0
    img[0]  = lui_(1, 16'h8000);
    img[1]  = addi_(2, 0, 16'h100);
    img[2]  = sw_(2, 16'h88, 1);        // WIN_BASE[1]
    img[3]  = addi_(2, 0, 16'h1FF);
    img[4]  = sw_(2, 16'h8C, 1);        // WIN_LIMIT[1]
    img[5]  = addi_(2, 0, 16'h103);
    img[6]  = sw_(2, 16'h08, 1);        // TASK_EN = tasks 0,1,8
    img[7]  = addi_(3, 0, 10);
    img[8]  = addi_(4, 0, 0);
    img[9]  = add_(4, 4, 3);            // L:
    img[10] = addi_(3, 3, -1);
    img[11] = bne_(3, 0, -3);           // -> L
    img[12] = sw_(4, 0, 0);
    img[13] = lw_(5, 0, 0);
    img[14] = addi_(6, 5, 1);           // load-use
    img[15] = sw_(6, 4, 0);
    img[16] = jal_(48);
    img[17] = sw_(7, 8, 0);
    img[18] = lw_(8, 16'h04, 1);        // GPIO_IN
    img[19] = sw_(8, 12, 0);
    img[20] = addi_(9, 0, 0);
    img[21] = addi_(10, 0, 4);
    img[22] = addi_(2, 0, 1);           // E:
    img[23] = sw_(2, 16'h0C, 1);        // WAIT ev0
    img[24] = addi_(9, 9, 1);
    img[25] = sw_(9, 16'h00, 1);        // GPIO_OUT = count
    img[26] = bne_(9, 10, -5);          // -> E
    img[27] = addi_(2, 0, 1);
    img[28] = sw_(2, 16'h10, 1);        // MT_EN = 1
    img[29] = addi_(2, 0, 2);
    img[30] = sw_(2, 16'h0C, 1);        // WAIT ev1
    img[31] = addi_(2, 0, 16'hAA);
    img[32] = sw_(2, 16'h00, 1);        // GPIO_OUT = 0xAA
    img[33] = lw_(11, 16'h18, 1);       // FAULT
    img[34] = sw_(11, 20, 0);
    img[35] = j_(35);
    img[48] = addi_(7, 0, 77);          // F:
    img[49] = jr_(31);
    // task 1 (HT) at word 64
    img[64] = addi_(2, 0, 16'h11);
    img[65] = sw_(2, 16'h100, 0);       // inside window
    img[66] = sw_(2, 16'h200, 0);       // outside window: refused
    img[67] = addi_(3, 0, 0);
    img[68] = addi_(3, 3, 1);           // L:
    img[69] = sw_(3, 16'h104, 0);
    img[70] = j_(68);
    // task 8 (ST) at word 512
    img[512] = addi_(2, 0, 16'h88);
    img[513] = sw_(2, 16'h1000, 0);     // common ST memory
    img[514] = sw_(2, 16'h10, 0);       // HT memory: refused
    img[515] = lw_(4, 16'h100, 0);      // HT memory read: refused, 0
    img[516] = sw_(4, 16'h1004, 0);
    img[517] = lui_(1, 16'h8000);
    img[518] = addi_(5, 0, 16'h7FFF);
    img[519] = sw_(5, 16'h08, 1);       // TASK_EN: not HT0, ignored
    img[520] = addi_(3, 0, 0);
    img[521] = addi_(3, 3, 1);          // L:
    img[522] = sw_(3, 16'h1008, 0);
    img[523] = j_(521);
  end

  // ---------------- mechanism counters ----------------
  int n_stall, n_flush, n_fwd, n_switch, n_mt, n_fault, n_wake, n_retire;
  int n_periph_rd, n_task8;
  logic [3:0] prev_tid;
  logic       prev_ready0;
  longint     cyc;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dbg_stall)  n_stall++;
    if (dbg_flush)  n_flush++;
    if (dbg_fwd)    n_fwd++;
    if (dbg_fault)  n_fault++;
    if (dbg_retire) n_retire++;
    if (run && cur_tid != prev_tid) n_switch++;
    if (run && mt_en && cur_tid != prev_tid && cur_tid != 0 && prev_tid != 0) n_mt++;
    if (run && cur_tid == 8) n_task8++;
    if (task_ready[0] && !prev_ready0) n_wake++;
    if (run && dut.exmem_q.valid && dut.exmem_q.mem_read && dut.periph) n_periph_rd++;
    prev_tid    <= cur_tid;
    prev_ready0 <= task_ready[0];
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int lat [4];
  realtime t_ev;
  initial begin
    cyc = 0; prev_tid = 0; prev_ready0 = 1;
    for (int i = 0; i < 1024; i++) begin
      dut.u_dmem.ht_mem[i] = '0;
      dut.u_dmem.st_mem[i] = '0;
    end
    // load while in reset
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = img[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // four event-0 waits: measure event -> GPIO latency from different phases
    for (int k = 0; k < 4; k++) begin
      int c0;
      wait (task_ready[0] == 1'b0);
      repeat (20 + 7 * k) @(posedge clk);
      #(3 + 4 * k);                        // event at varying phase
      ev_in[0] = 1'b1;
      c0 = 0;
      @(negedge clk);                      // the edge that samples it
      fork
        begin #5 ev_in[0] = 1'b0; end
      join_none
      while (gpio_out != word_t'(k + 1)) begin
        @(negedge clk); c0++;
        if (c0 > 100) break;
      end
      lat[k] = c0;
    end
    for (int k = 1; k < 4; k++)
      check(lat[k] == lat[0], $sformatf("event latency %0d vs %0d cycles", lat[k], lat[0]));
    $display("event-to-GPIO latency: %0d cycles after the sampling edge", lat[0]);

    // HT0 now waits for event 1 in MT mode: tasks 1 and 8 interleave
    wait (task_ready[0] == 1'b0);
    repeat (200) @(posedge clk);
    #5 ev_in[1] = 1'b1;
    @(negedge clk);
    #5 ev_in[1] = 1'b0;
    wait (gpio_out == 32'hAA);
    repeat (50) @(posedge clk);

    // ---------------- results ----------------
    check(dut.u_dmem.ht_mem[0] == 55, "sum 1..10");
    check(dut.u_dmem.ht_mem[1] == 56, "load-use result");
    check(dut.u_dmem.ht_mem[2] == 77, "call/return");
    check(dut.u_dmem.ht_mem[3] == 32'hCAFE_1234, "GPIO_IN read");
    check(dut.u_dmem.ht_mem[5] == 32'h0000_0102, $sformatf("FAULT reg %h", dut.u_dmem.ht_mem[5]));
    check(dut.u_dmem.ht_mem[64] == 32'h11, "task 1 write inside window");
    check(dut.u_dmem.ht_mem[128] == 0, "task 1 write outside window refused");
    check(dut.u_dmem.ht_mem[65] > 0, "task 1 counter ran");
    check(dut.u_dmem.st_mem[0] == 32'h88, "task 8 common memory write");
    check(dut.u_dmem.ht_mem[4] == 0, "task 8 HT memory write refused");
    check(dut.u_dmem.st_mem[1] == 0, "task 8 HT memory read refused");
    check(dut.u_dmem.st_mem[2] > 0, "task 8 counter ran");
    check(dut.u_nhse.en_q == 16'h0103, "TASK_EN unchanged by task 8");
    check(mt_en == 1'b1, "MT mode on");

    // every mechanism must have happened
    check(n_stall > 0,     "load-use stall seen");
    check(n_flush > 0,     "branch flush seen");
    check(n_fwd > 0,       "forwarding seen");
    check(n_switch > 0,    "task switch seen");
    check(n_mt > 0,        "MT interleave seen");
    check(n_fault >= 3,    "protection faults seen");
    check(n_wake >= 5,     "wake-ups seen");
    check(n_periph_rd > 0, "peripheral read seen");
    check(n_task8 > 0,     "soft thread ran");
    $display("stall=%0d flush=%0d fwd=%0d switch=%0d mt=%0d fault=%0d wake=%0d periph_rd=%0d retired=%0d cycles=%0d",
             n_stall, n_flush, n_fwd, n_switch, n_mt, n_fault, n_wake, n_periph_rd, n_retire, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
