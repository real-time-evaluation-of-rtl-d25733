// tb_nhse: drives the nHSE register window the way the MEM stage does and
// checks the schedule it produces on the falling edge: HT0 alone after
// reset, privileged writes only from HT0, fixed priority, wait/wake on
// events with event consumption, wake-up delay of one falling edge, MT
// alternation of the two best ready tasks, fault capture and windows.
module tb_nhse;
  import nmpra_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] ev_in = 0;
  word_t gpio_in = 32'h1234_5678, bus_wdata = 0, bus_rdata, win_base, win_limit, gpio_out;
  logic bus_we = 0, bus_fault = 0, run, mt_en;
  logic [7:0] bus_addr = 0;
  logic [3:0] bus_tid = 0, tid;
  logic [15:0] task_ready;
  int checks = 0, failures = 0;
  nhse dut (.*);
  always #10 clk = ~clk;

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (tid=%0d)", s, tid); end
  endtask

  // one MEM-stage write by task t; after it the falling edge has applied it
  task automatic wr(logic [3:0] t, logic [7:0] a, word_t d);
    @(posedge clk); #2;
    bus_we = 1; bus_tid = t; bus_addr = a; bus_wdata = d;
    @(posedge clk); #2;
    bus_we = 0;
    @(negedge clk); #1;
  endtask

  initial begin
    fork begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    #25 rst_n = 1;
    repeat (2) @(negedge clk); #1;
    check(tid == 0 && run && task_ready == 16'h0001, "only HT0 after reset");

    wr(3, REG_TASK_EN, 32'hFFFF);               // not HT0: ignored
    check(task_ready == 16'h0001, "TASK_EN write by task 3 ignored");
    wr(0, REG_TASK_EN, 32'h0106);               // bit 0 forced on
    check(task_ready == 16'h0107, "TASK_EN by HT0");
    check(tid == 0, "HT0 has priority");

    wr(0, REG_WAIT, 32'h1);                     // HT0 waits for event 0
    check(tid == 1 && run, "task 1 runs while HT0 waits");
    wr(1, REG_WAIT, 32'h2);                     // task 1 waits for event 1
    check(tid == 2, "task 2 next by priority");
    wr(2, REG_WAIT, 32'h2);
    check(tid == 8, "task 8 (ST) runs last");
    wr(8, REG_WAIT, 32'h4);
    check(!run, "no task ready: run low");

    // event 1 wakes tasks 1 and 2 at the first falling edge that sees it
    @(posedge clk); #3 ev_in = 8'h02;
    @(negedge clk); #1;
    check(tid == 1 && run, "event 1 wakes task 1 at the sampling edge");
    check(task_ready == 16'h0006, "tasks 1 and 2 woken, 0 and 8 still waiting");
    ev_in = 0;
    @(negedge clk); #1;
    check(dut.pend_q == 0, "event consumed");

    // MT mode: tasks 1 and 2 alternate
    wr(0, REG_MT_EN, 1);
    check(mt_en == 1, "MT_EN set by HT0");
    begin
      logic [3:0] a, b;
      @(negedge clk); #1; a = tid;
      @(negedge clk); #1; b = tid;
      check(mt_en && a != b && (a == 1 || a == 2) && (b == 1 || b == 2), "MT alternation of tasks 1 and 2");
      @(negedge clk); #1;
      check(tid == a, "alternation period two cycles");
    end

    // fault capture, window registers, GPIO
    @(posedge clk); #2 bus_fault = 1; bus_tid = 5;
    @(posedge clk); #2 bus_fault = 0;
    @(negedge clk); #1;
    bus_addr = REG_FAULT; #1;
    check(bus_rdata == 32'h20, "fault of task 5 recorded");
    wr(0, 8'h80 + 8'(8*5), 32'h400);
    wr(0, 8'h84 + 8'(8*5), 32'h4FF);
    bus_tid = 5; #1;
    check(win_base == 32'h400 && win_limit == 32'h4FF, "window of task 5");
    wr(7, REG_GPIO_OUT, 32'hBEEF);
    check(gpio_out == 32'hBEEF, "GPIO_OUT any task");
    bus_addr = REG_GPIO_IN; #1;
    check(bus_rdata == gpio_in, "GPIO_IN read");
    bus_addr = REG_TID; bus_tid = 9; #1;
    check(bus_rdata == 9, "TID read");

    // wake HT0: it preempts at once
    @(posedge clk); #3 ev_in = 8'h01;
    @(negedge clk); #1;
    ev_in = 0;
    check(tid == 0 || tid == 1 || tid == 2, "HT0 back in the schedule");
    check(task_ready[0], "HT0 ready after event 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
