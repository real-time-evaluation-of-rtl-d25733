// nhse: hardware scheduler engine of the nMPRA-MT processor.
//
// The scheduler state changes on the FALLING edge of the CPU clock, so the
// task it selects is stable half a cycle before the rising edge at which the
// pipeline, the PCs and the register banks use it. On every falling edge it
//   1. latches the external event lines ev_in into the pending set,
//   2. applies the register write the MEM stage completed at the last rising
//      edge (captured then in a small request register),
//   3. wakes every waiting task whose wait mask meets a pending event and
//      consumes those events,
//   4. picks the ready task of highest priority (lowest index; task 0 is
//      HT0) and, in fine-grained multithreading mode (MT_EN = 1), alternates
//      every cycle between the first and the second ready task, so each of
//      them issues one instruction every two cycles.
// A task is ready when it is enabled and not waiting. After reset only HT0
// is enabled, and only HT0 may write the configuration registers (TASK_EN,
// MT_EN, FAULT clear, write windows); writes of other tasks to them are
// ignored. run is low when no task is ready: then no pipeline copy moves.
//
// Registers (byte offset within the peripheral window, addr[31] = 1):
//   0x00 GPIO_OUT  rw, any task      0x04 GPIO_IN   r
//   0x08 TASK_EN   rw, HT0; bit 0 stays 1
//   0x0C WAIT      w: the writer waits for any event of mask wdata; r: pending
//   0x10 MT_EN     rw, HT0           0x14 TID       r: task reading it
//   0x18 FAULT     r: per-task write-protection faults; w (HT0): 1 clears
//   0x1C EVT_PEND  r
//   0x80 + 8*i     WIN_BASE of task i, +4: WIN_LIMIT (inclusive), HT0
// Falling-edge scheduling, HT0's sole access to configuration and the
// task-interleaving follow the nMPRA-MT description. The register map, the event/wait
// mechanism and the choice of the two interleaved tasks are this design's.
// ev_in is sampled without a synchronizer, as an asynchronous input would
// need on silicon; the nMPRA-MT description has none.
module nhse
  import nmpra_pkg::*;
#(
  parameter int NTASKS = 16,
  parameter int NEVT   = 8,
  localparam int TW = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NEVT-1:0] ev_in,
  input  word_t           gpio_in,
  // MEM-stage access to the register window, task bus_tid
  input  logic            bus_we,
  input  logic [7:0]      bus_addr,
  input  word_t           bus_wdata,
  input  logic [TW-1:0]   bus_tid,
  input  logic            bus_fault,   // protection fault of the MEM access
  output word_t           bus_rdata,
  output word_t           win_base,    // write window of task bus_tid
  output word_t           win_limit,
  // schedule
  output logic [TW-1:0]   tid,
  output logic            run,
  output logic            mt_en,
  output logic [NTASKS-1:0] task_ready,
  output word_t           gpio_out
);
  // ---------------- rising-edge capture of the MEM-stage request ----------
  typedef struct packed {
    logic          we;
    logic [7:0]    addr;
    word_t         wdata;
    logic [TW-1:0] tid;
    logic          fault;
  } req_t;
  req_t req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req <= '0;
    else        req <= '{we: bus_we, addr: bus_addr, wdata: bus_wdata,
                         tid: bus_tid, fault: bus_fault};
  end

  // ---------------- scheduler state (falling edge) ------------------------
  logic [NTASKS-1:0] en_q, wait_q, fault_q;
  logic [NEVT-1:0]   mask_q [NTASKS];
  logic [NEVT-1:0]   pend_q;
  word_t             base_q [NTASKS];
  word_t             limit_q[NTASKS];
  logic              mt_q, slot_q;
  word_t             gpio_q;

  logic [NTASKS-1:0] en_n, wait_n, fault_n, ready_n;
  logic [NEVT-1:0]   mask_n [NTASKS];
  logic [NEVT-1:0]   pend_n, consumed;
  word_t             base_n [NTASKS];
  word_t             limit_n[NTASKS];
  logic              mt_n, slot_n, run_n;
  word_t             gpio_n;
  logic [TW-1:0]     first, second, tid_n;
  logic              have_first, have_second;
  logic              priv;

  assign priv = (req.tid == '0);

  always_comb begin
    en_n    = en_q;
    wait_n  = wait_q;
    fault_n = fault_q;
    mask_n  = mask_q;
    base_n  = base_q;
    limit_n = limit_q;
    mt_n    = mt_q;
    gpio_n  = gpio_q;
    pend_n  = pend_q | ev_in;

    if (req.fault) fault_n[req.tid] = 1'b1;
    if (req.we) begin
      if (req.addr == REG_GPIO_OUT) gpio_n = req.wdata;
      if (req.addr == REG_WAIT) begin
        wait_n[req.tid] = 1'b1;
        mask_n[req.tid] = req.wdata[NEVT-1:0];
      end
      if (priv) begin
        if (req.addr == REG_TASK_EN) en_n    = req.wdata[NTASKS-1:0] | NTASKS'(1);
        if (req.addr == REG_MT_EN)   mt_n    = req.wdata[0];
        if (req.addr == REG_FAULT)   fault_n = fault_n & ~req.wdata[NTASKS-1:0];
        for (int i = 0; i < NTASKS; i++) begin
          if (req.addr == REG_WIN_BASE + 8'(8*i))     base_n[i]  = req.wdata;
          if (req.addr == REG_WIN_BASE + 8'(8*i + 4)) limit_n[i] = req.wdata;
        end
      end
    end

    consumed = '0;
    for (int i = 0; i < NTASKS; i++) begin
      if (wait_n[i] && (pend_n & mask_n[i]) != '0) begin
        wait_n[i] = 1'b0;
        consumed  = consumed | (pend_n & mask_n[i]);
      end
    end
    pend_n  = pend_n & ~consumed;
    ready_n = en_n & ~wait_n;

    have_first = 1'b0;  first  = '0;
    have_second = 1'b0; second = '0;
    for (int i = 0; i < NTASKS; i++) begin
      if (ready_n[i]) begin
        if (!have_first) begin
          have_first = 1'b1; first = TW'(i);
        end else if (!have_second) begin
          have_second = 1'b1; second = TW'(i);
        end
      end
    end

    run_n = have_first;
    if (mt_n && have_second) begin
      slot_n = ~slot_q;
      tid_n  = slot_q ? second : first;
    end else begin
      slot_n = 1'b0;
      tid_n  = first;
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q    <= NTASKS'(1);
      wait_q  <= '0;
      fault_q <= '0;
      pend_q  <= '0;
      mt_q    <= 1'b0;
      slot_q  <= 1'b0;
      gpio_q  <= '0;
      tid     <= '0;
      run     <= 1'b1;
      for (int i = 0; i < NTASKS; i++) begin
        mask_q[i]  <= '0;
        base_q[i]  <= '0;
        limit_q[i] <= '1;
      end
    end else begin
      en_q    <= en_n;
      wait_q  <= wait_n;
      fault_q <= fault_n;
      pend_q  <= pend_n;
      mt_q    <= mt_n;
      slot_q  <= slot_n;
      gpio_q  <= gpio_n;
      tid     <= tid_n;
      run     <= run_n;
      mask_q  <= mask_n;
      base_q  <= base_n;
      limit_q <= limit_n;
    end
  end

  // ---------------- outputs ------------------------------------------------
  assign mt_en      = mt_q;
  assign task_ready = en_q & ~wait_q;
  assign gpio_out   = gpio_q;
  assign win_base   = base_q[bus_tid];
  assign win_limit  = limit_q[bus_tid];

  always_comb begin
    bus_rdata = '0;
    unique case (bus_addr)
      REG_GPIO_OUT: bus_rdata = gpio_q;
      REG_GPIO_IN:  bus_rdata = gpio_in;
      REG_TASK_EN:  bus_rdata = word_t'(en_q);
      REG_WAIT:     bus_rdata = word_t'(pend_q);
      REG_MT_EN:    bus_rdata = word_t'(mt_q);
      REG_TID:      bus_rdata = word_t'(bus_tid);
      REG_FAULT:    bus_rdata = word_t'(fault_q);
      REG_EVT_PEND: bus_rdata = word_t'(pend_q);
      default: begin
        for (int i = 0; i < NTASKS; i++) begin
          if (bus_addr == REG_WIN_BASE + 8'(8*i))     bus_rdata = base_q[i];
          if (bus_addr == REG_WIN_BASE + 8'(8*i + 4)) bus_rdata = limit_q[i];
        end
      end
    endcase
  end
endmodule
