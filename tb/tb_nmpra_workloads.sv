// tb_nmpra_workloads: the evaluated configurations with 4, 8 and 16 tasks,
// each running the six-level nested-call workload of nmpra_call_run with
// two tasks interleaved in fine-grained mode. The three processors run one
// after the other. The cycle count of the workload must not depend on the
// number of contexts built.
`timescale 1ns/1ps
module tb_nmpra_workloads;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic start4 = 0, start8 = 0, start16 = 0;
  logic done4, done8, done16;
  int c4, c8, c16, f4, f8, f16;

  nmpra_call_run #(.NTASKS(4))  r4  (.clk, .start(start4),  .done(done4),  .checks(c4),  .failures(f4));
  nmpra_call_run #(.NTASKS(8))  r8  (.clk, .start(start8),  .done(done8),  .checks(c8),  .failures(f8));
  nmpra_call_run #(.NTASKS(16)) r16 (.clk, .start(start16), .done(done16), .checks(c16), .failures(f16));

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16, f4 + f8 + f16 + 1);
    $finish;
  end

  initial begin
    #1 start4 = 1;  wait (done4);
    start8 = 1;     wait (done8);
    start16 = 1;    wait (done16);
    if (r4.cycles != r16.cycles || r8.cycles != r16.cycles) begin
      $display("FAIL: cycle counts differ: %0d %0d %0d", r4.cycles, r8.cycles, r16.cycles);
      f16++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16 + 1, f4 + f8 + f16);
    $finish;
  end
endmodule
