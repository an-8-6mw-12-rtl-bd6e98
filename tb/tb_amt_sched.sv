// tb_amt_sched: self-checking test of the thread scheduler.
//
// Random ready masks and fetch-advance pulses are applied in both policies. A
// behavioural reference keeps its own "last thread" and predicts the selection:
// adaptive mode stays on the last thread while it is ready, conventional mode
// always rotates to the next ready thread. Also counts how often each policy
// stayed on a thread versus switched.
`timescale 1ns/1ps
module tb_amt_sched;
  localparam int NT = 8;
  logic clk = 0, rst_n = 0, amt = 0, advance = 0;
  logic [NT-1:0] ready = 0;
  logic [2:0] sel;
  logic sel_vld;
  int checks = 0, failures = 0, stays = 0, switches = 0;
  int ref_last = NT - 1;

  amt_sched dut (.clk, .rst_n, .amt, .ready, .advance, .sel, .sel_vld);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sel();
    if (amt && ready[ref_last]) return ref_last;
    for (int k = 1; k <= NT; k++)
      if (ready[(ref_last + k) % NT]) return (ref_last + k) % NT;
    return -1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int e;
      @(negedge clk);
      if (n % 1000 == 0) amt = ~amt;
      // ready threads drop out occasionally, like threads waiting on a load
      ready = 8'($urandom) | 8'($urandom);
      if ($urandom_range(0, 9) == 0) ready = 0;
      advance = ($urandom_range(0, 3) != 0);
      #1;
      e = ref_sel();
      checks++;
      if ((e < 0 && sel_vld) || (e >= 0 && (!sel_vld || sel != 3'(e)))) begin
        failures++;
        if (failures < 10) $display("FAIL amt=%0d ready=%b last=%0d sel=%0d exp=%0d", amt, ready, ref_last, sel, e);
      end
      if (advance && e >= 0) begin
        if (e == ref_last) stays++; else switches++;
        ref_last = e;
      end
    end
    checks++;
    if (stays == 0 || switches == 0) failures++;
    $display("stays=%0d switches=%0d", stays, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
