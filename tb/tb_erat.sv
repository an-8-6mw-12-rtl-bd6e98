// tb_erat: self-checking test of the early-rejection unit.
//
// Triangles with small integer coordinates (exact in fp32, so the determinant
// is exact) are generated at random and in three directed forms: fully beyond
// a clip plane, degenerate (collinear vertices) and clockwise. The reference
// classifies each with integer arithmetic. Every rejection reason must be seen.
`timescale 1ns/1ps
module tb_erat;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] en = 3'b111;
  logic in_valid = 0, out_valid, reject;
  logic [2:0] reason;
  vec_t pos [3];
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  erat dut (.clk, .rst_n, .en, .in_valid, .pos, .out_valid, .reject, .reason);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t i2f(int i);
    logic [63:0] d;
    if (i == 0) return 0;
    d = $realtobits(real'(i));
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  task automatic run(int vx [3], int vy [3], int vz [3], int vw [3]);
    longint det;
    logic outside, zero, back, erej;
    logic [2:0] ereason;
    for (int v = 0; v < 3; v++) pos[v] = {i2f(vw[v]), i2f(vz[v]), i2f(vy[v]), i2f(vx[v])};
    det = longint'(vx[0]) * (vy[1] * vw[2] - vy[2] * vw[1])
        - longint'(vy[0]) * (vx[1] * vw[2] - vx[2] * vw[1])
        + longint'(vw[0]) * (vx[1] * vy[2] - vx[2] * vy[1]);
    outside = 0;
    if (vx[0] > vw[0] && vx[1] > vw[1] && vx[2] > vw[2]) outside = 1;
    if (vx[0] < -vw[0] && vx[1] < -vw[1] && vx[2] < -vw[2]) outside = 1;
    if (vy[0] > vw[0] && vy[1] > vw[1] && vy[2] > vw[2]) outside = 1;
    if (vy[0] < -vw[0] && vy[1] < -vw[1] && vy[2] < -vw[2]) outside = 1;
    if (vz[0] > vw[0] && vz[1] > vw[1] && vz[2] > vw[2]) outside = 1;
    if (vz[0] < -vw[0] && vz[1] < -vw[1] && vz[2] < -vw[2]) outside = 1;
    zero = (det == 0); back = (det < 0);
    ereason = '0;
    if (en[0] && outside) ereason[0] = 1;
    else if (en[1] && zero) ereason[1] = 1;
    else if (en[2] && back) ereason[2] = 1;
    erej = |ereason;
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!(out_valid && reject == erej && reason == ereason)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%p y=%p w=%p det=%0d reject=%0d/%0d reason=%b/%b",
                                  vx, vy, vw, det, reject, erej, reason, ereason);
    end
    for (int r = 0; r < 3; r++) if (reason[r]) seen[r]++;
  endtask

  initial begin
    int vx [3], vy [3], vz [3], vw [3];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: outside right plane, degenerate, clockwise, front-facing
    run('{20, 30, 25}, '{0, 1, 5}, '{0, 0, 0}, '{10, 10, 10});
    run('{0, 2, 4}, '{0, 2, 4}, '{0, 0, 0}, '{10, 10, 10});
    run('{0, 0, 5}, '{0, 5, 0}, '{0, 0, 0}, '{10, 10, 10});
    run('{0, 5, 0}, '{0, 0, 5}, '{0, 0, 0}, '{10, 10, 10});
    for (int n = 0; n < 3000; n++) begin
      en = (n % 500 < 50) ? 3'($urandom) : 3'b111;
      for (int v = 0; v < 3; v++) begin
        vw[v] = $urandom_range(1, 40);
        vx[v] = $urandom_range(0, 120) - 60;
        vy[v] = $urandom_range(0, 120) - 60;
        vz[v] = $urandom_range(0, 120) - 60;
      end
      if (n % 7 == 0) begin vx[2] = vx[1]; vy[2] = vy[1]; vw[2] = vw[1]; end   // degenerate
      run(vx, vy, vz, vw);
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("outside=%0d zero=%0d back=%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
