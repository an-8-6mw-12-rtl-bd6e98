// erat: early rejection after transformation.
//
// Tests one triangle once its three vertices have been transformed, before any
// lighting or texturing is spent on them, for the three redundant cases:
//   outside    all three vertices lie beyond the same clip plane
//              (x > w, x < -w, y > w, y < -w, z > w or z < -w);
//   zero       the triangle has no area;
//   back face  the triangle faces away from the viewer.
// Area and facing come from the sign of the 3x3 determinant of the vertices'
// homogeneous (x, y, w) coordinates,
//   det = x0(y1w2 - y2w1) - y0(x1w2 - x2w1) + w0(x1y2 - x2y1),
// which has the sign of the screen-space signed area when every w > 0:
// det = 0 is a zero-area triangle and det < 0 (clockwise) a back face.
// Positions are 4-channel fp32 vectors {w, z, y, x} (x in channel 0). The
// arithmetic uses 9 fp32 multipliers and 5 adders in one combinational pass;
// the verdict is registered, so out_valid follows in_valid by one cycle.
// Each test can be switched off through en[2:0] = {back, zero, outside};
// reason reports which test fired (outside has priority, then zero, then back).
// The three rejection cases follow the design's rejection module; the clip
// planes, the determinant formulation, counter-clockwise front faces and the
// one-cycle latency are this design's choices.
module erat
  import sp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] en,
  input  logic       in_valid,
  input  vec_t       pos [3],
  output logic       out_valid,
  output logic       reject,
  output logic [2:0] reason      // {back, zero, outside}
);
  word_t x [3], y [3], z [3], w [3];
  always_comb
    for (int v = 0; v < 3; v++) begin
      x[v] = pos[v][31:0];
      y[v] = pos[v][63:32];
      z[v] = pos[v][95:64];
      w[v] = pos[v][127:96];
    end

  function automatic word_t fneg(word_t a);
    return {~a[31], a[30:0]};
  endfunction

  // ---- outside: every vertex beyond one plane
  logic [5:0] beyond [3];
  logic       outside;
  always_comb begin
    for (int v = 0; v < 3; v++) begin
      beyond[v][0] = fp_lt(w[v], x[v]);
      beyond[v][1] = fp_lt(x[v], fneg(w[v]));
      beyond[v][2] = fp_lt(w[v], y[v]);
      beyond[v][3] = fp_lt(y[v], fneg(w[v]));
      beyond[v][4] = fp_lt(w[v], z[v]);
      beyond[v][5] = fp_lt(z[v], fneg(w[v]));
    end
    outside = |(beyond[0] & beyond[1] & beyond[2]);
  end

  // ---- determinant
  word_t m_y1w2, m_y2w1, m_x1w2, m_x2w1, m_x1y2, m_x2y1;
  word_t d_a, d_b, d_c, m_x0a, m_y0b, m_w0c, s_ab, det;

  fp32_mul u_m0 (.a(y[1]), .b(w[2]), .y(m_y1w2));
  fp32_mul u_m1 (.a(y[2]), .b(w[1]), .y(m_y2w1));
  fp32_mul u_m2 (.a(x[1]), .b(w[2]), .y(m_x1w2));
  fp32_mul u_m3 (.a(x[2]), .b(w[1]), .y(m_x2w1));
  fp32_mul u_m4 (.a(x[1]), .b(y[2]), .y(m_x1y2));
  fp32_mul u_m5 (.a(x[2]), .b(y[1]), .y(m_x2y1));
  fp32_add u_a0 (.a(m_y1w2), .b(fneg(m_y2w1)), .y(d_a));
  fp32_add u_a1 (.a(m_x1w2), .b(fneg(m_x2w1)), .y(d_b));
  fp32_add u_a2 (.a(m_x1y2), .b(fneg(m_x2y1)), .y(d_c));
  fp32_mul u_m6 (.a(x[0]), .b(d_a), .y(m_x0a));
  fp32_mul u_m7 (.a(y[0]), .b(d_b), .y(m_y0b));
  fp32_mul u_m8 (.a(w[0]), .b(d_c), .y(m_w0c));
  fp32_add u_a3 (.a(m_x0a), .b(fneg(m_y0b)), .y(s_ab));
  fp32_add u_a4 (.a(s_ab), .b(m_w0c), .y(det));

  logic zero_area, back_face;
  assign zero_area = (det[30:0] == '0);
  assign back_face = !zero_area && det[31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      reject    <= 1'b0;
      reason    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        reason[0] <= en[0] && outside;
        reason[1] <= en[1] && !(en[0] && outside) && zero_area;
        reason[2] <= en[2] && !(en[0] && outside) && !(en[1] && zero_area) && back_face;
        reject    <= (en[0] && outside) || (en[1] && zero_area) || (en[2] && back_face);
      end
    end
  end
endmodule
