// simd_alu: the 4-channel SIMD processing element of one VLIW slot.
//
// Combinational execute stage of a slot. Source 1 is first swizzled (result
// channel i takes channel swz[2i+1:2i] of src1), then the Modify negate bits
// are applied, then all four channels execute the same operation:
//   * floating point (FADD, FMUL, FMAX, FMIN, MOV): one fp32 operation per
//     channel, 4 per slot per cycle;
//   * DP4: the four channel products are summed as (p0 + p1) + (p2 + p3),
//     each addition rounded toward zero, and the sum goes to every active
//     channel. Inactive channels contribute 0, so clearing the w bit of the
//     Active Vector gives DP3. The adder tree is three extra fp32 adders.
//   * fixed point (ADD16, SUB16, ABSD16): the same 32-bit channel is split into
//     two independent 16-bit halves, 8 operations per slot per cycle. This is
//     how the datapath doubles its operation rate for video encoding; the split
//     into 16-bit halves is this design's reading of "configured to fixed-point".
// For floating-point operations and MOV, negation flips the sign bit; for
// fixed-point operations it negates each 16-bit half (two's complement).
// Channels whose Active Vector bit is clear produce zero: they are the gated
// processing elements. TXLD passes src0 through (its channel 0 is the texture
// address). Channel count, operations and encodings come from sp_pkg.
module simd_alu
  import sp_pkg::*;
(
  input  opcode_e     op,
  input  logic [3:0]  act,
  input  logic [1:0]  neg,     // Modify bits: [0] negate src0, [1] negate src1
  input  logic [7:0]  swz,
  input  vec_t        a,
  input  vec_t        b,
  output vec_t        y
);
  word_t aw [LANES];
  word_t bw [LANES];
  word_t add_y [LANES];
  word_t mul_y [LANES];
  word_t dp_p  [LANES];
  word_t dp_01, dp_23, dp_y;

  function automatic word_t neg_w(word_t w, logic fixed);
    if (fixed) return {16'(-w[31:16]), 16'(-w[15:0])};
    return {~w[31], w[30:0]};
  endfunction

  function automatic logic [15:0] absd(logic [15:0] x, logic [15:0] z);
    return ($signed(x) > $signed(z)) ? 16'(x - z) : 16'(z - x);
  endfunction

  logic fixed_op;
  assign fixed_op = (op == OP_ADD16) || (op == OP_SUB16) || (op == OP_ABSD16);

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      aw[i] = a[i*WORD_W +: WORD_W];
      bw[i] = b[swz[2*i +: 2]*WORD_W +: WORD_W];
      if (neg[0]) aw[i] = neg_w(aw[i], fixed_op);
      if (neg[1]) bw[i] = neg_w(bw[i], fixed_op);
    end
  end

  for (genvar g = 0; g < LANES; g++) begin : g_lane
    fp32_add u_add (.a(aw[g]), .b(bw[g]), .y(add_y[g]));
    fp32_mul u_mul (.a(aw[g]), .b(bw[g]), .y(mul_y[g]));
    assign dp_p[g] = act[g] ? mul_y[g] : '0;
  end

  fp32_add u_dp01 (.a(dp_p[0]), .b(dp_p[1]), .y(dp_01));
  fp32_add u_dp23 (.a(dp_p[2]), .b(dp_p[3]), .y(dp_23));
  fp32_add u_dpy  (.a(dp_01),   .b(dp_23),   .y(dp_y));

  always_comb begin
    y = '0;
    for (int i = 0; i < LANES; i++) begin
      word_t r;
      unique case (op)
        OP_MOV, OP_TXLD: r = aw[i];
        OP_FADD:  r = add_y[i];
        OP_FMUL:  r = mul_y[i];
        OP_DP4:   r = dp_y;
        OP_FMAX:  r = fp_lt(aw[i], bw[i]) ? bw[i] : aw[i];
        OP_FMIN:  r = fp_lt(bw[i], aw[i]) ? bw[i] : aw[i];
        OP_ADD16: r = {16'(aw[i][31:16] + bw[i][31:16]), 16'(aw[i][15:0] + bw[i][15:0])};
        OP_SUB16: r = {16'(aw[i][31:16] - bw[i][31:16]), 16'(aw[i][15:0] - bw[i][15:0])};
        OP_ABSD16:r = {absd(aw[i][31:16], bw[i][31:16]), absd(aw[i][15:0], bw[i][15:0])};
        default:  r = '0;
      endcase
      y[i*WORD_W +: WORD_W] = act[i] ? r : '0;
    end
  end
endmodule
