// fp32_mul: single-precision floating-point multiplier of one SIMD channel.
//
// Combinational. Computes a * b in IEEE-754 single format with
// round-toward-zero (the product mantissa is truncated). Denormal inputs and
// results are flushed to signed zero, exponent overflow saturates to the
// largest finite value and NaN/infinity are not treated specially; these are
// this design's choices.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [47:0] p;
  logic [9:0]  e;
  logic        s;

  always_comb begin
    s = a[31] ^ b[31];
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    y = {s, 31'd0};
    if (a[30:23] != 0 && b[30:23] != 0) begin
      if (p[47]) begin
        e = e + 10'd1;
        y = {s, e[7:0], p[46:24]};
      end else begin
        y = {s, e[7:0], p[45:23]};
      end
      if ($signed(e) <= 0)       y = {s, 31'd0};
      else if ($signed(e) >= 255) y = {s, 8'hFE, 23'h7FFFFF};
    end
  end
endmodule
