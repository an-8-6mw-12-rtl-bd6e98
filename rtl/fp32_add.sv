// fp32_add: single-precision floating-point adder of one SIMD channel.
//
// Combinational. Computes a + b in IEEE-754 single format with
// round-toward-zero. Denormal inputs and results are flushed to zero, an
// exponent overflow saturates to the largest finite value, and NaN/infinity
// encodings are not treated specially. The rounding mode and these
// simplifications are this design's choice; the floating-point format of the
// processor is not specified beyond "floating point".
//
// The smaller operand is aligned with guard, round and sticky bits, so the
// truncated result is exact round-toward-zero also for effective subtraction.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [7:0]  ea, eb, eh, el;
  logic        sh, sl;
  logic [26:0] mh, ml, ml_sh;   // 1.23 mantissa with 3 extra bits (G,R,S)
  logic [7:0]  d;
  logic [27:0] sum;
  logic [26:0] diff, norm;
  logic [4:0]  lz;
  logic [9:0]  er;              // signed working exponent

  function automatic logic [4:0] lzc27(logic [26:0] v);
    lzc27 = 5'd27;
    for (int i = 0; i < 27; i++)
      if (v[i]) lzc27 = 5'(26 - i);
  endfunction

  always_comb begin
    ea = a[30:23];
    eb = b[30:23];
    y  = '0;
    sum = '0; diff = '0; norm = '0; lz = '0; er = '0;
    ml_sh = '0;
    // order by magnitude
    if (a[30:0] >= b[30:0]) begin
      eh = ea; el = eb; sh = a[31]; sl = b[31];
      mh = {(ea != 0), a[22:0], 3'b000};
      ml = {(eb != 0), b[22:0], 3'b000};
    end else begin
      eh = eb; el = ea; sh = b[31]; sl = a[31];
      mh = {(eb != 0), b[22:0], 3'b000};
      ml = {(ea != 0), a[22:0], 3'b000};
    end
    if (el == 0) ml = '0;                   // flush-to-zero input
    d = eh - el;
    if (d >= 8'd27) ml_sh = {26'd0, |ml};
    else begin
      ml_sh = ml >> d;
      if ((ml & ((27'd1 << d) - 27'd1)) != 0) ml_sh[0] = 1'b1;
    end

    if (eh == 0) begin
      y = '0;                                // both operands zero
    end else if (sh == sl) begin
      sum = {1'b0, mh} + {1'b0, ml_sh};
      er  = {2'b00, eh};
      if (sum[27]) begin
        sum = {1'b0, sum[27:1]} | {27'd0, sum[0]};
        er  = er + 10'd1;
      end
      if (er >= 10'd255) y = {sh, 8'hFE, 23'h7FFFFF};
      else               y = {sh, er[7:0], sum[25:3]};
    end else begin
      diff = mh - ml_sh;
      if (diff == 0) y = '0;
      else begin
        lz   = lzc27(diff);
        norm = diff << lz;
        er   = {2'b00, eh} - {5'd0, lz};
        if ($signed(er) <= 0) y = '0;        // flush-to-zero result
        else                  y = {sh, er[7:0], norm[25:3]};
      end
    end
  end
endmodule
