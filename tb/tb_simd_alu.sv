// tb_simd_alu: self-checking test of the SIMD processing element.
//
// Random fp32 operands (exponents kept within 2^-7..2^7 so that every exact
// sum and product fits a double) are run through each operation with random
// swizzle, negate and Active Vector settings. The reference computes the exact
// result with real arithmetic and truncates it to single precision
// (round-toward-zero), independently of the RTL adder and multiplier. The
// 16-bit fixed-point operations are checked half by half.
`timescale 1ns/1ps
module tb_simd_alu;
  import sp_pkg::*;

  opcode_e    op;
  logic [3:0] act;
  logic [1:0] neg;
  logic [7:0] swz;
  vec_t       a, b, y;
  int checks = 0, failures = 0;

  simd_alu dut (.op, .act, .neg, .swz, .a, .b, .y);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rz32(real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 0 || e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFE, 23'h7FFFFF};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic real f2r(word_t w);
    logic [63:0] d;
    if (w[30:23] == 0) return 0.0;
    d = {w[31], 11'(int'(w[30:23]) - 127 + 1023), w[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic word_t rnd_fp();
    return {1'($urandom), 8'(120 + $urandom_range(0, 14)), 23'($urandom)};
  endfunction

  function automatic logic [15:0] absd16(logic [15:0] x, logic [15:0] z);
    int xi, zi;
    xi = int'($signed(x)); zi = int'($signed(z));
    return 16'((xi > zi) ? xi - zi : zi - xi);
  endfunction

  task automatic check_one();
    word_t ai, bi, exp_w, got;
    word_t prod [LANES];
    word_t dot;
    logic fixed;
    fixed = (op == OP_ADD16) || (op == OP_SUB16) || (op == OP_ABSD16);
    // DP4 reference: products of the active channels, summed pairwise
    for (int i = 0; i < LANES; i++) begin
      ai = a[i*32 +: 32];
      bi = b[swz[2*i +: 2]*32 +: 32];
      if (neg[0]) ai = ai ^ 32'h8000_0000;
      if (neg[1]) bi = bi ^ 32'h8000_0000;
      prod[i] = act[i] ? rz32(f2r(ai) * f2r(bi)) : '0;
    end
    dot = rz32(f2r(rz32(f2r(prod[0]) + f2r(prod[1]))) + f2r(rz32(f2r(prod[2]) + f2r(prod[3]))));
    for (int i = 0; i < LANES; i++) begin
      ai = a[i*32 +: 32];
      bi = b[swz[2*i +: 2]*32 +: 32];
      if (neg[0]) ai = fixed ? {16'(-ai[31:16]), 16'(-ai[15:0])} : (ai ^ 32'h8000_0000);
      if (neg[1]) bi = fixed ? {16'(-bi[31:16]), 16'(-bi[15:0])} : (bi ^ 32'h8000_0000);
      case (op)
        OP_MOV:   exp_w = ai;
        OP_FADD:  exp_w = rz32(f2r(ai) + f2r(bi));
        OP_FMUL:  exp_w = rz32(f2r(ai) * f2r(bi));
        OP_DP4:   exp_w = dot;
        OP_FMAX:  exp_w = (f2r(ai) >= f2r(bi)) ? ai : bi;
        OP_FMIN:  exp_w = (f2r(ai) <= f2r(bi)) ? ai : bi;
        OP_ADD16: exp_w = {16'(ai[31:16] + bi[31:16]), 16'(ai[15:0] + bi[15:0])};
        OP_SUB16: exp_w = {16'(ai[31:16] - bi[31:16]), 16'(ai[15:0] - bi[15:0])};
        OP_ABSD16:exp_w = {absd16(ai[31:16], bi[31:16]), absd16(ai[15:0], bi[15:0])};
        default:  exp_w = '0;
      endcase
      if (!act[i]) exp_w = '0;
      got = y[i*32 +: 32];
      // a zero result may carry either sign
      if (got[30:0] == 0 && exp_w[30:0] == 0) got = exp_w;
      checks++;
      if (got !== exp_w) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s lane=%0d a=%h b=%h got=%h exp=%h", op.name(), i, ai, bi, y[i*32 +: 32], exp_w);
      end
    end
  endtask

  opcode_e ops[9] = '{OP_MOV, OP_FADD, OP_FMUL, OP_FMAX, OP_FMIN, OP_ADD16, OP_SUB16, OP_ABSD16, OP_DP4};

  initial begin
    // directed: 1.5 + 2.25 = 3.75, 1.5 * -2.0 = -3.0, x - x = 0
    op = OP_FADD; act = 4'hF; neg = 0; swz = 8'hE4;
    a = {4{32'h3FC0_0000}}; b = {4{32'h4010_0000}}; #1;
    checks++; if (y[31:0] !== 32'h4070_0000) begin failures++; $display("FAIL 1.5+2.25 %h", y[31:0]); end
    op = OP_FMUL; b = {4{32'hC000_0000}}; #1;
    checks++; if (y[31:0] !== 32'hC040_0000) begin failures++; $display("FAIL 1.5*-2 %h", y[31:0]); end
    op = OP_FADD; b = a; neg = 2'b10; #1;
    checks++; if (y[30:0] !== 0) begin failures++; $display("FAIL x-x %h", y[31:0]); end
    // 1.0 - 2^-30 truncates to the largest value below 1.0
    neg = 0; a = {4{32'h3F80_0000}}; b = {4{32'hB080_0000}}; #1;
    checks++; if (y[31:0] !== 32'h3F7F_FFFF) begin failures++; $display("FAIL 1-tiny %h", y[31:0]); end
    // (1,2,3,4).(5,6,7,8) = 70; with w gated (DP3) = 38 in channels 0..2
    op = OP_DP4; act = 4'hF; neg = 0; swz = 8'hE4;
    a = {32'h4080_0000, 32'h4040_0000, 32'h4000_0000, 32'h3F80_0000};
    b = {32'h4100_0000, 32'h40E0_0000, 32'h40C0_0000, 32'h40A0_0000}; #1;
    checks++; if (y !== {4{32'h428C_0000}}) begin failures++; $display("FAIL dp4 %h", y); end
    act = 4'h7; #1;
    checks++; if (y !== {32'h0, {3{32'h4218_0000}}}) begin failures++; $display("FAIL dp3 %h", y); end
    for (int n = 0; n < 4000; n++) begin
      op  = ops[$urandom_range(0, 8)];
      act = 4'($urandom); neg = 2'($urandom); swz = 8'($urandom);
      for (int i = 0; i < LANES; i++) begin
        a[i*32 +: 32] = (op inside {OP_ADD16, OP_SUB16, OP_ABSD16}) ? 32'($urandom) : rnd_fp();
        b[i*32 +: 32] = (op inside {OP_ADD16, OP_SUB16, OP_ABSD16}) ? 32'($urandom) : rnd_fp();
      end
      #1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
