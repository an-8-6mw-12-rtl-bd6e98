// tb_stream_proc: end-to-end test of the stream processor at its default size.
//
// Phase 1, vertex processing: a transform program (4 bundles, forwarding on)
// and a lighting program (colour * light + ambient, an intensity as the dot
// product colour . light, plus a texture fetch whose result is written under a
// 3-channel Active Vector) are loaded; 48 vertices
// live in a vertex memory model; a triangle strip, degenerate triangles and
// random triangles are streamed in. For each triangle the testbench predicts
// the early-rejection verdict with integer arithmetic (the transform is chosen
// so that every value is exact) and checks the reported verdict, the clip
// positions and, for visible triangles, the lit colour and texture data. It
// counts vertex-cache hits and misses, and checks that every vertex is
// transformed once per load while rejected triangles save lighting work.
// Phase 2, motion estimation: the search window sits in the constant region
// (row pitch given by const_stride), the current 8x8 block of 16-bit pixels is
// the input stream, thread t computes the SAD of row t with 16-bit absolute
// differences and additions; 18 candidate positions are searched and the best
// must be the planted match, with every SAD equal to the reference. It runs
// with adaptive scheduling without forwarding (hazard stalls) and with
// conventional interleaving (none).
// Phase 3, rate: the transform on all 8 threads must take at most 4 cycles per
// vertex plus pipeline fill (12.5 Mvertices/s at 50 MHz).
// Every mechanism (cache hit/miss, the three rejections, forwarding, hazard
// stall, bank stall, thread switch, gated channels, both scheduling modes,
// float and fixed-point operation) must occur at least once.
`timescale 1ns/1ps
module tb_stream_proc;
  import sp_pkg::*;
  localparam int NV = 48, VLAT = 2, TEX_LAT = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic amt = 1;
  logic [2:0] erat_en = 3'b111;
  logic [CMA_AW-1:0] stream_base = 16, const_base = 0, host_addr = 0;
  logic [3:0] stream_stride = 4, nattr = 3;
  logic [5:0] const_stride = 0;
  logic [7:0] xform_pc = 0, light_pc = 8, im_waddr = 0, run_pc = 0;
  logic host_we = 0, im_we = 0, vc_invalidate = 0, run_start = 0;
  vec_t host_wdata = '0;
  bundle_t im_wdata = '0;
  logic [7:0] run_mask = 0;
  logic busy, tri_valid = 0, tri_ready;
  logic [15:0] tri_idx [3] = '{0, 0, 0};
  logic vin_req, vin_valid = 0;
  logic [15:0] vin_idx;
  logic [3:0] vin_attr;
  vec_t vin_data = '0;
  logic tri_out_valid, tri_out_ready = 0, tri_out_reject;
  logic [2:0] tri_out_thr [3], tri_out_reason;
  logic [2:0] or_thr = 0, or_idx = 0;
  vec_t or_data;
  logic tex_req, tex_rvalid = 0;
  logic [15:0] tex_addr;
  logic [5:0] tex_tag, tex_rtag = 0;
  vec_t tex_rdata = '0;
  logic ev_fetch, ev_switch, ev_hazard_stall, ev_bank_stall, ev_forward, ev_gated_lane, ev_vc_hit, ev_vc_miss;

  stream_proc dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_hit = 0, n_miss = 0, n_fwd = 0, n_haz = 0, n_bank = 0, n_sw = 0, n_gate = 0;
  int n_trans = 0, n_lit = 0, n_tex = 0;
  int n_rej [3] = '{0, 0, 0};
  int n_amt_cycles = 0, n_conv_cycles = 0, n_fixed = 0, n_float = 0, n_dp4 = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    n_hit  += int'(ev_vc_hit);
    n_miss += int'(ev_vc_miss);
    n_fwd  += int'(ev_forward);
    n_haz  += int'(ev_hazard_stall);
    n_bank += int'(ev_bank_stall);
    n_sw   += int'(ev_switch);
    n_gate += int'(ev_gated_lane);
    n_tex  += int'(tex_req);
    n_trans += $countones(dut.set_trans);
    n_lit   += $countones(dut.set_lit);
    if (ev_fetch) begin
      if (amt) n_amt_cycles++; else n_conv_cycles++;
    end
    if (dut.u_core.e_vld)
      for (int s = 0; s < 2; s++) begin
        if (dut.u_core.e_slot[s].op inside {OP_ADD16, OP_SUB16, OP_ABSD16}) n_fixed++;
        if (dut.u_core.e_slot[s].op inside {OP_FADD, OP_FMUL, OP_DP4}) n_float++;
        if (dut.u_core.e_slot[s].op == OP_DP4) n_dp4++;
      end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ number helpers
  function automatic word_t r2f(real r);          // exact for the values used here
    logic [63:0] d;
    if (r == 0.0) return 0;
    d = $realtobits(r);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction
  function automatic vec_t v4(real x, real y, real z, real w);
    return {r2f(w), r2f(z), r2f(y), r2f(x)};
  endfunction

  // ------------------------------------------------------------ program helpers
  function automatic slot_t mk(opcode_e op, space_e d_sp, int d, space_e a_sp, int a,
                               space_e b_sp, int b, logic [7:0] swz, logic fwd,
                               logic [3:0] act = 4'hF);
    slot_t s;
    s.op = op; s.act = act; s.modf = {fwd, 2'b00};
    s.src0 = '{a_sp, 6'(a)}; s.src1 = '{b_sp, 6'(b)}; s.dst = '{d_sp, 6'(d)};
    s.wmask = 4'hF; s.swz = swz;
    return s;
  endfunction
  function automatic slot_t nop();
    return mk(OP_NOP, SP_GPR, 0, SP_ZERO, 0, SP_ZERO, 0, 8'hE4, 0);
  endfunction
  function automatic slot_t endi();
    return mk(OP_END, SP_GPR, 0, SP_ZERO, 0, SP_ZERO, 0, 8'hE4, 0);
  endfunction
  task automatic put(int pc, slot_t s0, slot_t s1);
    @(negedge clk); im_we = 1; im_waddr = 8'(pc); im_wdata = '{s1: s1, s0: s0};
    @(negedge clk); im_we = 0;
  endtask
  task automatic hw(int a, vec_t v);
    @(negedge clk); host_we = 1; host_addr = CMA_AW'(a); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask

  // ------------------------------------------------------------ memory models
  int vx [NV], vy [NV], vz [NV], vc [NV][3];
  function automatic vec_t vmem(int idx, int attr);
    case (attr)
      0: return v4(real'(vx[idx]), real'(vy[idx]), real'(vz[idx]), 1.0);
      1: return v4(vc[idx][0] / 8.0, vc[idx][1] / 8.0, vc[idx][2] / 8.0, 1.0);
      default: return {96'd0, 32'(idx * 2 + 1)};
    endcase
  endfunction
  int vcnt = 0;
  always @(posedge clk) begin
    vin_valid <= 1'b0;
    if (vin_req && !vin_valid) begin
      if (vcnt == VLAT) begin
        vin_valid <= 1'b1;
        vin_data  <= vmem(int'(vin_idx), int'(vin_attr));
        vcnt <= 0;
      end else vcnt <= vcnt + 1;
    end
  end

  function automatic vec_t tex_val(logic [15:0] a);
    return {32'(a) * 32'd7 + 32'd3, 32'(a) * 32'd5 + 32'd2, 32'(a) * 32'd3 + 32'd1, 32'(a)};
  endfunction
  int tq_time [$];
  logic [15:0] tq_addr [$];
  logic [5:0] tq_tag [$];
  always @(posedge clk) begin
    tex_rvalid <= 1'b0;
    if (tex_req) begin
      tq_time.push_back(cyc + TEX_LAT); tq_addr.push_back(tex_addr); tq_tag.push_back(tex_tag);
    end
    if (tq_time.size() > 0 && tq_time[0] <= cyc) begin
      tex_rvalid <= 1'b1;
      tex_rdata  <= tex_val(tq_addr[0]);
      tex_rtag   <= tq_tag[0];
      void'(tq_time.pop_front()); void'(tq_addr.pop_front()); void'(tq_tag.pop_front());
    end
  end

  // ------------------------------------------------------------ triangle phase
  // transform: clip = (2x+1, 2y-1, z, 8) for w = 1
  function automatic int cx(int i); return 2 * vx[i] + 1; endfunction
  function automatic int cy(int i); return 2 * vy[i] - 1; endfunction

  task automatic triangle(int i0, int i1, int i2);
    int id [3];
    longint det;
    logic outside;
    logic [2:0] ereason;
    vec_t texp;
    id = '{i0, i1, i2};
    det = longint'(cx(i0)) * (cy(i1) * 8 - cy(i2) * 8)
        - longint'(cy(i0)) * (cx(i1) * 8 - cx(i2) * 8)
        + 8 * (longint'(cx(i1)) * cy(i2) - longint'(cx(i2)) * cy(i1));
    outside = 0;
    if (cx(i0) > 8 && cx(i1) > 8 && cx(i2) > 8) outside = 1;
    if (cx(i0) < -8 && cx(i1) < -8 && cx(i2) < -8) outside = 1;
    if (cy(i0) > 8 && cy(i1) > 8 && cy(i2) > 8) outside = 1;
    if (cy(i0) < -8 && cy(i1) < -8 && cy(i2) < -8) outside = 1;
    ereason = outside ? 3'b001 : (det == 0) ? 3'b010 : (det < 0) ? 3'b100 : 3'b000;
    @(negedge clk);
    while (!tri_ready) @(negedge clk);
    tri_valid = 1; tri_idx = '{16'(i0), 16'(i1), 16'(i2)};
    @(negedge clk);
    tri_valid = 0;
    while (!tri_out_valid) @(negedge clk);
    chk(tri_out_reject == (ereason != 0) && tri_out_reason == ereason,
        $sformatf("triangle %0d %0d %0d: reason %b exp %b", i0, i1, i2, tri_out_reason, ereason));
    for (int r = 0; r < 3; r++) if (tri_out_reason[r]) n_rej[r]++;
    for (int k = 0; k < 3; k++) begin
      or_thr = tri_out_thr[k]; or_idx = 0; #1;
      chk(or_data == v4(real'(cx(id[k])), real'(cy(id[k])), real'(vz[id[k]]), 8.0),
          $sformatf("position of vertex %0d", id[k]));
      if (!tri_out_reject) begin
        or_idx = 1; #1;
        chk(or_data == v4(vc[id[k]][0] / 16.0 + 0.125, vc[id[k]][1] / 32.0 + 0.125,
                          vc[id[k]][2] / 8.0 + 0.125, 1.0),
            $sformatf("colour of vertex %0d", id[k]));
        or_idx = 2; #1;
        texp = tex_val(16'(id[k] * 2 + 1));
        chk(or_data[95:0] == texp[95:0], $sformatf("texture of vertex %0d", id[k]));
        or_idx = 3; #1;
        chk(or_data == {4{r2f(vc[id[k]][0] / 16.0 + vc[id[k]][1] / 32.0 + vc[id[k]][2] / 8.0 + 1.0)}},
            $sformatf("intensity (dot product) of vertex %0d", id[k]));
      end
    end
    @(negedge clk); tri_out_ready = 1;
    @(negedge clk); tri_out_ready = 0;
  endtask

  // ------------------------------------------------------------ motion estimation
  localparam int WIN = 64, CUR = 112;       // CMA word addresses
  logic [15:0] win [16][16];               // 16 rows x 16 pixels
  logic [15:0] cur [8][8];

  function automatic vec_t pix8(logic [15:0] p [8]);
    vec_t v;
    for (int i = 0; i < 8; i++) v[i*16 +: 16] = p[i];
    return v;
  endfunction

  task automatic me_search(int pc, output int best_sad, output int best_dy, output int best_dx);
    best_sad = 1 << 30; best_dy = -1; best_dx = -1;
    for (int dy = 0; dy <= 8; dy++)
      for (int dx = 0; dx < 2; dx++) begin
        int sad, ref_sad;
        @(negedge clk);
        const_base = CMA_AW'(WIN + dy * 2 + dx);
        while (busy) @(negedge clk);
        run_start = 1; run_mask = 8'hFF; run_pc = 8'(pc);
        @(negedge clk); run_start = 0;
        while (busy) @(negedge clk);
        sad = 0;
        for (int t = 0; t < 8; t++) begin
          or_thr = 3'(t); or_idx = 0; #1;
          sad += int'(or_data[15:0]) + int'(or_data[31:16]);
        end
        ref_sad = 0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) begin
            int d;
            d = int'(cur[r][c]) - int'(win[dy + r][dx * 8 + c]);
            ref_sad += (d < 0) ? -d : d;
          end
        chk(sad == ref_sad, $sformatf("SAD at (%0d,%0d) = %0d exp %0d", dy, dx, sad, ref_sad));
        if (sad < best_sad) begin best_sad = sad; best_dy = dy; best_dx = dx; end
      end
  endtask

  initial begin
    int h0, c0, bs, bdy, bdx;
    int nrand;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // vertices
    for (int i = 0; i < NV; i++) begin
      vx[i] = $urandom_range(0, 20) - 10;
      vy[i] = $urandom_range(0, 20) - 10;
      vz[i] = $urandom_range(0, 6) - 3;
      for (int c = 0; c < 3; c++) vc[i][c] = $urandom_range(0, 8);
    end
    // constants: transform columns, light colour, ambient
    hw(0, v4(2, 0, 0, 0)); hw(1, v4(0, 2, 0, 0)); hw(2, v4(0, 0, 1, 0)); hw(3, v4(1, -1, 0, 8));
    hw(4, v4(0.5, 0.25, 1.0, 1.0)); hw(5, v4(0.125, 0.125, 0.125, 0.0));
    // programs
    put(0, mk(OP_FMUL, SP_GPR, 0, SP_CONST, 0, SP_IN, 0, 8'h00, 0),
           mk(OP_FMUL, SP_GPR, 1, SP_CONST, 1, SP_IN, 0, 8'h55, 0));
    put(1, mk(OP_FMUL, SP_GPR, 2, SP_CONST, 2, SP_IN, 0, 8'hAA, 0),
           mk(OP_FMUL, SP_GPR, 3, SP_CONST, 3, SP_IN, 0, 8'hFF, 0));
    put(2, mk(OP_FADD, SP_GPR, 0, SP_GPR, 0, SP_GPR, 1, 8'hE4, 1),
           mk(OP_FADD, SP_GPR, 2, SP_GPR, 2, SP_GPR, 3, 8'hE4, 1));
    put(3, mk(OP_FADD, SP_IN, 0, SP_GPR, 0, SP_GPR, 2, 8'hE4, 1), endi());
    put(8, mk(OP_FMUL, SP_GPR, 5, SP_IN, 1, SP_CONST, 4, 8'hE4, 0),
           mk(OP_TXLD, SP_GPR, 6, SP_IN, 2, SP_ZERO, 0, 8'hE4, 0));
    put(9, mk(OP_FADD, SP_IN, 1, SP_GPR, 5, SP_CONST, 5, 8'hE4, 1),
           mk(OP_MOV,  SP_IN, 2, SP_GPR, 6, SP_ZERO, 0, 8'hE4, 0, 4'b0111));
    put(10, mk(OP_DP4, SP_IN, 3, SP_IN, 1, SP_CONST, 4, 8'hE4, 0), endi());
    // ME row SAD: |cur - ref| per pixel, then fold the channels
    for (int f = 0; f < 2; f++) begin
      put(16 + 8 * f, mk(OP_ABSD16, SP_GPR, 0, SP_IN, 0, SP_CONST, 0, 8'hE4, 0), nop());
      put(17 + 8 * f, mk(OP_ADD16, SP_GPR, 1, SP_GPR, 0, SP_GPR, 0, 8'hB1, 1'(f == 0)), nop());
      put(18 + 8 * f, mk(OP_ADD16, SP_IN, 0, SP_GPR, 1, SP_GPR, 1, 8'h4E, 1'(f == 0)), endi());
    end

    // ---- phase 1: triangles
    c0 = cyc;
    for (int i = 0; i < 28; i++)                        // strip, alternating winding
      if (i % 2 == 0) triangle(i, i + 1, i + 2); else triangle(i + 1, i, i + 2);
    triangle(3, 3, 7);                                  // degenerate by index
    triangle(30, 30, 30);
    for (int i = 0; i < 30; i++) begin
      int a, b, c;
      a = $urandom_range(0, NV - 1); b = $urandom_range(0, NV - 1); c = $urandom_range(0, NV - 1);
      triangle(a, b, c);
    end
    // collinear vertices
    vx[44] = 0; vy[44] = 0; vx[45] = 2; vy[45] = 2; vx[46] = 4; vy[46] = 4;
    @(negedge clk); vc_invalidate = 1; @(negedge clk); vc_invalidate = 0;
    triangle(44, 45, 46);
    $display("triangles: %0d cycles; cache hits %0d misses %0d; transformed %0d lit %0d",
             cyc - c0, n_hit, n_miss, n_trans, n_lit);
    $display("rejected: outside %0d zero %0d back %0d", n_rej[0], n_rej[1], n_rej[2]);
    chk(n_trans == n_miss, "each loaded vertex transformed once");
    chk(n_lit < n_trans, "rejection saves lighting work");

    // ---- phase 2: motion estimation (window in constants, block as stream)
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) win[r][c] = 16'($urandom_range(0, 255));
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) cur[r][c] = win[5 + r][8 + c];
    for (int r = 0; r < 16; r++)
      for (int w = 0; w < 2; w++) begin
        vec_t v;
        for (int i = 0; i < 8; i++) v[i*16 +: 16] = win[r][w * 8 + i];
        hw(WIN + r * 2 + w, v);
      end
    for (int r = 0; r < 8; r++) hw(CUR + r, pix8(cur[r]));
    stream_base = CUR; stream_stride = 1; const_stride = 2;
    h0 = n_haz;
    amt = 1;
    me_search(24, bs, bdy, bdx);                        // no forwarding
    chk(bs == 0 && bdy == 5 && bdx == 1, $sformatf("ME best (%0d,%0d) sad %0d", bdy, bdx, bs));
    chk(n_haz > h0, "hazard stalls without forwarding");
    amt = 0; h0 = n_haz;
    me_search(24, bs, bdy, bdx);                        // conventional interleaving
    chk(bs == 0 && bdy == 5 && bdx == 1, "ME best, conventional");
    chk(n_haz == h0, "no hazard stall with interleaved threads");
    amt = 1;
    me_search(16, bs, bdy, bdx);                        // with forwarding
    chk(bs == 0 && bdy == 5 && bdx == 1, "ME best, forwarding");

    // ---- phase 3: transform rate on 8 threads
    stream_base = 20; stream_stride = 8; const_base = 0; const_stride = 0;
    @(negedge clk);
    run_start = 1; run_mask = 8'hFF; run_pc = 0;
    @(negedge clk); run_start = 0;
    c0 = cyc;
    while (busy) @(negedge clk);
    $display("transform of 8 vertices: %0d cycles", cyc - c0);
    chk(cyc - c0 <= 8 * 4 + 6, "4 cycles per vertex");

    // ---- mechanisms
    $display("forward %0d hazard %0d bank %0d switch %0d gated %0d tex %0d fixed %0d float %0d amt %0d conv %0d",
             n_fwd, n_haz, n_bank, n_sw, n_gate, n_tex, n_fixed, n_float, n_amt_cycles, n_conv_cycles);
    chk(n_hit > 0 && n_miss > 0, "cache hit and miss");
    chk(n_rej[0] > 0, "outside rejection");
    chk(n_rej[1] > 0, "zero-area rejection");
    chk(n_rej[2] > 0, "back-face rejection");
    chk(n_fwd > 0, "forwarding");
    chk(n_haz > 0, "hazard stall");
    chk(n_bank > 0, "bank conflict");
    chk(n_sw > 0 && n_tex > 0, "texture loads and thread switches");
    chk(n_gate > 0, "gated channels");
    chk(n_amt_cycles > 0 && n_conv_cycles > 0, "both scheduling modes");
    chk(n_fixed > 0 && n_float > 0, "float and fixed-point modes");
    chk(n_dp4 > 0, "dot-product operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
