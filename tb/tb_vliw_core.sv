// tb_vliw_core: self-checking test of the VLIW SIMD core.
//
// The core is connected to a cma instance (the testbench writes it over
// channel 3 while the core is idle) and to a texture memory model that
// answers after TEX_LAT cycles with data computed from the address.
// Scenarios:
//   1. vertex transform (4x4 matrix times vertex, 4 bundles per vertex) on 8
//      threads, adaptive scheduling with forwarding: results against a
//      real-arithmetic reference with round-toward-zero; at most 4 cycles per
//      vertex plus pipeline fill, no hazard stall;
//   2. same program without forwarding, conventional interleaving: correct,
//      still no hazard stall (threads hide the latency);
//   3. without forwarding, adaptive scheduling: correct, hazard stalls occur;
//   4. bank-conflicting CMA layout: correct, bank stalls occur;
//   5. texture loads with a partly gated Active Vector: each thread parks and
//      the others run; gated channels keep their old value.
`timescale 1ns/1ps
module tb_vliw_core;
  import sp_pkg::*;
  localparam int TEX_LAT = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic amt;
  logic [CMA_AW-1:0] stream_base, const_base;
  logic [5:0] const_stride = 0;
  logic [3:0] stream_stride;
  logic im_we = 0;
  logic [7:0] im_waddr = 0;
  bundle_t im_wdata = '0;
  logic start = 0;
  logic [7:0] start_mask = 0;
  logic [7:0] start_pc = 0;
  logic busy;
  logic [3:0] c_req, m_req, m_we, m_gnt;
  logic [CMA_AW-1:0] c_addr [4], m_addr [4];
  vec_t m_wdata [4], m_rdata [4];
  logic tex_req, tex_rvalid = 0;
  logic [15:0] tex_addr;
  logic [5:0] tex_tag, tex_rtag = 0;
  vec_t tex_rdata = '0;
  logic [2:0] or_thr = 0, or_idx = 0;
  vec_t or_data, pos_out [8];
  logic ev_fetch, ev_switch, ev_hazard_stall, ev_bank_stall, ev_forward, ev_gated_lane;

  // testbench loader on channel 3
  logic ld_en = 0;
  logic [CMA_AW-1:0] ld_addr = 0;
  vec_t ld_data = '0;

  vliw_core dut (
    .clk, .rst_n, .amt, .stream_base, .stream_stride, .const_base, .const_stride,
    .im_we, .im_waddr, .im_wdata, .start, .start_mask, .start_pc, .busy,
    .cma_req(c_req), .cma_addr(c_addr), .cma_gnt(m_gnt), .cma_rdata(m_rdata),
    .tex_req, .tex_addr, .tex_tag, .tex_rvalid, .tex_rdata, .tex_rtag,
    .or_thr, .or_idx, .or_data, .pos_out,
    .ev_fetch, .ev_switch, .ev_hazard_stall, .ev_bank_stall, .ev_forward, .ev_gated_lane
  );

  always_comb begin
    m_req = c_req; m_we = '0;
    for (int c = 0; c < 4; c++) begin m_addr[c] = c_addr[c]; m_wdata[c] = '0; end
    if (ld_en) begin
      m_req[3] = 1'b1; m_we[3] = 1'b1; m_addr[3] = ld_addr; m_wdata[3] = ld_data;
    end
  end

  cma u_cma (.clk, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .gnt(m_gnt), .rdata(m_rdata));

  // texture memory model: fixed latency, one outstanding request per thread
  function automatic vec_t tex_val(logic [15:0] a);
    return {32'(a) * 32'd7 + 32'd3, 32'(a) * 32'd5 + 32'd2, 32'(a) * 32'd3 + 32'd1, 32'(a)};
  endfunction
  int   tq_time [$];
  logic [15:0] tq_addr [$];
  logic [5:0]  tq_tag [$];
  int   cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
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

  int checks = 0, failures = 0;
  int n_fwd = 0, n_haz = 0, n_bank = 0, n_sw = 0, n_gate = 0;
  always @(posedge clk) begin
    n_fwd  += int'(ev_forward);
    n_haz  += int'(ev_hazard_stall);
    n_bank += int'(ev_bank_stall);
    n_sw   += int'(ev_switch);
    n_gate += int'(ev_gated_lane);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ helpers
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
    @(negedge clk);
    im_we = 1; im_waddr = 8'(pc); im_wdata = '{s1: s1, s0: s0};
    @(negedge clk);
    im_we = 0;
  endtask

  task automatic ld(int a, vec_t v);
    @(negedge clk);
    ld_en = 1; ld_addr = CMA_AW'(a); ld_data = v;
    @(negedge clk);
    ld_en = 0;
  endtask

  // transform program at pc base; fwd selects forwarding on dependent bundles
  task automatic load_xform(int base, logic fwd);
    put(base + 0, mk(OP_FMUL, SP_GPR, 0, SP_CONST, 0, SP_IN, 0, 8'h00, 0),
                  mk(OP_FMUL, SP_GPR, 1, SP_CONST, 1, SP_IN, 0, 8'h55, 0));
    put(base + 1, mk(OP_FMUL, SP_GPR, 2, SP_CONST, 2, SP_IN, 0, 8'hAA, 0),
                  mk(OP_FMUL, SP_GPR, 3, SP_CONST, 3, SP_IN, 0, 8'hFF, 0));
    put(base + 2, mk(OP_FADD, SP_GPR, 0, SP_GPR, 0, SP_GPR, 1, 8'hE4, fwd),
                  mk(OP_FADD, SP_GPR, 2, SP_GPR, 2, SP_GPR, 3, 8'hE4, fwd));
    put(base + 3, mk(OP_FADD, SP_IN, 0, SP_GPR, 0, SP_GPR, 2, 8'hE4, fwd), endi());
  endtask

  // reference arithmetic (exact double, then truncated to single)
  function automatic word_t rz32(real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 0 || e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction
  function automatic real f2r(word_t w);
    if (w[30:23] == 0) return 0.0;
    return $bitstoreal({w[31], 11'(int'(w[30:23]) - 127 + 1023), w[22:0], 29'd0});
  endfunction
  function automatic word_t rnd_fp();
    return {1'($urandom), 8'(122 + $urandom_range(0, 10)), 23'($urandom)};
  endfunction
  function automatic logic same(word_t a, word_t b);
    return (a == b) || (a[30:0] == 0 && b[30:0] == 0);
  endfunction

  vec_t cst [4];
  vec_t vin [8];

  task automatic load_data(int sbase, int stride);
    for (int i = 0; i < 4; i++) begin
      for (int l = 0; l < 4; l++) cst[i][l*32 +: 32] = rnd_fp();
      ld(i, cst[i]);
    end
    for (int t = 0; t < 8; t++) begin
      for (int l = 0; l < 4; l++) vin[t][l*32 +: 32] = rnd_fp();
      ld(sbase + t * stride, vin[t]);
      // attribute 1: texture address in channel 0
      ld(sbase + t * stride + 1, {96'd0, 32'(100 + 3 * t)});
    end
  endtask

  task automatic check_xform(string tag);
    for (int t = 0; t < 8; t++)
      for (int l = 0; l < 4; l++) begin
        word_t p [4], s01, s23, o;
        for (int i = 0; i < 4; i++)
          p[i] = rz32(f2r(cst[i][l*32 +: 32]) * f2r(vin[t][i*32 +: 32]));
        s01 = rz32(f2r(p[0]) + f2r(p[1]));
        s23 = rz32(f2r(p[2]) + f2r(p[3]));
        o   = rz32(f2r(s01) + f2r(s23));
        chk(same(pos_out[t][l*32 +: 32], o),
            $sformatf("%s thread %0d lane %0d got %h exp %h", tag, t, l, pos_out[t][l*32 +: 32], o));
      end
  endtask

  task automatic run(int pc, output int cycles);
    int c0;
    @(negedge clk);
    start = 1; start_mask = 8'hFF; start_pc = 8'(pc);
    @(negedge clk);
    start = 0;
    c0 = cyc;
    while (busy) @(negedge clk);
    cycles = cyc - c0;
  endtask

  initial begin
    int cy, h0, b0, s0;
    amt = 1; stream_base = 20; stream_stride = 8; const_base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_xform(0, 1);
    load_xform(8, 0);
    // texture program: r4 <- tex[in1.x]; out1 <- 0; out1.xyz <- r4.xyz
    put(16, mk(OP_TXLD, SP_GPR, 4, SP_IN, 1, SP_ZERO, 0, 8'hE4, 0),
            mk(OP_MOV,  SP_IN, 1, SP_ZERO, 0, SP_ZERO, 0, 8'hE4, 0));
    put(17, mk(OP_MOV, SP_IN, 1, SP_GPR, 4, SP_ZERO, 0, 8'hE4, 0, 4'b0111), endi());
    load_data(20, 8);

    // 1. adaptive + forwarding
    h0 = n_haz;
    run(0, cy);
    $display("adaptive+forwarding: %0d cycles for 8 vertices", cy);
    check_xform("amt+fwd");
    chk(cy <= 8 * 4 + 6, $sformatf("throughput: %0d cycles > 38", cy));
    chk(n_haz == h0, "no hazard stall with forwarding");
    chk(n_fwd > 0, "forwarding used");

    // 2. conventional, no forwarding
    amt = 0; h0 = n_haz;
    run(8, cy);
    $display("conventional, no forwarding: %0d cycles", cy);
    check_xform("conv");
    chk(n_haz == h0, "interleaving hides dependences");
    chk(cy <= 8 * 4 + 6, "conventional throughput");

    // 3. adaptive, no forwarding
    amt = 1; h0 = n_haz;
    run(8, cy);
    $display("adaptive, no forwarding: %0d cycles, %0d hazard stalls", cy, n_haz - h0);
    check_xform("amt nofwd");
    chk(n_haz > h0, "hazard stalls without forwarding");

    // 4. bank conflicts: stream attribute 0 shares bank 0 with constant 0
    stream_base = 16; b0 = n_bank;
    load_data(16, 8);
    run(0, cy);
    $display("conflicting layout: %0d cycles, %0d bank stalls", cy, n_bank - b0);
    check_xform("bank");
    chk(n_bank > b0, "bank stalls");

    // 5. texture loads with gated lane 3
    s0 = n_sw;
    run(16, cy);
    $display("texture program: %0d cycles, %0d thread switches", cy, n_sw - s0);
    for (int t = 0; t < 8; t++) begin
      vec_t e;
      e = tex_val(16'(100 + 3 * t));
      e[127:96] = '0;
      @(negedge clk); or_thr = 3'(t); or_idx = 1; #1;
      chk(or_data == e, $sformatf("texture thread %0d got %h exp %h", t, or_data, e));
    end
    chk(cy < 8 * TEX_LAT, "texture latency hidden by other threads");
    chk(n_gate > 0, "gated lanes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
