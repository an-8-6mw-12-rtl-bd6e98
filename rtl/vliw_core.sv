// vliw_core: the 2-issue VLIW SIMD shader core with 8 hardware threads.
//
// Pipeline (one bundle of two slots per cycle):
//   IM   the thread scheduler (amt_sched) picks a ready thread; its bundle is
//        read from the instruction memory and its pc advances. A bundle that
//        holds TXLD parks the thread until the texture data returns; a bundle
//        that holds END retires the thread. So the next fetch switches thread.
//   DEC  operands are gathered. GPR sources come from the thread's register
//        file; input-stream and constant sources are read from the CMA over
//        its four channels (slot s, source k uses channel 2s+k). A bank
//        conflict holds the bundle in DEC until every channel has been served
//        (data already served is kept). A GPR source that an older bundle in
//        EXE or WB is still going to write is a data hazard: if the consuming
//        slot has its forwarding bit set (Modify[2]) the value is bypassed from
//        the EXE result or the WB register, otherwise the bundle stalls until
//        the write is done.
//   EXE  two simd_alu units execute. The EXE operand registers load only the
//        channels named in the slot's Active Vector and only for slots that do
//        something: this is where per-stage and per-element clock gating sits,
//        driven by the instruction. A TXLD issues its texture request here.
//   WB   results are written, under write mask and Active Vector, to the
//        thread's general registers or output registers. Texture data returns
//        through a separate write port.
// Stream addresses are stream_base + thread*stream_stride + index and constant
// addresses const_base + thread*const_stride + index, which is how the CMA is
// given its logical layout (const_stride is 0 for vertex shading, where all
// threads share the constants, and the search-window row pitch for motion
// estimation, where thread t works on row t of the candidate block). Threads are started together by start/start_mask at start_pc.
// Interface timing: texture requests are single-cycle pulses (tex_req) that the
// memory must accept; responses may come any number of cycles later, one per
// cycle. CMA reads are combinational (cma_gnt/cma_rdata in the request cycle).
// The pipeline stages, 2 slots, 4 channels, forwarding and clock gating under
// instruction control and the thread policies follow the processor described
// for this design; field encodings, register counts, the one-stage EXE and the
// texture interface are this design's choices.
module vliw_core
  import sp_pkg::*;
#(
  parameter int unsigned NT       = NTHREAD,
  parameter int unsigned IM_DEPTH = 256,
  localparam int unsigned TW      = $clog2(NT),
  localparam int unsigned PCW     = $clog2(IM_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                amt,            // 1: adaptive, 0: conventional
  input  logic [CMA_AW-1:0]   stream_base,
  input  logic [3:0]          stream_stride,  // attributes per thread
  input  logic [CMA_AW-1:0]   const_base,
  input  logic [5:0]          const_stride,   // per-thread constant offset (0 for shared constants)
  // program load
  input  logic                im_we,
  input  logic [PCW-1:0]      im_waddr,
  input  bundle_t             im_wdata,
  // thread start / status
  input  logic                start,
  input  logic [NT-1:0]       start_mask,
  input  logic [PCW-1:0]      start_pc,
  output logic                busy,
  // CMA channels (read only from the core)
  output logic [NCHAN-1:0]    cma_req,
  output logic [CMA_AW-1:0]   cma_addr  [NCHAN],
  input  logic [NCHAN-1:0]    cma_gnt,
  input  vec_t                cma_rdata [NCHAN],
  // texture memory
  output logic                tex_req,
  output logic [15:0]         tex_addr,
  output logic [TW+2:0]       tex_tag,        // {thread, GPR index}
  input  logic                tex_rvalid,
  input  vec_t                tex_rdata,
  input  logic [TW+2:0]       tex_rtag,
  // output registers
  input  logic [TW-1:0]       or_thr,
  input  logic [2:0]          or_idx,
  output vec_t                or_data,
  output vec_t                pos_out [NT],   // output register 0 of every thread
  // activity, one pulse per event
  output logic                ev_fetch,
  output logic                ev_switch,
  output logic                ev_hazard_stall,
  output logic                ev_bank_stall,
  output logic                ev_forward,
  output logic                ev_gated_lane
);
  // ---------------------------------------------------------------- state
  bundle_t        imem [IM_DEPTH];
  vec_t           gpr  [NT][NGPR];
  vec_t           oreg [NT][NOREG];
  logic [PCW-1:0] pc   [NT];
  logic [NT-1:0]  active, wait_tex;

  // DEC stage
  logic           d_vld;
  logic [TW-1:0]  d_thr;
  bundle_t        d_bun;
  logic [NCHAN-1:0] d_got;
  vec_t           d_hold [NCHAN];
  // EXE stage
  logic           e_vld;
  logic [TW-1:0]  e_thr;
  slot_t          e_slot [NSLOT];
  vec_t           e_a [NSLOT], e_b [NSLOT];
  // WB stage
  logic           w_vld;
  logic [TW-1:0]  w_thr;
  slot_t          w_slot [NSLOT];
  vec_t           w_res [NSLOT];
  logic [TW-1:0]  last_fetch_thr;

  function automatic logic writes_reg(slot_t s);
    return !(s.op inside {OP_NOP, OP_TXLD, OP_END});
  endfunction

  // ---------------------------------------------------------------- IM
  logic [TW-1:0] f_thr;
  logic          f_vld, dec_adv, fetch;
  bundle_t       f_bun;
  logic          f_txld, f_end;

  amt_sched #(.NT(NT)) u_sched (
    .clk, .rst_n, .amt,
    .ready   (active & ~wait_tex),
    .advance (fetch),
    .sel     (f_thr),
    .sel_vld (f_vld)
  );

  assign f_bun  = imem[pc[f_thr]];
  assign f_txld = (f_bun.s0.op == OP_TXLD) || (f_bun.s1.op == OP_TXLD);
  assign f_end  = (f_bun.s0.op == OP_END)  || (f_bun.s1.op == OP_END);
  // a new bundle enters DEC when DEC is empty or moves on this cycle
  assign fetch  = f_vld && (!d_vld || dec_adv);

  always_ff @(posedge clk) begin
    if (im_we) imem[im_waddr] <= im_wdata;
  end

  // ---------------------------------------------------------------- DEC
  vec_t       opnd [NSLOT][2];
  logic       hazard, cma_ok;
  logic [3:0] fwd_any;
  vec_t       alu_y [NSLOT];
  slot_t      d_slot [NSLOT];
  // per source and channel: an older bundle in EXE / WB writes this GPR lane
  logic [LANES-1:0] hit_e [NSLOT][2];
  logic [LANES-1:0] hit_w [NSLOT][2];
  vec_t             val_e [NSLOT][2];
  vec_t             val_w [NSLOT][2];

  assign d_slot[0] = d_bun.s0;
  assign d_slot[1] = d_bun.s1;

  function automatic opnd_t src_of(slot_t sl, int k);
    return (k == 0) ? sl.src0 : sl.src1;
  endfunction

  function automatic logic writes_gpr(slot_t p, opnd_t o, int l);
    return writes_reg(p) && p.dst.sp == DST_GPR && p.dst.idx == o.idx && p.wmask[l] && p.act[l];
  endfunction

  // producer search; slot 1 is the later of a bundle and overrides slot 0
  always_comb begin
    for (int s = 0; s < NSLOT; s++)
      for (int k = 0; k < 2; k++) begin
        hit_e[s][k] = '0;
        hit_w[s][k] = '0;
        val_e[s][k] = '0;
        val_w[s][k] = '0;
        for (int p = 0; p < NSLOT; p++)
          for (int l = 0; l < LANES; l++) begin
            if (w_vld && w_thr == d_thr && writes_gpr(w_slot[p], src_of(d_slot[s], k), l)) begin
              hit_w[s][k][l] = 1'b1;
              val_w[s][k][l*WORD_W +: WORD_W] = w_res[p][l*WORD_W +: WORD_W];
            end
            if (e_vld && e_thr == d_thr && writes_gpr(e_slot[p], src_of(d_slot[s], k), l)) begin
              hit_e[s][k][l] = 1'b1;
              val_e[s][k][l*WORD_W +: WORD_W] = alu_y[p][l*WORD_W +: WORD_W];
            end
          end
      end
  end

  // CMA requests depend only on the DEC bundle (kept apart from the grant path)
  always_comb begin
    for (int s = 0; s < NSLOT; s++)
      for (int k = 0; k < 2; k++) begin
        opnd_t o;
        o = src_of(d_slot[s], k);
        cma_req[2*s+k]  = 1'b0;
        cma_addr[2*s+k] = '0;
        if (o.sp == SP_IN || o.sp == SP_CONST) begin
          cma_addr[2*s+k] = (o.sp == SP_IN)
              ? CMA_AW'(stream_base + CMA_AW'(d_thr) * CMA_AW'(stream_stride) + CMA_AW'(o.idx))
              : CMA_AW'(const_base + CMA_AW'(d_thr) * CMA_AW'(const_stride) + CMA_AW'(o.idx));
          cma_req[2*s+k]  = d_vld && d_slot[s].op != OP_NOP && !d_got[2*s+k];
        end
      end
  end

  always_comb begin
    cma_ok = 1'b1;
    for (int c = 0; c < NCHAN; c++)
      if (cma_req[c] && !cma_gnt[c]) cma_ok = 1'b0;
  end

  always_comb begin
    hazard  = 1'b0;
    fwd_any = '0;
    for (int s = 0; s < NSLOT; s++)
      for (int k = 0; k < 2; k++) begin
        opnd[s][k] = '0;
        unique case (src_of(d_slot[s], k).sp)
          SP_GPR: begin
            opnd[s][k] = gpr[d_thr][src_of(d_slot[s], k).idx[2:0]];
            for (int l = 0; l < LANES; l++)
              if (d_vld && d_slot[s].op != OP_NOP && (hit_e[s][k][l] || hit_w[s][k][l])) begin
                if (d_slot[s].modf[2]) begin
                  fwd_any[2*s+k] = 1'b1;
                  opnd[s][k][l*WORD_W +: WORD_W] = hit_e[s][k][l] ? val_e[s][k][l*WORD_W +: WORD_W]
                                                                  : val_w[s][k][l*WORD_W +: WORD_W];
                end else begin
                  hazard = 1'b1;
                end
              end
          end
          SP_IN, SP_CONST:
            opnd[s][k] = d_got[2*s+k] ? d_hold[2*s+k] : cma_rdata[2*s+k];
          default: opnd[s][k] = '0;
        endcase
      end
  end

  assign dec_adv = d_vld && cma_ok && !hazard;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_vld <= 1'b0;
      d_thr <= '0;
      d_bun <= '0;
      d_got <= '0;
      for (int c = 0; c < NCHAN; c++) d_hold[c] <= '0;
    end else begin
      if (fetch) begin
        d_vld <= 1'b1;
        d_thr <= f_thr;
        d_bun <= f_bun;
      end else if (dec_adv) begin
        d_vld <= 1'b0;
      end
      if (dec_adv || !d_vld) d_got <= '0;
      else
        for (int c = 0; c < NCHAN; c++)
          if (cma_req[c] && cma_gnt[c]) begin
            d_got[c]  <= 1'b1;
            d_hold[c] <= cma_rdata[c];
          end
    end
  end

  // ---------------------------------------------------------------- EXE
  for (genvar g = 0; g < NSLOT; g++) begin : g_slot
    simd_alu u_alu (
      .op  (e_slot[g].op),
      .act (e_slot[g].act),
      .neg (e_slot[g].modf[1:0]),
      .swz (e_slot[g].swz),
      .a   (e_a[g]),
      .b   (e_b[g]),
      .y   (alu_y[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_vld <= 1'b0;
      e_thr <= '0;
      for (int s = 0; s < NSLOT; s++) begin
        e_slot[s] <= '0;
        e_a[s]    <= '0;
        e_b[s]    <= '0;
      end
    end else begin
      e_vld <= dec_adv;
      if (dec_adv) begin
        e_thr <= d_thr;
        for (int s = 0; s < NSLOT; s++) begin
          e_slot[s] <= d_slot[s];
          // clock gating: a NOP slot and inactive channels keep their registers
          if (d_slot[s].op != OP_NOP)
            for (int l = 0; l < LANES; l++)
              if (d_slot[s].act[l]) begin
                e_a[s][l*WORD_W +: WORD_W] <= opnd[s][0][l*WORD_W +: WORD_W];
                e_b[s][l*WORD_W +: WORD_W] <= opnd[s][1][l*WORD_W +: WORD_W];
              end
        end
      end else begin
        for (int s = 0; s < NSLOT; s++) e_slot[s].op <= OP_NOP;
      end
    end
  end

  // texture request from EXE (slot 0 has priority if both slots load)
  always_comb begin
    tex_req  = 1'b0;
    tex_addr = '0;
    tex_tag  = '0;
    for (int s = NSLOT-1; s >= 0; s--)
      if (e_vld && e_slot[s].op == OP_TXLD) begin
        tex_req  = 1'b1;
        tex_addr = alu_y[s][15:0];
        tex_tag  = {e_thr, e_slot[s].dst.idx[2:0]};
      end
  end

  // ---------------------------------------------------------------- WB
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_vld <= 1'b0;
      w_thr <= '0;
      for (int s = 0; s < NSLOT; s++) begin
        w_slot[s] <= '0;
        w_res[s]  <= '0;
      end
    end else begin
      w_vld <= e_vld;
      w_thr <= e_thr;
      for (int s = 0; s < NSLOT; s++) begin
        w_slot[s] <= e_vld ? e_slot[s] : '0;
        if (e_vld && writes_reg(e_slot[s])) w_res[s] <= alu_y[s];
      end
    end
  end

  // register files: WB slot 0, then slot 1, then the texture port
  always_ff @(posedge clk) begin
    for (int s = 0; s < NSLOT; s++)
      if (w_vld && writes_reg(w_slot[s]))
        for (int l = 0; l < LANES; l++)
          if (w_slot[s].wmask[l] && w_slot[s].act[l]) begin
            if (w_slot[s].dst.sp == DST_GPR)
              gpr[w_thr][w_slot[s].dst.idx[2:0]][l*WORD_W +: WORD_W] <= w_res[s][l*WORD_W +: WORD_W];
            else if (w_slot[s].dst.sp == DST_OUT)
              oreg[w_thr][w_slot[s].dst.idx[2:0]][l*WORD_W +: WORD_W] <= w_res[s][l*WORD_W +: WORD_W];
          end
    if (tex_rvalid)
      gpr[tex_rtag[TW+2:3]][tex_rtag[2:0]] <= tex_rdata;
  end

  assign or_data = oreg[or_thr][or_idx];
  always_comb
    for (int t = 0; t < NT; t++) pos_out[t] = oreg[t][0];

  // ---------------------------------------------------------------- threads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= '0;
      wait_tex <= '0;
      last_fetch_thr <= '0;
      for (int t = 0; t < NT; t++) pc[t] <= '0;
    end else begin
      if (fetch) begin
        pc[f_thr] <= pc[f_thr] + PCW'(1);
        last_fetch_thr <= f_thr;
        if (f_txld) wait_tex[f_thr] <= 1'b1;
        if (f_end)  active[f_thr]   <= 1'b0;
      end
      if (tex_rvalid) wait_tex[tex_rtag[TW+2:3]] <= 1'b0;
      if (start)
        for (int t = 0; t < NT; t++)
          if (start_mask[t]) begin
            active[t] <= 1'b1;
            pc[t]     <= start_pc;
          end
    end
  end

  assign busy = (|active) || (|wait_tex) || d_vld || e_vld || w_vld;

  assign ev_fetch        = fetch;
  assign ev_switch       = fetch && (f_thr != last_fetch_thr);
  assign ev_hazard_stall = d_vld && cma_ok && hazard;
  assign ev_bank_stall   = d_vld && !cma_ok;
  assign ev_forward      = dec_adv && (|fwd_any);
  assign ev_gated_lane   = dec_adv && (((d_bun.s0.op != OP_NOP) && (d_bun.s0.act != 4'hF)) ||
                                       ((d_bun.s1.op != OP_NOP) && (d_bun.s1.act != 4'hF)));

  // a new start must not hit a running thread
  assert property (@(posedge clk) disable iff (!rst_n) start |-> ((start_mask & (active | wait_tex)) == '0))
    else $error("vliw_core: start of a thread that is still running");
endmodule
