// stream_proc: stream processor core for mobile graphics and video encoding.
//
// One programmable 2-issue VLIW SIMD core (vliw_core) serves both workloads.
// It reads its input stream and constant registers from a shared 8-bank,
// 4-channel memory pool (cma) whose logical layout is set by three base/stride
// registers. For vertex processing the pool holds a stream cache of eight
// vertex threads plus the constants; for motion estimation it holds the
// search window (as constants) and the current macroblock (as the stream).
//
// Vertex processing is run triangle by triangle by the sequencer in this
// module, with the vertex cache tags (vcache) and the early-rejection unit
// (erat):
//   LOOKUP  the three indices are looked up; a hit reuses the vertex thread,
//           a miss allocates one;
//   LOAD    attributes of missed vertices are fetched over the vertex-input
//           port (vin_*: request held until vin_valid) into the thread's
//           stream-cache area through CMA channel 3;
//   XFORM   threads whose trans tag is clear run the transform program
//           (at xform_pc); their output register 0 is the clip position;
//   ERAT    the triangle is tested; a rejected triangle skips the next step;
//   LIGHT   threads whose lighted tag is clear run the lighting program
//           (at light_pc);
//   EMIT    {thread ids, reject, reason} are offered on tri_out_* until
//           accepted; output registers are read through or_*.
// Outside the triangle flow the core can run any program on any threads
// (run_start), which is how motion-estimation kernels are executed, and the
// host can write the CMA (host_we, only while idle) and the instruction
// memory. Texture loads leave through tex_*.
// The block structure (core, CMA, vertex cache tags, rejection after the
// transform stage) follows the design; the sequencer, its ports and their
// handshakes are this design's own.
module stream_proc
  import sp_pkg::*;
#(
  parameter int unsigned IM_DEPTH = 256,
  parameter int unsigned CMA_DEPTH = 64,
  localparam int unsigned PCW = $clog2(IM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               amt,
  input  logic [2:0]         erat_en,        // {back, zero, outside}
  input  logic [CMA_AW-1:0]  stream_base,
  input  logic [3:0]         stream_stride,
  input  logic [CMA_AW-1:0]  const_base,
  input  logic [5:0]         const_stride,
  input  logic [3:0]         nattr,          // attributes loaded per vertex
  input  logic [PCW-1:0]     xform_pc,
  input  logic [PCW-1:0]     light_pc,
  // host access
  input  logic               host_we,
  input  logic [CMA_AW-1:0]  host_addr,
  input  vec_t               host_wdata,
  input  logic               im_we,
  input  logic [PCW-1:0]     im_waddr,
  input  bundle_t            im_wdata,
  input  logic               vc_invalidate,
  // direct program run
  input  logic               run_start,
  input  logic [NTHREAD-1:0] run_mask,
  input  logic [PCW-1:0]     run_pc,
  output logic               busy,
  // triangles in
  input  logic               tri_valid,
  output logic               tri_ready,
  input  logic [15:0]        tri_idx [3],
  // vertex input
  output logic               vin_req,
  output logic [15:0]        vin_idx,
  output logic [3:0]         vin_attr,
  input  logic               vin_valid,
  input  vec_t               vin_data,
  // triangles out
  output logic               tri_out_valid,
  input  logic               tri_out_ready,
  output logic [2:0]         tri_out_thr [3],
  output logic               tri_out_reject,
  output logic [2:0]         tri_out_reason,
  // output registers
  input  logic [2:0]         or_thr,
  input  logic [2:0]         or_idx,
  output vec_t               or_data,
  // texture memory
  output logic               tex_req,
  output logic [15:0]        tex_addr,
  output logic [5:0]         tex_tag,
  input  logic               tex_rvalid,
  input  vec_t               tex_rdata,
  input  logic [5:0]         tex_rtag,
  // activity
  output logic               ev_fetch,
  output logic               ev_switch,
  output logic               ev_hazard_stall,
  output logic               ev_bank_stall,
  output logic               ev_forward,
  output logic               ev_gated_lane,
  output logic               ev_vc_hit,
  output logic               ev_vc_miss
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_LOAD, S_XFORM, S_XFORM_WAIT, S_ERAT, S_ERAT_WAIT,
    S_LIGHT, S_LIGHT_WAIT, S_EMIT
  } state_e;

  state_e          st_q;
  logic [1:0]      k_q;            // vertex of the triangle
  logic [3:0]      a_q;            // attribute being loaded
  logic [15:0]     idx_q  [3];
  logic [2:0]      ent_q  [3];
  logic [2:0]      miss_q;
  logic            rej_q;
  logic [2:0]      reason_q;

  // ---------------------------------------------------------------- core
  logic [NCHAN-1:0]  c_req, m_req, m_we, m_gnt;
  logic [CMA_AW-1:0] c_addr [NCHAN], m_addr [NCHAN];
  vec_t              m_wdata [NCHAN], m_rdata [NCHAN];
  logic              core_start, core_busy;
  logic [NTHREAD-1:0] core_mask;
  logic [PCW-1:0]    core_pc;
  vec_t              pos_out [NTHREAD];

  vliw_core #(.NT(NTHREAD), .IM_DEPTH(IM_DEPTH)) u_core (
    .clk, .rst_n, .amt, .stream_base, .stream_stride, .const_base, .const_stride,
    .im_we, .im_waddr, .im_wdata,
    .start (core_start), .start_mask (core_mask), .start_pc (core_pc), .busy (core_busy),
    .cma_req (c_req), .cma_addr (c_addr), .cma_gnt (m_gnt), .cma_rdata (m_rdata),
    .tex_req, .tex_addr, .tex_tag, .tex_rvalid, .tex_rdata, .tex_rtag,
    .or_thr, .or_idx, .or_data, .pos_out,
    .ev_fetch, .ev_switch, .ev_hazard_stall, .ev_bank_stall, .ev_forward, .ev_gated_lane
  );

  // ---------------------------------------------------------------- CMA
  // channel 3 is shared: vertex loads, then host writes (idle only), then core
  logic load_wr, host_wr;
  assign load_wr = (st_q == S_LOAD) && vin_valid;
  assign host_wr = host_we && (st_q == S_IDLE) && !core_busy;

  always_comb begin
    m_req = c_req;
    m_we  = '0;
    for (int c = 0; c < NCHAN; c++) begin
      m_addr[c]  = c_addr[c];
      m_wdata[c] = '0;
    end
    if (load_wr) begin
      m_req[3]   = 1'b1;
      m_we[3]    = 1'b1;
      m_addr[3]  = CMA_AW'(stream_base + CMA_AW'(ent_q[k_q]) * CMA_AW'(stream_stride) + CMA_AW'(a_q));
      m_wdata[3] = vin_data;
    end else if (host_wr) begin
      m_req[3]   = 1'b1;
      m_we[3]    = 1'b1;
      m_addr[3]  = host_addr;
      m_wdata[3] = host_wdata;
    end
  end

  cma #(.DEPTH(CMA_DEPTH)) u_cma (
    .clk, .req (m_req), .we (m_we), .addr (m_addr), .wdata (m_wdata),
    .gnt (m_gnt), .rdata (m_rdata)
  );

  // ---------------------------------------------------------------- vertex cache
  logic              lk_valid, lk_ok, lk_hit;
  logic [2:0]        lk_entry;
  logic [NTHREAD-1:0] set_trans, set_lit, valid_tag, hit_tag, trans_tag, lit_tag;
  logic              release_all;
  logic [NTHREAD-1:0] tri_mask;

  vcache #(.NE(NTHREAD), .IW(16)) u_vc (
    .clk, .rst_n, .invalidate (vc_invalidate && st_q == S_IDLE),
    .lk_valid, .lk_index (idx_q[k_q]), .lk_ok, .lk_hit, .lk_entry,
    .set_trans, .set_lit, .release_all,
    .valid_tag, .hit_tag, .trans_tag, .lit_tag
  );

  always_comb begin
    tri_mask = '0;
    for (int k = 0; k < 3; k++) tri_mask[ent_q[k]] = 1'b1;
  end

  // ---------------------------------------------------------------- ERAT
  logic erat_in, erat_out, erat_rej;
  logic [2:0] erat_reason;
  vec_t tri_pos [3];
  always_comb
    for (int k = 0; k < 3; k++) tri_pos[k] = pos_out[ent_q[k]];

  erat u_erat (
    .clk, .rst_n, .en (erat_en), .in_valid (erat_in), .pos (tri_pos),
    .out_valid (erat_out), .reject (erat_rej), .reason (erat_reason)
  );

  // ---------------------------------------------------------------- sequencer
  logic [NTHREAD-1:0] xf_mask, lt_mask;
  assign xf_mask = tri_mask & ~trans_tag;
  assign lt_mask = tri_mask & ~lit_tag;

  assign tri_ready     = (st_q == S_IDLE) && !core_busy && !run_start;
  assign lk_valid      = (st_q == S_LOOKUP);
  assign vin_req       = (st_q == S_LOAD);
  assign vin_idx       = idx_q[k_q];
  assign vin_attr      = a_q;
  assign erat_in       = (st_q == S_ERAT);
  assign tri_out_valid = (st_q == S_EMIT);
  assign tri_out_reject = rej_q;
  assign tri_out_reason = reason_q;
  always_comb
    for (int k = 0; k < 3; k++) tri_out_thr[k] = ent_q[k];

  always_comb begin
    core_start = 1'b0;
    core_mask  = '0;
    core_pc    = '0;
    if (st_q == S_XFORM && xf_mask != 0) begin
      core_start = 1'b1; core_mask = xf_mask; core_pc = xform_pc;
    end else if (st_q == S_LIGHT && lt_mask != 0) begin
      core_start = 1'b1; core_mask = lt_mask; core_pc = light_pc;
    end else if (st_q == S_IDLE && run_start && !core_busy) begin
      core_start = 1'b1; core_mask = run_mask; core_pc = run_pc;
    end
  end

  assign set_trans   = (st_q == S_XFORM_WAIT && !core_busy) ? xf_mask : '0;
  assign set_lit     = (st_q == S_LIGHT_WAIT && !core_busy) ? lt_mask : '0;
  assign release_all = (st_q == S_EMIT) && tri_out_ready;
  assign ev_vc_hit   = lk_valid && lk_ok && lk_hit;
  assign ev_vc_miss  = lk_valid && lk_ok && !lk_hit;
  assign busy        = core_busy || (st_q != S_IDLE);

  // next vertex (after k) that missed, or 3 if none
  function automatic logic [1:0] next_miss(logic [2:0] miss, int from);
    logic [1:0] r;
    r = 2'd3;
    for (int k = 2; k >= 0; k--)
      if (k >= from && miss[k]) r = 2'(k);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      k_q      <= '0;
      a_q      <= '0;
      miss_q   <= '0;
      rej_q    <= 1'b0;
      reason_q <= '0;
      for (int k = 0; k < 3; k++) begin
        idx_q[k] <= '0;
        ent_q[k] <= '0;
      end
    end else begin
      unique case (st_q)
        S_IDLE:
          if (tri_valid && tri_ready) begin
            for (int k = 0; k < 3; k++) idx_q[k] <= tri_idx[k];
            k_q  <= '0;
            st_q <= S_LOOKUP;
          end
        S_LOOKUP:
          if (lk_ok) begin
            ent_q[k_q]  <= lk_entry;
            miss_q[k_q] <= !lk_hit;
            if (k_q == 2'd2) begin
              logic [2:0] m;
              m = {!lk_hit, miss_q[1:0]};
              a_q <= '0;
              if (m == 0) st_q <= S_XFORM;
              else begin
                k_q  <= next_miss(m, 0);
                st_q <= S_LOAD;
              end
            end else k_q <= k_q + 2'd1;
          end
        S_LOAD:
          if (vin_valid) begin
            if (a_q + 4'd1 < nattr) a_q <= a_q + 4'd1;
            else begin
              a_q <= '0;
              if (next_miss(miss_q, int'(k_q) + 1) == 2'd3) st_q <= S_XFORM;
              else k_q <= next_miss(miss_q, int'(k_q) + 1);
            end
          end
        S_XFORM:      st_q <= (xf_mask != 0) ? S_XFORM_WAIT : S_ERAT;
        S_XFORM_WAIT: if (!core_busy) st_q <= S_ERAT;
        S_ERAT:       st_q <= S_ERAT_WAIT;
        S_ERAT_WAIT: begin
          rej_q    <= erat_rej;
          reason_q <= erat_reason;
          st_q     <= erat_rej ? S_EMIT : S_LIGHT;
        end
        S_LIGHT:      st_q <= (lt_mask != 0) ? S_LIGHT_WAIT : S_EMIT;
        S_LIGHT_WAIT: if (!core_busy) st_q <= S_EMIT;
        S_EMIT:       if (tri_out_ready) st_q <= S_IDLE;
        default:      st_q <= S_IDLE;
      endcase
    end
  end

  // the ERAT verdict arrives one cycle after its request
  assert property (@(posedge clk) disable iff (!rst_n) (st_q == S_ERAT_WAIT) |-> erat_out)
    else $error("stream_proc: ERAT result missing");
endmodule
