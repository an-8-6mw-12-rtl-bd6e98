// vcache: vertex cache tags, one entry per vertex thread.
//
// Vertices arrive as indices. Each entry records, for the vertex whose input
// attributes sit in that thread's part of the CMA stream cache:
//   index tag    the vertex index,
//   valid tag    the entry holds a vertex,
//   hit tag      the entry is used by the triangle now in flight (it must not
//                be replaced until release),
//   trans tag    the vertex has been through the transform stage,
//   lighted tag  the vertex has been through the lighting/texture stage.
// A vertex shared by consecutive triangles is thus transformed and lit once:
// a hit skips loading and, with its tags set, the shader stages too. Because
// the rejection test runs between the two stages, a vertex that only belongs
// to rejected triangles stays untransformed-but-unlit (trans=1, lighted=0), and
// is lit later only if a visible triangle uses it.
// Lookup (lk_valid/lk_index) answers combinationally with lk_hit and lk_entry
// (on a miss, the entry that will be allocated); the tags update at the clock
// edge. Allocation takes an invalid entry first, otherwise the oldest
// allocation (round-robin pointer) not locked by a hit tag. lk_ok is low when
// every entry is locked. The five tags follow the vertex cache tag structure
// of the design; the replacement policy is this design's own.
module vcache #(
  parameter int unsigned NE = sp_pkg::NTHREAD,
  parameter int unsigned IW = 16,
  localparam int unsigned EW = $clog2(NE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          invalidate,     // drop every entry (new vertex buffer)
  input  logic          lk_valid,
  input  logic [IW-1:0] lk_index,
  output logic          lk_ok,
  output logic          lk_hit,
  output logic [EW-1:0] lk_entry,
  input  logic [NE-1:0] set_trans,
  input  logic [NE-1:0] set_lit,
  input  logic          release_all,    // clear the hit tags (triangle done)
  output logic [NE-1:0] valid_tag,
  output logic [NE-1:0] hit_tag,
  output logic [NE-1:0] trans_tag,
  output logic [NE-1:0] lit_tag
);
  logic [IW-1:0] index_tag [NE];
  logic [EW-1:0] rr_q;
  logic          free_found, old_found;
  logic [EW-1:0] free_e, old_e;

  always_comb begin
    lk_hit   = 1'b0;
    lk_entry = '0;
    for (int e = NE-1; e >= 0; e--)
      if (valid_tag[e] && index_tag[e] == lk_index) begin
        lk_hit   = 1'b1;
        lk_entry = EW'(e);
      end
    free_found = 1'b0; free_e = '0;
    for (int e = NE-1; e >= 0; e--)
      if (!valid_tag[e]) begin free_found = 1'b1; free_e = EW'(e); end
    old_found = 1'b0; old_e = '0;
    for (int k = NE-1; k >= 0; k--)
      if (!hit_tag[EW'(int'(rr_q) + k)]) begin old_found = 1'b1; old_e = EW'(int'(rr_q) + k); end
    lk_ok = lk_hit || free_found || old_found;
    if (!lk_hit) lk_entry = free_found ? free_e : old_e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_tag <= '0;
      hit_tag   <= '0;
      trans_tag <= '0;
      lit_tag   <= '0;
      rr_q      <= '0;
      for (int e = 0; e < NE; e++) index_tag[e] <= '0;
    end else begin
      trans_tag <= trans_tag | set_trans;
      lit_tag   <= lit_tag | set_lit;
      if (release_all) hit_tag <= '0;
      if (lk_valid && lk_ok) begin
        hit_tag[lk_entry] <= 1'b1;
        if (!lk_hit) begin
          valid_tag[lk_entry] <= 1'b1;
          index_tag[lk_entry] <= lk_index;
          trans_tag[lk_entry] <= 1'b0;
          lit_tag[lk_entry]   <= 1'b0;
          if (!free_found) rr_q <= lk_entry + EW'(1);
        end
      end
      if (invalidate) begin
        valid_tag <= '0;
        trans_tag <= '0;
        lit_tag   <= '0;
      end
    end
  end

  // NE must be a power of two for the wrapping round-robin pointer
  initial assert (NE == (1 << EW)) else $error("vcache: NE must be a power of two");
endmodule
