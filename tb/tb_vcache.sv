// tb_vcache: self-checking test of the vertex cache tags.
//
// A behavioural reference keeps its own index/valid/hit/trans/lighted tags and
// replacement pointer and predicts hit, entry and tag state for every lookup.
// Traffic: a triangle strip (three lookups, then release), random tag updates,
// a random index stream and an invalidate. For the strip two of every three
// lookups must hit, the vertex reuse the cache exists for.
`timescale 1ns/1ps
module tb_vcache;
  localparam int NE = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic invalidate = 0, lk_valid = 0, release_all = 0;
  logic [15:0] lk_index = 0;
  logic lk_ok, lk_hit;
  logic [2:0] lk_entry;
  logic [NE-1:0] set_trans = 0, set_lit = 0, valid_tag, hit_tag, trans_tag, lit_tag;
  int checks = 0, failures = 0, hits = 0, lookups = 0;

  vcache dut (.clk, .rst_n, .invalidate, .lk_valid, .lk_index, .lk_ok, .lk_hit, .lk_entry,
              .set_trans, .set_lit, .release_all, .valid_tag, .hit_tag, .trans_tag, .lit_tag);

  // reference state
  logic [15:0] r_idx [NE];
  logic [NE-1:0] r_v = 0, r_h = 0, r_t = 0, r_l = 0;
  int r_rr = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic lookup(logic [15:0] idx);
    int e = -1; logic hit = 0;
    @(negedge clk);
    lk_valid = 1; lk_index = idx; #1;
    for (int i = 0; i < NE; i++) if (e < 0 && r_v[i] && r_idx[i] == idx) begin e = i; hit = 1; end
    if (!hit) for (int i = 0; i < NE; i++) if (e < 0 && !r_v[i]) e = i;
    if (e < 0) begin
      for (int k = 0; k < NE; k++) if (e < 0 && !r_h[(r_rr + k) % NE]) e = (r_rr + k) % NE;
      if (!hit && e >= 0) r_rr = (e + 1) % NE;
    end
    chk(lk_hit == hit && lk_entry == 3'(e), $sformatf("lookup %0d: hit %0d/%0d entry %0d/%0d", idx, lk_hit, hit, lk_entry, e));
    lookups++; if (hit) hits++;
    r_h[e] = 1;
    if (!hit) begin r_v[e] = 1; r_idx[e] = idx; r_t[e] = 0; r_l[e] = 0; end
    @(negedge clk);
    lk_valid = 0;
    #1 chk(valid_tag == r_v && hit_tag == r_h && trans_tag == r_t && lit_tag == r_l, "tags after lookup");
  endtask

  task automatic finish_tri();
    logic [NE-1:0] st, sl;
    st = 8'($urandom) & r_h; sl = 8'($urandom) & r_h & (r_t | st);
    @(negedge clk);
    set_trans = st; set_lit = sl; release_all = 1;
    r_t |= st; r_l |= sl; r_h = 0;
    @(negedge clk);
    set_trans = 0; set_lit = 0; release_all = 0;
    #1 chk(hit_tag == 0 && trans_tag == r_t && lit_tag == r_l, "tags after release");
  endtask

  initial begin
    int strip_hits, strip_lookups;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // triangle strip: (i, i+1, i+2)
    for (int i = 0; i < 300; i++) begin
      lookup(16'(i)); lookup(16'(i + 1)); lookup(16'(i + 2));
      finish_tri();
    end
    strip_hits = hits; strip_lookups = lookups;
    $display("strip: %0d hits of %0d lookups", strip_hits, strip_lookups);
    chk(strip_hits * 3 >= (strip_lookups - 3) * 2, "strip reuse");
    // random indices over a small range
    for (int i = 0; i < 1000; i++) begin
      lookup(16'($urandom_range(0, 15))); lookup(16'($urandom_range(0, 15))); lookup(16'($urandom_range(0, 15)));
      finish_tri();
      if (i % 250 == 249) begin
        @(negedge clk); invalidate = 1; r_v = 0; r_t = 0; r_l = 0;
        @(negedge clk); invalidate = 0;
        #1 chk(valid_tag == 0, "invalidate");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
