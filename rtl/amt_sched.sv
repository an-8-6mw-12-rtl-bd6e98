// amt_sched: thread selection for the instruction-fetch stage.
//
// Two policies, chosen by the amt input:
//   * conventional multi-threading (amt = 0): every fetch goes to the next
//     ready thread after the last one fetched, so consecutive instructions
//     always come from different threads and dependent instructions of one
//     thread are spread apart;
//   * adaptive multi-threading (amt = 1): the last thread keeps fetching for as
//     long as it is ready; only when it stops being ready (it issued a texture
//     load, or ended) does the next ready thread, in round-robin order, take
//     over. Back-to-back dependences inside one thread are then covered by data
//     forwarding, so few threads are needed and long texture latencies are
//     still hidden by switching.
// sel/sel_vld are combinational from ready; the last-fetched thread is
// registered when advance (a fetch actually happened) is high. Reset makes
// thread NT-1 the "last" thread so thread 0 is chosen first.
// The policies follow the adaptive multi-thread schedule of the design; the
// round-robin order and the reset choice are this design's own.
module amt_sched #(
  parameter int unsigned NT = sp_pkg::NTHREAD,
  localparam int unsigned TW = $clog2(NT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          amt,
  input  logic [NT-1:0] ready,
  input  logic          advance,
  output logic [TW-1:0] sel,
  output logic          sel_vld
);
  logic [TW-1:0] last_q;

  always_comb begin
    int unsigned t;
    t       = 0;
    sel_vld = |ready;
    sel     = last_q;
    if (!(amt && ready[last_q])) begin
      // first ready thread after last_q, wrapping round
      for (int k = NT; k >= 1; k--) begin
        t = (int'(last_q) + k) % NT;
        if (ready[t]) sel = TW'(t);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  last_q <= TW'(NT - 1);
    else if (advance && sel_vld) last_q <= sel;
  end

  assert property (@(posedge clk) disable iff (!rst_n) sel_vld |-> ready[sel])
    else $error("amt_sched: selected thread is not ready");
endmodule
