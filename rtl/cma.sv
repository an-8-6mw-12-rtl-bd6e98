// cma: configurable memory array, the shared on-chip memory pool.
//
// NBANK single-port banks sit behind a crossbar reached by NCHAN access
// channels (8 banks and 4 channels as in the CMA's structure). Software gives
// the pool its logical shape (stream cache, constant registers, search window,
// current macroblock) purely by address; the array itself only interleaves
// words over the banks: bank = addr mod NBANK, row = addr / NBANK.
//
// Each cycle every bank serves one access. When several channels request the
// same bank the lowest-numbered channel wins; another channel reading the very
// same word as a winning read is served as well (broadcast), otherwise it is
// not granted and must retry. Reads are combinational: rdata is valid in the
// cycle gnt is high. A granted write takes effect at the next clock edge.
// The bank depth and word width, the interleave and the fixed-priority
// arbitration are this design's choices.
module cma #(
  parameter int unsigned NBANK = sp_pkg::NBANK,
  parameter int unsigned NCHAN = sp_pkg::NCHAN,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned DW    = sp_pkg::VEC_W,
  localparam int unsigned AW   = $clog2(NBANK * DEPTH)
) (
  input  logic                clk,
  input  logic [NCHAN-1:0]    req,
  input  logic [NCHAN-1:0]    we,
  input  logic [AW-1:0]       addr  [NCHAN],
  input  logic [DW-1:0]       wdata [NCHAN],
  output logic [NCHAN-1:0]    gnt,
  output logic [DW-1:0]       rdata [NCHAN]
);
  localparam int unsigned BW = $clog2(NBANK);

  logic [DW-1:0] mem [NBANK][DEPTH];

  // winner[b] / win_vld[b]: channel that owns bank b this cycle
  logic [$clog2(NCHAN)-1:0] winner [NBANK];
  logic [NBANK-1:0]         win_vld;

  function automatic logic [BW-1:0] bank_of(logic [AW-1:0] a);
    return a[BW-1:0];
  endfunction

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      win_vld[b] = 1'b0;
      winner[b]  = '0;
      for (int c = NCHAN-1; c >= 0; c--)
        if (req[c] && bank_of(addr[c]) == BW'(b)) begin
          win_vld[b] = 1'b1;
          winner[b]  = ($clog2(NCHAN))'(c);
        end
    end
    for (int c = 0; c < NCHAN; c++) begin
      int unsigned wb;
      int unsigned wc;
      wb = bank_of(addr[c]);
      wc = winner[wb];
      gnt[c] = req[c] && (wc == c ||
               (!we[c] && !we[wc] && addr[wc] == addr[c]));
      rdata[c] = mem[wb][addr[c][AW-1:BW]];
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NBANK; b++)
      if (win_vld[b] && we[winner[b]])
        mem[b][addr[winner[b]][AW-1:BW]] <= wdata[winner[b]];
  end

  // two channels granted on one bank must be reading the same word
  always_comb begin
    for (int i = 0; i < NCHAN; i++)
      for (int j = i + 1; j < NCHAN; j++)
        if (gnt[i] && gnt[j] && bank_of(addr[i]) == bank_of(addr[j]))
          assert (!we[i] && !we[j] && addr[i] == addr[j])
            else $error("cma: conflicting accesses granted on one bank");
  end
endmodule
