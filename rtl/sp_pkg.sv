// sp_pkg: types and constants shared by the stream processor core.
//
// The core is a 2-issue VLIW machine; each slot holds one SIMD instruction
// operating on a 4-channel vector of 32-bit words. The fields of a slot follow
// the instruction layout drawn for the core (OP, Active Vector, Modify, Src0,
// Src1, Dst, WMask, Swizzle). Their widths and encodings are this design's own
// choice:
//   op     4 bits   operation (opcode_e)
//   act    4 bits   active vector: one enable per processing element (channel);
//                   a cleared bit gates that channel's execute register
//   modf   3 bits   modify: [0] negate src0, [1] negate src1,
//                   [2] use data forwarding for GPR sources
//   src0/1 8 bits   [7:6] operand space (space_e), [5:0] index
//   dst    8 bits   [7:6] destination space (GPR or output register), [5:0] index
//   wmask  4 bits   per-channel write mask
//   swz    8 bits   swizzle of src1, two bits per result channel (channel i
//                   takes src1 channel swz[2i+1:2i])
//
// Floating point is IEEE-754 single format with round-toward-zero, denormals
// flushed to zero and no NaN/infinity handling. In fixed-point mode each 32-bit
// channel carries two independent 16-bit values, so one slot performs eight
// operations per cycle.
package sp_pkg;

  localparam int unsigned LANES    = 4;           // SIMD channels per slot
  localparam int unsigned WORD_W   = 32;          // bits per channel
  localparam int unsigned VEC_W    = LANES * WORD_W;
  localparam int unsigned NSLOT    = 2;           // VLIW issue width
  localparam int unsigned NTHREAD  = 8;           // vertex threads
  localparam int unsigned NGPR     = 8;           // general registers per thread
  localparam int unsigned NOREG    = 8;           // output registers per thread
  localparam int unsigned NBANK    = 8;           // CMA banks
  localparam int unsigned NCHAN    = 4;           // CMA access channels
  localparam int unsigned CMA_AW   = 9;           // CMA word address (8 banks x 64)

  typedef logic [VEC_W-1:0]  vec_t;
  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_MOV   = 4'd1,   // dst = src0
    OP_FADD  = 4'd2,   // dst = src0 + src1 (fp32)
    OP_FMUL  = 4'd3,   // dst = src0 * src1 (fp32)
    OP_FMAX  = 4'd4,
    OP_FMIN  = 4'd5,
    OP_ADD16 = 4'd6,   // two 16-bit adds per channel
    OP_SUB16 = 4'd7,   // two 16-bit subtracts per channel
    OP_ABSD16= 4'd8,   // two 16-bit absolute differences per channel
    OP_TXLD  = 4'd9,   // texture load: address = src0 channel 0 [15:0]
    OP_DP4   = 4'd10,  // dot product of the active channels, broadcast (fp32)
    OP_END   = 4'd15   // thread finished
  } opcode_e;

  typedef enum logic [1:0] {
    SP_GPR   = 2'd0,   // per-thread general register
    SP_IN    = 2'd1,   // input stream attribute in the CMA
    SP_CONST = 2'd2,   // constant register in the CMA
    SP_ZERO  = 2'd3    // reads as zero (no access)
  } space_e;

  typedef struct packed {
    space_e     sp;
    logic [5:0] idx;
  } opnd_t;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  act;
    logic [2:0]  modf;
    opnd_t       src0;
    opnd_t       src1;
    opnd_t       dst;
    logic [3:0]  wmask;
    logic [7:0]  swz;
  } slot_t;

  typedef struct packed {
    slot_t s1;
    slot_t s0;
  } bundle_t;

  localparam int unsigned BUNDLE_W = $bits(bundle_t);

  // Destination space encodings (dst.sp)
  localparam space_e DST_GPR  = SP_GPR;
  localparam space_e DST_OUT  = SP_IN;   // output register of the thread

  // Magnitude/sign compare of two fp32 values (denormals already zero).
  function automatic logic fp_lt(word_t a, word_t b);
    logic a_zero, b_zero;
    a_zero = (a[30:0] == '0);
    b_zero = (b[30:0] == '0);
    if (a_zero && b_zero)      return 1'b0;
    if (a[31] != b[31])        return a[31];
    if (a[31] == 1'b0)         return a[30:0] < b[30:0];
    return a[30:0] > b[30:0];
  endfunction

endpackage
