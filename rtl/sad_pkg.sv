// Shared types and constants of the approximate SAD accelerator.
//
// The accelerator computes the sum of absolute differences (SAD) between a
// current prediction unit (PU) and a reference PU of up to 64x64 8-bit
// samples, 256 sample pairs per main-clock cycle (16 PEs of 16 lanes). The
// adders of the datapath can be swapped for one of several approximate
// adders, in one of three regions ("substitutions"). The sizes below are the
// published architecture's; the adder window size is this design's choice.
package sad_pkg;

  // Adder families: two exact ones and five approximate ones.
  typedef enum logic [2:0] {
    ADD_RCA  = 3'd0,  // ripple-carry, exact
    ADD_CLA  = 3'd1,  // carry look-ahead (4-bit groups), exact
    ADD_LOA  = 3'd2,  // lower-part OR adder
    ADD_ACA  = 3'd3,  // almost correct adder (speculative carry window)
    ADD_ACAA = 3'd4,  // accuracy-configurable adder (half-overlapping sub-adders)
    ADD_ETAI = 3'd5,  // error-tolerant adder I
    ADD_SCSA = 3'd6   // speculative carry-select adder
  } adder_e;

  // Where approximate adders are placed.
  typedef enum logic [1:0] {
    SUBST_NONE = 2'd0,  // every adder exact (the baseline)
    SUBST_1    = 2'd1,  // all adders of the PEs and of the tree adder
    SUBST_2    = 2'd2,  // tree adder and accumulator, bits 12 and up only
    SUBST_3    = 2'd3   // the subtractors inside the PEs only
  } subst_e;

  localparam int unsigned SAMPLE_W      = 8;    // luma sample width
  localparam int unsigned PE_LANES      = 16;   // differences per PE
  localparam int unsigned NUM_PE        = 16;   // PEs
  localparam int unsigned VEC_SAMPLES   = PE_LANES * NUM_PE;  // 256 per cycle
  localparam int unsigned PE_OUT_W      = 12;   // PE result width
  localparam int unsigned TREE_OUT_W    = 16;   // tree adder result width
  localparam int unsigned ACC_W         = 20;   // full 64x64 SAD width
  localparam int unsigned SUBST2_EXACT  = 12;   // bits 0..11 stay exact in substitution 2
  localparam int unsigned MAX_DIM       = 64;   // largest PU side
  localparam int unsigned DIM_W         = 7;    // rows / columns field (4..64)
  localparam int unsigned MAX_CYCLES    = (MAX_DIM * MAX_DIM) / VEC_SAMPLES;  // 16
  localparam int unsigned CLK_RATIO     = 8;    // memory clock / main clock
  localparam int unsigned WORD_SAMPLES  = VEC_SAMPLES / CLK_RATIO;  // 32 per memory word
  localparam int unsigned WORD_W        = WORD_SAMPLES * SAMPLE_W;  // 256 bits
  localparam int unsigned PAGE_WORDS    = (MAX_DIM * MAX_DIM) / WORD_SAMPLES;  // 128
  localparam int unsigned WADDR_W       = $clog2(PAGE_WORDS);  // 7
  localparam int unsigned VEC_W         = VEC_SAMPLES * SAMPLE_W;  // 2048 bits
  localparam int unsigned NSAMP_W       = $clog2(MAX_DIM * MAX_DIM) + 1;  // 13

endpackage
