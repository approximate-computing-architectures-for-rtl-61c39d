// Approximate SAD accelerator for HEVC motion estimation.
//
// Computes SAD = sum |C(i,j) - R(i,j)| between a current and a reference
// prediction unit of any size from 4x4 up to 64x64 8-bit samples. A writer
// loads both PUs, as flat row-major vectors of 32 samples per word, into the
// sample memory through port 1 (page chosen by toggle1). A request (valid_in
// with rows, columns, the read page toggle2 and `first` to open a new search)
// then makes the control unit fetch 256 sample pairs per main-clock cycle,
// eight memory words per cycle on the 8x memory clock. 16 processing
// elements reduce 16 pairs each to a 12-bit partial SAD, the tree adder sums
// them to 16 bits, and the accumulator builds the 20-bit SAD over 1..16
// cycles. With `pde` high, partial distortion elimination abandons a
// candidate as soon as its running sum exceeds the best SAD of the search.
//
// The adders can be exact or approximate: ADDER picks the family and SUBST
// the region (1: all adders of PEs and tree; 2: tree adder and accumulator
// above bit 11; 3: PE subtractors only). Defaults: second substitution with
// the lower-part OR adder, K = 4 (the adder choice and K are this design's;
// the regions and the 12-bit exact boundary are the published work's).
//
// Clocks: clk is the main clock; clk_mem must be exactly 8x clk with rising
// edges aligned. rst_n is synchronous, active low, sampled on both clocks.
// Timing: a PU needing c = ceil(rows*columns/256) cycles gives `done` (one
// cycle) c+3 clk edges after the edge that accepted it; ready is high when a
// request can be taken. sad is the candidate's SAD (its partial sum when
// `pruned`); sad_min is the best complete SAD since the last `first`.
module sad_top
  import sad_pkg::*;
#(
  parameter adder_e      ADDER = ADD_LOA,
  parameter subst_e      SUBST = SUBST_2,
  parameter int unsigned K     = 4,
  parameter int unsigned PAGES = 2
) (
  input  logic                       clk,
  input  logic                       clk_mem,
  input  logic                       rst_n,
  // writer (port 1 of the sample memory, memory clock)
  input  logic [$clog2(PAGES)-1:0]   toggle1,
  input  logic [WADDR_W-1:0]         port1_addr,
  input  logic                       port1_web,
  input  logic                       port1_csb,
  input  logic [WORD_W-1:0]          cur,
  input  logic [WORD_W-1:0]          ref_data,
  // requests
  input  logic                       valid_in,
  input  logic [DIM_W-1:0]           rows,
  input  logic [DIM_W-1:0]           columns,
  input  logic [$clog2(PAGES)-1:0]   toggle2,
  input  logic                       first,
  input  logic                       pde,
  output logic                       ready,
  // results
  output logic                       done,
  output logic [ACC_W-1:0]           sad,
  output logic                       pruned,
  output logic [ACC_W-1:0]           sad_min,
  output logic                       sad_min_valid
);

  localparam int unsigned AW = WADDR_W + $clog2(PAGES);

  logic [AW-1:0]            raddr;
  logic [WORD_W-1:0]        rcur, rref;
  logic                     tog;
  logic [WADDR_W-1:0]       base;
  logic [VEC_W-1:0]         fetch_cur, fetch_ref, vec_cur, vec_ref;
  logic                     vec_valid, vec_first, vec_last, new_search, pde_abort;
  logic [NUM_PE-1:0][PE_OUT_W-1:0] pe_sad;
  logic [TREE_OUT_W-1:0]    tree_sum;

  sample_sram #(.PAGES(PAGES)) u_sram (
    .clk_mem(clk_mem),
    .csb_n  (port1_csb),
    .web_n  (port1_web),
    .waddr  ({toggle1, port1_addr}),
    .wcur   (cur),
    .wref   (ref_data),
    .raddr  (raddr),
    .rcur   (rcur),
    .rref   (rref)
  );

  sample_fetch #(.PAGES(PAGES)) u_fetch (
    .clk_mem (clk_mem),
    .rst_n   (rst_n),
    .tog     (tog),
    .base    (base),
    .page_sel(toggle2),
    .raddr   (raddr),
    .rcur    (rcur),
    .rref    (rref),
    .vec_cur (fetch_cur),
    .vec_ref (fetch_ref)
  );

  sad_control u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (valid_in),
    .rows      (rows),
    .columns   (columns),
    .first     (first),
    .ready     (ready),
    .tog       (tog),
    .base      (base),
    .fetch_cur (fetch_cur),
    .fetch_ref (fetch_ref),
    .vec_cur   (vec_cur),
    .vec_ref   (vec_ref),
    .vec_valid (vec_valid),
    .vec_first (vec_first),
    .vec_last  (vec_last),
    .new_search(new_search),
    .pde_abort     (pde_abort)
  );

  // sample s of the vector goes to PE s/16, lane s%16
  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    sad_pe #(.ADDER(ADDER), .SUBST(SUBST), .K(K)) u_pe (
      .cur  (vec_cur[p*PE_LANES*SAMPLE_W +: PE_LANES*SAMPLE_W]),
      .ref_s(vec_ref[p*PE_LANES*SAMPLE_W +: PE_LANES*SAMPLE_W]),
      .sad  (pe_sad[p])
    );
  end

  adder_tree #(
    .N(NUM_PE), .IN_W(PE_OUT_W), .ADDER(ADDER),
    .APPROX(SUBST == SUBST_1 || SUBST == SUBST_2),
    .EXACT_LSBS((SUBST == SUBST_2) ? SUBST2_EXACT : 0), .K(K)
  ) u_tree (
    .operands(pe_sad),
    .sum     (tree_sum)
  );

  sad_accum_pde #(.ADDER(ADDER), .SUBST(SUBST), .K(K)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .pde_en    (pde),
    .new_search(new_search),
    .vec_valid (vec_valid),
    .vec_first (vec_first),
    .vec_last  (vec_last),
    .tree_sum  (tree_sum),
    .pde_abort     (pde_abort),
    .done      (done),
    .sad       (sad),
    .pruned    (pruned),
    .sad_min   (sad_min),
    .min_valid (sad_min_valid)
  );

endmodule
