// Processing element: sum of absolute differences of 16 sample pairs.
//
// Each lane subtracts its reference sample from its current sample
// (cur + ~ref + 1 on a 8-bit approx_adder, whose carry out is 1 when
// cur >= ref), takes the absolute value of the 9-bit difference, and the 16
// magnitudes are summed by a 4-level adder tree into a 12-bit partial SAD
// (at most 16 x 255 = 4080). Purely combinational.
//
// Approximation, as in the published work: with SUBST = SUBST_1 the tree
// adders are approximate (the subtractors stay exact); with SUBST = SUBST_3
// only the subtractors are approximate; otherwise everything here is exact.
// The absolute-value stage is always exact (this design's reading: only
// adders and subtractors are named as replaced).
module sad_pe
  import sad_pkg::*;
#(
  parameter adder_e      ADDER = ADD_LOA,
  parameter subst_e      SUBST = SUBST_2,
  parameter int unsigned K     = 4
) (
  input  logic [PE_LANES-1:0][SAMPLE_W-1:0] cur,
  input  logic [PE_LANES-1:0][SAMPLE_W-1:0] ref_s,
  output logic [PE_OUT_W-1:0]               sad
);

  logic [PE_LANES-1:0][SAMPLE_W-1:0] mag;

  for (genvar i = 0; i < PE_LANES; i++) begin : g_lane
    logic [SAMPLE_W:0] d;   // {cur >= ref, cur - ref mod 256}
    approx_adder #(
      .W(SAMPLE_W), .ADDER(ADDER), .APPROX(SUBST == SUBST_3), .EXACT_LSBS(0), .K(K)
    ) u_sub (
      .a  (cur[i]),
      .b  (~ref_s[i]),
      .cin(1'b1),
      .sum(d)
    );
    // the carry out is the "no borrow" flag: negate when it is clear
    assign mag[i] = d[SAMPLE_W] ? d[SAMPLE_W-1:0] : SAMPLE_W'(~d[SAMPLE_W-1:0] + 1'b1);
  end

  adder_tree #(
    .N(PE_LANES), .IN_W(SAMPLE_W), .ADDER(ADDER), .APPROX(SUBST == SUBST_1),
    .EXACT_LSBS(0), .K(K)
  ) u_tree (
    .operands(mag),
    .sum     (sad)
  );

endmodule
