// Configurable exact or approximate two-operand adder.
//
// Adds a + b + cin and returns a (W+1)-bit sum whose top bit is the carry
// out. With APPROX = 0, or ADDER set to RCA or CLA, the sum is exact: RCA is
// a plain ripple chain, CLA uses 4-bit look-ahead groups rippling between
// groups. With APPROX = 1 the bits below EXACT_LSBS are still added exactly;
// the bits from EXACT_LSBS up (the "section") use the chosen approximate
// scheme, K being its window or part size:
//   LOA  - the K lowest section bits are a|b and generate no carry; the carry
//          into the rest is a&b of the top OR'd bit; the rest is exact.
//   ETAI - the K lowest section bits are summed without carries, scanning
//          from their top down; at the first position where both bits are
//          1, that bit and all below it are set to 1. The rest is exact with
//          no carry from below.
//   ACA  - the carry into each bit is generated only from the K bits below
//          it, assuming a zero carry further down.
//   ACAA - sub-adders of K bits overlapping by K/2: the carry into each
//          K/2-bit segment comes from the previous segment alone.
//   SCSA - K-bit windows; the carry into a window is the carry out of the
//          previous window computed with a zero carry in (the speculative
//          carry-select choice).
// The carry from the exact low bits enters the section where the scheme
// lets a carry in (ACA, ACAA, SCSA when the chain reaches the section
// start); LOA and ETA-I drop it. Purely combinational.
//
// The adder families are those compared by the published work; the bit-level
// rules above and the single window parameter K are this design's reading
// of each family.
module approx_adder
  import sad_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter adder_e      ADDER      = ADD_LOA,
  parameter bit          APPROX     = 1'b1,
  parameter int unsigned EXACT_LSBS = 0,
  parameter int unsigned K          = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   sum
);

  localparam int unsigned LO   = (EXACT_LSBS > W) ? W : EXACT_LSBS;
  localparam int unsigned S    = W - LO;                   // section width
  localparam int unsigned KK   = (K < 1) ? 1 : K;
  localparam int unsigned HALF = (KK < 2) ? 1 : KK / 2;    // ACAA segment
  localparam int unsigned LPART = (KK > S) ? S : KK;       // LOA / ETA-I part
  localparam bit IS_EXACT = !APPROX || (ADDER == ADD_RCA) || (ADDER == ADD_CLA);

  logic [W-1:0] g, p;
  assign g = a & b;
  assign p = a ^ b;

  // Carry into section bit t when a chain starts at section bit st with
  // carry c0, rippling through section bits st..t-1.
  function automatic logic chain(input logic [W-1:0] gg, input logic [W-1:0] pp,
                                 input int unsigned st, input int unsigned t,
                                 input logic c0);
    logic c;
    c = c0;
    for (int j = 0; j < int'(S); j++)
      if (j >= int'(st) && j < int'(t)) c = gg[LO+j] | (pp[LO+j] & c);
    return c;
  endfunction

  always_comb begin
    logic [W:0] c;            // c[i] = carry into bit i; c[W] = carry out
    logic       flag;
    logic       c_lo;
    int unsigned st, seg;
    sum = '0;
    c   = '0;
    c[0] = cin;
    if (IS_EXACT) begin
      if (ADDER == ADD_CLA) begin
        // 4-bit look-ahead groups: every carry of a group from the group's
        // generate/propagate terms and its carry in.
        for (int unsigned gb = 0; gb < W; gb += 4) begin
          for (int unsigned j = gb; j < gb + 4 && j < W; j++) begin
            logic term, pall;
            pall = 1'b1;
            term = 1'b0;
            for (int unsigned m = j + 1; m > gb; m--) begin
              term = term | (g[m-1] & pall);
              pall = pall & p[m-1];
            end
            c[j+1] = term | (pall & c[gb]);
          end
        end
      end else begin
        for (int unsigned i = 0; i < W; i++) c[i+1] = g[i] | (p[i] & c[i]);
      end
      for (int unsigned i = 0; i < W; i++) sum[i] = p[i] ^ c[i];
      sum[W] = c[W];
    end else begin
      // exact low part
      for (int i = 0; i < int'(LO); i++) begin
        c[i+1]  = g[i] | (p[i] & c[i]);
        sum[i]  = p[i] ^ c[i];
      end
      c_lo = c[LO];
      unique case (ADDER)
        ADD_LOA, ADD_ETAI: begin
          // approximate lower part of the section
          flag = 1'b0;
          for (int unsigned t = LPART; t > 0; t--) begin
            if (ADDER == ADD_LOA) sum[LO+t-1] = a[LO+t-1] | b[LO+t-1];
            else begin
              if (!flag && g[LO+t-1]) flag = 1'b1;
              sum[LO+t-1] = flag ? 1'b1 : p[LO+t-1];
            end
          end
          // exact upper part of the section
          c[LO+LPART] = (ADDER == ADD_LOA && LPART > 0) ? g[LO+LPART-1] : 1'b0;
          for (int unsigned i = LO + LPART; i < W; i++) begin
            c[i+1] = g[i] | (p[i] & c[i]);
            sum[i] = p[i] ^ c[i];
          end
          sum[W] = c[W];
        end
        default: begin  // ACA, ACAA, SCSA
          for (int unsigned t = 0; t <= S; t++) begin
            if (ADDER == ADD_ACA) begin
              st = (t > KK) ? t - KK : 0;
            end else begin
              // ACAA: segments of HALF bits; SCSA: windows of KK bits
              seg = (ADDER == ADD_ACAA) ? HALF : KK;
              // the carry out (t == S) belongs to the top bit's segment
              st = ((t == S && t > 0) ? (t - 1) : t) / seg;
              st = (st >= 1) ? (st - 1) * seg : 0;
            end
            c[LO+t] = chain(g, p, st, t, (st == 0) ? c_lo : 1'b0);
          end
          for (int t = 0; t < int'(S); t++) sum[int'(LO)+t] = p[LO+t] ^ c[LO+t];
          sum[W] = c[W];
        end
      endcase
    end
  end

endmodule
