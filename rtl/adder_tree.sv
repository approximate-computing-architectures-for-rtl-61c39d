// Binary adder tree reducing N unsigned operands to one sum.
//
// Level l (l = 0 .. log2(N)-1) adds neighbouring pairs (2i, 2i+1) of the
// previous level with (IN_W+l)-bit adders whose carry out becomes the new top
// bit, so the result is IN_W+log2(N) bits wide and never overflows. With
// N = 16 and IN_W = 8 it is the tree inside a processing element (9, 10, 11
// and 12-bit levels); with IN_W = 12 it is the tree adder behind the 16 PEs
// (13, 14, 15 and 16-bit levels). Each adder is an approx_adder, so the whole
// tree can be made of exact or approximate adders, optionally approximating
// only bits EXACT_LSBS and up. Purely combinational. The structure and the
// widths follow the published datapath drawing; pairing order is this
// design's choice.
module adder_tree
  import sad_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter int unsigned IN_W       = 8,
  parameter adder_e      ADDER      = ADD_LOA,
  parameter bit          APPROX     = 1'b0,
  parameter int unsigned EXACT_LSBS = 0,
  parameter int unsigned K          = 4,
  localparam int unsigned LEVELS    = $clog2(N),
  localparam int unsigned OUT_W     = IN_W + LEVELS
) (
  input  logic [N-1:0][IN_W-1:0] operands,
  output logic [OUT_W-1:0]       sum
);

  // g_lvl[l].v[i] is the i-th sum of level l, zero-extended to OUT_W bits
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned LW = IN_W + l;
    logic [OUT_W-1:0] v [N >> (l + 1)];
    for (genvar i = 0; i < (N >> (l + 1)); i++) begin : g_add
      logic [LW-1:0] x, y;
      logic [LW:0]   s;
      if (l == 0) begin : g_first
        assign x = operands[2*i];
        assign y = operands[2*i+1];
      end else begin : g_next
        assign x = g_lvl[l-1].v[2*i][LW-1:0];
        assign y = g_lvl[l-1].v[2*i+1][LW-1:0];
      end
      approx_adder #(
        .W(LW), .ADDER(ADDER), .APPROX(APPROX), .EXACT_LSBS(EXACT_LSBS), .K(K)
      ) u_add (
        .a  (x),
        .b  (y),
        .cin(1'b0),
        .sum(s)
      );
      assign v[i] = OUT_W'(s);
    end
  end

  assign sum = g_lvl[LEVELS-1].v[0];

endmodule
