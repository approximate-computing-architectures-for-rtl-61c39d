// Eight-beat sample fetch between the memory clock and the main clock.
//
// The memory clock runs at exactly eight times the main clock with rising
// edges aligned. The main-clock side toggles `tog` every cycle; this block
// detects the toggle on the first memory edge after a main edge and counts
// beats 0..7 from there, so it stays aligned without a shared reset. In each
// main-clock cycle it reads words base+0 .. base+7 of page `page` and shifts
// them into a staging buffer; once the eighth word has arrived (on the first
// memory edge of the next main cycle) the 256 current and 256 reference
// samples are copied into vec_cur / vec_ref, which then stay stable for a
// whole main-clock cycle and are sampled on the following main edge.
// Latency: the vector of a base presented in main cycle n is sampled by the
// main clock at the end of cycle n+1.
//
// The 8x memory clock is the published design's; the alignment scheme and
// the staging are this design's.
module sample_fetch
  import sad_pkg::*;
#(
  parameter int unsigned PAGES = 2,   // at least 2
  localparam int unsigned PW   = $clog2(PAGES),
  localparam int unsigned AW   = WADDR_W + PW
) (
  input  logic                 clk_mem,
  input  logic                 rst_n,
  input  logic                 tog,
  input  logic [WADDR_W-1:0]   base,
  input  logic [PW-1:0]        page_sel,
  output logic [AW-1:0]        raddr,
  input  logic [WORD_W-1:0]    rcur,
  input  logic [WORD_W-1:0]    rref,
  output logic [VEC_W-1:0]     vec_cur,
  output logic [VEC_W-1:0]     vec_ref
);

  localparam int unsigned BW = $clog2(CLK_RATIO);

  logic          tog_q;
  logic [BW-1:0] beat_q;       // beat of the next memory edge
  logic [BW-1:0] beat;         // beat of the current memory cycle
  logic [BW-1:0] dbeat_q;      // beat of the word now on rcur/rref
  logic          dvalid_q;
  logic [CLK_RATIO-2:0][WORD_W-1:0] stage_cur, stage_ref;

  // a changed toggle marks the first memory cycle of a main cycle
  assign beat  = (tog != tog_q) ? '0 : beat_q;
  assign raddr = {page_sel, WADDR_W'(base + WADDR_W'(beat))};

  always_ff @(posedge clk_mem) begin
    if (!rst_n) begin
      tog_q    <= 1'b0;
      beat_q   <= '0;
      dbeat_q  <= '0;
      dvalid_q <= 1'b0;
      vec_cur  <= '0;
      vec_ref  <= '0;
    end else begin
      tog_q    <= tog;
      beat_q   <= beat + 1'b1;
      dbeat_q  <= beat;
      dvalid_q <= 1'b1;
      if (dvalid_q) begin
        if (dbeat_q == BW'(CLK_RATIO - 1)) begin
          vec_cur <= {rcur, stage_cur};
          vec_ref <= {rref, stage_ref};
        end else begin
          stage_cur[dbeat_q] <= rcur;
          stage_ref[dbeat_q] <= rref;
        end
      end
    end
  end

endmodule
