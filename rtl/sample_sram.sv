// Sample memory for the current and the reference PU.
//
// Two arrays, one for current and one for reference samples, share the
// addresses. Each word holds 32 samples (256 bits), so a 64x64 PU fills
// one 128-word page; there are PAGES pages, and with the default two the
// writer fills one page while the datapath reads the other (ping-pong).
// Port 1 writes both arrays at once, with active-low chip select and write
// enable like a compiled SRAM macro; port 2 reads both arrays. Both ports are
// synchronous to the memory clock, which runs at eight times the main clock
// so that eight words (256 sample pairs) are read per main-clock cycle.
// Read data appear one memory-clock cycle after the address.
//
// The published design keeps the samples in a vendor memory macro clocked at
// 8x; its organisation is not given, so the word size, the paging and the
// port protocol here are this design's choices.
module sample_sram
  import sad_pkg::*;
#(
  parameter int unsigned PAGES = 2,
  localparam int unsigned AW   = WADDR_W + $clog2(PAGES)
) (
  input  logic              clk_mem,
  // port 1: write
  input  logic              csb_n,
  input  logic              web_n,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wcur,
  input  logic [WORD_W-1:0] wref,
  // port 2: read
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rcur,
  output logic [WORD_W-1:0] rref
);

  logic [WORD_W-1:0] mem_cur [PAGES*PAGE_WORDS];
  logic [WORD_W-1:0] mem_ref [PAGES*PAGE_WORDS];

  always_ff @(posedge clk_mem) begin
    if (!csb_n && !web_n) begin
      mem_cur[waddr] <= wcur;
      mem_ref[waddr] <= wref;
    end
    rcur <= mem_cur[raddr];
    rref <= mem_ref[raddr];
  end

endmodule
