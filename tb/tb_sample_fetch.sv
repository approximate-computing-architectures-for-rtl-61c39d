// Self-checking test of sample_fetch with a sample_sram behind it. The
// memory clock runs at 8x the main clock with aligned rising edges; the main
// side toggles tog and presents a new random base and page every cycle.
// In the middle of each main cycle the assembled 256-sample vectors must
// hold words base..base+7 of the base and page presented one cycle earlier.
`timescale 1ns/1ps
module tb_sample_fetch;
  import sad_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, clk_mem = 0, rst_n = 0;
  logic csb_n = 1, web_n = 1;
  logic [7:0] waddr = 0, raddr;
  logic [255:0] wcur = 0, wref = 0, rcur, rref;
  logic tog = 0;
  logic [6:0] base = 0;
  logic page = 0;
  logic [2047:0] vec_cur, vec_ref;
  logic [255:0] mc [256], mr [256];

  sample_sram u_sram (.clk_mem, .csb_n, .web_n, .waddr, .wcur, .wref, .raddr, .rcur, .rref);
  sample_fetch dut (.clk_mem, .rst_n, .tog, .base, .page_sel(page), .raddr, .rcur, .rref,
                    .vec_cur, .vec_ref);

  // both clocks from one process so that aligned edges share a time step
  int ph = 0;
  always begin
    #1;
    ph++;
    clk_mem = ~clk_mem;
    if (ph % 8 == 1) clk = ~clk;
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) tog <= !tog;

  initial begin
    logic [6:0] pb;
    logic pp;
    int cyc = 0;
    for (int a = 0; a < 256; a++) begin
      mc[a] = rnd256();
      mr[a] = rnd256();
      @(posedge clk_mem);
      csb_n <= 0; web_n <= 0; waddr <= 8'(a); wcur <= mc[a]; wref <= mr[a];
    end
    @(posedge clk_mem);
    csb_n <= 1; web_n <= 1;
    @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      pb = base; pp = page;          // values presented in the cycle just ended
      base <= 7'($urandom_range(0, 120));
      page <= 1'($urandom);
      if (n > 0) begin
        @(negedge clk);
        for (int w = 0; w < 8; w++) begin
          checks += 2;
          if (vec_cur[w*256 +: 256] !== mc[{pp, 7'(pb + w)}]) failures++;
          if (vec_ref[w*256 +: 256] !== mr[{pp, 7'(pb + w)}]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
