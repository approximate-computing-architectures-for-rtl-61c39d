// Self-checking test of sample_sram: random writes through port 1 (with
// writes blocked by CSB or WEB high), then reads of every word of both
// pages on port 2, with the data checked one memory cycle after the address.
`timescale 1ns/1ps
module tb_sample_sram;
  import sad_pkg::*;

  int checks = 0, failures = 0;
  logic clk_mem = 0, csb_n = 1, web_n = 1;
  logic [7:0] waddr = 0, raddr = 0;
  logic [255:0] wcur = 0, wref = 0, rcur, rref;
  logic [255:0] mc [256], mr [256];

  sample_sram dut (.*);

  always #1 clk_mem = ~clk_mem;

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < 256; a++) begin
      mc[a] = rnd256();
      mr[a] = rnd256();
      @(posedge clk_mem);
      csb_n <= 0; web_n <= 0; waddr <= 8'(a); wcur <= mc[a]; wref <= mr[a];
    end
    // blocked writes must change nothing
    for (int n = 0; n < 64; n++) begin
      @(posedge clk_mem);
      csb_n <= n[0]; web_n <= !n[0]; waddr <= 8'($urandom); wcur <= rnd256(); wref <= rnd256();
    end
    @(posedge clk_mem);
    csb_n <= 1; web_n <= 1;
    for (int a = 0; a < 257; a++) begin
      @(posedge clk_mem);
      raddr <= 8'(a);
      #0.5;
      if (a > 0) begin
        checks += 2;
        if (rcur !== mc[a-1]) failures++;
        if (rref !== mr[a-1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
