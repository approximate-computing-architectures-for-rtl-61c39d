// Self-checking test of sad_control with a behavioural fetch model (a vector
// appears one main cycle after its base, sample i of base b holding
// (32b+i) mod 256 and its reference 3(32b+i)+1 mod 256). For random PU sizes
// it checks the number of vector cycles ceil(R*C/256), the first/last flags,
// the lane masking of the last vector, the contents, the new_search pulse,
// the c+3 cycle latency to the end of a PU, and that an pde_abort cancels every
// vector still in flight and frees the unit.
`timescale 1ns/1ps
module tb_sad_control;
  import sad_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid_in = 0, first = 0, ready, tog, pde_abort = 0;
  logic [6:0] rows = 0, columns = 0, base;
  logic [2047:0] fetch_cur, fetch_ref, vec_cur, vec_ref;
  logic vec_valid, vec_first, vec_last, new_search;

  sad_control dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk)
    for (int i = 0; i < 256; i++) begin
      fetch_cur[i*8 +: 8] <= 8'(32 * int'(base) + i);
      fetch_ref[i*8 +: 8] <= 8'(3 * (32 * int'(base) + i) + 1);
    end

  task automatic check(input string what, input longint unsigned got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes[] = '{4, 8, 16, 32, 64};
    int r, c, n, cyc, abort_at, seen, lanes, t;
    int n_abort = 0, n_partial = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int req = 0; req < 200; req++) begin
      r = sizes[$urandom_range(0, 4)];
      c = sizes[$urandom_range(0, 4)];
      if (req % 7 == 3) c = 12;        // a size that leaves a partial vector
      n = r * c;
      cyc = (n + 255) / 256;
      abort_at = (req % 3 == 0 && cyc > 1) ? $urandom_range(0, cyc - 2) : -1;
      #1;
      check("ready before", ready, 1);
      valid_in <= 1; rows <= 7'(r); columns <= 7'(c); first <= req[0];
      @(posedge clk);                 // accepting edge
      valid_in <= 0;
      #1;
      check("new_search", new_search, req[0]);
      check("busy", ready, 0);
      seen = 0;
      t = 0;
      while (1) begin
        @(posedge clk);
        t++;
        #1;
        pde_abort = 0;
        if (vec_valid) begin
          check("vector order", t, seen + 3);
          check("first", vec_first, seen == 0);
          check("last", vec_last, seen == cyc - 1);
          lanes = (n - 256 * seen > 256) ? 256 : n - 256 * seen;
          if (lanes < 256) n_partial++;
          for (int i = 0; i < 256; i++) begin
            checks += 2;
            if (vec_cur[i*8 +: 8] != ((i < lanes) ? 8'(256 * seen + i) : 8'h00)) failures++;
            if (vec_ref[i*8 +: 8] != ((i < lanes) ? 8'(3 * (256 * seen + i) + 1) : 8'h00)) failures++;
          end
          if (seen == abort_at) begin
            pde_abort = 1;
            n_abort++;
          end
          seen++;
          if (pde_abort || vec_last) break;
        end
        if (t > 40) break;
      end
      @(posedge clk);
      #1;
      pde_abort = 0;
      check("ready after", ready, 1);
      check("vectors seen", seen, (abort_at >= 0) ? abort_at + 1 : cyc);
      check("latency", t, (abort_at >= 0) ? abort_at + 3 : cyc + 2);
      // nothing may follow an pde_abort or the last vector
      repeat (4) begin
        @(posedge clk);
        #1;
        check("quiet", vec_valid, 0);
      end
    end
    checks += 2;
    if (n_abort == 0) failures++;
    if (n_partial == 0) failures++;
    $display("aborts %0d, partial vectors %0d", n_abort, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
