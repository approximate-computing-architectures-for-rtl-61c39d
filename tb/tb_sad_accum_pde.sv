// Self-checking test of sad_accum_pde (default: LOA adder, second
// substitution). Runs searches of random candidates with 1..16 partial sums
// each, with PDE on and off, and compares done/sad/pruned/sad_min and the
// pde_abort timing with a cycle model built on the reference adder. Counts that
// pruning, a best-SAD update and a completed-but-worse candidate all occur.
`timescale 1ns/1ps
module tb_sad_accum_pde;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pde_en = 0, new_search = 0, vec_valid = 0, vec_first = 0, vec_last = 0;
  logic [15:0] tree_sum = 0;
  logic pde_abort, done, pruned, min_valid;
  logic [19:0] sad, sad_min;

  sad_accum_pde dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint unsigned got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned acc, best;
    bit best_ok, exp_abort;
    int n_pruned = 0, n_update = 0, n_worse = 0;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 60; s++) begin
      pde_en <= (s % 4 != 3);
      @(posedge clk);
      new_search <= 1;
      @(posedge clk);
      new_search <= 0;
      best_ok = 0;
      best = 0;
      for (int cand = 0; cand < 8; cand++) begin
        cyc = $urandom_range(1, 16);
        acc = 0;
        for (int v = 0; v < cyc; v++) begin
          longint unsigned ts;
          // the first candidate of a search is small; later ones vary
          ts = (cand == 0) ? 64'($urandom_range(0, 2000)) : 64'($urandom_range(0, 65280));
          vec_valid <= 1;
          vec_first <= (v == 0);
          vec_last  <= (v == cyc - 1);
          tree_sum  <= 16'(ts);
          acc = ref_acc((v == 0) ? 0 : acc, ts, ADD_LOA, SUBST_2, 4);
          exp_abort = (s % 4 != 3) && best_ok && (v != cyc - 1) && (acc > best);
          #1;
          check("pde_abort", pde_abort, exp_abort);
          @(posedge clk);
          vec_valid <= 0;
          if (exp_abort || v == cyc - 1) begin
            #1;
            check("done", done, 1);
            check("sad", sad, acc);
            check("pruned", pruned, exp_abort);
            if (exp_abort) n_pruned++;
            else if (!best_ok || acc < best) begin best = acc; best_ok = 1; n_update++; end
            else n_worse++;
            check("sad_min", sad_min, best_ok ? best : 20'hfffff);
            check("min_valid", min_valid, best_ok);
            break;
          end
          #1;
          check("no early done", done, 0);
        end
        @(posedge clk);
        #1;
        check("done is one cycle", done, 0);
      end
    end
    checks += 3;
    if (n_pruned == 0) failures++;
    if (n_update == 0) failures++;
    if (n_worse == 0) failures++;
    $display("pruned %0d, best updated %0d, complete but worse %0d", n_pruned, n_update, n_worse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
