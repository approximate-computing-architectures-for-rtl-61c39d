// End-to-end test of sad_top at its default parameters (16 PEs, 20-bit
// SAD, 8x memory clock, second substitution with LOA).
//
// Runs motion-estimation searches over HEVC prediction-unit shapes from 4x8
// to 64x64. For every candidate the writer loads the current and reference
// PU into one memory page while the accelerator works on the other page,
// then a request is issued. Each result is compared with the reference
// model (same approximate adders) for the SAD value, the pruned flag, the
// best SAD so far and the latency (vectors used + 3 clock cycles). The
// exact SAD is computed too, to report how often and by how much (mean
// relative error distance) the approximate SAD differs. Counts that each
// mechanism occurs: single- and multi-cycle PUs, a partially filled last
// vector, PDE pruning, PDE disabled, best-SAD updates, both memory pages,
// writes overlapping a computation, and approximate results differing.
`timescale 1ns/1ps
module tb_sad_top;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  localparam adder_e AT = ADD_LOA;    // must match sad_top defaults
  localparam subst_e ST = SUBST_2;
  localparam int     KT = 4;

  int checks = 0, failures = 0;
  logic clk = 0, clk_mem = 0, rst_n = 0;
  logic toggle1 = 0, toggle2 = 0;
  logic [6:0] port1_addr = 0;
  logic port1_web = 1, port1_csb = 1;
  logic [255:0] cur = 0, ref_data = 0;
  logic valid_in = 0, first = 0, pde = 0;
  logic [6:0] rows = 0, columns = 0;
  logic ready, done, pruned, sad_min_valid;
  logic [19:0] sad, sad_min;

  sad_top dut (.*);

  int ph = 0;
  always begin
    #1;
    ph++;
    clk_mem = ~clk_mem;
    if (ph % 8 == 1) clk = ~clk;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint unsigned got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  typedef byte unsigned pu_t [4096];

  // load a PU pair into a page through port 1 (memory clock)
  task automatic write_pu(input logic pg, input pu_t c, input pu_t r, input int n);
    for (int w = 0; w < (n + 31) / 32; w++) begin
      logic [255:0] wc, wr;
      for (int i = 0; i < 32; i++) begin
        wc[i*8 +: 8] = c[32*w+i];
        wr[i*8 +: 8] = r[32*w+i];
      end
      @(posedge clk_mem);
      toggle1 <= pg; port1_addr <= 7'(w); port1_csb <= 0; port1_web <= 0;
      cur <= wc; ref_data <= wr;
    end
    @(posedge clk_mem);
    port1_csb <= 1; port1_web <= 1;
  endtask

  int n_single = 0, n_multi = 0, n_partial = 0, n_pruned = 0, n_nopde = 0;
  int n_update = 0, n_page[2] = '{0, 0}, n_overlap = 0, n_differ = 0, n_full = 0, n_cand = 0;
  real red_sum = 0.0;
  bit busy_flag = 0;

  // one request on a loaded page, checked against the model
  task automatic run_cand(input logic pg, input pu_t c, input pu_t r, input int nr, nc,
                          input bit fst, input bit pde_on,
                          inout longint unsigned best, inout bit best_ok);
    int n, cyc, used, t;
    longint unsigned acc, exact, tv;
    bit exp_pruned;
    byte unsigned vc[256], vr[256];
    n = nr * nc;
    cyc = (n + 255) / 256;
    acc = 0;
    exact = 0;
    used = cyc;
    exp_pruned = 0;
    if (fst) begin best_ok = 0; best = 20'hfffff; end
    for (int i = 0; i < n; i++) exact += (c[i] > r[i]) ? c[i] - r[i] : r[i] - c[i];
    for (int v = 0; v < cyc; v++) begin
      for (int i = 0; i < 256; i++) begin
        vc[i] = (256 * v + i < n) ? c[256*v+i] : 0;
        vr[i] = (256 * v + i < n) ? r[256*v+i] : 0;
      end
      tv = ref_vec(vc, vr, AT, ST, KT);
      acc = ref_acc((v == 0) ? 0 : acc, tv, AT, ST, KT);
      if (pde_on && best_ok && v != cyc - 1 && acc > best) begin
        exp_pruned = 1;
        used = v + 1;
        break;
      end
    end
    // request
    while (!ready) @(posedge clk);
    valid_in <= 1; rows <= 7'(nr); columns <= 7'(nc); toggle2 <= pg; first <= fst; pde <= pde_on;
    @(posedge clk);
    valid_in <= 0;
    busy_flag = 1;
    t = 0;
    do begin
      @(posedge clk);
      t++;
      #1;
    end while (!done && t < 40);
    busy_flag = 0;
    check("done", done, 1);
    check("latency", t, used + 3);
    check("sad", sad, acc);
    check("pruned", pruned, exp_pruned);
    if (!exp_pruned && (!best_ok || acc < best)) begin
      best = acc; best_ok = 1; n_update++;
    end
    check("sad_min", sad_min, best);
    check("sad_min_valid", sad_min_valid, best_ok);
    n_cand++;
    n_page[pg]++;
    if (cyc == 1) n_single++; else n_multi++;
    if (n % 256 != 0) n_partial++;
    if (n == 4096) n_full++;
    if (exp_pruned) n_pruned++;
    if (!pde_on) n_nopde++;
    if (!exp_pruned) begin
      if (acc != exact) n_differ++;
      if (exact != 0) red_sum += ((acc > exact) ? real'(acc - exact) : real'(exact - acc)) / real'(exact);
    end
  endtask

  initial begin
    int shapes[][2] = '{'{64,64}, '{64,32}, '{32,64}, '{32,32}, '{64,16}, '{16,64}, '{64,48},
                        '{48,64}, '{32,16}, '{16,32}, '{32,24}, '{24,32}, '{32,8}, '{8,32},
                        '{16,16}, '{16,8}, '{8,16}, '{16,12}, '{12,16}, '{16,4}, '{4,16},
                        '{8,8}, '{8,4}, '{4,8}};
    pu_t cpu, rpu [2];
    longint unsigned best;
    bit best_ok;
    int nr, nc, n, kind;
    logic pg;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    pg = 0;
    for (int s = 0; s < shapes.size() + 6; s++) begin
      nr = shapes[s % shapes.size()][0];
      nc = shapes[s % shapes.size()][1];
      n = nr * nc;
      for (int i = 0; i < 4096; i++) cpu[i] = byte'($urandom_range(0, 255));
      // candidate 0: close match, loaded before the search starts
      for (int i = 0; i < 4096; i++) rpu[pg][i] = byte'(int'(cpu[i]) + $urandom_range(0, 6) > 255 ? 255 : int'(cpu[i]) + $urandom_range(0, 6));
      write_pu(pg, cpu, rpu[pg], n);
      for (int k = 0; k < 6; k++) begin
        logic npg;
        npg = !pg;
        kind = $urandom_range(0, 2);
        // next candidate: a random block, a close one or a mid-distance one
        for (int i = 0; i < 4096; i++)
          case (kind)
            0: rpu[npg][i] = byte'($urandom_range(0, 255));
            1: rpu[npg][i] = byte'(int'(cpu[i]) ^ $urandom_range(0, 3));
            default: rpu[npg][i] = byte'(int'(cpu[i]) + $urandom_range(0, 60) > 255 ? 255 : int'(cpu[i]) + $urandom_range(0, 60));
          endcase
        // compute candidate k from page pg while the writer fills page npg
        fork
          run_cand(pg, cpu, rpu[pg], nr, nc, k == 0, s % 5 != 4, best, best_ok);
          begin
            @(posedge clk);
            @(posedge clk);
            if (k < 5) begin
              if (busy_flag) n_overlap++;
              write_pu(npg, cpu, rpu[npg], n);
            end
          end
        join
        pg = npg;
      end
    end
    checks += 10;
    if (n_single == 0)  begin failures++; $display("no single-cycle PU"); end
    if (n_multi == 0)   begin failures++; $display("no multi-cycle PU"); end
    if (n_partial == 0) begin failures++; $display("no partial vector"); end
    if (n_full == 0)    begin failures++; $display("no 64x64 PU"); end
    if (n_pruned == 0)  begin failures++; $display("no PDE pruning"); end
    if (n_nopde == 0)   begin failures++; $display("PDE never disabled"); end
    if (n_update == 0)  begin failures++; $display("no best-SAD update"); end
    if (n_page[0] == 0 || n_page[1] == 0) begin failures++; $display("a page unused"); end
    if (n_overlap == 0) begin failures++; $display("no write during a computation"); end
    if (n_differ == 0)  begin failures++; $display("approximation never changed a SAD"); end
    $display("candidates %0d: single-cycle %0d, multi-cycle %0d, partial vector %0d, 64x64 %0d",
             n_cand, n_single, n_multi, n_partial, n_full);
    $display("PDE pruned %0d, PDE off %0d, best updates %0d, pages %0d/%0d, overlapped writes %0d",
             n_pruned, n_nopde, n_update, n_page[0], n_page[1], n_overlap);
    $display("approximate SAD differed in %0d of %0d complete candidates, MRED %f",
             n_differ, n_cand - n_pruned, red_sum / real'(n_cand - n_pruned));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
