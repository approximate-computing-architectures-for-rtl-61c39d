// Body of the configuration sweep: seven sad_top instances, one per adder
// family (RCA, CLA, LOA, ACA, ACAA, ETA-I, SCSA), all with substitution SUB,
// fed the same samples in lockstep with PDE off. Each result is checked
// against the reference model of its own configuration and its latency
// against c+3 cycles; the exact families must give the exact SAD. At the end
// it prints, per family, the mean relative error distance (MRED), the mean
// error distance (MED) and the share of candidates whose SAD differs from
// the exact one (TPE). The samples are a smooth synthetic texture and the
// candidates are noisy, shifted copies of it, so that, as in motion
// estimation, many SADs are small. Instantiated by tb_sad_configs_sub1/2/3,
// which end the run.
`timescale 1ns/1ps
module tb_sad_config_body #(
  parameter sad_pkg::subst_e SUB = sad_pkg::SUBST_1
) (
  output int checks,
  output int failures,
  output bit finished
);
  import sad_pkg::*;
  import sad_ref_pkg::*;

  localparam int NS = 1, NA = 7, NC = NS * NA;
  logic clk = 0, clk_mem = 0, rst_n = 0;
  logic toggle1 = 0, toggle2 = 0;
  logic [6:0] port1_addr = 0;
  logic port1_web = 1, port1_csb = 1;
  logic [255:0] cur = 0, ref_data = 0;
  logic valid_in = 0, first = 0;
  logic [6:0] rows = 0, columns = 0;
  logic [NC-1:0] ready, done, pruned, smv;
  logic [19:0] sad [NC];
  logic [19:0] sad_min [NC];

  for (genvar s = 0; s < NS; s++) begin : g_s
    for (genvar a = 0; a < NA; a++) begin : g_a
      sad_top #(.ADDER(adder_e'(a)), .SUBST(SUB), .K(4)) u (
        .clk, .clk_mem, .rst_n, .toggle1, .port1_addr, .port1_web, .port1_csb, .cur, .ref_data,
        .valid_in, .rows, .columns, .toggle2, .first, .pde(1'b0), .ready(ready[s*NA+a]),
        .done(done[s*NA+a]), .sad(sad[s*NA+a]), .pruned(pruned[s*NA+a]),
        .sad_min(sad_min[s*NA+a]), .sad_min_valid(smv[s*NA+a]));
    end
  end

  int ph = 0;
  always begin
    #1;
    ph++;
    clk_mem = ~clk_mem;
    if (ph % 8 == 1) clk = ~clk;
  end

  task automatic check(input string what, input longint unsigned got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  typedef byte unsigned pu_t [4096];

  task automatic write_pu(input pu_t c, input pu_t r, input int n);
    for (int w = 0; w < (n + 31) / 32; w++) begin
      logic [255:0] wc, wr;
      for (int i = 0; i < 32; i++) begin
        wc[i*8 +: 8] = c[32*w+i];
        wr[i*8 +: 8] = r[32*w+i];
      end
      @(posedge clk_mem);
      port1_addr <= 7'(w); port1_csb <= 0; port1_web <= 0; cur <= wc; ref_data <= wr;
    end
    @(posedge clk_mem);
    port1_csb <= 1; port1_web <= 1;
  endtask

  function automatic byte unsigned clip(input int v);
    return byte'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  real red [NC];
  real ed [NC];
  int  n_differ [NC];

  initial begin
    int shapes[][2] = '{'{64,64}, '{32,32}, '{16,16}, '{8,8}, '{64,32}, '{16,8}, '{32,16}, '{8,4}};
    pu_t cpu, rpu;
    int nr, nc, n, cyc, t, n_cand;
    longint unsigned exact, acc [NC], tv;
    byte unsigned vc[256], vr[256];
    checks = 0;
    failures = 0;
    finished = 0;
    foreach (red[i]) begin red[i] = 0.0; ed[i] = 0.0; n_differ[i] = 0; end
    n_cand = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int s = 0; s < 16; s++) begin
      nr = shapes[s % shapes.size()][0];
      nc = shapes[s % shapes.size()][1];
      n = nr * nc;
      for (int cand = 0; cand < 4; cand++) begin
        int ox, oy, amp;
        ox = $urandom_range(0, 3);
        oy = $urandom_range(0, 3);
        amp = (cand == 0) ? 2 : (cand == 1) ? 8 : (cand == 2) ? 24 : 64;
        // smooth texture for the current PU, shifted noisy copy as reference
        for (int i = 0; i < n; i++) begin
          int y, x;
          y = i / nc;
          x = i % nc;
          cpu[i] = clip(128 + ((x * 3 + y * 5 + s * 7) % 64) - 32 + 16 * (((x / 8) + (y / 8)) % 2));
          rpu[i] = clip(128 + (((x + ox) * 3 + (y + oy) * 5 + s * 7) % 64) - 32
                        + 16 * ((((x + ox) / 8) + ((y + oy) / 8)) % 2)
                        + $urandom_range(0, 2 * amp) - amp);
        end
        write_pu(cpu, rpu, n);
        exact = 0;
        for (int i = 0; i < n; i++) exact += (cpu[i] > rpu[i]) ? cpu[i] - rpu[i] : rpu[i] - cpu[i];
        cyc = (n + 255) / 256;
        for (int k = 0; k < NC; k++) acc[k] = 0;
        for (int v = 0; v < cyc; v++) begin
          for (int i = 0; i < 256; i++) begin
            vc[i] = (256 * v + i < n) ? cpu[256*v+i] : 0;
            vr[i] = (256 * v + i < n) ? rpu[256*v+i] : 0;
          end
          for (int k = 0; k < NC; k++) begin
            tv = ref_vec(vc, vr, adder_e'(k % NA), SUB, 4);
            acc[k] = ref_acc((v == 0) ? 0 : acc[k], tv, adder_e'(k % NA), SUB, 4);
          end
        end
        while (!(&ready)) @(posedge clk);
        valid_in <= 1; rows <= 7'(nr); columns <= 7'(nc); first <= (cand == 0);
        @(posedge clk);
        valid_in <= 0;
        t = 0;
        do begin
          @(posedge clk);
          t++;
          #1;
        end while (!done[0] && t < 40);
        check("latency", t, cyc + 3);
        for (int k = 0; k < NC; k++) begin
          check("done", done[k], 1);
          check("pruned", pruned[k], 0);
          check("sad", sad[k], acc[k]);
          if (k % NA <= 1) check("exact family", sad[k], exact);
          if (64'(sad[k]) != exact) n_differ[k]++;
          ed[k] += (64'(sad[k]) > exact) ? real'(64'(sad[k]) - exact) : real'(exact - 64'(sad[k]));
          if (exact != 0)
            red[k] += ((64'(sad[k]) > exact) ? real'(64'(sad[k]) - exact) : real'(exact - 64'(sad[k]))) / real'(exact);
        end
        n_cand++;
      end
    end
    // every approximate family must change some SAD in substitutions 1 and
    // 3, except SCSA on the 8-bit subtractors (two 4-bit windows are exact)
    for (int k = 0; k < NC; k++)
      if (k % NA >= 2 && SUB != SUBST_2 && !(SUB == SUBST_3 && k % NA == 6)) begin
        checks++;
        if (n_differ[k] == 0) begin failures++; $display("config %0d never differed", k); end
      end
    $display("substitution %0d, MRED over %0d candidates (RCA CLA LOA ACA ACAA ETAI SCSA):", int'(SUB), n_cand);
    $display("  %6.3f %6.3f %6.3f %6.3f %6.3f %6.3f %6.3f",
             red[0] / n_cand, red[1] / n_cand, red[2] / n_cand, red[3] / n_cand,
             red[4] / n_cand, red[5] / n_cand, red[6] / n_cand);
    $display("  TPE %%:  %6.1f %6.1f %6.1f %6.1f %6.1f %6.1f %6.1f",
             100.0 * n_differ[0] / n_cand, 100.0 * n_differ[1] / n_cand, 100.0 * n_differ[2] / n_cand,
             100.0 * n_differ[3] / n_cand, 100.0 * n_differ[4] / n_cand, 100.0 * n_differ[5] / n_cand,
             100.0 * n_differ[6] / n_cand);
    $display("  MED:    %6.1f %6.1f %6.1f %6.1f %6.1f %6.1f %6.1f",
             ed[0] / n_cand, ed[1] / n_cand, ed[2] / n_cand, ed[3] / n_cand,
             ed[4] / n_cand, ed[5] / n_cand, ed[6] / n_cand);
    finished = 1;
  end
endmodule
