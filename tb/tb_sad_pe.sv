// Self-checking test of sad_pe: the default PE (exact in the second
// substitution) against the true sum of |cur - ref|, and PEs in the first
// (ETA-I tree) and third (ACA subtractors) substitutions against the
// reference model, on random and extreme sample sets.
`timescale 1ns/1ps
module tb_sad_pe;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0][7:0] c, r;
  logic [11:0] s_def, s_1, s_3;

  sad_pe u_def (.cur(c), .ref_s(r), .sad(s_def));
  sad_pe #(.ADDER(ADD_ETAI), .SUBST(SUBST_1), .K(4)) u_1 (.cur(c), .ref_s(r), .sad(s_1));
  sad_pe #(.ADDER(ADD_ACA), .SUBST(SUBST_3), .K(4)) u_3 (.cur(c), .ref_s(r), .sad(s_3));

  task automatic check(input string what, input longint unsigned got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned cb[16], rb[16];
    longint unsigned tot;
    int d1 = 0, d3 = 0;
    for (int n = 0; n < 5000; n++) begin
      tot = 0;
      for (int i = 0; i < 16; i++) begin
        case (n)
          0: begin cb[i] = 8'hff; rb[i] = 8'h00; end
          1: begin cb[i] = 8'h00; rb[i] = 8'hff; end
          2: begin cb[i] = 8'h5a; rb[i] = 8'h5a; end
          default: begin cb[i] = 8'($urandom); rb[i] = 8'($urandom); end
        endcase
        c[i] = cb[i];
        r[i] = rb[i];
        tot += (cb[i] > rb[i]) ? cb[i] - rb[i] : rb[i] - cb[i];
      end
      #1;
      check("default", s_def, tot);
      check("subst1", s_1, ref_pe(cb, rb, ADD_ETAI, SUBST_1, 4));
      check("subst3", s_3, ref_pe(cb, rb, ADD_ACA, SUBST_3, 4));
      if (64'(s_1) != tot) d1++;
      if (64'(s_3) != tot) d3++;
    end
    checks += 2;
    if (d1 == 0) failures++;
    if (d3 == 0) failures++;
    $display("approximate PEs differed: subst1 %0d, subst3 %0d of 5000", d1, d3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
