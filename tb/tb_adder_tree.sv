// Self-checking test of adder_tree: a 16-input tree of 12-bit operands
// (the tree adder behind the PEs) built exact, with LOA above bit 11, and
// with ACA on all bits, plus an 8-bit-input ETA-I tree (a PE's tree in the
// first substitution). Random and extreme operands, compared with the
// pairwise reference model and, for the exact tree, with the true sum.
`timescale 1ns/1ps
module tb_adder_tree;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0][11:0] op12;
  logic [15:0][7:0]  op8;
  logic [15:0] s_exact, s_loa, s_aca;
  logic [11:0] s_eta;

  adder_tree #(.N(16), .IN_W(12), .ADDER(ADD_RCA), .APPROX(0)) u_exact (.operands(op12), .sum(s_exact));
  adder_tree #(.N(16), .IN_W(12), .ADDER(ADD_LOA), .APPROX(1), .EXACT_LSBS(12), .K(4)) u_loa (.operands(op12), .sum(s_loa));
  adder_tree #(.N(16), .IN_W(12), .ADDER(ADD_ACA), .APPROX(1), .EXACT_LSBS(0), .K(4)) u_aca (.operands(op12), .sum(s_aca));
  adder_tree #(.N(16), .IN_W(8), .ADDER(ADD_ETAI), .APPROX(1), .EXACT_LSBS(0), .K(4)) u_eta (.operands(op8), .sum(s_eta));

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
    longint unsigned v12[] = new[16];
    longint unsigned v8[] = new[16];
    longint unsigned tot;
    int diff_loa = 0;
    for (int n = 0; n < 3000; n++) begin
      tot = 0;
      for (int i = 0; i < 16; i++) begin
        case (n)
          0: v12[i] = 12'hfff;
          1: v12[i] = 0;
          default: v12[i] = (n % 3 == 0) ? 64'($urandom_range(0, 4080)) : 64'($urandom_range(3000, 4080));
        endcase
        v8[i] = 64'($urandom_range(0, 255));
        op12[i] = 12'(v12[i]);
        op8[i] = 8'(v8[i]);
        tot += v12[i];
      end
      #1;
      check("exact", s_exact, tot);
      check("exact vs model", s_exact, ref_tree(v12, 12, ADD_RCA, 0, 0, 4));
      check("loa", s_loa, ref_tree(v12, 12, ADD_LOA, 1, 12, 4));
      check("aca", s_aca, ref_tree(v12, 12, ADD_ACA, 1, 0, 4));
      check("eta", s_eta, ref_tree(v8, 8, ADD_ETAI, 1, 0, 4));
      if (s_loa != s_exact) diff_loa++;
    end
    // sums above 4095 reach the approximate bits, so LOA must differ sometimes
    checks++;
    if (diff_loa == 0) failures++;
    $display("LOA tree differed from exact in %0d of 3000 cases", diff_loa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
