// Self-checking test of approx_adder: every adder family at two widths,
// with and without an exact low part, against the slice-arithmetic model,
// exhaustively for 8-bit operands and on random 20-bit operands. Also
// checks that the exact families and APPROX = 0 give the true sum.
`timescale 1ns/1ps
module tb_approx_adder;
  import sad_pkg::*;
  import sad_ref_pkg::*;

  int checks = 0, failures = 0;

  // 8-bit instances, all bits approximate (as inside a PE)
  logic [7:0] a8, b8;
  logic       c8;
  logic [8:0] s8 [7];
  // 20-bit instances, bits 12.. approximate (as in the accumulator)
  logic [19:0] a20, b20;
  logic [20:0] s20 [7];

  for (genvar t = 0; t < 7; t++) begin : g_t
    approx_adder #(.W(8), .ADDER(adder_e'(t)), .APPROX(1), .EXACT_LSBS(0), .K(4))
      u8 (.a(a8), .b(b8), .cin(c8), .sum(s8[t]));
    approx_adder #(.W(20), .ADDER(adder_e'(t)), .APPROX(1), .EXACT_LSBS(12), .K(4))
      u20 (.a(a20), .b(b20), .cin(1'b0), .sum(s20[t]));
  end
  logic [20:0] s20_exact;
  approx_adder #(.W(20), .ADDER(ADD_LOA), .APPROX(0), .EXACT_LSBS(0), .K(4))
    u_ex (.a(a20), .b(b20), .cin(1'b0), .sum(s20_exact));

  int err_count [7];

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (err_count[t]) err_count[t] = 0;
    for (int ci = 0; ci < 2; ci++)
      for (int ai = 0; ai < 256; ai++)
        for (int bi = 0; bi < 256; bi += 3) begin
          a8 = 8'(ai); b8 = 8'(bi); c8 = 1'(ci);
          #1;
          for (int t = 0; t < 7; t++) begin
            longint unsigned e;
            e = ref_add(ai, bi, ci, 8, adder_e'(t), 1, 0, 4);
            checks++;
            if (64'(s8[t]) != e) begin
              failures++;
              if (failures < 10) $display("8-bit type %0d: %0d+%0d+%0d = %0d, expected %0d", t, ai, bi, ci, s8[t], e);
            end
            if (64'(s8[t]) != 64'(ai + bi + ci)) err_count[t]++;
          end
        end
    // exact families must never err; approximate ones must err sometimes,
    // except SCSA, which with two 4-bit windows on 8 bits is still exact
    for (int t = 0; t < 7; t++) begin
      checks++;
      if ((t <= 1 || t == 6) != (err_count[t] == 0)) begin
        failures++;
        $display("type %0d: %0d wrong sums", t, err_count[t]);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a20 = 20'($urandom);
      b20 = 20'($urandom);
      #1;
      checks++;
      if (64'(s20_exact) != 64'(a20) + 64'(b20)) failures++;
      for (int t = 0; t < 7; t++) begin
        checks++;
        if (64'(s20[t]) != ref_add(a20, b20, 0, 20, adder_e'(t), 1, 12, 4)) begin
          failures++;
          if (failures < 10) $display("20-bit type %0d: %h+%h = %h", t, a20, b20, s20[t]);
        end
        // the exact low part is never affected
        checks++;
        if (s20[t][11:0] != 12'(a20 + b20)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
