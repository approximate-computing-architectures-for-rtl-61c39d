// Configuration sweep for substitution 1: runs tb_sad_config_body with the
// seven adder families placed as in substitution 1, then reports.
`timescale 1ns/1ps
module tb_sad_configs_sub1;
  import sad_pkg::*;

  int checks, failures;
  bit finished;

  tb_sad_config_body #(.SUB(SUBST_1)) u_body (.checks, .failures, .finished);

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
