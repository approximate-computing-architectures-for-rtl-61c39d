// SAD accumulator with partial distortion elimination (PDE).
//
// A PU of R x C samples reaches the datapath as 1 to 16 vectors of 256
// sample pairs; the tree adder turns each vector into a 16-bit partial SAD.
// This block adds the partial SADs of one candidate into a 20-bit
// accumulator (enough for 64x64 x 255). It also keeps the best (smallest)
// complete SAD of the current search. When PDE is enabled and the running
// sum of a candidate exceeds the best SAD before its last vector, the
// candidate is abandoned: `pde_abort` tells the control unit to stop fetching
// and the candidate is reported with `pruned` set and its partial sum.
//
// Timing: vec_valid/tree_sum are consumed on the rising clock edge; done,
// sad and pruned are registered and valid for one cycle after the edge that
// took the last (or the aborting) vector. `pde_abort` is combinational from the
// current vector. new_search clears the best SAD at the next edge.
// The accumulation adder is approximate in substitutions 1 (all bits) and 2
// (bits 12..19), as in the published work; the comparator is exact, and the
// interface, strict "greater than" test and no-prune-on-last-vector rule are
// this design's choices.
module sad_accum_pde
  import sad_pkg::*;
#(
  parameter adder_e      ADDER = ADD_LOA,
  parameter subst_e      SUBST = SUBST_2,
  parameter int unsigned K     = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pde_en,
  input  logic                  new_search,
  input  logic                  vec_valid,
  input  logic                  vec_first,
  input  logic                  vec_last,
  input  logic [TREE_OUT_W-1:0] tree_sum,
  output logic                  pde_abort,
  output logic                  done,
  output logic [ACC_W-1:0]      sad,
  output logic                  pruned,
  output logic [ACC_W-1:0]      sad_min,
  output logic                  min_valid
);

  logic [ACC_W-1:0] acc_q;
  logic [ACC_W:0]   acc_sum;     // its carry out is dropped: a SAD never exceeds 20 bits
  logic [ACC_W-1:0] acc_next;

  approx_adder #(
    .W(ACC_W), .ADDER(ADDER), .APPROX(SUBST == SUBST_1 || SUBST == SUBST_2),
    .EXACT_LSBS((SUBST == SUBST_2) ? SUBST2_EXACT : 0), .K(K)
  ) u_acc (
    .a  (vec_first ? '0 : acc_q),
    .b  (ACC_W'(tree_sum)),
    .cin(1'b0),
    .sum(acc_sum)
  );
  assign acc_next = acc_sum[ACC_W-1:0];

  assign pde_abort = vec_valid && pde_en && min_valid && !vec_last && (acc_next > sad_min);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q     <= '0;
      done      <= 1'b0;
      sad       <= '0;
      pruned    <= 1'b0;
      sad_min   <= '1;
      min_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (vec_valid) acc_q <= acc_next;
      if (vec_valid && (vec_last || pde_abort)) begin
        done   <= 1'b1;
        sad    <= acc_next;
        pruned <= pde_abort;
      end
      if (new_search) begin
        min_valid <= 1'b0;
        sad_min   <= '1;
      end else if (vec_valid && vec_last && (!min_valid || acc_next < sad_min)) begin
        min_valid <= 1'b1;
        sad_min   <= acc_next;
      end
    end
  end

endmodule
