// Control unit: turns a rows x columns PU into 1..16 vectors of 256 pairs.
//
// The samples of a PU are stored as one flat row-major vector, 32 samples
// per memory word. On valid_in (while ready) the unit latches the PU size,
// computes n = R*C samples and ceil(n/256) vector cycles, and then issues
// one base address (8 words) per main-clock cycle. Each fetched vector is
// registered here with the lanes beyond the PU's last sample forced to zero
// in both the current and the reference half, so they add nothing to the
// SAD; a 4x4 PU thus takes one cycle and a 64x64 PU sixteen. `pde_abort` from
// the PDE comparator cancels the vectors still in flight and ends the
// candidate early. ready returns high the cycle after the candidate's result.
//
// Pipeline (main clock): accept -> issue base (cycle 1) -> fetch over eight
// memory beats -> vector register -> tree + accumulate. The result of a PU
// needing c cycles is registered c+3 clock edges after the accepting edge.
// `first` with valid_in starts a new search (clears the best SAD).
// The ceil(R*C/256) cycle count follows the published design; the storage
// order, the zero-masking and the handshake are this design's choices.
module sad_control
  import sad_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // request
  input  logic                 valid_in,
  input  logic [DIM_W-1:0]     rows,
  input  logic [DIM_W-1:0]     columns,
  input  logic                 first,
  output logic                 ready,
  // to the memory side
  output logic                 tog,
  output logic [WADDR_W-1:0]   base,
  input  logic [VEC_W-1:0]     fetch_cur,
  input  logic [VEC_W-1:0]     fetch_ref,
  // to the datapath
  output logic [VEC_W-1:0]     vec_cur,
  output logic [VEC_W-1:0]     vec_ref,
  output logic                 vec_valid,
  output logic                 vec_first,
  output logic                 vec_last,
  output logic                 new_search,
  input  logic                 pde_abort
);

  localparam int unsigned CW = $clog2(MAX_CYCLES) + 1;   // 0..16
  localparam int unsigned LW = $clog2(VEC_SAMPLES) + 1;  // 0..256

  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [LW-1:0] lanes;   // valid samples in this vector
  } slot_t;

  logic               busy;
  logic [NSAMP_W-1:0] left_q;     // samples not yet issued
  logic [CW-1:0]      issued_q;
  slot_t              a_q, b_q;   // issued / being fetched
  logic               finish;

  assign ready  = !busy;
  assign finish = vec_valid && (vec_last || pde_abort);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      left_q     <= '0;
      issued_q   <= '0;
      a_q        <= '0;
      b_q        <= '0;
      tog        <= 1'b0;
      base       <= '0;
      vec_valid  <= 1'b0;
      vec_first  <= 1'b0;
      vec_last   <= 1'b0;
      new_search <= 1'b0;
    end else begin
      tog        <= !tog;
      new_search <= 1'b0;
      a_q.valid  <= 1'b0;
      if (!busy && valid_in) begin
        logic [NSAMP_W-1:0] n;
        n = NSAMP_W'(rows) * NSAMP_W'(columns);
        if (n > NSAMP_W'(MAX_DIM * MAX_DIM)) n = NSAMP_W'(MAX_DIM * MAX_DIM);
        if (n == '0) n = NSAMP_W'(1);
        busy       <= 1'b1;
        left_q     <= n;
        issued_q   <= '0;
        new_search <= first;
      end else if (busy && left_q != '0 && !pde_abort) begin
        a_q.valid <= 1'b1;
        a_q.first <= (issued_q == '0);
        a_q.last  <= (left_q <= NSAMP_W'(VEC_SAMPLES));
        a_q.lanes <= (left_q >= NSAMP_W'(VEC_SAMPLES)) ? LW'(VEC_SAMPLES) : LW'(left_q);
        base      <= WADDR_W'(issued_q * CLK_RATIO);
        issued_q  <= issued_q + 1'b1;
        left_q    <= (left_q >= NSAMP_W'(VEC_SAMPLES)) ? left_q - NSAMP_W'(VEC_SAMPLES) : '0;
      end
      if (pde_abort) begin
        // drop everything in flight for the abandoned candidate
        left_q    <= '0;
        a_q.valid <= 1'b0;
      end
      b_q       <= a_q;
      if (pde_abort) b_q.valid <= 1'b0;
      vec_valid <= b_q.valid && !pde_abort;
      vec_first <= b_q.first;
      vec_last  <= b_q.last;
      for (int unsigned i = 0; i < VEC_SAMPLES; i++) begin
        vec_cur[i*SAMPLE_W +: SAMPLE_W] <= (i < b_q.lanes) ? fetch_cur[i*SAMPLE_W +: SAMPLE_W] : '0;
        vec_ref[i*SAMPLE_W +: SAMPLE_W] <= (i < b_q.lanes) ? fetch_ref[i*SAMPLE_W +: SAMPLE_W] : '0;
      end
      if (finish) busy <= 1'b0;
    end
  end

endmodule
