// tmr_mv_array: band matrix-vector multiplier c = A*b on a linear systolic
// array with pipeline period 1 and triple modular redundancy (error masking).
//
// Idea. With alpha = 1 every PE is busy every clock, so each stage needs three
// PEs that all hold b_i, and a voter that passes the majority of their three
// results on to the next stage. SCHEME chooses when the two copies run:
//   SPACE_SHIFT      : all three PEs work on the same clock (conventional TMR
//                      with tightly coupled PEs). One register per c link.
//   SPACE_TIME_SHIFT : copy 1 runs one clock and copy 2 two clocks after the
//                      original (k2 = 1, 2). Two delay elements are
//                      transferred onto the c link so that the vote is done
//                      before the next stage uses the sum (no roll-back): the
//                      original waits two clocks, copy 1 one clock, and the
//                      three meet in the voter. Three registers per c link.
// TIME_SHIFT is not possible with alpha = 1 (no idle clock) and is rejected.
// A single faulty PE, permanent or transient, is outvoted in either scheme; in
// the space-time-shift scheme one fault that lasts one clock also hits at most
// one copy of any computation even if it strikes all PEs of a stage.
//
// Stage i (i = 0..N-1), L = 1 (space shift) or 3 (space-time shift):
//   row j's sum reaches stage i at edge T0 + L*i + j with a_in[i] = A[j][i];
//   the voted sum drives c of stage i+1 in the clock before edge
//   T0 + L*(i+1) + j; no_majority[i] is raised when the three results differ
//   (the vote then passes the original).
// c_j is on c_out in the clock before edge T0 + L*N + j. One row per clock.
//
// The triplicated stage, the time shifts and the delay transfer follow the
// source's error-masking schemes for pipeline period 1. Widths, reset, b
// loading, the registered a copies and the voter's tie rule are this design's
// own. fault_xor[i][k] is a test input XORed into the c register of copy k
// (0 original, 1 and 2 the copies) of stage i; tie to zero.
module tmr_mv_array
  import ft_pkg::*;
#(
  parameter int unsigned N      = 5,                // stages (vector length)
  parameter redundancy_t SCHEME = SPACE_TIME_SHIFT  // SPACE_SHIFT or SPACE_TIME_SHIFT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_b,
  input  data_t b_load     [N],
  input  data_t a_in       [N],
  input  acc_t  c_in,
  input  acc_t  fault_xor  [N][3],
  output acc_t  c_out,
  output logic  no_majority[N],
  output logic  nm_any
);
  if (SCHEME == TIME_SHIFT) begin : g_bad_scheme
    $error("tmr_mv_array: a time shift needs idle clocks, which alpha = 1 lacks");
  end

  acc_t c_link [N+1];
  assign c_link[0] = c_in;

  for (genvar i = 0; i < N; i++) begin : g_stage
    acc_t  q [3];        // c registers of the three PEs
    acc_t  c_src [3];    // c input of each PE
    data_t a_src [3];    // a input of each PE
    acc_t  v [3];        // the three results, aligned for the vote

    if (SCHEME == SPACE_SHIFT) begin : g_ss
      for (genvar k = 0; k < 3; k++) begin : g_copy
        assign c_src[k] = c_link[i];
        assign a_src[k] = a_in[i];
        assign v[k]     = q[k];
      end
    end else begin : g_sts
      // copy k sees the inputs k clocks late; result k waits 2-k clocks
      acc_t  c_d1, c_d2, q0_d1, q0_d2, q1_d1;
      data_t a_d1, a_d2;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          c_d1  <= '0;
          c_d2  <= '0;
          a_d1  <= '0;
          a_d2  <= '0;
          q0_d1 <= '0;
          q0_d2 <= '0;
          q1_d1 <= '0;
        end else begin
          c_d1  <= c_link[i];
          c_d2  <= c_d1;
          a_d1  <= a_in[i];
          a_d2  <= a_d1;
          q0_d1 <= q[0];
          q0_d2 <= q0_d1;
          q1_d1 <= q[1];
        end
      end
      assign c_src[0] = c_link[i];
      assign c_src[1] = c_d1;
      assign c_src[2] = c_d2;
      assign a_src[0] = a_in[i];
      assign a_src[1] = a_d1;
      assign a_src[2] = a_d2;
      assign v[0]     = q0_d2;
      assign v[1]     = q1_d1;
      assign v[2]     = q[2];
    end

    for (genvar k = 0; k < 3; k++) begin : g_pe
      mv_pe u_pe (
        .clk, .rst_n, .load_b,
        .b_load   (b_load[i]),
        .a_in     (a_src[k]),
        .c_in     (c_src[k]),
        .fault_xor(fault_xor[i][k]),
        .c_out    (q[k])
      );
    end

    tmr_voter u_vote (
      .c1         (v[0]),
      .c2         (v[1]),
      .c3         (v[2]),
      .c_out      (c_link[i+1]),
      .no_majority(no_majority[i])
    );
  end

  assign c_out = c_link[N];

  always_comb begin
    nm_any = 1'b0;
    for (int i = 0; i < int'(N); i++) nm_any |= no_majority[i];
  end
endmodule
