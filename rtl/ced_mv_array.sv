// ced_mv_array: band matrix-vector multiplier c = A*b on a linear systolic
// array with pipeline period 1 and error detection by duplication, with the
// copy shifted in time and space (default) or in space only.
//
// Idea. With alpha = 1 every PE is busy every clock, so the copy of each
// computation needs a second PE (duplication). The copy is shifted by one
// clock (k2 = 1): the redundant PE sees the same c and a one clock later, so a
// fault that lasts one clock cannot hit both copies the same way, and a
// permanent fault in either PE makes the copies differ. To keep the check in
// front of the next stage (no roll-back), one delay element is transferred onto
// the c link between stages: the original result waits one clock, meets the
// redundant result in the matcher, and only the checked value moves on.
//
// Stage i (i = 0..N-1) holds vector element b_i in both of its PEs:
//   original  : c_o  <= c_in + a*b_i ;  c_od <= c_o        (extra delay)
//   redundant : c_id <= c_in ; a_d <= a ; c_r <= c_id + a_d*b_i
//   matcher   : c_next = c_od, err[i] = (c_od != c_r)
// The c link therefore has two delays per stage (schedule W = [2, 1]).
//
// SCHEME = SPACE_SHIFT gives the conventional duplication instead: both PEs
// see the same c and a on the same clock, the matcher compares their
// registers directly, and the c link keeps one delay per stage. This catches
// permanent faults, and transient faults that hit one of the two PEs. Both
// schemes detect only: the original's result moves on whether or not it
// matched. TIME_SHIFT is rejected (alpha = 1 leaves no idle clock).
//
// Schedule. Row j's partial sum enters c_in at clock T0 + j; stage i must then
// see a_in[i] = A[j][i] at clock T0 + L*i + j, and the finished c_j appears on
// c_out at clock T0 + L*N + j, with L = 2 (space-time shift) or 1 (space
// shift). A zero in a_in is an idle slot.
//
// b is loaded in parallel into both PEs of every stage while load_b is high.
// fault_xor[i][0] / [i][1] are test inputs XORed into the original /
// redundant PE's c register; tie them to zero in use.
//
// The duplicated stage, the delay elements and the matcher follow the
// source's space-time-shift design for this array. Widths, reset, the b
// loading and the registered a copy of the redundant PE are this design's own.
module ced_mv_array
  import ft_pkg::*;
#(
  parameter int unsigned N      = 5,                // PEs of the original array (vector length)
  parameter redundancy_t SCHEME = SPACE_TIME_SHIFT  // or SPACE_SHIFT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_b,
  input  data_t b_load   [N],
  input  data_t a_in     [N],
  input  acc_t  c_in,
  input  acc_t  fault_xor[N][2],
  output acc_t  c_out,
  output logic  err      [N],
  output logic  err_any
);
  if (SCHEME == TIME_SHIFT) begin : g_bad_scheme
    $error("ced_mv_array: a time shift needs idle clocks, which alpha = 1 lacks");
  end

  acc_t c_link [N+1];
  assign c_link[0] = c_in;

  for (genvar i = 0; i < N; i++) begin : g_stage
    acc_t  c_o, c_r;

    mv_pe u_orig (
      .clk, .rst_n, .load_b,
      .b_load   (b_load[i]),
      .a_in     (a_in[i]),
      .c_in     (c_link[i]),
      .fault_xor(fault_xor[i][0]),
      .c_out    (c_o)
    );

    if (SCHEME == SPACE_SHIFT) begin : g_ss
      mv_pe u_red (
        .clk, .rst_n, .load_b,
        .b_load   (b_load[i]),
        .a_in     (a_in[i]),
        .c_in     (c_link[i]),
        .fault_xor(fault_xor[i][1]),
        .c_out    (c_r)
      );

      matcher u_match (
        .c_orig  (c_o),
        .c_red   (c_r),
        .c_out   (c_link[i+1]),
        .mismatch(err[i])
      );
    end else begin : g_sts
      acc_t  c_od, c_id;
      data_t a_d;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          c_od <= '0;
          c_id <= '0;
          a_d  <= '0;
        end else begin
          c_od <= c_o;
          c_id <= c_link[i];
          a_d  <= a_in[i];
        end
      end

      mv_pe u_red (
        .clk, .rst_n, .load_b,
        .b_load   (b_load[i]),
        .a_in     (a_d),
        .c_in     (c_id),
        .fault_xor(fault_xor[i][1]),
        .c_out    (c_r)
      );

      matcher u_match (
        .c_orig  (c_od),
        .c_red   (c_r),
        .c_out   (c_link[i+1]),
        .mismatch(err[i])
      );
    end
  end

  assign c_out = c_link[N];

  always_comb begin
    err_any = 1'b0;
    for (int i = 0; i < int'(N); i++) err_any |= err[i];
  end
endmodule
