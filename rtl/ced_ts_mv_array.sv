// ced_ts_mv_array: band matrix-vector multiplier c = A*b on the linear array
// with a scaled schedule (pipeline period 2) and time-shift error detection.
//
// Idea. Scaling the schedule of the one-PE-per-vector-element array by two
// (W = [2, 2] instead of [1, 1]) leaves every PE idle on every other clock
// and puts two registers on every c link. The idle clock repeats the
// computation in the same PE one clock later (k1 = 0, k2 = 1). No PE is added.
// A transient fault hits only one of the two runs and is caught by comparing
// them in the stage itself. Because the time shift (1) is smaller than the
// delays on the c link (2), the comparison finishes before the next stage uses
// the value, so no roll-back is needed for detection.
//
// Stage i (i = 0..N-1) holds b_i in one mv_pe:
//   edge t   (original) : pe <= c_in + a*b_i
//   edge t+1 (copy)     : pe <= c_in + a*b_i (same inputs), d <= original
//   clock after t+1     : matcher compares d with pe; err[i] if they differ;
//                         d is the c input of stage i+1 at edge t+2, and at
//                         edge t+3 the copy's result follows in d.
// Original computations run on even edges counted from the first edge after
// reset; err[i] is only raised in the clocks where a matching pair is present.
//
// Schedule: row j enters on c_in at edges T0+2j and T0+2j+1 (T0 even), stage i
// must see a_in[i] = A[j][i] at edges T0+2(i+j) and T0+2(i+j)+1, and c_j is on
// c_out in the clock before edge T0+2(N+j). One row every two clocks.
//
// The scaled schedule, the time shift and the in-PE comparison follow the
// source's time-shift example for this array. The hold register d, the
// matcher placement, widths, reset and b loading are this design's own.
// fault_xor[i] is a test input XORed into stage i's PE register; tie to zero.
module ced_ts_mv_array
  import ft_pkg::*;
#(
  parameter int unsigned N = 5  // PEs (vector length)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_b,
  input  data_t b_load   [N],
  input  data_t a_in     [N],
  input  acc_t  c_in,
  input  acc_t  fault_xor[N],
  output acc_t  c_out,
  output logic  err      [N],
  output logic  err_any
);
  acc_t c_link [N+1];
  logic phase;         // edge count mod 2
  logic primed;        // two edges have passed since reset
  logic started;

  assign c_link[0] = c_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      started <= 1'b0;
      primed  <= 1'b0;
    end else begin
      phase   <= ~phase;
      started <= 1'b1;
      primed  <= started;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    acc_t pe_q, d_q;
    logic mismatch;

    mv_pe u_pe (
      .clk, .rst_n, .load_b,
      .b_load   (b_load[i]),
      .a_in     (a_in[i]),
      .c_in     (c_link[i]),
      .fault_xor(fault_xor[i]),
      .c_out    (pe_q)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) d_q <= '0;
      else        d_q <= pe_q;
    end

    matcher u_match (
      .c_orig  (d_q),
      .c_red   (pe_q),
      .c_out   (c_link[i+1]),
      .mismatch(mismatch)
    );
    // d holds an original and pe its copy in the clocks with phase = 0
    assign err[i] = mismatch && primed && !phase;
  end

  assign c_out = c_link[N];

  always_comb begin
    err_any = 1'b0;
    for (int i = 0; i < int'(N); i++) err_any |= err[i];
  end
endmodule
