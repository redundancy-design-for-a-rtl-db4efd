// tmr_ts_mv_array: band matrix-vector multiplier c = A*b on the linear array
// with a schedule scaled by three (pipeline period 3) and time-shift triple
// modular redundancy, which masks transient faults with no extra PE.
//
// Idea. Scaling the schedule of the one-PE-per-vector-element array by three
// (W = [3, 3] instead of [1, 1]) leaves every PE idle on two clocks out of
// three and puts three registers on every c link. The idle clocks repeat the
// computation in the same PE one and two clocks later (k1 = 0, k2 = 1 and 2).
// A voter in the stage takes the three runs. The largest time shift (2) is
// below the link delay (3), so the vote is done before the next stage needs
// the value, and only voted sums travel on.
//
// Stage i (i = 0..N-1) holds b_i in one mv_pe:
//   edges e, e+1, e+2  : pe <= c_in + a*b_i, three times on the same inputs;
//                        h1 <= pe and h2 <= h1 on every edge
//   clock after e+2    : voter takes (h2, h1, pe) = (run 1, run 2, run 3);
//                        the vote drives c of stage i+1 and is captured in v
//   edges e+3 .. e+5   : stage i+1 runs on the vote (e+3) and on v (e+4, e+5).
// Original computations run on edges e with e mod 3 = 0, counted from the
// first edge after reset. no_majority[i] is raised in a vote clock where all
// three runs differ; the vote then passes run 1.
//
// Schedule: row j enters on c_in at edges T0+3j .. T0+3j+2 (T0 a multiple of
// 3), stage i must see a_in[i] = A[j][i] at edges T0+3(i+j) .. T0+3(i+j)+2,
// and c_j is on c_out in the clock before edge T0+3(N+j) and the two clocks
// after it. One row every three clocks.
//
// The scaled schedule, the time shifts and the vote inside the stage follow
// the source's time-shift error-masking scheme for pipeline periods of three
// and more. The hold registers, the vote register v, widths, reset and b
// loading are this design's own. A permanent fault spoils all three runs
// alike and is not masked. fault_xor[i] is a test input XORed into stage i's
// PE register; tie to zero.
module tmr_ts_mv_array
  import ft_pkg::*;
#(
  parameter int unsigned N = 5  // PEs (vector length)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_b,
  input  data_t b_load     [N],
  input  data_t a_in       [N],
  input  acc_t  c_in,
  input  acc_t  fault_xor  [N],
  output acc_t  c_out,
  output logic  no_majority[N],
  output logic  nm_any
);
  acc_t c_link [N+1];
  logic [1:0] phase;   // edge count mod 3
  logic [1:0] age;     // edges since reset, saturating at 3
  logic live;          // the clock after the third run of a triple

  assign c_link[0] = c_in;
  assign live = (phase == 2'd0) && (age == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 2'd0;
      age   <= 2'd0;
    end else begin
      phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      if (age != 2'd3) age <= age + 2'd1;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    acc_t pe_q, h1_q, h2_q, v_q, vote;
    logic nm;

    mv_pe u_pe (
      .clk, .rst_n, .load_b,
      .b_load   (b_load[i]),
      .a_in     (a_in[i]),
      .c_in     (c_link[i]),
      .fault_xor(fault_xor[i]),
      .c_out    (pe_q)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        h1_q <= '0;
        h2_q <= '0;
        v_q  <= '0;
      end else begin
        h1_q <= pe_q;
        h2_q <= h1_q;
        v_q  <= c_link[i+1];
      end
    end

    tmr_voter u_vote (
      .c1         (h2_q),
      .c2         (h1_q),
      .c3         (pe_q),
      .c_out      (vote),
      .no_majority(nm)
    );

    assign c_link[i+1]    = live ? vote : v_q;
    assign no_majority[i] = nm && live;
  end

  assign c_out = c_link[N];

  always_comb begin
    nm_any = 1'b0;
    for (int i = 0; i < int'(N); i++) nm_any |= no_majority[i];
  end
endmodule
