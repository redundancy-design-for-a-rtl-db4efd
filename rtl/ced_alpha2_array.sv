// ced_alpha2_array: band matrix-vector multiplier c = A*b on the linear
// systolic array with pipeline period 2, with concurrent error detection by
// one of three redundancy schemes.
//
// Idea. In the original array (PE p = i - j, clock t = i + j for matrix element
// a_ji) every PE works only on every other clock. The idle clocks run a copy
// of the whole computation, shifted in space and/or time:
//   SPACE_SHIFT      (k1 = 1, k2 = -1): computation done by PE p at clock t is
//                    repeated by PE p+1 at the same clock; NO+1 PEs, no extra
//                    latency; detects permanent faults.
//   TIME_SHIFT       (k1 = 0, k2 = 1): repeated by PE p itself at clock t+1;
//                    NO PEs; detects transient faults.
//   SPACE_TIME_SHIFT (k1 = 1, k2 = 1): repeated by PE p+1 at clock t+2;
//                    NO+1 PEs; detects both.
// With TN = k2 + k1 (the time shift) and K1 = k1, the matcher of original PE p
// compares PE p's c register, delayed TN clocks, with PE p+K1's c register,
// in the clock after the copy ran. The copies share the links and registers
// of the original array, so the host feeds every input twice: once in the
// original's slot and once in the copy's slot.
//
// Dataflow. Physical PE q (q = 0 .. NP-1, NP = NO + K1) is a mac_pe: a_in[q]
// comes from the host, b enters at the top PE and moves down (q -> q-1), c
// enters at the bottom PE and moves up (q -> q+1), one delay per link.
// PE q runs its original computation on edges tau with tau = q (mod 2), counted
// from the first edge after reset, and the copy on the other edges.
// c_out is the c register of the top PE; err[p] is raised in the clock where
// matcher p sees two different copies. Matchers stay silent for the first
// TN + 1 clocks after reset, before any compared original has run.
//
// The array, the three schemes and their (k1, k2) follow the source's
// examples. The matchers and their placement are this design's own: the
// source only states that the two copies are compared. Faults are detected,
// not corrected: the source notes that correcting them in the time-shift and
// space-time-shift schemes needs a roll-back, which is not built here.
// fault_xor[q] is a test input XORed into PE q's c register; tie to zero.
module ced_alpha2_array
  import ft_pkg::*;
#(
  parameter int unsigned NO = 4,                 // PEs of the original array
  parameter redundancy_t SCHEME = SPACE_SHIFT,
  localparam int unsigned K1 = (SCHEME == TIME_SHIFT) ? 0 : 1,
  localparam int unsigned TN = (SCHEME == SPACE_SHIFT) ? 0 :
                               (SCHEME == TIME_SHIFT)  ? 1 : 2,
  localparam int unsigned NP = NO + K1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t a_in     [NP],
  input  data_t b_in,
  input  acc_t  c_in,
  input  acc_t  fault_xor[NP],
  output acc_t  c_out,
  output logic  err      [NO],
  output logic  err_any
);
  data_t b_w [NP+1];   // b_w[q]: b into PE q (b_w[NP] from the host)
  acc_t  c_w [NP+1];   // c_w[q]: c into PE q; c_w[q+1]: c register of PE q
  logic  phase;        // edge count mod 2
  logic [1:0] age;     // edges since reset, saturating at TN + 1
  logic  primed;       // the originals being compared ran after reset

  assign b_w[NP] = b_in;
  assign c_w[0]  = c_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0;
      age   <= '0;
    end else begin
      phase <= ~phase;
      if (!primed) age <= age + 2'd1;
    end
  end
  assign primed = (age == 2'(TN + 1));

  for (genvar q = 0; q < NP; q++) begin : g_pe
    data_t a_unused;
    mac_pe u_pe (
      .clk, .rst_n,
      .a_in     (a_in[q]),
      .b_in     (b_w[q+1]),
      .c_in     (c_w[q]),
      .fault_xor(fault_xor[q]),
      .a_out    (a_unused),
      .b_out    (b_w[q]),
      .c_out    (c_w[q+1])
    );
  end

  for (genvar p = 0; p < NO; p++) begin : g_chk
    acc_t hist [TN+1];   // hist[d]: PE p's c register d clocks ago
    acc_t checked;       // the matcher's forwarded copy; c moves on inside the PEs
    logic mismatch;
    assign hist[0] = c_w[p+1];
    for (genvar d = 1; d <= TN; d++) begin : g_hist
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) hist[d] <= '0;
        else        hist[d] <= hist[d-1];
      end
    end
    matcher u_match (
      .c_orig  (hist[TN]),
      .c_red   (c_w[p+1+K1]),
      .c_out   (checked),
      .mismatch(mismatch)
    );
    // PE p ran its original on the edge TN+1 clocks back: that edge's parity,
    // (phase - TN - 1) mod 2, must equal p mod 2.
    localparam logic LIVE = 1'((p + TN + 1) % 2);
    assign err[p] = mismatch && primed && (phase == LIVE);
  end

  assign c_out = c_w[NP];

  always_comb begin
    err_any = 1'b0;
    for (int p = 0; p < int'(NO); p++) err_any |= err[p];
  end
endmodule
