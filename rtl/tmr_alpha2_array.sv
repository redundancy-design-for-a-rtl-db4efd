// tmr_alpha2_array: band matrix-vector multiplier c = A*b on the linear
// systolic array with pipeline period 2 and space-shift triple modular
// redundancy (error masking).
//
// Idea. In the pipeline-period-2 array (PE p = i - j, clock t = i + j for
// matrix element a_ji) each PE is idle every other clock. The space shift
// (k1 = 1, k2 = -1) fills those clocks: the computation of PE p at clock t is
// repeated by PE p+1 at the same clock, which costs one extra PE (NP = NO+1
// PEs). That gives two copies. The third copy comes from an extra PE beside
// every odd-numbered PE, doing exactly what that PE does. Each computation
// runs in a pair (p, p+1), and exactly one of the two is odd, so every
// computation runs three times on the same clock. For NO = 4 this is 2 extra
// PEs besides the space-shift PE, about 50 percent.
//
// Voting. Voter p takes the c registers of PE p, PE p+1 and the extra PE of
// whichever of the two is odd. Its vote is real in the clock after PE p ran
// its original, i.e. on edges tau with tau = p (mod 2). PE q's c input is a
// two-way multiplexer on the clock parity:
//   original slot (tau = q mod 2): vote p = q-1 (sum of node q-1);
//   copy slot     (otherwise)    : vote p = q-2 (sum of node q-2, for the copy
//                                  of node q-1 that PE q runs).
// Where that voter does not exist, PE 0 takes c_in, and PE 1 in its copy
// slot takes c_in delayed by one register (c_in_d). Routing that value through
// PE 0's idle slot instead would let a fault in PE 0 spoil two of the three
// copies of its own computation. Only voted sums move on, so one faulty PE,
// permanent or transient, is outvoted and never spreads.
//
// Dataflow and timing. As in ced_alpha2_array with the space-shift scheme:
// a_in[q] from the host, b enters the top PE and moves down, c enters PE 0.
// PE q runs its original on edges tau = q (mod 2) counted from the first edge
// after reset, and on the other edges the copy of node q-1; the host feeds
// every input in both slots, the extra PE k (beside PE 2k+1) gets the same a,
// b and c as its partner. c_out is the vote of the top original PE, real in
// the clock after that PE's original ran; no_majority[p] is raised in that
// clock of voter p when all three copies differ (the vote passes PE p's).
//
// The space shift, its (k1, k2) and the extra PE beside every odd PE follow
// the source's space-shift error-masking scheme for pipeline period 2. The
// voter placement and the multiplexers are this design's own reading of it.
// fault_xor[q] and x_fault_xor[k] are test inputs XORed into the c register of
// PE q and of extra PE k; tie them to zero.
module tmr_alpha2_array
  import ft_pkg::*;
#(
  parameter int unsigned NO = 4,          // PEs of the original array
  localparam int unsigned NP = NO + 1,    // with the space-shift PE
  localparam int unsigned NX = NP / 2     // extra PEs, beside PEs 1, 3, ...
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t a_in       [NP],
  input  data_t b_in,
  input  acc_t  c_in,
  input  acc_t  fault_xor  [NP],
  input  acc_t  x_fault_xor[NX],
  output acc_t  c_out,
  output logic  no_majority[NO],
  output logic  nm_any
);
  data_t b_w  [NP+1];  // b_w[q]: b into PE q (b_w[NP] from the host)
  acc_t  c_sel[NP];    // c input of PE q (and of its extra PE)
  acc_t  c_q  [NP];    // c register of PE q
  acc_t  c_x  [NX];    // c register of extra PE k
  acc_t  vote [NO];
  acc_t  c_in_d;       // c_in one clock late, for the copy slot of PE 1
  logic  phase;        // edge count mod 2

  assign b_w[NP] = b_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= 1'b0;
      c_in_d <= '0;
    end else begin
      phase  <= ~phase;
      c_in_d <= c_in;
    end
  end

  for (genvar q = 0; q < NP; q++) begin : g_pe
    data_t a_unused;
    // the clock before an edge tau has phase = tau mod 2
    localparam logic ORIG = 1'(q % 2);
    if (q == 0) begin : g_c0
      assign c_sel[q] = c_in;
    end else if (q == 1) begin : g_c1
      assign c_sel[q] = (phase == ORIG) ? vote[0] : c_in_d;
    end else begin : g_cn
      assign c_sel[q] = (phase == ORIG) ? vote[q-1] : vote[q-2];
    end

    mac_pe u_pe (
      .clk, .rst_n,
      .a_in     (a_in[q]),
      .b_in     (b_w[q+1]),
      .c_in     (c_sel[q]),
      .fault_xor(fault_xor[q]),
      .a_out    (a_unused),
      .b_out    (b_w[q]),
      .c_out    (c_q[q])
    );

    if (q % 2 == 1) begin : g_extra
      data_t xa_unused, xb_unused;
      mac_pe u_xpe (
        .clk, .rst_n,
        .a_in     (a_in[q]),
        .b_in     (b_w[q+1]),
        .c_in     (c_sel[q]),
        .fault_xor(x_fault_xor[q/2]),
        .a_out    (xa_unused),
        .b_out    (xb_unused),
        .c_out    (c_x[q/2])
      );
    end
  end

  for (genvar p = 0; p < NO; p++) begin : g_vote
    localparam int unsigned ODD = (p % 2 == 1) ? p : p + 1;
    localparam logic LIVE = 1'((p + 1) % 2);
    logic nm;
    tmr_voter u_vote (
      .c1         (c_q[p]),
      .c2         (c_q[p+1]),
      .c3         (c_x[ODD/2]),
      .c_out      (vote[p]),
      .no_majority(nm)
    );
    assign no_majority[p] = nm && (phase == LIVE);
  end

  assign c_out = vote[NO-1];

  always_comb begin
    nm_any = 1'b0;
    for (int p = 0; p < int'(NO); p++) nm_any |= no_majority[p];
  end
endmodule
