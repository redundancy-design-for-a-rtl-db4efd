// tmr_hex_array: band matrix-matrix multiplier on a hexagonal systolic array
// with space-shift triple modular redundancy.
//
// Idea. The classic hexagonal array for C = A*B (A with ROWS diagonals, B
// with COLS diagonals) has pipeline period alpha = 3: each PE works one
// clock in three. Here the two idle clocks of every PE are used to repeat the
// computations of its two left-hand neighbours: the computation that the
// original array performs in PE(x,y) at clock t is also performed, at the same
// clock, by PE(x,y+1) and PE(x,y+2). Two extra PE columns (2*ROWS PEs) are
// enough for full TMR, instead of two extra arrays.
//
// Structure (row 0 at the top, column 0 at the left).
//  * ROWS x (COLS+2) mac_pe. a enters each row at the left and moves right,
//    b enters each column at the top and moves down, c moves up-left:
//    the partial sum leaving PE(x+1,y) is used next by PE(x,y-1).
//  * A voter above every original PE position (x,y), y < COLS, votes on the
//    c' registers of PE(x,y), PE(x,y+1), PE(x,y+2).
//  * In rows 0..ROWS-2 a cycle_mux feeds the c input of every PE. PE(x,z)
//    in role r = (x + z - phase) mod 3 (0: original, 1: first copy,
//    2: second copy; phase = cycle - 1) needs the result of voter
//    (x+1, z+1-r); its mux input c<phase+1> is wired to that voter, so a
//    single broadcast "cycle" drives every multiplexer. Voter positions
//    at column COLS and beyond are the right edge: c_right_in[x].
//  * The bottom row takes c straight from c_bot_in[z].
//
// Input schedule (done by the host). An original computation c_ij += a_ik*b_kj
// runs in PE(x,y) with x = i-k+ROWS/2, y = j-k+COLS/2, at a clock t with
// t mod 3 = (x+y) mod 3 counted from the first clock after reset. Every input
// value therefore enters three times: each a on three consecutive clocks of
// its row, each b at the same clock in three adjacent columns, each initial c
// at the same clock in three adjacent bottom columns.
//
// Outputs. Finished sums leave through the voters of row 0 (c_top_out[y])
// and of column 0 (c_left_out[x]); c_top_out[y] holds the voted result of the
// computation done in PE(0,y) one clock earlier. no_majority[x][y] marks a
// vote where all three copies differ; it is only raised in the clock where
// voter (x,y) holds a real triple (its original PE worked one clock before).
//
// The structure, the voter/mux placement and the cycle-controlled
// multiplexing follow the source. Widths, reset, the right-edge c input, the
// input schedule offsets and the fault_xor test inputs (XORed into each PE's
// c' register; tie to zero in use) are this design's own.
module tmr_hex_array
  import ft_pkg::*;
#(
  parameter int unsigned ROWS = 3,  // diagonals of A (PE rows)
  parameter int unsigned COLS = 3,  // diagonals of B (original PE columns)
  localparam int unsigned NCOL = COLS + 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  data_t  a_in       [ROWS],
  input  data_t  b_in       [NCOL],
  input  acc_t   c_bot_in   [NCOL],
  input  acc_t   c_right_in [ROWS],
  input  acc_t   fault_xor  [ROWS][NCOL],
  output cycle_t cycle,
  output acc_t   c_top_out  [COLS],
  output acc_t   c_left_out [ROWS],
  output logic   no_majority[ROWS][COLS]
);
  data_t a_w   [ROWS][NCOL+1];  // a_w[x][z]: a into PE(x,z)
  data_t b_w   [ROWS+1][NCOL];  // b_w[x][z]: b into PE(x,z)
  acc_t  c_pe  [ROWS][NCOL];    // c' register of PE(x,z)
  acc_t  c_in  [ROWS][NCOL];    // c into PE(x,z)
  acc_t  vote  [ROWS][COLS];    // voted result of original position (x,y)

  cycle_gen u_cycle (.clk, .rst_n, .cycle);

  for (genvar x = 0; x < ROWS; x++) begin : g_a
    assign a_w[x][0] = a_in[x];
  end
  for (genvar z = 0; z < NCOL; z++) begin : g_b
    assign b_w[0][z] = b_in[z];
  end

  for (genvar x = 0; x < ROWS; x++) begin : g_row
    for (genvar z = 0; z < NCOL; z++) begin : g_col
      mac_pe u_pe (
        .clk, .rst_n,
        .a_in     (a_w[x][z]),
        .b_in     (b_w[x][z]),
        .c_in     (c_in[x][z]),
        .fault_xor(fault_xor[x][z]),
        .a_out    (a_w[x][z+1]),
        .b_out    (b_w[x+1][z]),
        .c_out    (c_pe[x][z])
      );
    end
    for (genvar y = 0; y < COLS; y++) begin : g_vote
      // The voter holds a real triple only in the clock after its original
      // PE worked, i.e. when phase - 1 = (x + y) mod 3.
      localparam int LIVE = (x + y + 1) % 3;
      logic nomaj_raw;
      tmr_voter u_voter (
        .c1         (c_pe[x][y]),
        .c2         (c_pe[x][y+1]),
        .c3         (c_pe[x][y+2]),
        .c_out      (vote[x][y]),
        .no_majority(nomaj_raw)
      );
      assign no_majority[x][y] = nomaj_raw && (cycle == cycle_t'(LIVE + 1));
    end
  end

  // c inputs: bottom row straight from the host, other rows through a mux.
  for (genvar z = 0; z < NCOL; z++) begin : g_cbot
    assign c_in[ROWS-1][z] = c_bot_in[z];
  end
  for (genvar x = 0; x + 1 < ROWS; x++) begin : g_mrow
    for (genvar z = 0; z < NCOL; z++) begin : g_mcol
      acc_t src [3];
      for (genvar p = 0; p < 3; p++) begin : g_src
        // role of PE(x,z) while phase = p, and the voter column it reads
        localparam int R = (x + z + 3 - p) % 3;
        localparam int S = z + 1 - R;
        if (S >= int'(COLS)) begin : g_edge
          assign src[p] = c_right_in[x];
        end else if (S < 0) begin : g_none
          assign src[p] = '0;
        end else begin : g_voter
          assign src[p] = vote[x+1][S];
        end
      end
      cycle_mux u_mux (
        .cycle,
        .c1   (src[0]),
        .c2   (src[1]),
        .c3   (src[2]),
        .c_out(c_in[x][z])
      );
    end
  end

  for (genvar y = 0; y < COLS; y++) begin : g_top
    assign c_top_out[y] = vote[0][y];
  end
  for (genvar x = 0; x < ROWS; x++) begin : g_left
    assign c_left_out[x] = vote[x][0];
  end
endmodule
