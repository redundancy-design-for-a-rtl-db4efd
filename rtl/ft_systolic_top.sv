// ft_systolic_top: the seven fault-tolerant systolic arrays side by side.
//
//  * hex_*: band matrix-matrix multiplier, hexagonal array with pipeline
//    period 3 and space-shift TMR (error masking), see tmr_hex_array.
//  * mv_* : band matrix-vector multiplier, linear array with pipeline period
//    1 and space-time-shift duplication (error detection; MV_SCHEME =
//    SPACE_SHIFT gives plain duplication on the same clock), see ced_mv_array.
//  * m1_* : the same pipeline-period-1 array with three PEs per stage and a
//    voter (error masking); the copies are shifted by one and two clocks
//    with delay transfer (M1_SCHEME = SPACE_TIME_SHIFT) or run on the same
//    clock (SPACE_SHIFT, conventional TMR), see tmr_mv_array.
//  * p2_* : band matrix-vector multiplier, linear array with pipeline period
//    2 whose idle clocks run a shifted copy for error detection; the scheme
//    (space-, time- or space-time-shift) is the parameter P2_SCHEME, see
//    ced_alpha2_array. Space-time shift is the default because it is the one
//    of the three that detects both permanent and transient faults.
//  * a2_* : the pipeline-period-2 array with the space shift and an extra PE
//    beside every odd PE: three copies of every computation and a voter
//    (error masking), see tmr_alpha2_array.
//  * ts_* : band matrix-vector multiplier on the period-1 array with its
//    schedule scaled by two; each PE repeats its computation on the idle clock
//    (time shift, transient-fault detection), see ced_ts_mv_array.
//  * tm_* : the same array with its schedule scaled by three; each PE runs
//    every computation three times and votes (time shift, transient-fault
//    masking), see tmr_ts_mv_array.
//
// The seven arrays share only clock and reset; each has its own ports, input
// schedule and timing, described in its module. The *_fault_xor inputs are
// fault-emulation test inputs and are tied to zero in normal use.
module ft_systolic_top
  import ft_pkg::*;
#(
  parameter int unsigned HEX_ROWS = 3,
  parameter int unsigned HEX_COLS = 3,
  parameter int unsigned MV_N     = 5,
  parameter redundancy_t MV_SCHEME = SPACE_TIME_SHIFT,
  parameter int unsigned M1_N     = 5,
  parameter redundancy_t M1_SCHEME = SPACE_TIME_SHIFT,
  parameter int unsigned P2_N     = 4,
  parameter redundancy_t P2_SCHEME = SPACE_TIME_SHIFT,
  parameter int unsigned A2_N     = 4,
  parameter int unsigned TS_N     = 5,
  parameter int unsigned TM_N     = 5,
  localparam int unsigned P2_NP   = P2_N + ((P2_SCHEME == TIME_SHIFT) ? 0 : 1),
  localparam int unsigned A2_NP   = A2_N + 1,
  localparam int unsigned A2_NX   = A2_NP / 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // TMR band matrix-matrix array
  input  data_t  hex_a_in       [HEX_ROWS],
  input  data_t  hex_b_in       [HEX_COLS+2],
  input  acc_t   hex_c_bot_in   [HEX_COLS+2],
  input  acc_t   hex_c_right_in [HEX_ROWS],
  input  acc_t   hex_fault_xor  [HEX_ROWS][HEX_COLS+2],
  output cycle_t hex_cycle,
  output acc_t   hex_c_top_out  [HEX_COLS],
  output acc_t   hex_c_left_out [HEX_ROWS],
  output logic   hex_no_majority[HEX_ROWS][HEX_COLS],
  // error-detecting band matrix-vector array
  input  logic   mv_load_b,
  input  data_t  mv_b_load      [MV_N],
  input  data_t  mv_a_in        [MV_N],
  input  acc_t   mv_c_in,
  input  acc_t   mv_fault_xor   [MV_N][2],
  output acc_t   mv_c_out,
  output logic   mv_err         [MV_N],
  output logic   mv_err_any,
  // error-masking pipeline-period-1 band matrix-vector array
  input  logic   m1_load_b,
  input  data_t  m1_b_load      [M1_N],
  input  data_t  m1_a_in        [M1_N],
  input  acc_t   m1_c_in,
  input  acc_t   m1_fault_xor   [M1_N][3],
  output acc_t   m1_c_out,
  output logic   m1_no_majority [M1_N],
  output logic   m1_nm_any,
  // error-detecting pipeline-period-2 band matrix-vector array
  input  data_t  p2_a_in        [P2_NP],
  input  data_t  p2_b_in,
  input  acc_t   p2_c_in,
  input  acc_t   p2_fault_xor   [P2_NP],
  output acc_t   p2_c_out,
  output logic   p2_err         [P2_N],
  output logic   p2_err_any,
  // error-masking pipeline-period-2 band matrix-vector array
  input  data_t  a2_a_in        [A2_NP],
  input  data_t  a2_b_in,
  input  acc_t   a2_c_in,
  input  acc_t   a2_fault_xor   [A2_NP],
  input  acc_t   a2_x_fault_xor [A2_NX],
  output acc_t   a2_c_out,
  output logic   a2_no_majority [A2_N],
  output logic   a2_nm_any,
  // scaled-schedule time-shift band matrix-vector array
  input  logic   ts_load_b,
  input  data_t  ts_b_load      [TS_N],
  input  data_t  ts_a_in        [TS_N],
  input  acc_t   ts_c_in,
  input  acc_t   ts_fault_xor   [TS_N],
  output acc_t   ts_c_out,
  output logic   ts_err         [TS_N],
  output logic   ts_err_any,
  input  logic   tm_load_b,
  input  data_t  tm_b_load      [TM_N],
  input  data_t  tm_a_in        [TM_N],
  input  acc_t   tm_c_in,
  input  acc_t   tm_fault_xor   [TM_N],
  output acc_t   tm_c_out,
  output logic   tm_no_majority [TM_N],
  output logic   tm_nm_any
);
  tmr_hex_array #(.ROWS(HEX_ROWS), .COLS(HEX_COLS)) u_hex (
    .clk, .rst_n,
    .a_in       (hex_a_in),
    .b_in       (hex_b_in),
    .c_bot_in   (hex_c_bot_in),
    .c_right_in (hex_c_right_in),
    .fault_xor  (hex_fault_xor),
    .cycle      (hex_cycle),
    .c_top_out  (hex_c_top_out),
    .c_left_out (hex_c_left_out),
    .no_majority(hex_no_majority)
  );

  ced_mv_array #(.N(MV_N), .SCHEME(MV_SCHEME)) u_mv (
    .clk, .rst_n,
    .load_b   (mv_load_b),
    .b_load   (mv_b_load),
    .a_in     (mv_a_in),
    .c_in     (mv_c_in),
    .fault_xor(mv_fault_xor),
    .c_out    (mv_c_out),
    .err      (mv_err),
    .err_any  (mv_err_any)
  );

  tmr_mv_array #(.N(M1_N), .SCHEME(M1_SCHEME)) u_m1 (
    .clk, .rst_n,
    .load_b     (m1_load_b),
    .b_load     (m1_b_load),
    .a_in       (m1_a_in),
    .c_in       (m1_c_in),
    .fault_xor  (m1_fault_xor),
    .c_out      (m1_c_out),
    .no_majority(m1_no_majority),
    .nm_any     (m1_nm_any)
  );

  ced_alpha2_array #(.NO(P2_N), .SCHEME(P2_SCHEME)) u_p2 (
    .clk, .rst_n,
    .a_in     (p2_a_in),
    .b_in     (p2_b_in),
    .c_in     (p2_c_in),
    .fault_xor(p2_fault_xor),
    .c_out    (p2_c_out),
    .err      (p2_err),
    .err_any  (p2_err_any)
  );

  tmr_alpha2_array #(.NO(A2_N)) u_a2 (
    .clk, .rst_n,
    .a_in       (a2_a_in),
    .b_in       (a2_b_in),
    .c_in       (a2_c_in),
    .fault_xor  (a2_fault_xor),
    .x_fault_xor(a2_x_fault_xor),
    .c_out      (a2_c_out),
    .no_majority(a2_no_majority),
    .nm_any     (a2_nm_any)
  );

  ced_ts_mv_array #(.N(TS_N)) u_ts (
    .clk, .rst_n,
    .load_b   (ts_load_b),
    .b_load   (ts_b_load),
    .a_in     (ts_a_in),
    .c_in     (ts_c_in),
    .fault_xor(ts_fault_xor),
    .c_out    (ts_c_out),
    .err      (ts_err),
    .err_any  (ts_err_any)
  );

  tmr_ts_mv_array #(.N(TM_N)) u_tm (
    .clk, .rst_n,
    .load_b     (tm_load_b),
    .b_load     (tm_b_load),
    .a_in       (tm_a_in),
    .c_in       (tm_c_in),
    .fault_xor  (tm_fault_xor),
    .c_out      (tm_c_out),
    .no_majority(tm_no_majority),
    .nm_any     (tm_nm_any)
  );
endmodule
