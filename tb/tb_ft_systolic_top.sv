// tb_ft_systolic_top: end-to-end testbench of the seven fault-tolerant arrays at
// their default sizes (3 x 3 + 2 redundant columns hexagonal TMR array, 5-stage
// error-detecting matrix-vector array, 5-stage error-masking matrix-vector
// array with the space-time-shift scheme, 4-PE pipeline-period-2 matrix-vector
// array with the space-time-shift scheme, 4-PE pipeline-period-2 error-masking
// array (space shift plus extra PEs), 5-PE time-shift arrays with the
// schedule scaled by two and by three).
//
// Four jobs run the arrays side by side on random data:
//   0  fault-free: every result correct, no error or no-majority flag;
//   1  permanent faults: hex PE(1,2) (must be masked, results correct) and
//      the redundant PE of matrix-vector stage 3 (err[3] high on every clock,
//      results correct);
//   2  single-clock transient faults in random PEs of all arrays: hex results
//      stay correct, every matrix-vector transient is flagged in the right
//      stage and clock;
//   3  two different faults in one hex voting triple: must raise no_majority.
// The pipeline-period-2 array runs alongside: fault-free in jobs 0 and 3
// (results checked, no flag), a permanent fault in its PE 1 in job 1 (must be
// flagged), covered single-clock transients in job 2 (each flagged by the
// right matcher at the right clock). The scaled-schedule time-shift array
// runs alongside too: fault-free in jobs 0 and 3, a permanent fault in job 1
// (wrong results, and by design no flag), covered transients in job 2 (each
// flagged in the right stage and clock). The array with the schedule scaled
// by three runs fault-free in job 0, with a permanent fault in job 1 (wrong
// results, no flag), with transients in job 2 (all masked, results correct)
// and with two hits in one triple in job 3 (no_majority at the right clock).
// The error-masking period-1 array runs fault-free in job 0, with a permanent
// fault in one PE in job 1 and with transients in job 2 (all masked, results
// correct), and with two permanent faults in one stage in job 3 (no_majority).
// The error-masking period-2 array runs the same four cases, its permanent
// fault in PE 0 and its double fault in PE 1 and the extra PE beside it.
// Every result is compared at the clock predicted by the schedules, with a
// reference computed by plain loops. The mechanisms (each value of the cycle
// control, masked permanent fault, masked transient, no-majority vote, detected
// permanent fault, detected transient, vector load) are counted; one that
// never happens is a failure.
module tb_ft_systolic_top;
  import ft_pkg::*;
  import hex_model_pkg::*;

  localparam int unsigned HR = 3, HC = 3, HN = HC + 2, MVN = 5;
  localparam int HEX_N = 10;   // order of the band matrices
  localparam int MV_M = 16;    // matrix rows streamed through the vector array
  localparam int MV_T0 = 3;
  localparam int P2N = 4, P2NP = 5, P2_K1 = 1, P2_TN = 2;  // space-time shift
  localparam int P2_OFF = 2, P2_M = 12, P2_T0 = 8;
  localparam int TSN = 5, TS_M = 12, TS_T0 = 4;
  localparam int TMN = 5, TM_M = 12, TM_T0 = 6;
  localparam int A2N = 4, A2NP = 5, A2NX = 2, A2_OFF = 2, A2_M = 12, A2_T0 = 8;
  localparam int M1N = 5, M1_M = 12, M1_T0 = 4, M1_L = 3;

  logic   clk = 0, rst_n = 0;
  data_t  hex_a_in [HR];
  data_t  hex_b_in [HN];
  acc_t   hex_c_bot_in [HN];
  acc_t   hex_c_right_in [HR];
  acc_t   hex_fault_xor [HR][HN];
  cycle_t hex_cycle;
  acc_t   hex_c_top_out [HC];
  acc_t   hex_c_left_out [HR];
  logic   hex_no_majority [HR][HC];
  logic   mv_load_b;
  data_t  mv_b_load [MVN];
  data_t  mv_a_in [MVN];
  acc_t   mv_c_in;
  acc_t   mv_fault_xor [MVN][2];
  acc_t   mv_c_out;
  logic   mv_err [MVN];
  logic   mv_err_any;
  data_t  p2_a_in [P2NP];
  data_t  p2_b_in;
  acc_t   p2_c_in, p2_c_out;
  acc_t   p2_fault_xor [P2NP];
  logic   p2_err [P2N];
  logic   p2_err_any;
  logic   ts_load_b;
  data_t  ts_b_load [TSN];
  data_t  ts_a_in [TSN];
  acc_t   ts_c_in, ts_c_out;
  acc_t   ts_fault_xor [TSN];
  logic   ts_err [TSN];
  logic   ts_err_any;
  data_t  a2_a_in [A2NP];
  data_t  a2_b_in;
  acc_t   a2_c_in, a2_c_out;
  acc_t   a2_fault_xor [A2NP];
  acc_t   a2_x_fault_xor [A2NX];
  logic   a2_no_majority [A2N];
  logic   a2_nm_any;
  logic   m1_load_b;
  data_t  m1_b_load [M1N];
  data_t  m1_a_in [M1N];
  acc_t   m1_c_in, m1_c_out;
  acc_t   m1_fault_xor [M1N][3];
  logic   m1_no_majority [M1N];
  logic   m1_nm_any;
  logic   tm_load_b;
  data_t  tm_b_load [TMN];
  data_t  tm_a_in [TMN];
  acc_t   tm_c_in, tm_c_out;
  acc_t   tm_fault_xor [TMN];
  logic   tm_no_majority [TMN];
  logic   tm_nm_any;

  ft_systolic_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen_cycle [3];
  int n_hex_masked_perm = 0, n_hex_masked_trans = 0, n_hex_nomaj = 0;
  int n_mv_det_perm = 0, n_mv_det_trans = 0, n_mv_trans = 0, n_mv_load = 0;
  int n_p2_results = 0, n_p2_det_perm = 0, n_p2_det_trans = 0, n_p2_trans = 0;

  int n_a2_results = 0, n_a2_masked_perm = 0, n_a2_trans = 0, n_a2_masked_trans = 0, n_a2_nomaj = 0;
  data_t a2A [A2_M][A2_M];
  data_t a2b [A2_M];
  acc_t  a2C0 [A2_M];

  function automatic acc_t a2_golden(int j);
    acc_t g = a2C0[j];
    for (int i = 0; i < A2_M; i++) g += acc_t'(a2A[j][i]) * acc_t'(a2b[i]);
    return g;
  endfunction

  // node run by physical PE q of the error-masking period-2 array at edge tau
  function automatic void a2_node(int q, int tau, output int p, output int i, output int j);
    p = (((tau - q) % 2 + 2) % 2 == 0) ? q : q - 1;
    i = (p - A2_OFF + tau - A2_T0) / 2;
    j = (tau - A2_T0 - p + A2_OFF) / 2;
  endfunction

  int n_m1_results = 0, n_m1_masked_perm = 0, n_m1_trans = 0, n_m1_masked_trans = 0, n_m1_nomaj = 0;
  data_t m1A [M1_M][M1N];
  data_t m1b [M1N];
  acc_t  m1C0 [M1_M];

  function automatic acc_t m1_golden(int j);
    acc_t g = m1C0[j];
    for (int i = 0; i < M1N; i++) g += acc_t'(m1A[j][i]) * acc_t'(m1b[i]);
    return g;
  endfunction

  int n_tm_results = 0, n_tm_trans = 0, n_tm_masked = 0, n_tm_perm_wrong = 0;
  int n_tm_doubles = 0, n_tm_nomaj = 0;
  data_t tmA [TM_M][TMN];
  data_t tmb [TMN];
  acc_t  tmC0 [TM_M];

  function automatic acc_t tm_golden(int j);
    acc_t g = tmC0[j];
    for (int i = 0; i < TMN; i++) g += acc_t'(tmA[j][i]) * acc_t'(tmb[i]);
    return g;
  endfunction

  int n_ts_results = 0, n_ts_trans = 0, n_ts_det_trans = 0, n_ts_perm_wrong = 0;
  data_t tsA [TS_M][TSN];
  data_t tsb [TSN];
  acc_t  tsC0 [TS_M];

  function automatic acc_t ts_golden(int j);
    acc_t g = tsC0[j];
    for (int i = 0; i < TSN; i++) g += acc_t'(tsA[j][i]) * acc_t'(tsb[i]);
    return g;
  endfunction

  data_t p2A [P2_M][P2_M];
  data_t p2b [P2_M];
  acc_t  p2C0 [P2_M];

  function automatic acc_t p2_golden(int j);
    acc_t g = p2C0[j];
    for (int i = 0; i < P2_M; i++) g += acc_t'(p2A[j][i]) * acc_t'(p2b[i]);
    return g;
  endfunction

  // node run by physical PE q of the period-2 array at edge tau
  function automatic void p2_node(int q, int tau, output int p, output int i, output int j);
    int t;
    if (((tau - q) % 2 + 2) % 2 == 0) begin p = q; t = tau; end
    else begin p = q - P2_K1; t = tau - P2_TN; end
    i = (p - P2_OFF + t - P2_T0) / 2;
    j = (t - P2_T0 - p + P2_OFF) / 2;
  endfunction

  data_t mvA [MV_M][MVN];
  data_t mvb [MVN];
  acc_t  mvC0 [MV_M];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic acc_t mv_golden(int j);
    acc_t s = mvC0[j];
    for (int i = 0; i < int'(MVN); i++) s += acc_t'(mvA[j][i]) * acc_t'(mvb[i]);
    return s;
  endfunction

  task automatic run_job(int mode);
    int last;
    int mv_last = MV_T0 + MV_M + 2 * int'(MVN) + 4;
    int mv_exp_err [int];
    int p2_last = P2_T0 + 2 * P2_M + 2 * P2NP + 8;
    int p2_exp_err [int];
    int ts_last = TS_T0 + 2 * (TS_M + TSN) + 4;
    int ts_exp_err [int];
    int tm_last = TM_T0 + 3 * (TM_M + TMN) + 6;
    int tm_exp_nm [int];
    int m1_last = M1_T0 + M1_L * M1N + M1_M + 4;
    int a2_last = A2_T0 + 2 * A2_M + 2 * A2NP + 8;
    setup(HR, HC, HEX_N);
    randomise(32'hffff);
    last = last_edge();
    if (mv_last > last) last = mv_last;
    if (p2_last > last) last = p2_last;
    if (ts_last > last) last = ts_last;
    if (tm_last > last) last = tm_last;
    if (m1_last > last) last = m1_last;
    if (a2_last > last) last = a2_last;
    for (int j = 0; j < A2_M; j++) begin
      for (int i = 0; i < A2_M; i++)
        a2A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      a2C0[j] = acc_t'($urandom);
      a2b[j] = data_t'($urandom);
    end
    foreach (a2_fault_xor[q]) a2_fault_xor[q] = '0;
    foreach (a2_x_fault_xor[k]) a2_x_fault_xor[k] = '0;
    if (mode == 1) a2_fault_xor[0] = 32'h0000_1000;
    if (mode == 3) begin
      a2_fault_xor[1] = 32'h0000_0001;
      a2_x_fault_xor[0] = 32'h0000_0002;
    end
    for (int j = 0; j < M1_M; j++) begin
      for (int i = 0; i < M1N; i++)
        m1A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      m1C0[j] = acc_t'($urandom);
    end
    foreach (m1b[i]) m1b[i] = data_t'($urandom);
    foreach (m1_fault_xor[i, k]) m1_fault_xor[i][k] = '0;
    if (mode == 1) m1_fault_xor[2][0] = 32'h0000_0040;
    if (mode == 3) begin
      m1_fault_xor[1][0] = 32'h0000_0001;
      m1_fault_xor[1][1] = 32'h0000_0002;
    end
    for (int j = 0; j < TM_M; j++) begin
      for (int i = 0; i < TMN; i++)
        tmA[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      tmC0[j] = acc_t'($urandom);
    end
    foreach (tmb[i]) tmb[i] = data_t'($urandom);
    foreach (tm_fault_xor[i]) tm_fault_xor[i] = '0;
    if (mode == 1) tm_fault_xor[4] = 32'h0000_0400;
    for (int j = 0; j < TS_M; j++) begin
      for (int i = 0; i < TSN; i++)
        tsA[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      tsC0[j] = acc_t'($urandom);
    end
    foreach (tsb[i]) tsb[i] = data_t'($urandom);
    foreach (ts_fault_xor[i]) ts_fault_xor[i] = '0;
    if (mode == 1) ts_fault_xor[2] = 32'h0000_0020;
    for (int j = 0; j < P2_M; j++) begin
      for (int i = 0; i < P2_M; i++)
        p2A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      p2C0[j] = acc_t'($urandom);
      p2b[j] = data_t'($urandom);
    end
    foreach (p2_fault_xor[q]) p2_fault_xor[q] = '0;
    if (mode == 1) p2_fault_xor[1] = 32'h0000_2000;
    for (int j = 0; j < MV_M; j++) begin
      for (int i = 0; i < int'(MVN); i++)
        mvA[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      mvC0[j] = acc_t'($urandom);
    end
    foreach (mvb[i]) mvb[i] = data_t'($urandom);
    foreach (hex_fault_xor[x, z]) hex_fault_xor[x][z] = '0;
    foreach (mv_fault_xor[i, p]) mv_fault_xor[i][p] = '0;
    if (mode == 1) begin
      hex_fault_xor[1][2] = 32'h0000_0100;
      mv_fault_xor[3][1] = 32'h0000_0004;
    end
    if (mode == 3) begin
      hex_fault_xor[1][1] = 32'h0000_0001;
      hex_fault_xor[1][2] = 32'h0000_0002;
    end
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tau = 0; tau <= last; tau++) begin
      if (tau > 0) @(negedge clk);
      // ---- outputs of the cycle before edge tau ----
      check(hex_cycle == cycle_t'(mod3(tau) + 1), "cycle control");
      seen_cycle[int'(hex_cycle) - 1]++;
      foreach (hex_no_majority[x, y]) if (hex_no_majority[x][y]) begin
        if (mode == 3) n_hex_nomaj++;
        else check(0, $sformatf("unexpected no_majority[%0d][%0d]", x, y));
      end
      for (int i = 0; i < HEX_N; i++)
        for (int j = 0; j < HEX_N; j++) begin
          bit top; int pos, te;
          if (exit_of(i, j, top, pos, te) && te == tau && mode != 3) begin
            acc_t got = top ? hex_c_top_out[pos] : hex_c_left_out[pos];
            check(got == golden(i, j), $sformatf("hex mode %0d c[%0d][%0d] got %0h exp %0h",
                                                 mode, i, j, got, golden(i, j)));
            if (mode == 1 && got == golden(i, j)) n_hex_masked_perm++;
          end
        end
      begin
        int j = tau - MV_T0 - 2 * int'(MVN);
        if (j >= 0 && j < MV_M && mode != 2)
          check(mv_c_out == mv_golden(j), $sformatf("mv mode %0d c[%0d] got %0h exp %0h",
                                                    mode, j, mv_c_out, mv_golden(j)));
      end
      for (int i = 0; i < int'(MVN); i++) begin
        bit exp = 0;
        if (mode == 1 && i == 3 && tau >= 1) exp = 1;
        if (mode == 2 && mv_exp_err.exists(tau) && mv_exp_err[tau] == i) exp = 1;
        check(mv_err[i] == exp, $sformatf("mv mode %0d err[%0d]=%0b at %0d", mode, i, mv_err[i], tau));
        if (mv_err[i] && exp) begin
          if (mode == 2) n_mv_det_trans++;
          else n_mv_det_perm++;
        end
      end
      for (int j = 0; j < P2_M; j++) begin
        int tf = (j + P2N - 1 - P2_OFF) + j + P2_T0;
        if (tau == tf + 1 + P2_K1 && (mode == 0 || mode == 3)) begin
          check(p2_c_out == p2_golden(j), $sformatf("p2 c[%0d] got %0h exp %0h", j, p2_c_out, p2_golden(j)));
          n_p2_results++;
        end
      end
      for (int p = 0; p < P2N; p++) begin
        if (mode == 0 || mode == 3) check(!p2_err[p], $sformatf("p2 err[%0d] without fault", p));
        if (mode == 1 && p2_err[p] && tau > P2NP + P2_TN + 1) n_p2_det_perm++;
        if (mode == 2 && p2_exp_err.exists(tau) && p2_exp_err[tau] == p) begin
          check(p2_err[p], $sformatf("p2 transient not flagged by matcher %0d at %0d", p, tau));
          if (p2_err[p]) n_p2_det_trans++;
        end
      end
      check(p2_err_any == (p2_err[0] | p2_err[1] | p2_err[2] | p2_err[3]), "p2 err_any");
      for (int j = 0; j < TS_M; j++)
        if (tau == TS_T0 + 2 * (TSN + j)) begin
          if (mode == 0 || mode == 3) begin
            check(ts_c_out == ts_golden(j), $sformatf("ts c[%0d] got %0h exp %0h", j, ts_c_out, ts_golden(j)));
            n_ts_results++;
          end
          if (mode == 1 && ts_c_out != ts_golden(j)) n_ts_perm_wrong++;
        end
      for (int i = 0; i < TSN; i++) begin
        if (mode != 2) check(!ts_err[i], $sformatf("ts mode %0d err[%0d] at %0d", mode, i, tau));
        if (mode == 2 && ts_exp_err.exists(tau) && ts_exp_err[tau] == i) begin
          check(ts_err[i], $sformatf("ts transient in stage %0d not flagged at %0d", i, tau));
          if (ts_err[i]) n_ts_det_trans++;
        end
      end
      check(ts_err_any == (ts_err[0] | ts_err[1] | ts_err[2] | ts_err[3] | ts_err[4]), "ts err_any");
      for (int j = 0; j < TM_M; j++)
        for (int k = 0; k < 3; k++)
          if (tau == TM_T0 + 3 * (TMN + j) + k) begin
            if (mode == 0 || mode == 2) begin
              check(tm_c_out == tm_golden(j), $sformatf("tm mode %0d c[%0d] got %0h exp %0h",
                                                        mode, j, tm_c_out, tm_golden(j)));
              if (k == 0) n_tm_results++;
              if (mode == 2 && k == 0 && tm_c_out == tm_golden(j)) n_tm_masked++;
            end
            if (mode == 1 && k == 0 && tm_c_out != tm_golden(j)) n_tm_perm_wrong++;
          end
      for (int i = 0; i < TMN; i++) begin
        bit exp = tm_exp_nm.exists(tau) && tm_exp_nm[tau] == i;
        check(tm_no_majority[i] == exp, $sformatf("tm mode %0d no_majority[%0d]=%0b at %0d",
                                                  mode, i, tm_no_majority[i], tau));
        if (exp && tm_no_majority[i]) n_tm_nomaj++;
      end
      check(tm_nm_any == (tm_no_majority[0] | tm_no_majority[1] | tm_no_majority[2] |
                          tm_no_majority[3] | tm_no_majority[4]), "tm nm_any");
      for (int j = 0; j < M1_M; j++)
        if (tau == M1_T0 + M1_L * M1N + j && mode != 3) begin
          check(m1_c_out == m1_golden(j), $sformatf("m1 mode %0d c[%0d] got %0h exp %0h",
                                                    mode, j, m1_c_out, m1_golden(j)));
          n_m1_results++;
          if (mode == 1 && m1_c_out == m1_golden(j)) n_m1_masked_perm++;
          if (mode == 2 && m1_c_out == m1_golden(j)) n_m1_masked_trans++;
        end
      for (int i = 0; i < M1N; i++) begin
        if (mode != 3) check(!m1_no_majority[i], $sformatf("m1 mode %0d no_majority[%0d] at %0d", mode, i, tau));
        else if (tau > 3) begin
          check(m1_no_majority[i] == (i == 1), $sformatf("m1 no_majority[%0d]=%0b at %0d", i, m1_no_majority[i], tau));
          if (i == 1 && m1_no_majority[i]) n_m1_nomaj++;
        end
      end
      check(m1_nm_any == (m1_no_majority[0] | m1_no_majority[1] | m1_no_majority[2] |
                          m1_no_majority[3] | m1_no_majority[4]), "m1 nm_any");
      for (int j = 0; j < A2_M; j++)
        if (tau == (j + A2N - 1 - A2_OFF) + j + A2_T0 + 1 && mode != 3) begin
          check(a2_c_out == a2_golden(j), $sformatf("a2 mode %0d c[%0d] got %0h exp %0h",
                                                    mode, j, a2_c_out, a2_golden(j)));
          n_a2_results++;
          if (mode == 1 && a2_c_out == a2_golden(j)) n_a2_masked_perm++;
          if (mode == 2 && a2_c_out == a2_golden(j)) n_a2_masked_trans++;
        end
      for (int p = 0; p < A2N; p++) begin
        if (mode != 3) check(!a2_no_majority[p], $sformatf("a2 mode %0d no_majority[%0d] at %0d", mode, p, tau));
        else if (tau > 2) begin
          bit exp = (p <= 1) && (tau % 2 == (p + 1) % 2);
          check(a2_no_majority[p] == exp, $sformatf("a2 no_majority[%0d]=%0b at %0d", p, a2_no_majority[p], tau));
          if (exp && a2_no_majority[p]) n_a2_nomaj++;
        end
      end
      check(a2_nm_any == (a2_no_majority[0] | a2_no_majority[1] | a2_no_majority[2] |
                          a2_no_majority[3]), "a2 nm_any");
      // ---- inputs for edge tau ----
      for (int q = 0; q < A2NP; q++) begin
        int p, i, j;
        a2_node(q, tau, p, i, j);
        a2_a_in[q] = (p >= 0 && p < A2N && i >= 0 && i < A2_M && j >= 0 && j < A2_M) ? a2A[j][i] : '0;
      end
      begin
        int p, i, j;
        a2_node(A2NP - 1, tau, p, i, j);
        a2_b_in = (i >= 0 && i < A2_M) ? a2b[i] : '0;
        a2_node(0, tau, p, i, j);
        a2_c_in = (j >= 0 && j < A2_M) ? a2C0[j] : '0;
      end
      if (mode == 2) begin
        foreach (a2_fault_xor[q]) a2_fault_xor[q] = '0;
        foreach (a2_x_fault_xor[k]) a2_x_fault_xor[k] = '0;
        if (tau % 3 == 2) begin
          int w = $urandom_range(A2NP + A2NX - 1);
          if (w < A2NP) a2_fault_xor[w] = acc_t'($urandom_range(1, 32'hffff));
          else a2_x_fault_xor[w - A2NP] = acc_t'($urandom_range(1, 32'hffff));
          n_a2_trans++;
        end
      end
      m1_load_b = (tau == 0);
      foreach (m1_b_load[i]) m1_b_load[i] = m1b[i];
      m1_c_in = (tau >= M1_T0 && tau - M1_T0 < M1_M) ? m1C0[tau - M1_T0] : '0;
      for (int i = 0; i < M1N; i++) begin
        int j = tau - M1_T0 - M1_L * i;
        m1_a_in[i] = (j >= 0 && j < M1_M) ? m1A[j][i] : '0;
      end
      if (mode == 2) begin
        foreach (m1_fault_xor[i, k]) m1_fault_xor[i][k] = '0;
        if (tau % 4 == 3 && tau >= M1_T0) begin
          m1_fault_xor[$urandom_range(M1N - 1)][$urandom_range(2)] = acc_t'($urandom_range(1, 32'hffff));
          n_m1_trans++;
        end
      end
      tm_load_b = (tau == 0);
      foreach (tm_b_load[i]) tm_b_load[i] = tmb[i];
      begin
        int j = (tau - TM_T0) / 3;
        tm_c_in = (tau >= TM_T0 && j < TM_M) ? tmC0[j] : '0;
      end
      for (int i = 0; i < TMN; i++) begin
        int j = (tau - TM_T0 - 3 * i) / 3;
        tm_a_in[i] = (tau - TM_T0 - 3 * i >= 0 && j < TM_M) ? tmA[j][i] : '0;
      end
      if (mode == 2) begin
        foreach (tm_fault_xor[i]) tm_fault_xor[i] = '0;
        if (tau % 5 == 2 && tau >= TM_T0) begin
          tm_fault_xor[$urandom_range(TMN - 1)] = acc_t'($urandom_range(1, 32'hffff));
          n_tm_trans++;
        end
      end
      if (mode == 3) begin
        int e = tau - (tau % 3);
        foreach (tm_fault_xor[i]) tm_fault_xor[i] = '0;
        if (e % 12 == 0 && e >= TM_T0 && e + 3 <= last) begin
          int s = (e / 12) % TMN;
          if (tau == e) tm_fault_xor[s] = 32'h0000_0008;
          if (tau == e + 1) begin
            tm_fault_xor[s] = 32'h0008_0000;
            tm_exp_nm[e + 3] = s;
            n_tm_doubles++;
          end
        end
      end
      ts_load_b = (tau == 0);
      foreach (ts_b_load[i]) ts_b_load[i] = tsb[i];
      begin
        int j = (tau - TS_T0) >> 1;
        ts_c_in = (tau >= TS_T0 && j < TS_M) ? tsC0[j] : '0;
      end
      for (int i = 0; i < TSN; i++) begin
        int j = (tau - TS_T0 - 2 * i) >> 1;
        ts_a_in[i] = (tau - TS_T0 - 2 * i >= 0 && j < TS_M) ? tsA[j][i] : '0;
      end
      if (mode == 2) begin
        foreach (ts_fault_xor[i]) ts_fault_xor[i] = '0;
        if (tau % 7 == 4 && tau >= 2 && tau + 3 <= last) begin
          int s = $urandom_range(TSN - 1);
          ts_fault_xor[s] = acc_t'($urandom_range(1, 32'hffff));
          ts_exp_err[(tau % 2 == 0) ? tau + 2 : tau + 1] = s;
          n_ts_trans++;
        end
      end
      for (int q = 0; q < P2NP; q++) begin
        int p, i, j;
        p2_node(q, tau, p, i, j);
        p2_a_in[q] = (p >= 0 && p < P2N && i >= 0 && i < P2_M && j >= 0 && j < P2_M) ? p2A[j][i] : '0;
      end
      begin
        int p, i, j;
        p2_node(P2NP - 1, tau, p, i, j);
        p2_b_in = (i >= 0 && i < P2_M) ? p2b[i] : '0;
        p2_node(0, tau, p, i, j);
        p2_c_in = (j >= 0 && j < P2_M) ? p2C0[j] : '0;
      end
      if (mode == 2) begin
        foreach (p2_fault_xor[q]) p2_fault_xor[q] = '0;
        if (tau % 5 == 3 && tau + P2_TN + 2 <= last) begin
          int q = $urandom_range(P2NP - 1);
          bit orig = (((tau - q) % 2 + 2) % 2 == 0);
          int p = orig ? q : q - P2_K1;
          if (p >= 0 && p < P2N) begin
            p2_fault_xor[q] = acc_t'($urandom_range(1, 32'hffff));
            p2_exp_err[orig ? tau + P2_TN + 1 : tau + 1] = p;
            n_p2_trans++;
          end
        end
      end
      for (int x = 0; x < int'(HR); x++) hex_a_in[x] = a_val(x, tau);
      for (int z = 0; z < int'(HN); z++) begin
        hex_b_in[z] = b_val(z, tau);
        hex_c_bot_in[z] = cbot_val(z, tau);
      end
      for (int x = 0; x < int'(HR); x++)
        hex_c_right_in[x] = (x < int'(HR) - 1) ? cright_val(x, tau) : '0;
      mv_load_b = (tau == 0);
      if (mv_load_b) n_mv_load++;
      foreach (mv_b_load[i]) mv_b_load[i] = mvb[i];
      mv_c_in = (tau - MV_T0 >= 0 && tau - MV_T0 < MV_M) ? mvC0[tau - MV_T0] : '0;
      for (int i = 0; i < int'(MVN); i++) begin
        int j = tau - MV_T0 - 2 * i;
        mv_a_in[i] = (j >= 0 && j < MV_M) ? mvA[j][i] : '0;
      end
      if (mode == 2) begin
        foreach (hex_fault_xor[x, z]) hex_fault_xor[x][z] = '0;
        foreach (mv_fault_xor[i, p]) mv_fault_xor[i][p] = '0;
        if (tau % 5 == 1) begin
          hex_fault_xor[$urandom_range(HR - 1)][$urandom_range(HN - 1)] =
            acc_t'($urandom_range(1, 32'hffff));
          n_hex_masked_trans++;
        end
        // redundant copies only, so the results can still be checked
        if (tau % 6 == 2 && tau + 1 <= last) begin
          int s = $urandom_range(MVN - 1);
          mv_fault_xor[s][1] = acc_t'($urandom_range(1, 32'hffff));
          mv_exp_err[tau + 1] = s;
          n_mv_trans++;
        end
      end
    end
    $display("job %0d done after %0d clocks", mode, last + 1);
  endtask

  initial begin
    foreach (hex_a_in[x]) hex_a_in[x] = '0;
    foreach (hex_b_in[z]) begin hex_b_in[z] = '0; hex_c_bot_in[z] = '0; end
    foreach (hex_c_right_in[x]) hex_c_right_in[x] = '0;
    foreach (mv_a_in[i]) begin mv_a_in[i] = '0; mv_b_load[i] = '0; end
    mv_c_in = '0; mv_load_b = 0;
    foreach (p2_a_in[q]) p2_a_in[q] = '0;
    p2_b_in = '0; p2_c_in = '0;
    foreach (ts_a_in[i]) begin ts_a_in[i] = '0; ts_b_load[i] = '0; end
    ts_c_in = '0; ts_load_b = 0;
    foreach (a2_a_in[q]) a2_a_in[q] = '0;
    a2_b_in = '0; a2_c_in = '0;
    foreach (m1_a_in[i]) begin m1_a_in[i] = '0; m1_b_load[i] = '0; end
    m1_c_in = '0; m1_load_b = 0;
    foreach (tm_a_in[i]) begin tm_a_in[i] = '0; tm_b_load[i] = '0; end
    tm_c_in = '0; tm_load_b = 0;
    run_job(0);
    run_job(1);
    run_job(2);
    run_job(3);
    $display("cycle=1/2/3 seen %0d/%0d/%0d", seen_cycle[0], seen_cycle[1], seen_cycle[2]);
    $display("hex: masked permanent-fault results %0d, masked transients %0d, no-majority votes %0d",
             n_hex_masked_perm, n_hex_masked_trans, n_hex_nomaj);
    $display("mv: detected permanent-fault clocks %0d, transients %0d of %0d, vector loads %0d",
             n_mv_det_perm, n_mv_det_trans, n_mv_trans, n_mv_load);
    $display("p2: results %0d, permanent-fault flags %0d, transients %0d of %0d",
             n_p2_results, n_p2_det_perm, n_p2_det_trans, n_p2_trans);
    check(n_p2_results > 0, "p2 results");
    check(n_p2_det_perm > 0, "p2 permanent fault flagged");
    check(n_p2_trans > 0 && n_p2_det_trans == n_p2_trans, "p2 every transient flagged");
    $display("ts: results %0d, transients %0d of %0d, wrong results under permanent fault %0d",
             n_ts_results, n_ts_det_trans, n_ts_trans, n_ts_perm_wrong);
    check(n_ts_results > 0, "ts results");
    check(n_ts_trans > 0 && n_ts_det_trans == n_ts_trans, "ts every transient flagged");
    check(n_ts_perm_wrong > 0, "ts permanent fault reaches results unseen");
    $display("a2: results %0d, masked permanent-fault results %0d, transients %0d with rows correct %0d, no-majority clocks %0d",
             n_a2_results, n_a2_masked_perm, n_a2_trans, n_a2_masked_trans, n_a2_nomaj);
    check(n_a2_masked_perm == A2_M, "a2 permanent fault masked");
    check(n_a2_trans > 0 && n_a2_masked_trans == A2_M, "a2 transients masked");
    check(n_a2_nomaj > 0, "a2 no-majority vote");
    $display("m1: results %0d, masked permanent-fault results %0d, transients %0d with rows correct %0d, no-majority clocks %0d",
             n_m1_results, n_m1_masked_perm, n_m1_trans, n_m1_masked_trans, n_m1_nomaj);
    check(n_m1_masked_perm == M1_M, "m1 permanent fault masked");
    check(n_m1_trans > 0 && n_m1_masked_trans == M1_M, "m1 transients masked");
    check(n_m1_nomaj > 0, "m1 no-majority vote");
    $display("tm: results %0d, transients %0d with rows correct %0d, wrong results under permanent fault %0d, double faults %0d flagged %0d",
             n_tm_results, n_tm_trans, n_tm_masked, n_tm_perm_wrong, n_tm_doubles, n_tm_nomaj);
    check(n_tm_results > 0, "tm results");
    check(n_tm_trans > 0 && n_tm_masked == TM_M, "tm transients masked");
    check(n_tm_perm_wrong > 0, "tm permanent fault reaches results unmasked");
    check(n_tm_doubles > 0 && n_tm_nomaj == n_tm_doubles, "tm every double fault flagged");
    check(seen_cycle[0] > 0 && seen_cycle[1] > 0 && seen_cycle[2] > 0, "all three cycle values");
    check(n_hex_masked_perm > 0, "hex permanent fault masked");
    check(n_hex_masked_trans > 0, "hex transient masked");
    check(n_hex_nomaj > 0, "hex no-majority vote");
    check(n_mv_det_perm > 0, "mv permanent fault detected");
    check(n_mv_trans > 0 && n_mv_det_trans == n_mv_trans, "mv every transient detected");
    check(n_mv_load > 0, "mv vector load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
