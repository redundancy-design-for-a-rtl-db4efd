// tb_tmr_ts_mv_array: self-checking testbench of the matrix-vector array with
// a schedule scaled by three and time-shift triple modular redundancy.
//
// Jobs on random band matrices (row j holds columns j-2 .. j+1):
//   0 fault-free: every c_j correct in the three clocks around edge
//     T0+3(N+j), no_majority never raised;
//   1 single-clock transient faults in random stages, at most one per triple:
//     every result still correct (masked), no_majority never raised;
//   2 a permanent fault: all three runs happen in the same faulty PE, so the
//     results are wrong and no_majority stays low;
//   3 two transients with different masks in the first two runs of one
//     triple: no_majority of that stage in the clock before edge e+3.
module tb_tmr_ts_mv_array;
  import ft_pkg::*;

  localparam int unsigned N = 5;
  localparam int M = 10;
  localparam int T0 = 6;

  logic  clk = 0, rst_n = 0, load_b = 0;
  data_t b_load [N];
  data_t a_in [N];
  acc_t  c_in, c_out;
  acc_t  fault_xor [N];
  logic  no_majority [N];
  logic  nm_any;

  int checks = 0, failures = 0;
  int injected = 0, masked_rows = 0, wrong_perm = 0, doubles = 0, flagged = 0;
  data_t A [M][N];
  data_t bv [N];
  acc_t  C0 [M];

  tmr_ts_mv_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic acc_t golden(int j);
    acc_t s = C0[j];
    for (int i = 0; i < int'(N); i++) s += acc_t'(A[j][i]) * acc_t'(bv[i]);
    return s;
  endfunction

  task automatic run_job(int mode);
    int last = T0 + 3 * (M + int'(N)) + 6;
    int exp_nm [int];
    foreach (fault_xor[i]) fault_xor[i] = '0;
    for (int j = 0; j < M; j++) begin
      for (int i = 0; i < int'(N); i++)
        A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      C0[j] = acc_t'($urandom);
    end
    foreach (bv[i]) bv[i] = data_t'($urandom);
    if (mode == 2) fault_xor[3] = 32'h0000_0100;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int tau = 0; tau <= last; tau++) begin
      if (tau > 0) @(negedge clk);
      // outputs of the clock before edge tau
      for (int j = 0; j < M; j++)
        for (int k = 0; k < 3; k++)
          if (tau == T0 + 3 * (int'(N) + j) + k) begin
            if (mode < 2) check(c_out == golden(j),
                                $sformatf("mode %0d c[%0d] got %0h exp %0h", mode, j, c_out, golden(j)));
            if (mode == 1 && k == 0 && c_out == golden(j)) masked_rows++;
            if (mode == 2 && k == 0 && c_out != golden(j)) wrong_perm++;
          end
      for (int i = 0; i < int'(N); i++) begin
        bit exp = exp_nm.exists(tau) && exp_nm[tau] == i;
        check(no_majority[i] == exp, $sformatf("mode %0d no_majority[%0d]=%0b at %0d", mode, i, no_majority[i], tau));
        if (exp && no_majority[i]) flagged++;
      end
      check(nm_any == (no_majority[0] | no_majority[1] | no_majority[2] |
                       no_majority[3] | no_majority[4]), "nm_any");
      // inputs for edge tau
      load_b = (tau == 0);
      foreach (b_load[i]) b_load[i] = bv[i];
      begin
        int j = (tau - T0) / 3;
        c_in = (tau >= T0 && j < M) ? C0[j] : '0;
      end
      for (int i = 0; i < int'(N); i++) begin
        int j = (tau - T0 - 3 * i) / 3;
        a_in[i] = (tau - T0 - 3 * i >= 0 && j < M) ? A[j][i] : '0;
      end
      if (mode == 1) begin
        foreach (fault_xor[i]) fault_xor[i] = '0;
        if (tau % 4 == 1 && tau >= T0) begin
          fault_xor[$urandom_range(N - 1)] = acc_t'($urandom_range(1, 32'hffff));
          injected++;
        end
      end
      if (mode == 3) begin
        // hits in runs 1 and 2 of the triple that starts at edge e
        int e = tau - (tau % 3);
        foreach (fault_xor[i]) fault_xor[i] = '0;
        if (e % 9 == 0 && e >= T0 && e + 3 <= last) begin
          int s = (e / 9) % int'(N);
          if (tau == e) fault_xor[s] = 32'h0000_0001 << (e % 16);
          if (tau == e + 1) begin
            fault_xor[s] = 32'h0001_0000 << (e % 16);
            exp_nm[e + 3] = s;
            doubles++;
          end
        end
      end
    end
  endtask

  initial begin
    foreach (a_in[i]) begin a_in[i] = '0; b_load[i] = '0; end
    c_in = '0;
    run_job(0);
    run_job(0);
    run_job(1);
    run_job(2);
    run_job(3);
    $display("transients injected %0d, rows correct despite them %0d; wrong results under permanent fault %0d; double faults %0d flagged %0d",
             injected, masked_rows, wrong_perm, doubles, flagged);
    check(injected > 0 && masked_rows == M, "every row correct under transients");
    check(wrong_perm > 0, "permanent fault reaches the results unmasked");
    check(doubles > 0 && flagged == doubles, "every double fault flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
