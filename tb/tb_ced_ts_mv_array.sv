// tb_ced_ts_mv_array: self-checking testbench of the scaled-schedule
// matrix-vector array with time-shift error detection.
//
// Jobs on random band matrices (row j holds columns j-2 .. j+1):
//   0 fault-free: every c_j correct at clock T0+2(N+j), err never raised;
//   1 single-clock transient faults: the hit stage must flag at the predicted
//     clock (2 clocks after a hit original, 1 clock after a hit copy);
//   2 a permanent fault: both runs happen in the same faulty PE, so the
//     results are wrong and err must stay low (time shift sees only transients).
module tb_ced_ts_mv_array;
  import ft_pkg::*;

  localparam int unsigned N = 5;
  localparam int M = 10;
  localparam int T0 = 4;

  logic  clk = 0, rst_n = 0, load_b = 0;
  data_t b_load [N];
  data_t a_in [N];
  acc_t  c_in, c_out;
  acc_t  fault_xor [N];
  logic  err [N];
  logic  err_any;

  int checks = 0, failures = 0, injected = 0, detected = 0, wrong_perm = 0;
  data_t A [M][N];
  data_t bv [N];
  acc_t  C0 [M];

  ced_ts_mv_array dut (.*);
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
    int last = T0 + 2 * (M + int'(N)) + 4;
    int exp_err [int];
    foreach (fault_xor[i]) fault_xor[i] = '0;
    for (int j = 0; j < M; j++) begin
      for (int i = 0; i < int'(N); i++)
        A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      C0[j] = acc_t'($urandom);
    end
    foreach (bv[i]) bv[i] = data_t'($urandom);
    if (mode == 2) fault_xor[1] = 32'h0000_0010;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int tau = 0; tau <= last; tau++) begin
      if (tau > 0) @(negedge clk);
      for (int j = 0; j < M; j++)
        if (tau == T0 + 2 * (int'(N) + j)) begin
          if (mode == 0) check(c_out == golden(j), $sformatf("c[%0d] got %0h exp %0h", j, c_out, golden(j)));
          if (mode == 2 && c_out != golden(j)) wrong_perm++;
        end
      for (int i = 0; i < int'(N); i++) begin
        if (mode != 1) check(!err[i], $sformatf("mode %0d err[%0d] at %0d", mode, i, tau));
        if (mode == 1 && exp_err.exists(tau) && exp_err[tau] == i) begin
          check(err[i], $sformatf("transient in stage %0d not flagged at %0d", i, tau));
          if (err[i]) detected++;
        end
      end
      check(err_any == (err[0] | err[1] | err[2] | err[3] | err[4]), "err_any");
      // inputs for edge tau
      load_b = (tau == 0);
      foreach (b_load[i]) b_load[i] = bv[i];
      begin
        int j = (tau - T0) >> 1;
        c_in = (tau >= T0 && j < M) ? C0[j] : '0;
      end
      for (int i = 0; i < int'(N); i++) begin
        int j = (tau - T0 - 2 * i) >> 1;
        a_in[i] = (tau - T0 - 2 * i >= 0 && j < M) ? A[j][i] : '0;
      end
      if (mode == 1) begin
        foreach (fault_xor[i]) fault_xor[i] = '0;
        if (tau % 7 == 3 && tau >= 2 && tau + 3 <= last) begin
          int s = $urandom_range(N - 1);
          fault_xor[s] = acc_t'($urandom_range(1, 32'hffff));
          exp_err[(tau % 2 == 0) ? tau + 2 : tau + 1] = s;
          injected++;
        end
        if (tau % 7 == 6 && tau >= 2 && tau + 3 <= last) begin
          int s = $urandom_range(N - 1);
          fault_xor[s] = acc_t'($urandom_range(1, 32'hffff));
          exp_err[(tau % 2 == 0) ? tau + 2 : tau + 1] = s;
          injected++;
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
    $display("transients injected %0d flagged %0d; wrong results under permanent fault %0d",
             injected, detected, wrong_perm);
    check(injected > 0 && detected == injected, "every transient flagged");
    check(wrong_perm > 0, "permanent fault reaches the results unseen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
