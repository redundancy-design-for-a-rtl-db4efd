// tb_ced_mv_array: self-checking testbench of the error-detecting band
// matrix-vector array (pipeline period 1, duplication), both schemes side by
// side: space-time shift (L = 2 clocks per stage) and space shift (L = 1).
//
// Each job loads a random vector b, streams a random band matrix A (row j has
// elements in columns j-2 .. j+1) and initial sums C0 on the schedule of
// ced_mv_array, and checks every c_j = C0[j] + sum_i A[j][i]*b[i] at the clock
// the schedule predicts (L clocks per stage). Jobs: fault-free (err must stay
// low); a permanent fault in an original PE and in a redundant PE (the stage's
// err must be high on every clock, the others low; with the redundant PE
// faulty the results must stay correct); single-clock transient faults (err
// must rise in exactly the stage and clock the fault reaches the matcher).
module tb_ced_mv_array;
  import ft_pkg::*;

  localparam int unsigned N = 5;
  localparam int M = 12;   // matrix rows streamed per job
  localparam int T0 = 3;   // edge at which row 0 enters c_in

  int checks [2], failures [2];
  int detected_perm [2], detected_trans [2], injected_trans [2];
  bit done [2];
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  for (genvar s = 0; s < 2; s++) begin : g_scheme
    localparam redundancy_t SCH = (s == 0) ? SPACE_TIME_SHIFT : SPACE_SHIFT;
    localparam int L = (s == 0) ? 2 : 1;   // clocks per stage
    localparam int D = (s == 0) ? 2 : 1;   // clocks from an original PE's edge to its check

    logic  rst_n = 0, load_b = 0;
    data_t b_load [N];
    data_t a_in [N];
    acc_t  c_in, c_out;
    acc_t  fault_xor [N][2];
    logic  err [N];
    logic  err_any;

    data_t A [M][N];
    data_t bv [N];
    acc_t  C0 [M];

    ced_mv_array #(.SCHEME(SCH)) dut (.*);

    task automatic check(bit ok, string what);
      checks[s]++;
      if (!ok) begin failures[s]++; $display("FAIL scheme %0d %s", s, what); end
    endtask

    function automatic acc_t golden(int j);
      acc_t g = C0[j];
      for (int i = 0; i < int'(N); i++) g += acc_t'(A[j][i]) * acc_t'(bv[i]);
      return g;
    endfunction

    // mode 0: none, 1: permanent in original PE of stage 2,
    // 2: permanent in redundant PE of stage 0, 3: transients
    task automatic run_job(int mode);
      int last = T0 + M + L * int'(N) + 4;
      int exp_err_at [int];   // clock -> stage expected to flag
      foreach (fault_xor[i, p]) fault_xor[i][p] = '0;
      for (int j = 0; j < M; j++) begin
        for (int i = 0; i < int'(N); i++)
          A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
        C0[j] = acc_t'($urandom);
      end
      foreach (bv[i]) bv[i] = data_t'($urandom);
      if (mode == 1) fault_xor[2][0] = 32'h0001_0000;
      if (mode == 2) fault_xor[0][1] = 32'h0000_0040;
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      // load b on the first edge; the data stream starts later (T0 >= 1)
      for (int tau = 0; tau <= last; tau++) begin
        if (tau > 0) @(negedge clk);
        // outputs of the cycle before edge tau
        begin
          int j = tau - T0 - L * int'(N);
          if (j >= 0 && j < M && mode != 1 && mode != 3)
            check(c_out == golden(j), $sformatf("mode %0d c[%0d] got %0h exp %0h", mode, j, c_out, golden(j)));
          if (j >= 0 && j < M && mode == 1)
            check(c_out != golden(j), "faulty original copy reaches output");
        end
        for (int i = 0; i < int'(N); i++) begin
          bit exp = 0;
          if (mode == 1 && i == 2 && tau >= D) exp = 1;
          if (mode == 2 && i == 0 && tau >= 1) exp = 1;
          if (mode == 3 && exp_err_at.exists(tau) && exp_err_at[tau] == i) exp = 1;
          if (mode == 1 && i == 2 && tau < D) continue;
          check(err[i] == exp, $sformatf("mode %0d err[%0d]=%0b at %0d", mode, i, err[i], tau));
          if (err[i] && exp) begin
            if (mode == 3) detected_trans[s]++;
            else detected_perm[s]++;
          end
        end
        check(err_any == (err[0] | err[1] | err[2] | err[3] | err[4]), "err_any");
        // inputs for edge tau
        load_b = (tau == 0);
        foreach (b_load[i]) b_load[i] = bv[i];
        c_in = (tau - T0 >= 0 && tau - T0 < M) ? C0[tau - T0] : '0;
        for (int i = 0; i < int'(N); i++) begin
          int j = tau - T0 - L * i;
          a_in[i] = (j >= 0 && j < M) ? A[j][i] : '0;
        end
        if (mode == 3) begin
          foreach (fault_xor[i, p]) fault_xor[i][p] = '0;
          if (tau % 6 == 2 && tau + 2 <= last) begin
            int st = $urandom_range(N - 1);
            int p = $urandom_range(1);
            fault_xor[st][p] = acc_t'($urandom_range(1, 32'hffff));
            exp_err_at[tau + (p == 0 ? D : 1)] = st;
            injected_trans[s]++;
          end
        end
      end
      $display("scheme %0d job mode %0d done", s, mode);
    endtask

    initial begin
      foreach (a_in[i]) a_in[i] = '0;
      foreach (b_load[i]) b_load[i] = '0;
      c_in = '0;
      run_job(0);
      run_job(0);
      run_job(1);
      run_job(2);
      run_job(3);
      $display("scheme %0d: permanent-fault detections %0d, transients injected %0d detected %0d",
               s, detected_perm[s], injected_trans[s], detected_trans[s]);
      check(detected_perm[s] > 0, "permanent fault detected");
      check(injected_trans[s] > 0 && detected_trans[s] == injected_trans[s], "every transient detected");
      done[s] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
