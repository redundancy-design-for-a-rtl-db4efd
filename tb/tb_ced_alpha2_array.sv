// tb_ced_alpha2_array: self-checking testbench of the pipeline-period-2
// band matrix-vector array with its three redundancy schemes.
//
// One instance per scheme runs, side by side, these jobs on random data:
//   0 fault-free: every c_j correct at the predicted clock, err never raised;
//   1 single-clock transient faults, each placed on a PE and clock that one
//     matcher covers: that matcher must flag it at the predicted clock;
//   2 a permanent fault in PE 1: flagged by the space-shift and
//     space-time-shift schemes, never by the time-shift scheme (both copies
//     run in the faulty PE and fail alike).
// The input streams are built from the schedule: PE q runs the original
// computation on edges tau = q (mod 2) and on the other edges the copy of
// node (q - K1, tau - TN). Matrix band: row j holds columns j-2 .. j+1.
module tb_ced_alpha2_array;
  import ft_pkg::*;

  localparam int unsigned NO = 4;
  localparam int OFF = 2;       // PE p = i - j + OFF
  localparam int M = 10;        // matrix order
  localparam int T0 = 8;        // node (i,j) runs at edge i + j + T0 (T0 even)

  int checks [3], failures [3], detected [3], injected [3], perm_flags [3];
  bit done [3];
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  for (genvar s = 0; s < 3; s++) begin : g_scheme
    localparam redundancy_t SCH = redundancy_t'(s);
    localparam int K1 = (SCH == TIME_SHIFT) ? 0 : 1;
    localparam int TN = (SCH == SPACE_SHIFT) ? 0 : (SCH == TIME_SHIFT) ? 1 : 2;
    localparam int NP = NO + K1;

    logic  rst_n = 0;
    data_t a_in [NP];
    data_t b_in;
    acc_t  c_in, c_out;
    acc_t  fault_xor [NP];
    logic  err [NO];
    logic  err_any;

    data_t A [M][M];
    data_t bv [M];
    acc_t  C0 [M];

    ced_alpha2_array #(.SCHEME(SCH)) dut (.*);

    function automatic acc_t golden(int j);
      acc_t g = C0[j];
      for (int i = 0; i < M; i++) g += acc_t'(A[j][i]) * acc_t'(bv[i]);
      return g;
    endfunction

    // node run by physical PE q at edge tau (original or copy)
    function automatic void node_of(int q, int tau, output int p, output int i, output int j);
      int t;
      if (((tau - q) % 2 + 2) % 2 == 0) begin p = q; t = tau; end
      else begin p = q - K1; t = tau - TN; end
      i = (p - OFF + t - T0) / 2;
      j = (t - T0 - p + OFF) / 2;
    endfunction

    task automatic check(bit ok, string what);
      checks[s]++;
      if (!ok) begin failures[s]++; $display("FAIL scheme %0d: %s", s, what); end
    endtask

    task automatic run_job(int mode);
      int last = T0 + 2 * M + 2 * NP + 8;
      int exp_err [int];
      int nperm = 0;
      for (int j = 0; j < M; j++) begin
        for (int i = 0; i < M; i++)
          A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
        C0[j] = acc_t'($urandom);
        bv[j] = data_t'($urandom);
      end
      foreach (fault_xor[q]) fault_xor[q] = '0;
      if (mode == 2) fault_xor[1] = 32'h0000_0800;
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int tau = 0; tau <= last; tau++) begin
        if (tau > 0) @(negedge clk);
        // outputs of the cycle before edge tau
        for (int j = 0; j < M; j++) begin
          int tf = (j + NO - 1 - OFF) + j + T0;
          if (tau == tf + 1 + K1 && mode == 0)
            check(c_out == golden(j), $sformatf("c[%0d] got %0h exp %0h", j, c_out, golden(j)));
        end
        for (int p = 0; p < int'(NO); p++) begin
          if (mode == 0) check(!err[p], $sformatf("err[%0d] at %0d without fault", p, tau));
          if (mode == 1 && exp_err.exists(tau) && exp_err[tau] == p) begin
            check(err[p], $sformatf("transient not flagged by matcher %0d at %0d", p, tau));
            if (err[p]) detected[s]++;
          end
          // from the clock on where no reset value is left in the pipeline
          if (mode == 2 && err[p] && tau > NP + TN + 1) nperm++;
        end
        // inputs for edge tau
        for (int q = 0; q < NP; q++) begin
          int p, i, j;
          node_of(q, tau, p, i, j);
          a_in[q] = (p >= 0 && p < int'(NO) && i >= 0 && i < M && j >= 0 && j < M) ? A[j][i] : '0;
        end
        begin
          int p, i, j;
          node_of(NP - 1, tau, p, i, j);
          b_in = (i >= 0 && i < M) ? bv[i] : '0;
          node_of(0, tau, p, i, j);
          c_in = (j >= 0 && j < M) ? C0[j] : '0;
        end
        if (mode == 1) begin
          foreach (fault_xor[q]) fault_xor[q] = '0;
          if (tau % 5 == 2 && tau + TN + 2 <= last) begin
            int q = $urandom_range(NP - 1);
            bit orig = (((tau - q) % 2 + 2) % 2 == 0);
            int p = orig ? q : q - K1;
            if (p >= 0 && p < int'(NO)) begin
              fault_xor[q] = acc_t'($urandom_range(1, 32'hffff));
              exp_err[orig ? tau + TN + 1 : tau + 1] = p;
              injected[s]++;
            end
          end
        end
      end
      if (mode == 2) begin
        if (SCH == TIME_SHIFT) check(nperm == 0, "time shift cannot see a permanent fault");
        else check(nperm > 0, "permanent fault flagged");
        perm_flags[s] += nperm;
      end
    endtask

    initial begin
      foreach (a_in[q]) a_in[q] = '0;
      b_in = '0; c_in = '0;
      run_job(0);
      run_job(0);
      run_job(1);
      run_job(2);
      check(injected[s] > 0 && detected[s] == injected[s], "every covered transient flagged");
      $display("scheme %0d: transients injected %0d flagged %0d, permanent-fault flags %0d",
               s, injected[s], detected[s], perm_flags[s]);
      done[s] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
