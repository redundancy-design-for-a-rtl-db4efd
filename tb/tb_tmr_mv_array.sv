// tb_tmr_mv_array: self-checking testbench of the pipeline-period-1 band
// matrix-vector array with triple modular redundancy, both schemes side by
// side (space shift: L = 1 register per link; space-time shift: L = 3).
//
// Jobs on random band matrices (row j holds columns j-2 .. j+1):
//   0 fault-free: c_j correct in the clock before edge T0+L*N+j, no flag;
//   1 a permanent fault in one PE (original or a copy): every result still
//     correct, no flag;
//   2 single-clock transient faults in random PEs; in the space-time-shift
//     scheme every other hit strikes all three PEs of a stage at once, which
//     still touches each computation only once: every result correct;
//   3 permanent faults with different masks in two PEs of one stage: that
//     stage's no_majority high on every clock once the pipeline is primed.
module tb_tmr_mv_array;
  import ft_pkg::*;

  localparam int unsigned N = 5;
  localparam int M = 12;
  localparam int T0 = 4;

  int checks [2], failures [2], injected [2], masked [2], nm_clocks [2];
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
    localparam redundancy_t SCH = (s == 0) ? SPACE_SHIFT : SPACE_TIME_SHIFT;
    localparam int L = (s == 0) ? 1 : 3;

    logic  rst_n = 0, load_b = 0;
    data_t b_load [N];
    data_t a_in [N];
    acc_t  c_in, c_out;
    acc_t  fault_xor [N][3];
    logic  no_majority [N];
    logic  nm_any;

    data_t A [M][N];
    data_t bv [N];
    acc_t  C0 [M];

    tmr_mv_array #(.SCHEME(SCH)) dut (.*);

    task automatic check(bit ok, string what);
      checks[s]++;
      if (!ok) begin failures[s]++; $display("FAIL scheme %0d %s", s, what); end
    endtask

    function automatic acc_t golden(int j);
      acc_t g = C0[j];
      for (int i = 0; i < int'(N); i++) g += acc_t'(A[j][i]) * acc_t'(bv[i]);
      return g;
    endfunction

    task automatic run_job(int mode, int stage, int copy);
      int last = T0 + L * int'(N) + M + 4;
      foreach (fault_xor[i, k]) fault_xor[i][k] = '0;
      for (int j = 0; j < M; j++) begin
        for (int i = 0; i < int'(N); i++)
          A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
        C0[j] = acc_t'($urandom);
      end
      foreach (bv[i]) bv[i] = data_t'($urandom);
      if (mode == 1) fault_xor[stage][copy] = 32'h0000_0200;
      if (mode == 3) begin
        fault_xor[stage][copy] = 32'h0000_0001;
        fault_xor[stage][(copy + 1) % 3] = 32'h0000_0002;
      end
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int tau = 0; tau <= last; tau++) begin
        if (tau > 0) @(negedge clk);
        // outputs of the clock before edge tau
        for (int j = 0; j < M; j++)
          if (tau == T0 + L * int'(N) + j && mode != 3) begin
            check(c_out == golden(j), $sformatf("mode %0d c[%0d] got %0h exp %0h", mode, j, c_out, golden(j)));
            if (mode != 0 && c_out == golden(j)) masked[s]++;
          end
        for (int i = 0; i < int'(N); i++) begin
          if (mode != 3) check(!no_majority[i], $sformatf("mode %0d no_majority[%0d] at %0d", mode, i, tau));
          else if (tau > 3) begin
            check(no_majority[i] == (i == stage),
                  $sformatf("mode 3 no_majority[%0d]=%0b at %0d", i, no_majority[i], tau));
            if (i == stage && no_majority[i]) nm_clocks[s]++;
          end
        end
        check(nm_any == (no_majority[0] | no_majority[1] | no_majority[2] |
                         no_majority[3] | no_majority[4]), "nm_any");
        // inputs for edge tau
        load_b = (tau == 0);
        foreach (b_load[i]) b_load[i] = bv[i];
        c_in = (tau >= T0 && tau - T0 < M) ? C0[tau - T0] : '0;
        for (int i = 0; i < int'(N); i++) begin
          int j = tau - T0 - L * i;
          a_in[i] = (j >= 0 && j < M) ? A[j][i] : '0;
        end
        if (mode == 2) begin
          foreach (fault_xor[i, k]) fault_xor[i][k] = '0;
          if (tau % 4 == 1 && tau >= T0) begin
            int st = $urandom_range(N - 1);
            if (s == 1 && tau % 8 == 5)
              for (int k = 0; k < 3; k++) fault_xor[st][k] = acc_t'(32'h0000_0100 << k);
            else
              fault_xor[st][$urandom_range(2)] = acc_t'($urandom_range(1, 32'hffff));
            injected[s]++;
          end
        end
      end
    endtask

    initial begin
      foreach (a_in[i]) begin a_in[i] = '0; b_load[i] = '0; end
      c_in = '0;
      run_job(0, 0, 0);
      run_job(0, 0, 0);
      run_job(1, 2, 0);
      run_job(1, 4, 2);
      run_job(1, 0, 1);
      run_job(2, 0, 0);
      run_job(3, 1, 0);
      run_job(3, 3, 1);
      $display("scheme %0d: transients %0d, correct results under faults %0d, no-majority clocks %0d",
               s, injected[s], masked[s], nm_clocks[s]);
      check(injected[s] > 0 && masked[s] == 4 * M, "all results under faults correct");
      check(nm_clocks[s] > 0, "double fault raises no_majority");
      done[s] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
