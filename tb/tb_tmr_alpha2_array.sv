// tb_tmr_alpha2_array: self-checking testbench of the pipeline-period-2 band
// matrix-vector array with space-shift triple modular redundancy.
//
// Jobs on random band matrices (row j holds columns j-2 .. j+1):
//   0 fault-free: every c_j correct in the clock after the top PE's original
//     ran, no_majority never raised;
//   1 a permanent fault in one PE (main or extra): every result still correct,
//     no_majority never raised;
//   2 single-clock transient faults in random PEs (main or extra): every
//     result correct;
//   3 permanent faults with different masks in an odd PE and its extra PE:
//     the two voters that PE takes part in raise no_majority in every clock
//     where their vote is real, the others never.
// The input streams follow the schedule: PE q runs the original computation
// on edges tau = q (mod 2) and on the other edges the copy of node
// (q - 1, tau); node (i, j) runs at edge i + j + T0 on PE i - j + OFF.
module tb_tmr_alpha2_array;
  import ft_pkg::*;

  localparam int unsigned NO = 4, NP = NO + 1, NX = NP / 2;
  localparam int OFF = 2;       // PE p = i - j + OFF
  localparam int M = 10;        // matrix order
  localparam int T0 = 8;        // node (i,j) runs at edge i + j + T0 (T0 even)

  logic  clk = 0, rst_n = 0;
  data_t a_in [NP];
  data_t b_in;
  acc_t  c_in, c_out;
  acc_t  fault_xor [NP];
  acc_t  x_fault_xor [NX];
  logic  no_majority [NO];
  logic  nm_any;

  int checks = 0, failures = 0, injected = 0, masked = 0, nm_clocks = 0;
  data_t A [M][M];
  data_t bv [M];
  acc_t  C0 [M];

  tmr_alpha2_array dut (.*);
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
    acc_t g = C0[j];
    for (int i = 0; i < M; i++) g += acc_t'(A[j][i]) * acc_t'(bv[i]);
    return g;
  endfunction

  // node run by physical PE q at edge tau (original or copy)
  function automatic void node_of(int q, int tau, output int p, output int i, output int j);
    p = (((tau - q) % 2 + 2) % 2 == 0) ? q : q - 1;
    i = (p - OFF + tau - T0) / 2;
    j = (tau - T0 - p + OFF) / 2;
  endfunction

  // mode 1: which = 0..NP-1 main PE, NP.. extra PE; mode 3: which = odd PE
  task automatic run_job(int mode, int which);
    int last = T0 + 2 * M + 2 * NP + 8;
    for (int j = 0; j < M; j++) begin
      for (int i = 0; i < M; i++)
        A[j][i] = (i - j >= -2 && i - j <= 1) ? data_t'($urandom) : '0;
      C0[j] = acc_t'($urandom);
      bv[j] = data_t'($urandom);
    end
    foreach (fault_xor[q]) fault_xor[q] = '0;
    foreach (x_fault_xor[k]) x_fault_xor[k] = '0;
    if (mode == 1) begin
      if (which < int'(NP)) fault_xor[which] = 32'h0000_0800;
      else x_fault_xor[which - NP] = 32'h0000_0800;
    end
    if (mode == 3) begin
      fault_xor[which] = 32'h0000_0001;
      x_fault_xor[which / 2] = 32'h0000_0002;
    end
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int tau = 0; tau <= last; tau++) begin
      if (tau > 0) @(negedge clk);
      // outputs of the clock before edge tau
      for (int j = 0; j < M; j++) begin
        int tf = (j + NO - 1 - OFF) + j + T0;
        if (tau == tf + 1 && mode != 3) begin
          check(c_out == golden(j), $sformatf("mode %0d c[%0d] got %0h exp %0h", mode, j, c_out, golden(j)));
          if (mode != 0 && c_out == golden(j)) masked++;
        end
      end
      for (int p = 0; p < int'(NO); p++) begin
        if (mode != 3) check(!no_majority[p], $sformatf("mode %0d no_majority[%0d] at %0d", mode, p, tau));
        else if (tau > 2) begin
          bit exp = (p == which - 1 || p == which) && (tau % 2 == (p + 1) % 2);
          check(no_majority[p] == exp, $sformatf("mode 3 no_majority[%0d]=%0b at %0d", p, no_majority[p], tau));
          if (exp && no_majority[p]) nm_clocks++;
        end
      end
      check(nm_any == (no_majority[0] | no_majority[1] | no_majority[2] | no_majority[3]), "nm_any");
      // inputs for edge tau
      for (int q = 0; q < int'(NP); q++) begin
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
      if (mode == 2) begin
        foreach (fault_xor[q]) fault_xor[q] = '0;
        foreach (x_fault_xor[k]) x_fault_xor[k] = '0;
        if (tau % 3 == 1) begin
          int w = $urandom_range(NP + NX - 1);
          if (w < int'(NP)) fault_xor[w] = acc_t'($urandom_range(1, 32'hffff));
          else x_fault_xor[w - NP] = acc_t'($urandom_range(1, 32'hffff));
          injected++;
        end
      end
    end
  endtask

  initial begin
    foreach (a_in[q]) a_in[q] = '0;
    b_in = '0; c_in = '0;
    run_job(0, 0);
    run_job(0, 0);
    for (int w = 0; w < int'(NP + NX); w++) run_job(1, w);
    run_job(2, 0);
    run_job(3, 1);
    run_job(3, 3);
    $display("transients %0d, correct results under faults %0d, no-majority clocks %0d",
             injected, masked, nm_clocks);
    check(injected > 0 && masked == (NP + NX + 1) * M, "every result under a single fault correct");
    check(nm_clocks > 0, "double fault raises no_majority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
