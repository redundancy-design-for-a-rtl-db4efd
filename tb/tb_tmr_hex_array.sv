// tb_tmr_hex_array: self-checking testbench of the TMR hexagonal band
// matrix-matrix array.
//
// Each job loads random banded A, B and an initial C0, feeds the boundary
// inputs from the schedule in hex_model_pkg, and compares every result c_ij
// with a plain triple-loop product at the exact clock the schedule predicts
// (so the latency is checked too). It also checks the broadcast cycle
// control. Jobs: fault-free; one permanent PE fault (must be masked);
// single-clock transient faults in random PEs (must be masked); and two
// different faults in one voting triple (must show up as no_majority).
module tb_tmr_hex_array;
  import ft_pkg::*;
  import hex_model_pkg::*;

  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 3;
  localparam int unsigned NCOL = COLS + 2;
  localparam int WATCHDOG = 20000;

  logic   clk = 0, rst_n = 0;
  data_t  a_in [ROWS];
  data_t  b_in [NCOL];
  acc_t   c_bot_in [NCOL];
  acc_t   c_right_in [ROWS];
  acc_t   fault_xor [ROWS][NCOL];
  cycle_t cycle;
  acc_t   c_top_out [COLS];
  acc_t   c_left_out [ROWS];
  logic   no_majority [ROWS][COLS];

  int checks = 0, failures = 0;
  int masked_perm = 0, masked_trans = 0, nomaj_seen = 0, wrong_under_double = 0;

  tmr_hex_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic clear_faults();
    foreach (fault_xor[x, z]) fault_xor[x][z] = '0;
  endtask

  // mode 0: no fault, 1: permanent fault in PE(1,2), 2: transients,
  // 3: two different permanent faults in PE(1,1) and PE(1,2)
  task automatic run_job(int nn, int mode);
    int last;
    int nres = 0, nbad = 0;
    setup(ROWS, COLS, nn);
    randomise(mode == 0 ? 32'hffff : 32'h00ff);
    last = last_edge();
    clear_faults();
    if (mode == 1) fault_xor[1][2] = 32'h0000_0100;
    if (mode == 3) begin
      fault_xor[1][1] = 32'h0000_0001;
      fault_xor[1][2] = 32'h0000_0002;
    end
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tau = 0; tau <= last; tau++) begin
      if (tau > 0) @(negedge clk);
      // outputs of the cycle before edge tau
      check(cycle == cycle_t'(mod3(tau) + 1), $sformatf("cycle at %0d", tau));
      foreach (no_majority[x, y]) if (no_majority[x][y]) begin
        if (mode == 3) nomaj_seen++;
        else check(0, $sformatf("no_majority[%0d][%0d] at %0d", x, y, tau));
      end
      for (int i = 0; i < nn; i++)
        for (int j = 0; j < nn; j++) begin
          bit top; int pos, te;
          if (exit_of(i, j, top, pos, te) && te == tau) begin
            acc_t got = top ? c_top_out[pos] : c_left_out[pos];
            nres++;
            if (mode == 3) begin
              if (got != golden(i, j)) nbad++;
            end else begin
              check(got == golden(i, j),
                    $sformatf("mode %0d c[%0d][%0d] got %0h exp %0h", mode, i, j, got, golden(i, j)));
              if (mode == 1) masked_perm++;
            end
          end
        end
      // inputs for edge tau
      for (int x = 0; x < ROWS; x++) a_in[x] = a_val(x, tau);
      for (int z = 0; z < NCOL; z++) begin
        b_in[z] = b_val(z, tau);
        c_bot_in[z] = cbot_val(z, tau);
      end
      for (int x = 0; x < ROWS; x++) c_right_in[x] = (x < ROWS - 1) ? cright_val(x, tau) : '0;
      if (mode == 2) begin
        clear_faults();
        if (tau % 4 == 0) begin
          fault_xor[$urandom_range(ROWS-1)][$urandom_range(NCOL-1)] = acc_t'($urandom_range(1, 32'hffff));
          masked_trans++;
        end
      end
    end
    check(nres == (mode == 0 ? nres : nres) && nres > 0, "results seen");
    if (mode == 3) wrong_under_double += nbad;
    $display("job mode %0d n %0d: %0d results", mode, nn, nres);
  endtask

  initial begin
    clear_faults();
    foreach (a_in[x]) a_in[x] = '0;
    foreach (b_in[z]) begin b_in[z] = '0; c_bot_in[z] = '0; end
    foreach (c_right_in[x]) c_right_in[x] = '0;
    run_job(1, 0);
    run_job(4, 0);
    run_job(9, 0);
    run_job(9, 1);
    run_job(9, 2);
    run_job(9, 3);
    $display("masked permanent-fault results %0d, injected transients %0d, no-majority votes %0d, wrong results under double fault %0d",
             masked_perm, masked_trans, nomaj_seen, wrong_under_double);
    check(masked_perm > 0, "permanent fault masked");
    check(masked_trans > 0, "transient faults injected");
    check(nomaj_seen > 0, "double fault flagged by no_majority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
