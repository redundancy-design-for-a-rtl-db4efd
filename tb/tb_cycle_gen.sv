// tb_cycle_gen: checks that cycle is 1 in the first clock after reset and
// then repeats 1, 2, 3, including across a second reset.
module tb_cycle_gen;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0;
  cycle_t cycle;
  int checks = 0, failures = 0;

  cycle_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int t = 0; t < 40 + run; t++) begin
        if (t > 0) @(negedge clk);
        checks++;
        if (cycle != cycle_t'(t % 3 + 1)) begin
          failures++;
          $display("FAIL clock %0d cycle %0d", t, cycle);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
