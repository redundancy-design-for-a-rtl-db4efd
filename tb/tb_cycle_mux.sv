// tb_cycle_mux: checks that cycle = 1, 2, 3 selects c1, c2, c3.
module tb_cycle_mux;
  import ft_pkg::*;
  cycle_t cycle;
  acc_t c1, c2, c3, c_out;
  int checks = 0, failures = 0;

  cycle_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      acc_t exp;
      c1 = acc_t'($urandom); c2 = acc_t'($urandom); c3 = acc_t'($urandom);
      cycle = cycle_t'(n % 3 + 1);
      exp = (n % 3 == 0) ? c1 : (n % 3 == 1) ? c2 : c3;
      #1;
      checks++;
      if (c_out != exp) begin
        failures++;
        $display("FAIL cycle %0d got %0h exp %0h", cycle, c_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
