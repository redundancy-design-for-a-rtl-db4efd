// tb_mac_pe: checks that the hexagonal-array PE latches a, b and c + a*b one
// clock after its inputs, that fault_xor flips the c register, and reset.
module tb_mac_pe;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0;
  data_t a_in, b_in, a_out, b_out;
  acc_t c_in, fault_xor, c_out;
  int checks = 0, failures = 0;

  mac_pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    a_in = '0; b_in = '0; c_in = '0; fault_xor = '0;
    @(negedge clk);
    check(c_out == '0 && a_out == '0 && b_out == '0, "reset");
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      automatic data_t a = data_t'($urandom);
      automatic data_t b = data_t'($urandom);
      automatic acc_t c = acc_t'($urandom);
      automatic acc_t f = (n % 5 == 0) ? acc_t'($urandom) : '0;
      automatic acc_t exp = (c + {16'h0, a} * {16'h0, b}) ^ f;
      a_in = a; b_in = b; c_in = c; fault_xor = f;
      @(negedge clk);
      check(a_out == a, "a pass");
      check(b_out == b, "b pass");
      check(c_out == exp, $sformatf("c' got %0h exp %0h", c_out, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
