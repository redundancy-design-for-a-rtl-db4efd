// tb_mv_pe: checks the stationary-b PE: b loading, c_out = c_in + a*b one
// clock later, fault_xor and reset.
module tb_mv_pe;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0, load_b;
  data_t b_load, a_in;
  acc_t c_in, fault_xor, c_out;
  int checks = 0, failures = 0;

  mv_pe dut (.*);
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
    automatic data_t b = '0;
    load_b = 0; b_load = '0; a_in = '0; c_in = '0; fault_xor = '0;
    @(negedge clk);
    check(c_out == '0, "reset");
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic data_t a = data_t'($urandom);
      automatic acc_t c = acc_t'($urandom);
      automatic acc_t f = (n % 7 == 3) ? acc_t'($urandom) : '0;
      automatic acc_t exp = (c + {16'h0, a} * {16'h0, b}) ^ f;
      a_in = a; c_in = c; fault_xor = f;
      load_b = (n % 50 == 0);
      b_load = data_t'($urandom);
      @(negedge clk);
      check(c_out == exp, $sformatf("c got %0h exp %0h", c_out, exp));
      if (load_b) b = b_load;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
