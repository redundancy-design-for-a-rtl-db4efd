// tb_matcher: checks that the matcher forwards the original copy and flags
// exactly the cases where the two copies differ.
module tb_matcher;
  import ft_pkg::*;
  acc_t c_orig, c_red, c_out;
  logic mismatch;
  int checks = 0, failures = 0;

  matcher dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      c_orig = acc_t'($urandom);
      c_red  = (n % 2 == 0) ? c_orig : c_orig ^ (32'h1 << (n % 32));
      #1;
      checks += 2;
      if (c_out != c_orig) begin failures++; $display("FAIL forward"); end
      if (mismatch != (n % 2 == 1)) begin failures++; $display("FAIL flag at %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
