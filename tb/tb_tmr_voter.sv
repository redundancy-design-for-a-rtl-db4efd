// tb_tmr_voter: checks the word-level majority vote over all agreement
// patterns (all equal, one copy differing in each position, all different).
module tb_tmr_voter;
  import ft_pkg::*;
  acc_t c1, c2, c3, c_out;
  logic no_majority;
  int checks = 0, failures = 0;

  tmr_voter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      automatic acc_t g = acc_t'($urandom);
      automatic acc_t e = g ^ acc_t'($urandom_range(1, 32'hffff_ffff));
      automatic acc_t h = g ^ e ^ 32'h8000_0000;  // differs from both g and e
      automatic int pat = n % 5;
      case (pat)
        0: begin c1 = g; c2 = g; c3 = g; end
        1: begin c1 = e; c2 = g; c3 = g; end
        2: begin c1 = g; c2 = e; c3 = g; end
        3: begin c1 = g; c2 = g; c3 = e; end
        default: begin c1 = g; c2 = e; c3 = (h == g || h == e) ? ~g : h; end
      endcase
      #1;
      if (pat < 4) begin
        check(c_out == g, $sformatf("pattern %0d voted %0h exp %0h", pat, c_out, g));
        check(!no_majority, "no_majority with a majority");
      end else begin
        check(no_majority, "no majority not flagged");
        check(c_out == c1, "tie passes copy 1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
