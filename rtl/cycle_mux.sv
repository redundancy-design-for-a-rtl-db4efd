// cycle_mux: three-input multiplexer in front of each PE's c input.
//
// It follows the multiplexer of the TMR array: c' = c1 when cycle = 1,
// c2 when cycle = 2, c3 when cycle = 3. Each input is wired to a different
// voter of the row below, so the PE takes its partial sum from the voter
// that serves the computation it executes in that cycle. Combinational.
module cycle_mux
  import ft_pkg::*;
(
  input  cycle_t cycle,
  input  acc_t   c1,
  input  acc_t   c2,
  input  acc_t   c3,
  output acc_t   c_out
);
  always_comb begin
    unique case (cycle)
      CYCLE_1: c_out = c1;
      CYCLE_2: c_out = c2;
      default: c_out = c3;
    endcase
  end
endmodule
