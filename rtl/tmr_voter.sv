// tmr_voter: word-level majority voter of the TMR systolic array.
//
// It receives the three copies of one result, computed by the original PE and
// by its two redundant neighbours in the same clock cycle, and outputs the
// value that at least two of them agree on. A single faulty copy is thereby
// masked. When all three differ there is no majority; the voter then passes
// copy c1 (the original computation's PE) on and raises no_majority. The
// source gives only the voting function; the tie rule and the no_majority
// flag are this design's own choice. Purely combinational.
module tmr_voter
  import ft_pkg::*;
(
  input  acc_t c1,
  input  acc_t c2,
  input  acc_t c3,
  output acc_t c_out,
  output logic no_majority
);
  always_comb begin
    no_majority = 1'b0;
    if (c1 == c2 || c1 == c3) c_out = c1;
    else if (c2 == c3)        c_out = c2;
    else begin
      c_out       = c1;
      no_majority = 1'b1;
    end
  end
endmodule
