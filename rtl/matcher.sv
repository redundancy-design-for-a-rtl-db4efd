// matcher: comparator of a duplicated (error-detecting) systolic stage.
//
// It receives the result of the original PE and the result of the redundant
// PE for the same computation, aligned to the same clock, passes the original
// result on and raises mismatch when the two differ. The source gives the
// matching function; forwarding the original copy is this design's choice.
// Purely combinational. c_out is a plain wire from c_orig on purpose: the
// stage forwards the original result whether or not it matched.
module matcher
  import ft_pkg::*;
(
  input  acc_t c_orig,
  input  acc_t c_red,
  output acc_t c_out,
  output logic mismatch
);
  always_comb begin
    c_out    = c_orig;
    mismatch = (c_orig != c_red);
  end
endmodule
