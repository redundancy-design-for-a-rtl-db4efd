// mv_pe: processor element of the linear band matrix-vector array.
//
// The PE keeps one vector element b stationary (the projection along the
// vector direction folds b's link into a register of the PE) and each clock
// latches c_out = c_in + a_in * b. The function follows the source's
// matrix-vector array; loading b through load_b/b_load is this design's own
// choice, as are the widths and the reset to zero. fault_xor is XORed into
// the c register (held at zero in use) so a testbench can emulate a
// permanent or transient fault.
//
// Latency: one clock from a_in, c_in to c_out. b is written on the clock
// edge where load_b is high and is used from the next clock on.
module mv_pe
  import ft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_b,
  input  data_t b_load,
  input  data_t a_in,
  input  acc_t  c_in,
  input  acc_t  fault_xor,
  output acc_t  c_out
);
  data_t b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q   <= '0;
      c_out <= '0;
    end else begin
      if (load_b) b_q <= b_load;
      c_out <= (c_in + acc_t'(a_in) * acc_t'(b_q)) ^ fault_xor;
    end
  end
endmodule
