// mac_pe: processor element of the hexagonal band matrix multiplication array.
//
// Each clock the PE latches a' = a, b' = b and c' = c + a*b, so every one of
// its three links carries one delay element, as in the classic hexagonal
// array. a and b are passed on unchanged to the neighbouring PEs; c' leaves
// towards the voter. The function follows the processor element drawn for the
// TMR array; the word widths, the synchronous reset to zero and the fault_xor
// input are this design's own. fault_xor is XORed into the c' register and is
// held at zero in normal use: it lets a testbench emulate a permanent
// (constant mask) or transient (one-cycle mask) fault in this PE.
//
// Latency: one clock from a, b, c to a_out, b_out, c_out.
module mac_pe
  import ft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t a_in,
  input  data_t b_in,
  input  acc_t  c_in,
  input  acc_t  fault_xor,
  output data_t a_out,
  output data_t b_out,
  output acc_t  c_out
);
  acc_t prod;
  always_comb prod = acc_t'(a_in) * acc_t'(b_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out <= '0;
      b_out <= '0;
      c_out <= '0;
    end else begin
      a_out <= a_in;
      b_out <= b_in;
      c_out <= (c_in + prod) ^ fault_xor;
    end
  end
endmodule
