// cycle_gen: generator of the broadcast "cycle" control of the TMR array.
//
// The alpha = 3 array repeats a three-clock pattern; cycle counts
// 1, 2, 3, 1, 2, ... and is broadcast to every multiplexer. After reset it
// shows 1 in the first clock cycle. The source names the signal and its three
// values; the counter and its reset value are this design's own.
module cycle_gen
  import ft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output cycle_t cycle
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cycle <= CYCLE_1;
    else begin
      unique case (cycle)
        CYCLE_1: cycle <= CYCLE_2;
        CYCLE_2: cycle <= CYCLE_3;
        default: cycle <= CYCLE_1;
      endcase
    end
  end
endmodule
