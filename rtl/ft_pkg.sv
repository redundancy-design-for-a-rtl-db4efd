// ft_pkg: types and constants shared by the fault-tolerant systolic arrays.
//
// The word widths are this design's own choice; the source method is
// independent of arithmetic width. Operands (matrix and vector elements) are
// DATA_W-bit unsigned words, partial sums are ACC_W-bit unsigned words that
// wrap modulo 2**ACC_W. redundancy_t names the three redundancy schemes of
// the pipeline-period-2 array. The phase type numbers the three clock cycles of an
// alpha = 3 array the way the multiplexer control "cycle" does: 1, 2, 3.
package ft_pkg;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = 32;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ACC_W-1:0]  acc_t;

  // Value of the broadcast "cycle" control of the alpha = 3 TMR array.
  typedef enum logic [1:0] {
    CYCLE_1 = 2'd1,
    CYCLE_2 = 2'd2,
    CYCLE_3 = 2'd3
  } cycle_t;

  // Redundancy scheme of a pipeline-period-2 array: where the copy of each
  // computation runs (another PE, a later clock, or both).
  typedef enum logic [1:0] {
    SPACE_SHIFT      = 2'd0,
    TIME_SHIFT       = 2'd1,
    SPACE_TIME_SHIFT = 2'd2
  } redundancy_t;
endpackage
