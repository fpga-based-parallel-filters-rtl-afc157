// check_encoder: builds the inputs of the check filters ("Coding" block).
//
// Check filter j filters the sum of the data inputs x_i whose column of the
// Hamming check matrix has a one in row j. For the four-filter bank this is
//   xc[0] = x1 + x2 + x3,  xc[1] = x1 + x2 + x4,  xc[2] = x1 + x3 + x4,
// as in the published scheme; by linearity the check filter output then equals the sum of
// the corresponding data filter outputs. Each sum is built from its own adders
// with no term shared between rows, as the published scheme asks, so that one faulty
// adder corrupts one check input only. (A synthesis tool may still merge
// common terms unless told to keep them; that is a tool setting.)
//
// Interface and timing: purely combinational. Inputs are two's complement
// IN_W-bit values; outputs are XC_W bits wide, enough for the largest row sum
// (10 bits for 8-bit inputs and K = 4).
module check_encoder
  import pfecc_pkg::*;
#(
  parameter int unsigned K    = 4,
  parameter int unsigned IN_W = 8,
  localparam int unsigned R    = check_count(K),
  localparam int unsigned XC_W = check_in_width(K, IN_W)
) (
  input  logic signed [IN_W-1:0] x  [K],
  output logic signed [XC_W-1:0] xc [R]
);

  for (genvar j = 0; j < R; j++) begin : g_row
    always_comb begin
      xc[j] = '0;
      for (int i = 0; i < int'(K); i++)
        if (h_bit(R, j, i)) xc[j] += XC_W'(x[i]);
    end
  end

endmodule
