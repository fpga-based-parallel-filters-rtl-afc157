// syndrome_unit: compares each check filter output with the matching sum of
// data filter outputs and turns the differences into a binary syndrome.
//
// With the check matrix H = [A | -I] (A the Hamming data columns), the
// difference vector is s = [y z] H^T negated, computed here row by row as
//   diff[j] = z[j] - sum_{i : A[j][i] = 1} y[i].
// Without faults diff[j] is only the small rounding residue left by the
// output truncation of the filters, so a value whose magnitude is at most
// THRESH counts as 0 and anything larger counts as 1: syn[j] = |diff[j]| >
// THRESH. The thresholded comparison follows the published scheme; the default THRESH,
// one less than the largest row weight, is this design's own choice: it is
// the largest residue that truncating each output by the same number of bits
// can leave (2 for the four-filter bank). Each row has its own adders, so a
// fault in one row's logic affects one syndrome bit only, as the published scheme asks.
//
// Interface and timing: purely combinational. y[i] are the data filter
// outputs (Y_W bits), z[j] the check filter outputs (Z_W bits, same LSB
// weight), all two's complement.
module syndrome_unit
  import pfecc_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned Y_W    = 18,
  parameter int unsigned Z_W    = 20,
  parameter int unsigned THRESH = max_row_weight(K) - 1,
  localparam int unsigned R     = check_count(K),
  localparam int unsigned S_W   = Z_W + 2
) (
  input  logic signed [Y_W-1:0] y    [K],
  input  logic signed [Z_W-1:0] z    [R],
  output logic signed [S_W-1:0] diff [R],
  output logic        [R-1:0]   syn
);

  for (genvar j = 0; j < R; j++) begin : g_row
    logic signed [S_W-1:0] mag;
    always_comb begin
      diff[j] = S_W'(z[j]);
      for (int i = 0; i < int'(K); i++)
        if (h_bit(R, j, i)) diff[j] -= S_W'(y[i]);
      mag    = (diff[j] < 0) ? -diff[j] : diff[j];
      syn[j] = mag > S_W'(THRESH);
    end
  end

endmodule
