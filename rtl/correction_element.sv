// correction_element: one copy of the output correction logic of the
// protected filter bank. The fault corrector instantiates three of them and
// votes on their results.
//
// Each copy decodes the syndrome on its own: data output i is taken to be in
// error when the syndrome equals column i of the Hamming check matrix. Its
// value is then rebuilt from the check filter of the first row r that
// contains filter i and the other data outputs of that row,
//   yc[i] = z[r] - sum_{m != i, A[r][m] = 1} y[m]
// (for filter 1 of the four-filter bank: yc1 = z1 - y2 - y3). Otherwise the
// output passes unchanged. A syndrome that names a check filter, or none,
// leaves all data outputs alone, as in the syndrome table of the code. The
// rebuilt value is saturated to the Y_W-bit output range, since the
// truncation residue can push it one or two LSBs past full scale.
//
// Interface and timing: purely combinational; widths as in syndrome_unit.
module correction_element
  import pfecc_pkg::*;
#(
  parameter int unsigned K    = 4,
  parameter int unsigned Y_W  = 18,
  parameter int unsigned Z_W  = 20,
  localparam int unsigned R   = check_count(K)
) (
  input  logic signed [Y_W-1:0] y   [K],
  input  logic signed [Z_W-1:0] z   [R],
  input  logic        [R-1:0]   syn,
  output logic signed [Y_W-1:0] yc  [K]
);

  localparam int unsigned W = Z_W + 2;
  localparam logic signed [W-1:0] Y_MAX = W'({1'b0, {(Y_W-1){1'b1}}});
  localparam logic signed [W-1:0] Y_MIN = -Y_MAX - 1;

  for (genvar i = 0; i < K; i++) begin : g_out
    localparam int unsigned ROW = repair_row(R, i);
    localparam col_t        COL = data_column(R, i);
    logic signed [W-1:0] rebuilt;
    always_comb begin
      rebuilt = W'(z[ROW]);
      for (int m = 0; m < int'(K); m++)
        if (m != i && h_bit(R, ROW, m)) rebuilt -= W'(y[m]);
      if (syn == COL[R-1:0]) begin
        if (rebuilt > Y_MAX)      yc[i] = Y_MAX[Y_W-1:0];
        else if (rebuilt < Y_MIN) yc[i] = Y_MIN[Y_W-1:0];
        else                      yc[i] = rebuilt[Y_W-1:0];
      end else begin
        yc[i] = y[i];
      end
    end
  end

endmodule
