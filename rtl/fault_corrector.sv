// fault_corrector: the "single fault correction" stage of the protected
// filter bank.
//
// The thresholded syndrome is decoded as in the syndrome table of the
// Hamming code: all zero means no error; equal to data column i means data
// filter i failed and its output is rebuilt from a check filter and the
// other data outputs; a single one means a check filter failed and the data
// outputs are left alone. Following the published scheme, the correction logic is
// triplicated (three correction_element copies, each decoding the syndrome
// itself) and a bitwise majority vote forms the outputs, so that a fault in
// one copy cannot reach them. The status flags are this design's addition
// for observing the bank; they are not triplicated.
//
// Status outputs: err_data - a data filter was found faulty, its index (0
// based) on err_index; err_check - a check filter was found faulty;
// uncorrectable - the syndrome matches no single filter (possible only when
// K is below the 2^R - R - 1 data filters a full Hamming code would hold).
//
// Interface and timing: purely combinational; widths as in syndrome_unit.
module fault_corrector
  import pfecc_pkg::*;
#(
  parameter int unsigned K    = 4,
  parameter int unsigned Y_W  = 18,
  parameter int unsigned Z_W  = 20,
  localparam int unsigned R   = check_count(K),
  localparam int unsigned I_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic signed [Y_W-1:0] y   [K],
  input  logic signed [Z_W-1:0] z   [R],
  input  logic        [R-1:0]   syn,
  output logic signed [Y_W-1:0] yc  [K],
  output logic                  err_data,
  output logic        [I_W-1:0] err_index,
  output logic                  err_check,
  output logic                  uncorrectable
);

  logic signed [Y_W-1:0] copy [3][K];

  for (genvar c = 0; c < 3; c++) begin : g_copy
    correction_element #(.K(K), .Y_W(Y_W), .Z_W(Z_W)) u_elem (
      .y   (y),
      .z   (z),
      .syn (syn),
      .yc  (copy[c])
    );
  end

  majority_voter #(.N(K), .WIDTH(Y_W)) u_vote (
    .a (copy[0]),
    .b (copy[1]),
    .c (copy[2]),
    .o (yc)
  );

  always_comb begin
    err_data  = 1'b0;
    err_index = '0;
    for (int i = 0; i < int'(K); i++) begin
      if (syn == R'(data_column(R, i))) begin
        err_data  = 1'b1;
        err_index = I_W'(i);
      end
    end
    err_check     = (syn != '0) && ((syn & (syn - 1'b1)) == '0);
    uncorrectable = (syn != '0) && !err_data && !err_check;
  end

endmodule
