// parallel_filter_ecc: a bank of K FIR filters with the same impulse
// response, each filtering its own input, protected against a fault in any
// one filter by a Hamming code applied across the filters.
//
// Each data filter plays the part of one data bit of a Hamming code. The
// check_encoder forms R sums of the inputs (x1+x2+x3, x1+x2+x4, x1+x3+x4
// for K = 4) and R check filters, identical to the data filters but for
// their wider input, filter them. Since filtering is linear, check output j
// equals the sum of the data outputs of row j up to truncation residue. The
// syndrome_unit thresholds the differences into a syndrome and the
// fault_corrector rebuilds the output of the filter it names. With K = 4
// there are three check filters (a (7,4) code); with K = 11 there are four
// ((15,11) code). That structure, the widths and the triplicated corrector
// follow the published scheme; the pipeline, the valid signal, the status outputs and the
// fault-injection inputs are this design's own.
//
// Fault injection. To exercise the protection the bank has XOR masks that
// corrupt the input (fi_x_mask) or the coefficients (fi_coef_mask) seen by
// any one filter; filters 0..K-1 are the data filters, K..K+R-1 the check
// filters. The encoder always sees the clean inputs. Tie the masks to zero in
// normal use.
//
// Interface and timing. On a clock with in_valid high, x[i] is taken as
// sample x_i(n). The filter outputs are registered one cycle later; the
// syndrome and correction are combinational on them and registered once
// more, so yc[i] = y_i(n) (corrected) appears two clocks after the sample
// with out_valid high, together with the raw check differences (residue),
// the syndrome and the flags for the same sample. One sample per clock per
// filter. coef[l] = h(l) is shared by all filters.
// Synchronous active-low reset clears the filters and the output stage.
module parallel_filter_ecc
  import pfecc_pkg::*;
#(
  parameter int unsigned K       = 4,
  parameter int unsigned IN_W    = 8,
  parameter int unsigned COEF_W  = 8,
  parameter int unsigned TAPS    = 16,
  parameter int unsigned OUT_W   = 18,
  parameter int unsigned THRESH  = max_row_weight(K) - 1,
  localparam int unsigned R      = check_count(K),
  localparam int unsigned N      = K + R,
  localparam int unsigned XC_W   = check_in_width(K, IN_W),
  localparam int unsigned Z_W    = OUT_W + XC_W - IN_W,
  localparam int unsigned I_W    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   x            [K],
  input  logic signed [COEF_W-1:0] coef         [TAPS],
  input  logic        [XC_W-1:0]   fi_x_mask    [N],
  input  logic        [COEF_W-1:0] fi_coef_mask [N][TAPS],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  yc           [K],
  output logic signed [Z_W+1:0]    residue      [R],
  output logic        [R-1:0]      syndrome,
  output logic                     err_data,
  output logic        [I_W-1:0]    err_index,
  output logic                     err_check,
  output logic                     uncorrectable
);

  // ---------------------------------------------------------------- coding
  logic signed [XC_W-1:0] xc [R];

  check_encoder #(.K(K), .IN_W(IN_W)) u_enc (
    .x  (x),
    .xc (xc)
  );

  // --------------------------------------------------------------- filters
  logic signed [OUT_W-1:0] y [K];
  logic signed [Z_W-1:0]   z [R];

  for (genvar i = 0; i < N; i++) begin : g_filt
    logic signed [COEF_W-1:0] h [TAPS];
    always_comb
      for (int l = 0; l < int'(TAPS); l++) h[l] = coef[l] ^ fi_coef_mask[i][l];

    if (i < K) begin : g_data
      logic signed [IN_W-1:0] xin;
      assign xin = x[i] ^ fi_x_mask[i][IN_W-1:0];
      fir_filter #(.IN_W(IN_W), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(OUT_W)) u_fir (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (in_valid),
        .x     (xin),
        .coef  (h),
        .y     (y[i])
      );
    end else begin : g_check
      logic signed [XC_W-1:0] xin;
      assign xin = xc[i-K] ^ fi_x_mask[i];
      fir_filter #(.IN_W(XC_W), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(Z_W)) u_fir (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (in_valid),
        .x     (xin),
        .coef  (h),
        .y     (z[i-K])
      );
    end
  end

  // ------------------------------------------------- syndrome and correction
  logic signed [Z_W+1:0]  diff [R];
  logic        [R-1:0]    syn;
  logic signed [OUT_W-1:0] yc_d [K];
  logic                   err_data_d, err_check_d, uncorr_d;
  logic        [I_W-1:0]  err_index_d;

  syndrome_unit #(.K(K), .Y_W(OUT_W), .Z_W(Z_W), .THRESH(THRESH)) u_syn (
    .y    (y),
    .z    (z),
    .diff (diff),
    .syn  (syn)
  );

  fault_corrector #(.K(K), .Y_W(OUT_W), .Z_W(Z_W)) u_cor (
    .y             (y),
    .z             (z),
    .syn           (syn),
    .yc            (yc_d),
    .err_data      (err_data_d),
    .err_index     (err_index_d),
    .err_check     (err_check_d),
    .uncorrectable (uncorr_d)
  );

  // ---------------------------------------------------------- output stage
  logic filt_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      filt_valid    <= 1'b0;
      out_valid     <= 1'b0;
      for (int i = 0; i < int'(K); i++) yc[i] <= '0;
      for (int j = 0; j < int'(R); j++) residue[j] <= '0;
      syndrome      <= '0;
      err_data      <= 1'b0;
      err_index     <= '0;
      err_check     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      filt_valid <= in_valid;
      out_valid  <= filt_valid;
      if (filt_valid) begin
        yc            <= yc_d;
        residue       <= diff;
        syndrome      <= syn;
        err_data      <= err_data_d;
        err_index     <= err_index_d;
        err_check     <= err_check_d;
        uncorrectable <= uncorr_d;
      end
    end
  end

  // A full Hamming code (K = 2^R - R - 1) uses every syndrome value, so a
  // syndrome matching no single filter can only occur for shortened codes.
  always_ff @(posedge clk)
    if (rst_n && filt_valid && K == (1 << R) - R - 1)
      assert (!uncorr_d)
        else $error("syndrome %b matches no filter of a full Hamming code", syn);

endmodule
