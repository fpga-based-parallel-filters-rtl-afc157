// tb_parallel_filter_ecc_k11: end-to-end test of the protected filter bank
// configured for eleven data filters and four check filters (a (15,11) Hamming code), otherwise at its default sizes.
//
// pfecc_model drives random samples and coefficients, injects 7900
// single-bit input faults and 7900 single-bit coefficient faults into random
// data and check filters, and checks every output against its own reference
// model (see pfecc_model for the acceptance rules). A watchdog ends the run
// with a failure if it does not finish.
module tb_parallel_filter_ecc_k11;
  localparam int K    = 11;
  localparam int R    = (K <= 4) ? 3 : 4;
  localparam int XC_W = (K <= 4) ? 10 : 11;
  localparam int Z_W  = 18 + XC_W - 8;
  localparam int I_W  = $clog2(K);

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid, err_data, err_check, uncorrectable;
  logic signed [7:0]      x            [K];
  logic signed [7:0]      coef         [16];
  logic        [XC_W-1:0] fi_x_mask    [K+R];
  logic        [7:0]      fi_coef_mask [K+R][16];
  logic signed [17:0]     yc           [K];
  logic signed [Z_W+1:0]  residue      [R];
  logic        [R-1:0]    syndrome;
  logic        [I_W-1:0]  err_index;

  always #5 clk = ~clk;

  parallel_filter_ecc #(.K(11)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .coef(coef),
    .fi_x_mask(fi_x_mask), .fi_coef_mask(fi_coef_mask), .out_valid(out_valid),
    .yc(yc), .residue(residue), .syndrome(syndrome), .err_data(err_data),
    .err_index(err_index), .err_check(err_check), .uncorrectable(uncorrectable));

  pfecc_model #(.K(K)) model (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .coef(coef),
    .fi_x_mask(fi_x_mask), .fi_coef_mask(fi_coef_mask), .out_valid(out_valid),
    .yc(yc), .residue(residue), .syndrome(syndrome), .err_data(err_data),
    .err_index(err_index), .err_check(err_check), .uncorrectable(uncorrectable));

  initial begin
    repeat (2000000) @(posedge clk);
    model.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", model.checks, model.failures);
    $finish;
  end
endmodule
