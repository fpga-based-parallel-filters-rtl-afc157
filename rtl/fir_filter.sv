// fir_filter: direct-form FIR filter, y(n) = sum_{l=0}^{TAPS-1} x(n-l) * h(l).
//
// One filter of the protected bank. The same module is used for the data
// filters (8-bit input) and for the check filters, whose input is a sum of
// several data inputs and therefore wider (10 bits for the four-filter bank).
// The filter length (16), the 8-bit input and coefficient quantization and
// the 18-bit output of the data filters follow the case study; the structure
// (direct form, one multiplier per tap, one output register) is this
// design's own choice, since the published scheme fixes only the response and sizes.
//
// Arithmetic is two's complement. The products are summed at full precision
// (IN_W + COEF_W + clog2(TAPS) bits) and the OUT_W most significant bits are
// kept, i.e. the sum is truncated toward minus infinity by dropping
// ACC_W - OUT_W least significant bits. Check filters are given an OUT_W that
// drops the same number of bits, so every filter output has the same LSB
// weight; the truncation is what makes the check comparisons differ by a few
// LSBs and calls for the threshold in the syndrome unit.
//
// Interface and timing: coefficients arrive on `coef` (coef[l] = h(l)) and
// may change at any time; they are not registered here. On a clock with
// `en` high the sample on `x` is taken as x(n) and y(n) appears on `y` after
// that clock edge (latency one cycle, one sample per cycle). With `en` low
// the delay line and output hold. Synchronous active-low reset clears the
// delay line and the output.
module fir_filter #(
  parameter int unsigned IN_W   = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned TAPS   = 16,
  parameter int unsigned OUT_W  = 18
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [IN_W-1:0]   x,
  input  logic signed [COEF_W-1:0] coef [TAPS],
  output logic signed [OUT_W-1:0]  y
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS);
  localparam int unsigned DROP  = ACC_W - OUT_W;

  // dly[l] holds x(n-1-l) before the current sample is shifted in.
  logic signed [IN_W-1:0]  dly [TAPS-1];
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = ACC_W'(x) * ACC_W'(coef[0]);
    for (int l = 1; l < int'(TAPS); l++) acc += ACC_W'(dly[l-1]) * ACC_W'(coef[l]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(TAPS) - 1; l++) dly[l] <= '0;
      y <= '0;
    end else if (en) begin
      dly[0] <= x;
      for (int l = 1; l < int'(TAPS) - 1; l++) dly[l] <= dly[l-1];
      y <= OUT_W'(acc >>> DROP);
    end
  end

endmodule
