// tb_fir_filter: self-checking test of fir_filter at its default size
// (16 taps, 8-bit input and coefficients, 18-bit output).
//
// Random coefficients and random samples are applied with `en` toggling at
// random. A reference model keeps its own history of the accepted samples,
// forms the full-precision convolution sum and truncates it by the two
// dropped LSBs (floor division by 4). The output is checked one clock after
// each accepted sample (latency 1) and checked to hold while `en` is low.
// Coefficients are reloaded a few times, including the extreme values -128
// and 127. A watchdog ends the run with a failure if it hangs.
module tb_fir_filter;
  localparam int IN_W = 8, COEF_W = 8, TAPS = 16, OUT_W = 18;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IN_W-1:0]   x = '0;
  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [OUT_W-1:0]  y;

  int checks = 0, failures = 0;
  int hist [TAPS];               // hist[l] = x(n-l) of accepted samples

  fir_filter #(.IN_W(IN_W), .COEF_W(COEF_W), .TAPS(TAPS), .OUT_W(OUT_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .coef(coef), .y(y));

  always #5 clk = ~clk;

  function automatic int expected();
    longint acc = 0;
    for (int l = 0; l < TAPS; l++) acc += longint'(hist[l]) * longint'(coef[l]);
    // floor(acc / 4) for signed values
    return int'(acc >>> 2);
  endfunction

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(y) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: y=%0d expected %0d", what, y, exp);
    end
  endtask

  initial begin
    for (int l = 0; l < TAPS; l++) begin coef[l] = '0; hist[l] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) check(0, "after reset");
    for (int seg = 0; seg < 6; seg++) begin
      for (int l = 0; l < TAPS; l++)
        case (seg)
          0: coef[l] = COEF_W'(l + 1);                 // simple ramp
          1: coef[l] = (l % 2) ? -128 : 127;           // extremes
          default: coef[l] = COEF_W'($urandom);
        endcase
      for (int n = 0; n < 400; n++) begin
        logic do_en;
        int   held;
        do_en = ($urandom % 4) != 0;
        if (seg == 1) x = (n % 2) ? 127 : -128;
        else          x = IN_W'($urandom);
        en   = do_en;
        held = int'(y);
        @(posedge clk);
        if (do_en) begin
          for (int l = TAPS - 1; l > 0; l--) hist[l] = hist[l-1];
          hist[0] = int'(x);
        end
        @(negedge clk);
        if (do_en) check(expected(), "sample");
        else       check(held, "hold");
      end
    end
    en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
