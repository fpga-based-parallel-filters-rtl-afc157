// tb_check_encoder: self-checking test of check_encoder.
//
// The four-filter instance is checked against the three sums written out by
// hand (x1+x2+x3, x1+x2+x4, x1+x3+x4). An eleven-filter instance is checked
// against a hand-written table of the (15,11) code columns, s1 first:
//   1111, 1110 1101 1011 0111, 1100 1010 1001 0110 0101 0011.
// Inputs are random 8-bit values plus the corner values -128 and 127, which
// reach the full range of the widened check inputs.
module tb_check_encoder;
  logic signed [7:0]  x4  [4];
  logic signed [9:0]  xc4 [3];
  logic signed [7:0]  x11 [11];
  logic signed [10:0] xc11 [4];

  int checks = 0, failures = 0;

  // (15,11) columns, s1 as the MSB of each nibble
  localparam logic [3:0] COL11 [11] = '{4'b1111, 4'b1110, 4'b1101, 4'b1011, 4'b0111,
                                        4'b1100, 4'b1010, 4'b1001, 4'b0110, 4'b0101, 4'b0011};

  check_encoder #(.K(4),  .IN_W(8)) dut4  (.x(x4),  .xc(xc4));
  check_encoder #(.K(11), .IN_W(8)) dut11 (.x(x11), .xc(xc11));

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++)
        x4[i] = (t == 0) ? -8'sd128 : (t == 1) ? 8'sd127 : 8'($urandom);
      for (int i = 0; i < 11; i++)
        x11[i] = (t == 0) ? -8'sd128 : (t == 1) ? 8'sd127 : 8'($urandom);
      #1;
      cmp(int'(xc4[0]), int'(x4[0]) + int'(x4[1]) + int'(x4[2]), "k4 x5");
      cmp(int'(xc4[1]), int'(x4[0]) + int'(x4[1]) + int'(x4[3]), "k4 x6");
      cmp(int'(xc4[2]), int'(x4[0]) + int'(x4[2]) + int'(x4[3]), "k4 x7");
      for (int j = 0; j < 4; j++) begin
        int s;
        s = 0;
        for (int i = 0; i < 11; i++) if (COL11[i][3-j]) s += int'(x11[i]);
        cmp(int'(xc11[j]), s, "k11 row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
