// tb_syndrome_unit: self-checking test of syndrome_unit for the four-filter
// bank (18-bit data outputs, 20-bit check outputs, threshold 2).
//
// Consistent vectors are built as z_j = (sum of the row's y) + q_j with a
// truncation-like residue q_j in 0..2: the syndrome must be zero. Then one
// output, data or check, is disturbed by an error of magnitude 5 or more and
// the syndrome must equal that filter's column, written out by hand from the
// text's equations (bit 0 = s1): y1 -> 111, y2 -> 011, y3 -> 101,
// y4 -> 110, z_j -> one-hot j. The differences are compared exactly and the
// threshold is probed at +-2 (still zero) and +-3 (flagged).
module tb_syndrome_unit;
  logic signed [17:0] y [4];
  logic signed [19:0] z [3];
  logic signed [21:0] diff [3];
  logic        [2:0]  syn;

  int checks = 0, failures = 0;
  localparam logic [2:0] COL [4] = '{3'b111, 3'b011, 3'b101, 3'b110};

  syndrome_unit #(.K(4), .Y_W(18), .Z_W(20), .THRESH(2)) dut (
    .y(y), .z(z), .diff(diff), .syn(syn));

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int yv [4];
  int zv [3];

  task automatic apply();
    for (int i = 0; i < 4; i++) y[i] = 18'(yv[i]);
    for (int j = 0; j < 3; j++) z[j] = 20'(zv[j]);
    #1;
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int q [3];
      int e, victim;
      for (int i = 0; i < 4; i++) yv[i] = int'($urandom % 200000) - 100000;
      for (int j = 0; j < 3; j++) q[j] = int'($urandom % 3);
      zv[0] = yv[0] + yv[1] + yv[2] + q[0];
      zv[1] = yv[0] + yv[1] + yv[3] + q[1];
      zv[2] = yv[0] + yv[2] + yv[3] + q[2];
      apply();
      cmp(int'(syn), 0, "clean syndrome");
      for (int j = 0; j < 3; j++) cmp(int'(diff[j]), q[j], "clean diff");

      // one faulty filter, error large enough to cross the threshold
      e = 5 + int'($urandom % 5000);
      if ($urandom % 2) e = -e;
      victim = int'($urandom % 7);
      if (victim < 4) begin
        yv[victim] -= e;
        apply();
        cmp(int'(syn), int'(COL[victim]), "data error syndrome");
        yv[victim] += e;
      end else begin
        zv[victim-4] += e;
        apply();
        cmp(int'(syn), 1 << (victim - 4), "check error syndrome");
        cmp(int'(diff[victim-4]), q[victim-4] + e, "check error diff");
        zv[victim-4] -= e;
      end
    end

    // threshold boundary on row 0
    yv = '{10, 20, 30, 40};
    zv = '{60, 70, 80};
    zv[1] = 10 + 20 + 40; zv[2] = 10 + 30 + 40;
    zv[0] = 60 + 2;  apply(); cmp(int'(syn), 3'b000, "diff +2");
    zv[0] = 60 - 2;  apply(); cmp(int'(syn), 3'b000, "diff -2");
    zv[0] = 60 + 3;  apply(); cmp(int'(syn), 3'b001, "diff +3");
    zv[0] = 60 - 3;  apply(); cmp(int'(syn), 3'b001, "diff -3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
