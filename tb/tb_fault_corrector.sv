// tb_fault_corrector: self-checking test of fault_corrector for the
// four-filter bank (18-bit data outputs, 20-bit check outputs).
//
// Check outputs are made exactly consistent with random data outputs
// (z1 = y1+y2+y3, z2 = y1+y2+y4, z3 = y1+y3+y4). One data output is then
// corrupted and the syndrome of that filter (hand-written: y1 111, y2 011,
// y3 101, y4 110, bit 0 = s1) is applied: the corrected outputs must all
// equal the uncorrupted values, and err_data/err_index must name the filter.
// A zero syndrome and a one-hot (check filter) syndrome must pass the data
// outputs unchanged, with err_check raised for the latter. A rebuilt value
// past full scale must saturate. Finally one of the three correction copies
// at a time is forced to a wrong value, which the vote must hide.
module tb_fault_corrector;
  logic signed [17:0] y  [4];
  logic signed [19:0] z  [3];
  logic        [2:0]  syn;
  logic signed [17:0] yc [4];
  logic               err_data, err_check, uncorrectable;
  logic        [1:0]  err_index;

  int checks = 0, failures = 0;
  localparam logic [2:0] COL [4] = '{3'b111, 3'b011, 3'b101, 3'b110};

  fault_corrector #(.K(4), .Y_W(18), .Z_W(20)) dut (
    .y(y), .z(z), .syn(syn), .yc(yc), .err_data(err_data), .err_index(err_index),
    .err_check(err_check), .uncorrectable(uncorrectable));

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int yv [4];
  logic signed [17:0] bad;

  task automatic load_consistent();
    for (int i = 0; i < 4; i++) y[i] = 18'(yv[i]);
    z[0] = 20'(yv[0] + yv[1] + yv[2]);
    z[1] = 20'(yv[0] + yv[1] + yv[3]);
    z[2] = 20'(yv[0] + yv[2] + yv[3]);
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int victim, e;
      for (int i = 0; i < 4; i++) yv[i] = int'($urandom % 200000) - 100000;
      load_consistent();
      victim = int'($urandom % 8);   // 0..3 data, 4..6 check, 7 none
      e = 1 + int'($urandom % 30000);
      if (victim < 4) begin
        y[victim] = 18'(yv[victim] + e);
        syn = COL[victim];
      end else if (victim < 7) begin
        z[victim-4] = 20'(int'(z[victim-4]) - e);
        syn = 3'(1 << (victim - 4));
      end else begin
        syn = '0;
      end
      #1;
      for (int i = 0; i < 4; i++) cmp(int'(yc[i]), yv[i], "corrected output");
      cmp(int'(err_data), int'(victim < 4), "err_data");
      if (victim < 4) cmp(int'(err_index), victim, "err_index");
      cmp(int'(err_check), int'(victim >= 4 && victim < 7), "err_check");
      cmp(int'(uncorrectable), 0, "uncorrectable");
    end

    // saturation: y1 rebuilt as z1 - y2 - y3 = 131073 must clip to 131071
    yv = '{131071, 5, 7, 9};
    load_consistent();
    z[0] = 20'(int'(z[0]) + 2);
    y[0] = 18'(-1000);
    syn  = COL[0];
    #1;
    cmp(int'(yc[0]), 131071, "positive saturation");
    yv = '{-131072, 5, 7, 9};
    load_consistent();
    z[0] = 20'(int'(z[0]) - 2);
    y[0] = 18'(1000);
    #1;
    cmp(int'(yc[0]), -131072, "negative saturation");

    // Triplication: a wrong value on output 0 of any one correction copy must
    // be voted out, both when that output is a rebuilt value (filter 0
    // faulty) and when it is passed through.
    for (int c = 0; c < 3; c++) begin
      for (int t = 0; t < 50; t++) begin
        int victim;
        for (int i = 0; i < 4; i++) yv[i] = int'($urandom % 200000) - 100000;
        load_consistent();
        victim = int'($urandom % 4);
        y[victim] = 18'(yv[victim] + 777);
        syn = (t % 2) ? COL[victim] : 3'b000;
        if (syn == 3'b000) y[victim] = 18'(yv[victim]);
        bad = ~18'(yv[0]);
        case (c)
          0: force dut.g_copy[0].u_elem.yc[0] = bad;
          1: force dut.g_copy[1].u_elem.yc[0] = bad;
          default: force dut.g_copy[2].u_elem.yc[0] = bad;
        endcase
        #1;
        for (int i = 0; i < 4; i++) cmp(int'(yc[i]), yv[i], "output with one faulty copy");
        case (c)
          0: release dut.g_copy[0].u_elem.yc[0];
          1: release dut.g_copy[1].u_elem.yc[0];
          default: release dut.g_copy[2].u_elem.yc[0];
        endcase
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    // Triplication: a wrong value on output 0 of any one correction copy must
    // be voted out, both when that output is a rebuilt value (filter 0
    // faulty) and when it is passed through.
    for (int c = 0; c < 3; c++) begin
      for (int t = 0; t < 50; t++) begin
        int victim;
        for (int i = 0; i < 4; i++) yv[i] = int'($urandom % 200000) - 100000;
        load_consistent();
        victim = int'($urandom % 4);
        y[victim] = 18'(yv[victim] + 777);
        syn = (t % 2) ? COL[victim] : 3'b000;
        if (syn == 3'b000) y[victim] = 18'(yv[victim]);
        bad = ~18'(yv[0]);
        case (c)
          0: force dut.g_copy[0].u_elem.yc[0] = bad;
          1: force dut.g_copy[1].u_elem.yc[0] = bad;
          default: force dut.g_copy[2].u_elem.yc[0] = bad;
        endcase
        #1;
        for (int i = 0; i < 4; i++) cmp(int'(yc[i]), yv[i], "output with one faulty copy");
        case (c)
          0: release dut.g_copy[0].u_elem.yc[0];
          1: release dut.g_copy[1].u_elem.yc[0];
          default: release dut.g_copy[2].u_elem.yc[0];
        endcase
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
