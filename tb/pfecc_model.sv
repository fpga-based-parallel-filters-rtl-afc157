// pfecc_model: stimulus, reference model and checker for parallel_filter_ecc,
// shared by the end-to-end testbenches of the four- and eleven-filter banks.
//
// Stimulus: random 8-bit samples on all K inputs (with in_valid dropped on
// about one clock in eight) and random 8-bit coefficients, renewed every
// 500 fault episodes. Fault episodes follow the fault-injection experiment
// the design is meant to pass: N_IN_FAULTS single-bit errors on the input
// of a random filter (one clock long) and N_COEF_FAULTS single-bit errors
// on one coefficient of a random filter (held for 6 clocks), each followed
// by 16 accepted clean samples so that no faulty sample is left in a delay
// line when the next fault starts. Data and check
// filters are both targeted.
//
// Reference: the model filters the clean and the faulty inputs of every
// filter with the clean and the faulty coefficients, truncating by two LSBs
// like the hardware, and works out the true outputs y_i and the error e the
// fault puts on the victim filter. The check matrix is a hand-written table
// and the check inputs are summed here, not taken from the design. With
// T = (largest row weight) - 1, the threshold of the bank:
//   e = 0          every output exact, zero syndrome, no flags;
//   |e| > 2T       the syndrome names the victim; a data victim's output is
//                  rebuilt to within 0..T LSBs of the truth (the truncation
//                  residue of its check row), all other outputs exact;
//   0 < |e| <= 2T  a small error may slip under the threshold; every output
//                  must stay within 3T LSBs of the truth.
// Each output must appear exactly two clocks after its sample. Events that
// must happen at least once: a corrected error on every data filter, a
// detected error on every check filter, a nonzero residue absorbed by the
// threshold, a small error tolerated, input and coefficient faults, and
// idle (in_valid low) clocks. Ends with the TB_RESULT line.
module pfecc_model #(
  parameter int K             = 4,
  parameter int N_IN_FAULTS   = 7900,
  parameter int N_COEF_FAULTS = 7900,
  parameter int R             = (K <= 4) ? 3 : 4,
  parameter int XC_W          = (K <= 4) ? 10 : 11,
  parameter int Z_W           = 18 + XC_W - 8,
  parameter int I_W           = (K > 1) ? $clog2(K) : 1
) (
  input  logic                clk,
  output logic                rst_n,
  output logic                in_valid,
  output logic signed [7:0]   x            [K],
  output logic signed [7:0]   coef         [16],
  output logic        [XC_W-1:0] fi_x_mask [K+R],
  output logic        [7:0]   fi_coef_mask [K+R][16],
  input  logic                out_valid,
  input  logic signed [17:0]  yc           [K],
  input  logic signed [Z_W+1:0] residue    [R],
  input  logic        [R-1:0] syndrome,
  input  logic                err_data,
  input  logic        [I_W-1:0] err_index,
  input  logic                err_check,
  input  logic                uncorrectable
);
  localparam int N    = K + R;
  localparam int TAPS = 16;

  // Hamming columns, s1 first, as strings of the row bits.
  localparam string COLS3  [4]  = '{"111", "110", "101", "011"};
  localparam string COLS4  [11] = '{"1111", "1110", "1101", "1011", "0111", "1100",
                                    "1010", "1001", "0110", "0101", "0011"};

  function automatic bit hm(int row, int i);
    return (R == 3) ? (COLS3[i][row] == "1") : (COLS4[i][row] == "1");
  endfunction

  function automatic int col_syn(int i);     // syndrome value, bit j = row j
    int v = 0;
    for (int j = 0; j < R; j++) if (hm(j, i)) v |= 1 << j;
    return v;
  endfunction

  int thr;
  bit last_valid;

  typedef struct {
    longint cycle;
    int     ytrue [K];
    int     err;
    int     victim;
  } sample_t;

  sample_t pending [$];

  int hc [N][TAPS];     // clean input history per filter
  int hf [N][TAPS];     // faulty input history per filter
  longint cycle = 0;

  int checks = 0, failures = 0;
  int n_corr [K];
  int n_chk  [R];
  int n_absorbed = 0, n_small = 0, n_in = 0, n_coef = 0, n_idle = 0, n_out = 0;

  task automatic cmp(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------- checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      sample_t s;
      n_out++;
      if (pending.size() == 0) begin
        cmp(0, "output without a pending sample");
      end else begin
        s = pending.pop_front();
        cmp(cycle - s.cycle == 2, $sformatf("latency %0d", cycle - s.cycle));
        cmp(!uncorrectable, "uncorrectable flag");
        if (s.err == 0) begin
          bit any_res;
          any_res = 0;
          for (int i = 0; i < K; i++)
            cmp(int'(yc[i]) == s.ytrue[i], $sformatf("clean y%0d=%0d exp %0d", i, yc[i], s.ytrue[i]));
          cmp(syndrome == '0 && !err_data && !err_check, "clean flags");
          for (int j = 0; j < R; j++) if (residue[j] != 0) any_res = 1;
          if (any_res && syndrome == '0) n_absorbed++;
        end else if (s.err > 2 * thr || s.err < -2 * thr) begin
          if (s.victim < K) begin
            int d;
            cmp(int'(syndrome) == col_syn(s.victim), $sformatf("syndrome %b for data %0d", syndrome, s.victim));
            cmp(err_data && int'(err_index) == s.victim && !err_check, "data error flags");
            d = int'(yc[s.victim]) - s.ytrue[s.victim];
            cmp(d >= 0 && d <= thr, $sformatf("rebuilt y%0d off by %0d", s.victim, d));
            for (int i = 0; i < K; i++)
              if (i != s.victim) cmp(int'(yc[i]) == s.ytrue[i], "unaffected output");
            n_corr[s.victim]++;
          end else begin
            cmp(int'(syndrome) == (1 << (s.victim - K)), $sformatf("syndrome %b for check %0d", syndrome, s.victim - K));
            cmp(err_check && !err_data, "check error flags");
            for (int i = 0; i < K; i++) cmp(int'(yc[i]) == s.ytrue[i], "output with check error");
            n_chk[s.victim - K]++;
          end
        end else begin
          for (int i = 0; i < K; i++) begin
            int d;
            d = int'(yc[i]) - s.ytrue[i];
            cmp(d <= 3 * thr && d >= -3 * thr, $sformatf("small error y%0d off by %0d", i, d));
          end
          n_small++;
        end
      end
    end
  end

  // ----------------------------------------------------------- reference
  function automatic int conv(int h[TAPS], int c[TAPS]);
    longint acc = 0;
    for (int l = 0; l < TAPS; l++) acc += longint'(h[l]) * longint'(c[l]);
    return int'(acc >>> 2);
  endfunction

  // Apply one sample (with whatever masks are set) and record its expectation.
  task automatic step();
    bit v;
    v = ($urandom % 8) != 0;
    for (int i = 0; i < K; i++) x[i] = 8'($urandom);
    in_valid = v;
    last_valid = v;
    if (!v) begin
      n_idle++;
    end else begin
      sample_t s;
      int cc [TAPS];
      int cf [TAPS];
      s.err = 0;
      s.victim = -1;
      s.cycle = cycle;       // the clock cycle the sample is presented in
      for (int l = 0; l < TAPS; l++) cc[l] = int'(coef[l]);
      for (int f = 0; f < N; f++) begin
        int clean_in, fault_in, yc_ref, yf_ref;
        if (f < K) begin
          clean_in = int'(x[f]);
          fault_in = int'($signed(8'(x[f] ^ fi_x_mask[f][7:0])));
        end else begin
          logic signed [XC_W-1:0] sum;
          sum = '0;
          for (int i = 0; i < K; i++) if (hm(f - K, i)) sum += XC_W'(x[i]);
          clean_in = int'(sum);
          fault_in = int'($signed(sum ^ fi_x_mask[f]));
        end
        for (int l = TAPS - 1; l > 0; l--) begin
          hc[f][l] = hc[f][l-1];
          hf[f][l] = hf[f][l-1];
        end
        hc[f][0] = clean_in;
        hf[f][0] = fault_in;
        for (int l = 0; l < TAPS; l++) cf[l] = int'($signed(8'(coef[l] ^ fi_coef_mask[f][l])));
        yc_ref = conv(hc[f], cc);
        yf_ref = conv(hf[f], cf);
        if (f < K) s.ytrue[f] = yc_ref;
        if (yf_ref != yc_ref) begin
          if (s.victim >= 0) cmp(0, "two faulty filters in one sample");
          s.victim = f;
          s.err    = yf_ref - yc_ref;
        end
      end
      pending.push_back(s);
    end
    @(posedge clk);
    @(negedge clk);
  endtask

  // Step until TAPS samples have been accepted, so no faulty sample is left
  // in any delay line.
  task automatic flush();
    int nv;
    nv = 0;
    while (nv < TAPS) begin
      step();
      if (last_valid) nv++;
    end
  endtask

  task automatic clear_masks();
    for (int f = 0; f < N; f++) begin
      fi_x_mask[f] = '0;
      for (int l = 0; l < TAPS; l++) fi_coef_mask[f][l] = '0;
    end
  endtask

  task automatic new_coefs();
    for (int l = 0; l < TAPS; l++) coef[l] = 8'($urandom);
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    int episodes;
    thr = 0;
    for (int j = 0; j < R; j++) begin
      int w;
      w = 0;
      for (int i = 0; i < K; i++) if (hm(j, i)) w++;
      if (w - 1 > thr) thr = w - 1;
    end
    for (int i = 0; i < K; i++) n_corr[i] = 0;
    for (int j = 0; j < R; j++) n_chk[j] = 0;
    for (int f = 0; f < N; f++) for (int l = 0; l < TAPS; l++) begin hc[f][l] = 0; hf[f][l] = 0; end
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < K; i++) x[i] = '0;
    new_coefs();
    clear_masks();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cmp(!out_valid && yc[0] == '0 && syndrome == '0, "reset state");

    // fault-free warm-up
    repeat (200) step();

    episodes = N_IN_FAULTS + N_COEF_FAULTS;
    for (int ep = 0; ep < episodes; ep++) begin
      int f;
      bit is_in;
      if (ep % 500 == 0) begin
        new_coefs();
        flush();
      end
      f = int'($urandom % N);
      // interleave the two kinds until each has its quota
      is_in = (ep % 2 == 0) ? (n_in < N_IN_FAULTS) : !(n_coef < N_COEF_FAULTS);
      if (is_in) begin
        int b;
        b = int'($urandom % ((f < K) ? 8 : XC_W));
        n_in++;
        fi_x_mask[f] = XC_W'(1) << b;
        step();
        clear_masks();
        flush();
      end else begin
        int l;
        l = int'($urandom % TAPS);
        n_coef++;
        fi_coef_mask[f][l] = 8'(1) << ($urandom % 8);
        repeat (6) step();
        clear_masks();
        flush();
      end
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    cmp(pending.size() == 0, "samples never reached the output");

    for (int i = 0; i < K; i++) cmp(n_corr[i] > 0, $sformatf("no corrected error on data filter %0d", i));
    for (int j = 0; j < R; j++) cmp(n_chk[j] > 0, $sformatf("no detected error on check filter %0d", j));
    cmp(n_absorbed > 0, "threshold never absorbed a residue");
    cmp(n_small > 0, "no small error seen");
    cmp(n_in > 0 && n_coef > 0 && n_idle > 0, "fault kinds or idle cycles missing");
    $display("K=%0d samples=%0d input_faults=%0d coef_faults=%0d idle=%0d", K, n_out, n_in, n_coef, n_idle);
    for (int i = 0; i < K; i++) $display("  data filter %0d: corrected %0d", i, n_corr[i]);
    for (int j = 0; j < R; j++) $display("  check filter %0d: detected %0d", j, n_chk[j]);
    $display("  residue absorbed by threshold %0d, small errors tolerated %0d", n_absorbed, n_small);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
