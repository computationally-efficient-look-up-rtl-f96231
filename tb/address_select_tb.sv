// address_select_tb: checks power measurement, set choice and the
// coefficient update sweep.
//
// A behavioural LUT with a one-cycle read is filled with random words. For
// each standard (3G, 4G, 5G) the monitored stream carries constant-envelope
// samples at the power of every set of the power table (set k at
// base + k-1 dBFS) and at levels below the first and above the last set. The
// measured mean power must match |x|^2 of the samples, the measured set must
// be the table's set, and the next complete sweep must write all 25 words
// of that set to the coefficient port and commit it, one sweep every
// 2*25 + 2 cycles. In manual mode the sweep must follow manual_set instead.
// A short window (64 samples) keeps the run short.
module address_select_tb;
  import dpd_pkg::*;

  localparam int unsigned WIN_LOG2 = 6;
  localparam int unsigned AWL      = SET_W + COEF_AW;
  int base_db [3] = '{-20, -18, -10};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BEAT_W-1:0] mon_tdata = '0;
  logic mon_fire = 1'b0;
  std_e std_sel = STD_3G;
  logic auto_sel = 1'b1, upd_en = 1'b0;
  logic [SET_W-1:0] manual_set = '0;
  logic lut_re;
  logic [AWL-1:0] lut_raddr;
  cplx_t lut_rdata;
  logic coef_we, coef_commit;
  logic [COEF_AW-1:0] coef_addr;
  cplx_t coef_data;
  logic [31:0] mean_pow;
  logic pow_valid;
  logic [SET_W-1:0] meas_set, active_set;
  int checks = 0, failures = 0;

  address_select #(.WIN_LOG2(WIN_LOG2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural coefficient LUT
  cplx_t lut [1 << AWL];
  always_ff @(posedge clk) if (lut_re) lut_rdata <= lut[lut_raddr];

  // coefficient port monitor
  cplx_t wr [NUM_COEF];
  cplx_t committed [NUM_COEF];
  int commits = 0, cyc = 0, last_commit = 0, period = 0;
  always @(negedge clk) begin
    cyc++;
    if (coef_we && coef_addr < NUM_COEF) wr[coef_addr] = coef_data;
    if (coef_commit) begin
      committed = wr;
      period = cyc - last_commit;
      last_commit = cyc;
      commits++;
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("failed: %s", what);
    end
  endtask

  // Drive beats at a power of db dBFS for n windows.
  task automatic drive(real db, int windows);
    real a, ph;
    cplx_t x;
    for (int b = 0; b < windows * ((1 << WIN_LOG2) / LANES); b++) begin
      for (int j = 0; j < LANES; j++) begin
        a  = 32768.0 * (10.0 ** (db / 20.0));
        ph = real'($urandom_range(0, 62831)) / 10000.0;
        x.i = sample_t'($rtoi(a * $cos(ph)));
        x.q = sample_t'($rtoi(a * $sin(ph)));
        mon_tdata[32*j +: 32] = x;
      end
      mon_fire = 1'b1;
      @(negedge clk);
      mon_fire = 1'b0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    mon_fire = 1'b0;
  endtask

  task automatic wait_commits(int n);
    int c0 = commits;
    while (commits < c0 + n) @(negedge clk);
  endtask

  initial begin
    int exp_set, c_before;
    real lvl, measured, ideal;
    for (int k = 0; k < (1 << AWL); k++) lut[k] = cplx_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    upd_en = 1'b1;

    for (int s = 0; s < 3; s++) begin
      std_sel = std_e'(s);
      for (int k = -1; k <= int'(NUM_SETS); k++) begin
        lvl = real'(base_db[s] + k) + (($urandom_range(0, 1) == 1) ? 0.3 : -0.3);
        if (k == -1) lvl = real'(base_db[s]) - 4.0;
        if (k == int'(NUM_SETS)) lvl = real'(base_db[s]) + real'(NUM_SETS) + 2.0;
        exp_set = (k < 0) ? 0 : (k >= int'(NUM_SETS)) ? int'(NUM_SETS) - 1 : k;
        drive(lvl, 3);
        check(pow_valid, "power measured");
        ideal = 1073741824.0 * (10.0 ** (lvl / 10.0));
        measured = real'(mean_pow);
        check(measured > ideal * 0.97 && measured < ideal * 1.03, "mean power");
        check(meas_set == SET_W'(exp_set), $sformatf("std %0d level %f: set %0d expected %0d",
                                                     s, lvl, meas_set, exp_set));
        wait_commits(2);
        check(active_set == SET_W'(exp_set), "active set after sweep");
        for (int c = 0; c < NUM_COEF; c++)
          check(committed[c] == lut[{SET_W'(exp_set), COEF_AW'(c)}], "committed coefficient");
        check(period == 2 * NUM_COEF + 2, $sformatf("sweep period %0d", period));
      end
    end

    // manual mode
    auto_sel = 1'b0;
    for (int m = 0; m < NUM_SETS; m++) begin
      manual_set = SET_W'(m);
      wait_commits(2);
      check(active_set == SET_W'(m), "manual set active");
      for (int c = 0; c < NUM_COEF; c++)
        check(committed[c] == lut[{SET_W'(m), COEF_AW'(c)}], "manual committed coefficient");
    end

    // no sweep while disabled
    upd_en = 1'b0;
    repeat (60) @(negedge clk);
    c_before = commits;
    repeat (200) @(negedge clk);
    check(commits == c_before, "no commit while update disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
