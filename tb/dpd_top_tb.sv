// dpd_top_tb: end-to-end test of the multi-standard predistorter at its
// default sizes (8750-beat signal buffer, 1024-sample power window).
//
// The host side is modelled with AXI4-Lite writes and reads and an
// AXI-Stream source; the RF data converter side is a sink with random
// backpressure. Eight coefficient sets, each with its own linear gain and
// random memory/nonlinear terms, are loaded into the LUT. Then:
//   A. a full 70,000-sample constant-envelope signal at -8 dBFS is loaded
//      and played as 5G: the table puts 5G at -8 dBFS in set 3 (index 2);
//   B. the same signal is declared 4G: -8 dBFS is above 4G's last level
//      (-11 dBFS), so set 8 (index 7) must be chosen;
//   C. manual selection of set index 5;
//   D. a new, 40-beat signal at -17 dBFS is loaded and played as 3G: the
//      table puts 3G at -17 dBFS in set 4 (index 3).
// In each phase, once the status register reports the expected set, every
// output sample is compared with the real-valued memory polynomial of that
// set over the looping input signal (tolerance 24 LSB). Each mechanism
// (output stall, automatic set change, standard switch, manual selection,
// buffer wrap-around, reload) is counted and must have happened.
module dpd_top_tb;
  import dpd_pkg::*;
  import mp_ref_pkg::*;

  localparam int unsigned FULL_BEATS = 8750;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 1'b0, s_axil_awready;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0] s_axil_wstrb = 4'hf;
  logic s_axil_wvalid = 1'b0, s_axil_wready;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready = 1'b0;
  logic s_axil_arvalid = 1'b0, s_axil_arready;
  logic s_axil_rvalid, s_axil_rready = 1'b0;
  logic [BEAT_W-1:0] s_axis_tdata = '0, m_axis_tdata;
  logic s_axis_tvalid = 1'b0, s_axis_tlast = 1'b0, s_axis_tready;
  logic m_axis_tvalid, m_axis_tlast, m_axis_tready = 1'b0;
  int checks = 0, failures = 0;

  dpd_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("failed: %s", what);
    end
  endtask

  // ---------------- AXI4-Lite host ----------------
  task automatic axil_write(logic [11:0] addr, logic [31:0] data);
    s_axil_awaddr = addr; s_axil_wdata = data;
    s_axil_awvalid = 1'b1; s_axil_wvalid = 1'b1;
    #1;
    while (!s_axil_awready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    s_axil_bready = 1'b1;
    #1;
    while (!s_axil_bvalid) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    s_axil_bready = 1'b0;
  endtask

  task automatic axil_read(logic [11:0] addr, output logic [31:0] data);
    s_axil_araddr = addr; s_axil_arvalid = 1'b1;
    #1;
    while (!s_axil_arready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    s_axil_arvalid = 1'b0;
    s_axil_rready = 1'b1;
    #1;
    while (!s_axil_rvalid) begin
      @(negedge clk);
      #1;
    end
    data = s_axil_rdata;
    @(negedge clk);
    s_axil_rready = 1'b0;
  endtask

  // ---------------- signal and coefficient models ----------------
  cplx_t sig [FULL_BEATS * LANES];
  int    sig_len = 0;                  // samples in the loaded signal
  cplx_t lut_model [NUM_SETS][NUM_COEF];

  task automatic make_signal(int beats, real db);
    real a, ph;
    a = 32768.0 * (10.0 ** (db / 20.0));
    for (int n = 0; n < beats * LANES; n++) begin
      ph = real'($urandom_range(0, 62831)) / 10000.0;
      sig[n].i = sample_t'($rtoi(a * $cos(ph)));
      sig[n].q = sample_t'($rtoi(a * $sin(ph)));
    end
    sig_len = beats * LANES;
  endtask

  task automatic load_signal(int beats);
    logic [31:0] d;
    axil_write(12'h000, 32'h2);  // load_en only
    for (int b = 0; b < beats; b++) begin
      for (int j = 0; j < LANES; j++) s_axis_tdata[32*j +: 32] = sig[b*LANES+j];
      s_axis_tlast  = (b == beats - 1);
      s_axis_tvalid = 1'b1;
      #1;
      while (!s_axis_tready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    s_axis_tvalid = 1'b0;
    axil_read(12'h014, d);
    check(d == 32'(beats), $sformatf("buffer length %0d, expected %0d", d, beats));
  endtask

  // ---------------- output checker ----------------
  bit  checking = 1'b0;
  int  exp_set = 0;
  int  out_beat = 0;          // output beats since playback (re)started
  int  checked_beats = 0;
  int  n_stall = 0, n_wrap = 0;
  cplx_t cur [NUM_COEF];

  always @(negedge clk) begin
    m_axis_tready = ($urandom_range(0, 3) != 0);
    #1;
    if (m_axis_tvalid && !m_axis_tready) n_stall++;
    if (m_axis_tvalid && m_axis_tready) begin
      if (m_axis_tlast) n_wrap++;
      if (checking && out_beat > 0) begin
        cplx_t h [MP_TAPS];
        real re, im;
        int n;
        cplx_t e, g;
        cur = lut_model[exp_set];
        for (int j = 0; j < LANES; j++) begin
          n = ((out_beat * LANES) % sig_len) + j;
          for (int m = 0; m < MP_TAPS; m++) h[m] = sig[(n - m + sig_len) % sig_len];
          mp_out(h, cur, re, im);
          e.i = sample_t'($rtoi(sat(re)));
          e.q = sample_t'($rtoi(sat(im)));
          g = cplx_t'(m_axis_tdata[32*j +: 32]);
          checks++;
          if (absr(real'(g.i) - real'(e.i)) > 24.0 || absr(real'(g.q) - real'(e.q)) > 24.0) begin
            failures++;
            if (failures < 15)
              $display("beat %0d lane %0d set %0d: got (%0d,%0d) expected (%0d,%0d)",
                       out_beat, j, exp_set, g.i, g.q, e.i, e.q);
          end
        end
        checked_beats++;
      end
      out_beat++;
    end
  end

  // ---------------- phase helpers ----------------
  int n_set_change = 0, last_active = -1;

  task automatic wait_set(int set, bit want_meas);
    logic [31:0] st;
    int tries = 0;
    do begin
      axil_read(12'h00C, st);
      if (int'(st[2:0]) != last_active) begin
        if (last_active >= 0) n_set_change++;
        last_active = int'(st[2:0]);
      end
      tries++;
    end while ((int'(st[2:0]) != set || (want_meas && (!st[16] || int'(st[10:8]) != set)))
               && tries < 5000);
    check(tries < 5000, $sformatf("set %0d reached (status %h)", set, st));
  endtask

  task automatic check_phase(int set, int beats);
    repeat (120) @(negedge clk);   // let in-flight samples of the old set drain
    exp_set = set;
    checked_beats = 0;
    checking = 1'b1;
    while (checked_beats < beats) @(negedge clk);
    checking = 1'b0;
  endtask

  initial begin
    int n_std_switch = 0, n_manual = 0, n_reload = 0;
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // coefficient sets: linear gain grows with the set, random small terms
    for (int s = 0; s < NUM_SETS; s++)
      for (int k = 0; k < NUM_COEF; k++) begin
        lut_model[s][k].i = sample_t'($signed($urandom_range(0, 200)) - 100);
        lut_model[s][k].q = sample_t'($signed($urandom_range(0, 200)) - 100);
        if (k == 0) lut_model[s][k].i = sample_t'(3000 + 200 * s);
        axil_write(12'h400 + 12'(4 * (s * 32 + k)), lut_model[s][k]);
      end

    // A: full-length signal, 5G at -8 dBFS -> index 2
    make_signal(FULL_BEATS, -8.0);
    load_signal(FULL_BEATS);
    axil_write(12'h004, 32'(STD_5G));
    out_beat = 0;
    axil_write(12'h000, 32'hD);    // play, auto, update
    wait_set(2, 1'b1);
    axil_read(12'h010, d);
    check(real'(d) > 0.97 * 1073741824.0 * (10.0 ** -0.8) &&
          real'(d) < 1.03 * 1073741824.0 * (10.0 ** -0.8), "measured power of -8 dBFS");
    check_phase(2, FULL_BEATS + 200);

    // B: same signal declared 4G -> index 7
    axil_write(12'h004, 32'(STD_4G));
    n_std_switch++;
    wait_set(7, 1'b1);
    check_phase(7, 400);

    // C: manual selection
    axil_write(12'h008, 32'd5);
    axil_write(12'h000, 32'h9);    // play, update, manual
    n_manual++;
    wait_set(5, 1'b0);
    check_phase(5, 400);

    // D: reload a short 3G signal at -17 dBFS -> index 3
    axil_write(12'h000, 32'h0);
    repeat (60) @(negedge clk);    // drain the pipeline
    make_signal(40, -17.0);
    load_signal(40);
    n_reload++;
    axil_write(12'h004, 32'(STD_3G));
    n_std_switch++;
    out_beat = 0;
    axil_write(12'h000, 32'hD);
    wait_set(3, 1'b1);
    check_phase(3, 400);

    $display("mechanisms: stalls=%0d set_changes=%0d std_switches=%0d manual=%0d wraps=%0d reloads=%0d",
             n_stall, n_set_change, n_std_switch, n_manual, n_wrap, n_reload);
    check(n_stall > 0, "output stall happened");
    check(n_set_change >= 3, "set changed");
    check(n_std_switch > 0 && n_manual > 0 && n_reload > 0, "mode switches happened");
    check(n_wrap > 2, "buffer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
