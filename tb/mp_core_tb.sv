// mp_core_tb: end-to-end check of the parallel memory polynomial core.
//
// 1. After reset the core must pass samples through unchanged (identity set).
// 2. A random coefficient set is written and committed; random beats are
//    streamed with random gaps on the input and random backpressure on the
//    output. Every output sample is compared with the real-valued reference
//    model, which uses the full sample history across beat boundaries, within
//    24 LSB. tlast must come out with its beat.
// 3. A second set is written into the shadow bank while streaming but not
//    committed: the outputs must still follow the first set. After the
//    commit they must follow the second.
// 4. With the output always ready, 64 back-to-back beats must come out on 64
//    consecutive cycles (8 samples per clock), the first one LATENCY = 24
//    cycles after it entered.
module mp_core_tb;
  import dpd_pkg::*;
  import mp_ref_pkg::*;

  localparam int unsigned LAT = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BEAT_W-1:0] s_axis_tdata = '0, m_axis_tdata;
  logic s_axis_tvalid = 1'b0, s_axis_tlast = 1'b0, s_axis_tready;
  logic m_axis_tvalid, m_axis_tlast, m_axis_tready = 1'b0;
  logic coef_we = 1'b0, coef_commit = 1'b0;
  logic [COEF_AW-1:0] coef_addr = '0;
  cplx_t coef_data = '0;
  int checks = 0, failures = 0;

  mp_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t hist_all[$];          // every accepted sample, in order
  cplx_t cur_coef [NUM_COEF];  // set the outputs must follow
  cplx_t out_exp [$];          // expected outputs (in order)
  logic  last_q [$];
  int    tol = 0;              // 0: exact compare, else tolerance in LSB

  function automatic cplx_t rand_sample();
    cplx_t x;
    int amp;
    amp = $urandom_range(100, 22000);
    x.i = sample_t'($signed($urandom_range(0, 2 * amp)) - amp);
    x.q = sample_t'($signed($urandom_range(0, 2 * amp)) - amp);
    return x;
  endfunction

  task automatic random_set(output cplx_t c [NUM_COEF]);
    for (int k = 0; k < NUM_COEF; k++) begin
      c[k].i = sample_t'($signed($urandom_range(0, 240)) - 120);
      c[k].q = sample_t'($signed($urandom_range(0, 240)) - 120);
    end
    c[0].i = sample_t'(3500 + $urandom_range(0, 600));
  endtask

  task automatic write_set(input cplx_t c [NUM_COEF]);
    for (int k = 0; k < NUM_COEF; k++) begin
      coef_we = 1'b1; coef_addr = COEF_AW'(k); coef_data = c[k];
      @(negedge clk);
    end
    coef_we = 1'b0;
  endtask

  task automatic commit();
    coef_commit = 1'b1;
    @(negedge clk);
    coef_commit = 1'b0;
  endtask

  // Record one accepted beat and the outputs it must produce.
  task automatic accept_beat(logic [BEAT_W-1:0] d, logic last);
    cplx_t h [MP_TAPS];
    real re, im;
    cplx_t e;
    for (int j = 0; j < LANES; j++) begin
      hist_all.push_back(cplx_t'(d[32*j +: 32]));
      for (int m = 0; m < MP_TAPS; m++)
        h[m] = (hist_all.size() > m) ? hist_all[hist_all.size()-1-m] : '0;
      mp_out(h, cur_coef, re, im);
      e.i = sample_t'($rtoi(sat(re) + ((re < 0) ? -0.5 : 0.5)));
      e.q = sample_t'($rtoi(sat(im) + ((im < 0) ? -0.5 : 0.5)));
      out_exp.push_back(e);
    end
    last_q.push_back(last);
  endtask

  task automatic check_beat();
    cplx_t e, g;
    logic l;
    for (int j = 0; j < LANES; j++) begin
      e = out_exp.pop_front();
      g = cplx_t'(m_axis_tdata[32*j +: 32]);
      checks++;
      if ((tol == 0 && g != e) ||
          absr(real'(g.i) - real'(e.i)) > real'(tol) || absr(real'(g.q) - real'(e.q)) > real'(tol)) begin
        failures++;
        if (failures < 10) $display("lane %0d got (%0d,%0d) expected (%0d,%0d)", j, g.i, g.q, e.i, e.q);
      end
    end
    l = last_q.pop_front();
    checks++;
    if (m_axis_tlast != l) begin
      failures++;
      $display("tlast %0d expected %0d", m_axis_tlast, l);
    end
  endtask

  // Stream nbeats beats with random gaps and backpressure until all come out.
  task automatic stream(int nbeats, int gaps);
    int sent = 0;
    while (sent < nbeats || out_exp.size() != 0) begin
      s_axis_tvalid = (sent < nbeats) && (gaps == 0 || $urandom_range(0, 3) != 0);
      for (int j = 0; j < LANES; j++) s_axis_tdata[32*j +: 32] = rand_sample();
      s_axis_tlast  = ($urandom_range(0, 7) == 0);
      m_axis_tready = (gaps == 0 || $urandom_range(0, 2) != 0);
      #1;
      if (m_axis_tvalid && m_axis_tready) check_beat();
      if (s_axis_tvalid && s_axis_tready) begin
        accept_beat(s_axis_tdata, s_axis_tlast);
        sent++;
      end
      @(negedge clk);
    end
    s_axis_tvalid = 1'b0;
  endtask

  initial begin
    cplx_t set_a [NUM_COEF], set_b [NUM_COEF];
    int lat, run, first;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. identity after reset, exact
    for (int k = 0; k < NUM_COEF; k++) cur_coef[k] = '0;
    cur_coef[0].i = 16'sd4096;
    tol = 0;
    stream(40, 1);

    // 2. random set with random flow control
    random_set(set_a);
    write_set(set_a);
    commit();
    cur_coef = set_a;
    tol = 24;
    stream(300, 1);

    // 3. shadow write without commit changes nothing; commit switches
    random_set(set_b);
    fork
      write_set(set_b);
      stream(100, 1);
    join
    commit();
    cur_coef = set_b;
    stream(200, 1);

    // 4. latency and throughput with the output always ready
    repeat (LAT + 4) @(negedge clk);
    lat = 0; run = 0; first = -1;
    for (int c = 0; c < 64 + LAT + 10; c++) begin
      s_axis_tvalid = (c < 64);
      for (int j = 0; j < LANES; j++) s_axis_tdata[32*j +: 32] = rand_sample();
      s_axis_tlast  = (c == 63);
      m_axis_tready = 1'b1;
      #1;
      if (m_axis_tvalid) begin
        check_beat();
        run++;
        if (first < 0) first = c;
      end
      if (s_axis_tvalid && s_axis_tready) accept_beat(s_axis_tdata, s_axis_tlast);
      @(negedge clk);
    end
    s_axis_tvalid = 1'b0;
    checks++;
    if (first != LAT || run != 64) begin
      failures++;
      $display("first output after %0d cycles (expected %0d), %0d beats in a row", first, LAT, run);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
