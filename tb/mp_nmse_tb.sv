// mp_nmse_tb: accuracy of the fixed-point memory polynomial, measured as the
// normalised mean square error (NMSE) against the real-valued model.
//
// Two cores run side by side on the same stream: the predistorter
// configuration (order 5, 5 taps) and a smaller behavioural-model
// configuration (order 3, 3 taps). The stimulus is 30,000 complex samples
// with Gaussian I and Q at -12 dBFS rms, clipped at 0.99 of full scale, a
// stand-in for an OFDM-like multi-carrier signal; the validation sets used
// to judge such models are of this length. Coefficients are a dominant
// linear term plus random small nonlinear and memory terms.
//   NMSE = 10 log10( sum |y_hw - y_ref|^2 / sum |y_ref|^2 )
// must be below -60 dB for both, far below the -25 .. -46 dB at which
// predistorters and amplifier models of this kind are typically judged, so
// the datapath precision does not limit them. The measured NMSE is printed.
module mp_nmse_tb;
  import dpd_pkg::*;
  import mp_ref_pkg::*;

  localparam int unsigned NSAMP = 30000;
  localparam int unsigned NBEAT = NSAMP / LANES;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BEAT_W-1:0] s_tdata = '0;
  logic s_tvalid = 1'b0;
  logic we5 = 1'b0, commit5 = 1'b0, we3 = 1'b0, commit3 = 1'b0;
  logic [COEF_AW-1:0] coef_addr = '0;
  cplx_t coef_data = '0;
  int checks = 0, failures = 0;

  // order 5 / 5 taps
  logic [BEAT_W-1:0] y5;
  logic v5, l5, r5;
  mp_core u_dpd (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(1'b0), .s_axis_tready(r5),
    .m_axis_tdata(y5), .m_axis_tvalid(v5), .m_axis_tlast(l5), .m_axis_tready(1'b1),
    .coef_we(we5), .coef_addr, .coef_data, .coef_commit(commit5)
  );

  // order 3 / 3 taps
  logic [BEAT_W-1:0] y3;
  logic v3, l3, r3;
  mp_core #(.ORDER(3), .TAPS(3)) u_bm (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(1'b0), .s_axis_tready(r3),
    .m_axis_tdata(y3), .m_axis_tvalid(v3), .m_axis_tlast(l3), .m_axis_tready(1'b1),
    .coef_we(we3), .coef_addr, .coef_data, .coef_commit(commit3)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t sig [NSAMP];
  cplx_t c5 [], c3 [];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic sample_t clip(real v);
    if (v > 0.99 * 32768.0) v = 0.99 * 32768.0;
    if (v < -0.99 * 32768.0) v = -0.99 * 32768.0;
    return sample_t'($rtoi(v));
  endfunction

  // NMSE accumulators: [0] order 5, [1] order 3
  real err [2] = '{0.0, 0.0};
  real pwr [2] = '{0.0, 0.0};
  int  nout [2] = '{0, 0};

  task automatic accumulate(int which, logic [BEAT_W-1:0] y, int order, int taps, cplx_t c []);
    cplx_t h [];
    cplx_t g;
    real re, im;
    int n;
    h = new[taps];
    for (int j = 0; j < LANES; j++) begin
      n = nout[which];
      for (int m = 0; m < taps; m++) h[m] = (n - m >= 0) ? sig[n-m] : '0;
      mp_out_gen(h, c, order, taps, re, im);
      re = sat(re);
      im = sat(im);
      g = cplx_t'(y[32*j +: 32]);
      err[which] += (real'(g.i) - re) ** 2 + (real'(g.q) - im) ** 2;
      pwr[which] += re ** 2 + im ** 2;
      nout[which]++;
    end
  endtask

  always @(negedge clk) begin
    if (v5) accumulate(0, y5, 5, 5, c5);
    if (v3) accumulate(1, y3, 3, 3, c3);
  end

  initial begin
    real sigma, nmse;
    sigma = 32768.0 * (10.0 ** (-12.0 / 20.0)) / $sqrt(2.0);
    for (int n = 0; n < NSAMP; n++) begin
      sig[n].i = clip(sigma * gauss());
      sig[n].q = clip(sigma * gauss());
    end
    c5 = new[25];
    c3 = new[9];
    for (int k = 0; k < 25; k++) begin
      c5[k].i = sample_t'($signed($urandom_range(0, 300)) - 150);
      c5[k].q = sample_t'($signed($urandom_range(0, 300)) - 150);
    end
    c5[0] = '{q: 16'sd120, i: 16'sd4096};
    for (int k = 0; k < 9; k++) begin
      c3[k].i = sample_t'($signed($urandom_range(0, 600)) - 300);
      c3[k].q = sample_t'($signed($urandom_range(0, 600)) - 300);
    end
    c3[0] = '{q: -16'sd200, i: 16'sd3900};

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 25; k++) begin
      we5 = 1'b1; coef_addr = COEF_AW'(k); coef_data = c5[k];
      @(negedge clk);
    end
    we5 = 1'b0;
    for (int k = 0; k < 9; k++) begin
      we3 = 1'b1; coef_addr = COEF_AW'(k); coef_data = c3[k];
      @(negedge clk);
    end
    we3 = 1'b0; commit5 = 1'b1; commit3 = 1'b1;
    @(negedge clk);
    commit5 = 1'b0; commit3 = 1'b0;

    for (int b = 0; b < NBEAT; b++) begin
      for (int j = 0; j < LANES; j++) s_tdata[32*j +: 32] = sig[b*LANES+j];
      s_tvalid = 1'b1;
      @(negedge clk);
    end
    s_tvalid = 1'b0;
    repeat (40) @(negedge clk);

    for (int w = 0; w < 2; w++) begin
      nmse = 10.0 * $log10(err[w] / pwr[w]);
      $display("%s: %0d samples, NMSE %0.1f dB", (w == 0) ? "order 5, 5 taps" : "order 3, 3 taps",
               nout[w], nmse);
      checks++;
      if (nout[w] != NBEAT * LANES) begin
        failures++;
        $display("expected %0d output samples", NBEAT * LANES);
      end
      checks++;
      if (!(nmse < -60.0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
