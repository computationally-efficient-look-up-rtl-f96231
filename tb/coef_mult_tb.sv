// coef_mult_tb: checks one coefficient multiplication block bit-exactly.
//
// Random basis terms and coefficients (including full-scale values that
// force saturation) are applied with a toggling clock enable. The expected
// output is worked out with 64-bit integers: the sum of the 25 complex
// products, rounded by adding 2^11 and shifting right by 12, saturated to
// 16 bits. A single input with the enable held checks the 2-cycle latency.
module coef_mult_tb;
  import dpd_pkg::*;

  localparam int unsigned N = MP_TAPS * MP_ORDER;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, in_valid = 1'b0;
  cplx_t [MP_TAPS-1:0][MP_ORDER-1:0] in_v = '0;
  cplx_t [N-1:0] coef = '0;
  logic out_valid;
  cplx_t out_y;
  int checks = 0, failures = 0;

  coef_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t exp_q[$];

  function automatic sample_t rs(longint v);
    longint r;
    r = (v + 2048) >>> 12;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return sample_t'(r);
  endfunction

  function automatic cplx_t expected();
    longint re, im;
    cplx_t y;
    re = 0;
    im = 0;
    for (int m = 0; m < MP_TAPS; m++)
      for (int p = 0; p < MP_ORDER; p++) begin
        re += longint'(in_v[m][p].i) * longint'(coef[m*MP_ORDER+p].i)
            - longint'(in_v[m][p].q) * longint'(coef[m*MP_ORDER+p].q);
        im += longint'(in_v[m][p].i) * longint'(coef[m*MP_ORDER+p].q)
            + longint'(in_v[m][p].q) * longint'(coef[m*MP_ORDER+p].i);
      end
    y.i = rs(re);
    y.q = rs(im);
    return y;
  endfunction

  task automatic randomize_inputs(int big);
    for (int m = 0; m < MP_TAPS; m++)
      for (int p = 0; p < MP_ORDER; p++) begin
        in_v[m][p].i = sample_t'($urandom);
        in_v[m][p].q = sample_t'($urandom);
      end
    for (int k = 0; k < N; k++) begin
      coef[k].i = big ? sample_t'($urandom) : sample_t'($signed($urandom_range(0, 1600)) - 800);
      coef[k].q = big ? sample_t'($urandom) : sample_t'($signed($urandom_range(0, 1600)) - 800);
    end
  endtask

  task automatic check_out();
    cplx_t e;
    e = exp_q.pop_front();
    checks++;
    if (out_y != e) begin
      failures++;
      if (failures < 10) $display("got (%0d,%0d) expected (%0d,%0d)", out_y.i, out_y.q, e.i, e.q);
    end
  endtask

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    ce = 1'b1; in_valid = 1'b1;
    randomize_inputs(0);
    exp_q.push_back(expected());
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2) begin
      failures++;
      $display("latency %0d, expected 2", lat);
    end
    check_out();
    repeat (4) @(negedge clk);

    for (int n = 0; n < 2000 || exp_q.size() != 0; n++) begin
      ce = ($urandom_range(0, 3) != 0);
      if (ce && out_valid) check_out();
      in_valid = (n < 2000) && ($urandom_range(0, 4) != 0);
      randomize_inputs(n % 4 == 0);
      if (ce && in_valid) exp_q.push_back(expected());
      @(negedge clk);
      if (n > 10000) break;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
