// basis_gen_tb: checks the basis terms x|x|^(p-1), p = 1..5.
//
// Random samples of random amplitude are streamed with a toggling clock
// enable; each of the five basis terms is compared with the real-valued
// reference within 8 LSB (the CORDIC and the rounded power chain each add
// about one LSB per multiplication). The first term must equal x exactly.
// A single sample with the enable held checks the 22-cycle latency.
module basis_gen_tb;
  import dpd_pkg::*;
  import mp_ref_pkg::*;

  localparam int unsigned LAT = 16 + 2 + 3 + 1;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, in_valid = 1'b0;
  cplx_t in_x = '0;
  logic out_valid;
  cplx_t [MP_ORDER-1:0] out_v;
  int checks = 0, failures = 0;

  basis_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t q[$];

  function automatic cplx_t rand_sample();
    cplx_t x;
    int amp;
    amp  = $urandom_range(1, 23000);
    x.i  = sample_t'($signed($urandom_range(0, 2 * amp)) - amp);
    x.q  = sample_t'($signed($urandom_range(0, 2 * amp)) - amp);
    return x;
  endfunction

  task automatic check_out();
    cplx_t x;
    real re, im;
    x = q.pop_front();
    for (int p = 1; p <= MP_ORDER; p++) begin
      basis(x, p, re, im);
      checks++;
      if (absr(real'(out_v[p-1].i) - re) > 8.0 || absr(real'(out_v[p-1].q) - im) > 8.0 ||
          (p == 1 && out_v[0] != x)) begin
        failures++;
        if (failures < 10)
          $display("p=%0d x=(%0d,%0d) got (%0d,%0d) expected (%f,%f)",
                   p, x.i, x.q, out_v[p-1].i, out_v[p-1].q, re, im);
      end
    end
  endtask

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    ce = 1'b1; in_valid = 1'b1; in_x = '{q: 16'sd15000, i: -16'sd20000};
    q.push_back(in_x);
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", lat, LAT);
    end
    check_out();
    repeat (LAT + 2) @(negedge clk);

    for (int n = 0; n < 3000 || q.size() != 0; n++) begin
      ce = ($urandom_range(0, 3) != 0);
      if (ce && out_valid) check_out();
      in_valid = (n < 3000) && ($urandom_range(0, 4) != 0);
      in_x = rand_sample();
      if (ce && in_valid) q.push_back(in_x);
      @(negedge clk);
      if (n > 10000) break;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
