// cordic_mag_tb: checks the CORDIC magnitude against sqrt(I^2 + Q^2).
//
// Random Q1.15 samples (plus the corner cases on the axes and at full
// scale) are fed with a randomly toggling clock enable. Every output is
// compared with the real-valued magnitude, saturated at 32767, within 3 LSB,
// and the sample carried along must come out unchanged. A single sample with
// the enable held high checks the latency of ITER + 2 cycles.
module cordic_mag_tb;
  import dpd_pkg::*;

  localparam int unsigned ITER = 16;
  localparam int unsigned LAT  = ITER + 2;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, in_valid = 1'b0;
  sample_t in_i = '0, in_q = '0;
  logic out_valid;
  logic [15:0] out_mag;
  sample_t out_i, out_q;
  int checks = 0, failures = 0;

  cordic_mag #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t qi[$], qq[$];

  function automatic int ref_mag(sample_t i, sample_t q);
    real r;
    r = $sqrt(real'(i) * real'(i) + real'(q) * real'(q));
    if (r > 32767.0) r = 32767.0;
    return int'(r);
  endfunction

  task automatic check_out();
    sample_t ei, eq;
    int e, d;
    ei = qi.pop_front();
    eq = qq.pop_front();
    e  = ref_mag(ei, eq);
    d  = int'(out_mag) - e;
    checks++;
    if (d > 3 || d < -3 || out_i != ei || out_q != eq) begin
      failures++;
      if (failures < 10)
        $display("mismatch x=(%0d,%0d) mag=%0d expected %0d", ei, eq, out_mag, e);
    end
  endtask

  sample_t corner_i [8] = '{16'sd32767, -16'sd32768, 16'sd0, 16'sd0, 16'sd23170, -16'sd23170, 16'sd1, 16'sd0};
  sample_t corner_q [8] = '{16'sd0, 16'sd0, 16'sd32767, -16'sd32768, 16'sd23170, -16'sd23170, -16'sd1, 16'sd0};

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Latency of one sample with ce held high.
    ce = 1'b1; in_valid = 1'b1; in_i = 16'sd12000; in_q = -16'sd9000;
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
    checks++;
    if (int'(out_mag) - ref_mag(12000, -9000) > 3 || ref_mag(12000, -9000) - int'(out_mag) > 3) begin
      failures++;
      $display("magnitude %0d of (12000,-9000)", out_mag);
    end
    repeat (LAT + 2) @(negedge clk);

    // Stream with random enable.
    for (int n = 0; n < 3000 || qi.size() != 0; n++) begin
      ce = ($urandom_range(0, 3) != 0);
      if (ce && out_valid) check_out();
      in_valid = (n < 3000) && ($urandom_range(0, 4) != 0);
      if (n < 8) begin
        in_i = corner_i[n]; in_q = corner_q[n];
      end else begin
        in_i = sample_t'($urandom);
        in_q = sample_t'($urandom);
      end
      if (ce && in_valid) begin
        qi.push_back(in_i);
        qq.push_back(in_q);
      end
      @(negedge clk);
      if (n > 10000) break;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
