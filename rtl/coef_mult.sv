// coef_mult: coefficient multiplication block of one output lane.
//
// Computes one predistorted sample
//   y(n) = sum_{m=0}^{TAPS-1} sum_{p=1}^{ORDER} c_{m,p} * v_p(n-m)
// from the basis terms of the current and the TAPS-1 preceding samples.
// Basis terms are Q1.15, coefficients Q(16-CFRAC).CFRAC. Stage 1 registers
// the TAPS*ORDER full-precision complex products (four real multiplies
// each); stage 2 adds them, rounds away CFRAC bits to return to Q1.15, and
// saturates to the 16-bit range.
//
// Interface: in_v[m][p-1] is v_p(n-m); coef[m*ORDER+p-1] is c_{m,p}
// (dpd_pkg::coef_index). out_y/out_valid follow in_valid by 2 enabled
// cycles; ce stalls both stages. The sum of products follows the published
// design; the two-stage split, rounding and saturation are this design's.
module coef_mult #(
  parameter int unsigned ORDER = dpd_pkg::MP_ORDER,
  parameter int unsigned TAPS  = dpd_pkg::MP_TAPS,
  parameter int unsigned CFRAC = dpd_pkg::COEF_FRAC
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  ce,
  input  logic                                  in_valid,
  input  dpd_pkg::cplx_t [TAPS-1:0][ORDER-1:0]  in_v,
  input  dpd_pkg::cplx_t [TAPS*ORDER-1:0]       coef,
  output logic                                  out_valid,
  output dpd_pkg::cplx_t                        out_y
);
  import dpd_pkg::*;

  localparam int unsigned N     = TAPS * ORDER;
  localparam int unsigned PW    = 2 * SAMPLE_W + 1;      // one complex product part
  localparam int unsigned ACC_W = PW + $clog2(N) + 1;

  logic signed [PW-1:0] prod_re [N];
  logic signed [PW-1:0] prod_im [N];
  logic                 v1;

  always_ff @(posedge clk) begin
    if (ce) begin
      for (int m = 0; m < TAPS; m++) begin
        for (int p = 0; p < ORDER; p++) begin
          prod_re[m*ORDER+p] <= PW'(in_v[m][p].i) * PW'(coef[m*ORDER+p].i)
                              - PW'(in_v[m][p].q) * PW'(coef[m*ORDER+p].q);
          prod_im[m*ORDER+p] <= PW'(in_v[m][p].i) * PW'(coef[m*ORDER+p].q)
                              + PW'(in_v[m][p].q) * PW'(coef[m*ORDER+p].i);
        end
      end
    end
  end

  // Round a Q.(15+CFRAC) sum to Q1.15 and saturate.
  function automatic sample_t round_sat(logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] r;
    r = (a + (ACC_W'(1) <<< (CFRAC - 1))) >>> CFRAC;
    if (r > ACC_W'(32767))       return 16'sh7fff;
    else if (r < -ACC_W'(32768)) return 16'sh8000;
    else                         return sample_t'(r);
  endfunction

  logic signed [ACC_W-1:0] sum_re, sum_im;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int k = 0; k < N; k++) begin
      sum_re += ACC_W'(prod_re[k]);
      sum_im += ACC_W'(prod_im[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      out_y.i <= round_sat(sum_re);
      out_y.q <= round_sat(sum_im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else if (ce) begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
