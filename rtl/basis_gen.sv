// basis_gen: memory polynomial basis generator for one sample stream.
//
// For an input sample x it produces the ORDER basis terms
//   v_p = x * |x|^(p-1),  p = 1 .. ORDER
// which the coefficient multiplication blocks weight and sum. The magnitude
// |x| comes from a pipelined CORDIC (cordic_mag). The powers |x|^2 ..
// |x|^(ORDER-1) are then built one per pipeline stage by multiplying the
// previous power by |x|, and a final stage multiplies x by every power. All
// values are Q1.15; products are rounded to nearest and, because |x| <= 1,
// never exceed the range of x itself.
//
// Interface: in_valid/in_x enter; out_valid/out_v leave LATENCY enabled
// cycles later, with out_v[p-1] holding v_p. ce stalls the whole pipeline.
// Latency = (ITER + 2) + (ORDER - 2) + 1, 22 cycles with the defaults.
// The basis function follows the published design (one basis generator per
// sample, helped by a CORDIC); the pipelining and rounding are this design's.
module basis_gen #(
  parameter int unsigned ORDER = dpd_pkg::MP_ORDER,
  parameter int unsigned ITER  = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           ce,
  input  logic                           in_valid,
  input  dpd_pkg::cplx_t                 in_x,
  output logic                           out_valid,
  output dpd_pkg::cplx_t [ORDER-1:0]     out_v
);
  import dpd_pkg::*;

  localparam int unsigned NPOW = ORDER - 1;     // powers |x|^1 .. |x|^(ORDER-1)
  localparam int unsigned PSTG = (ORDER > 2) ? ORDER - 2 : 0;  // power stages

  logic        c_valid;
  logic [15:0] c_mag;
  sample_t     c_i, c_q;

  cordic_mag #(.ITER(ITER)) u_cordic (
    .clk, .rst_n, .ce,
    .in_valid (in_valid),
    .in_i     (in_x.i),
    .in_q     (in_x.q),
    .out_valid(c_valid),
    .out_mag  (c_mag),
    .out_i    (c_i),
    .out_q    (c_q)
  );

  // pw[s][k-1] = |x|^k after power stage s (stage 0 = CORDIC output).
  logic [15:0] pw  [PSTG+1][NPOW];
  cplx_t       xd  [PSTG+1];
  logic        vd  [PSTG+1];

  always_comb begin
    for (int k = 0; k < NPOW; k++) pw[0][k] = (k == 0) ? c_mag : 16'd0;
    xd[0] = '{q: c_q, i: c_i};
    vd[0] = c_valid;
  end

  // Rounded Q1.15 product of two non-negative values <= 1.
  function automatic logic [15:0] umul15(logic [15:0] a, logic [15:0] b);
    logic [31:0] p;
    p = 32'(a) * 32'(b) + 32'd16384;
    return 16'(p >> 15);
  endfunction

  // Rounded Q1.15 product of a signed sample and a non-negative value <= 1.
  function automatic sample_t smul15(sample_t a, logic [15:0] b);
    logic signed [32:0] p;
    p = 33'(a) * $signed({17'd0, b}) + 33'sd16384;
    return sample_t'(p >>> 15);
  endfunction

  for (genvar s = 1; s <= PSTG; s++) begin : g_pow
    always_ff @(posedge clk) begin
      if (ce) begin
        for (int k = 0; k < NPOW; k++) begin
          if (k == s) pw[s][k] <= umul15(pw[s-1][s-1], pw[s-1][0]);
          else        pw[s][k] <= pw[s-1][k];
        end
        xd[s] <= xd[s-1];
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  vd[s] <= 1'b0;
      else if (ce) vd[s] <= vd[s-1];
    end
  end

  // Final stage: v_1 = x, v_p = x * |x|^(p-1).
  always_ff @(posedge clk) begin
    if (ce) begin
      out_v[0] <= xd[PSTG];
      for (int p = 1; p < ORDER; p++) begin
        out_v[p].i <= smul15(xd[PSTG].i, pw[PSTG][p-1]);
        out_v[p].q <= smul15(xd[PSTG].q, pw[PSTG][p-1]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out_valid <= 1'b0;
    else if (ce) out_valid <= vd[PSTG];
  end

endmodule
