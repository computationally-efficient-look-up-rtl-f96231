// cordic_mag: pipelined CORDIC in vectoring mode returning the magnitude |x|
// of a complex Q1.15 sample.
//
// The predistorter needs |x(n)| for every sample to form the memory
// polynomial basis terms; a CORDIC computes it with shifts and adds only.
// Stage 0 folds the sample into the right half-plane (negating both parts
// when I < 0, which keeps the magnitude). Each of the ITER micro-rotation
// stages then rotates the vector towards the real axis by +/-atan(2^-k). The
// last stage removes the CORDIC gain (about 1.6468) with one constant
// multiply and saturates the result to 0..32767 (Q1.15, so |x| <= 1).
// GUARD extra fractional bits are carried to keep the rounding error near one
// LSB.
//
// Interface: in_valid/in_i/in_q enter, out_valid/out_mag/out_i/out_q leave
// ITER+2 enabled cycles later. The unmodified sample travels alongside the
// magnitude so that callers get both aligned. ce is a pipeline clock enable:
// when low every stage holds (this is how the surrounding stream stalls).
// The use of a CORDIC follows the published design; the iteration count,
// guard bits and pipelining are this design's choices.
module cordic_mag #(
  parameter int unsigned ITER  = 16,
  parameter int unsigned GUARD = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic                     in_valid,
  input  dpd_pkg::sample_t         in_i,
  input  dpd_pkg::sample_t         in_q,
  output logic                     out_valid,
  output logic [15:0]              out_mag,
  output dpd_pkg::sample_t         out_i,
  output dpd_pkg::sample_t         out_q
);
  import dpd_pkg::*;

  // 16 input bits, GUARD fraction bits, 2 bits of headroom for the gain.
  localparam int unsigned W = SAMPLE_W + GUARD + 2;
  localparam int unsigned STAGES = ITER + 2;
  // round(2^16 / 1.6467602581) : inverse CORDIC gain in Q0.16
  localparam logic [16:0] INV_GAIN = 17'd39797;

  logic signed [W-1:0] xs [ITER+1];
  logic signed [W-1:0] ys [ITER+1];
  logic [STAGES-1:0]   vld;
  sample_t             di [STAGES];
  sample_t             dq [STAGES];
  logic [15:0]         mag_q;

  // Stage 0: fold into the right half-plane.
  always_ff @(posedge clk) begin
    if (ce) begin
      if (in_i[SAMPLE_W-1]) begin
        xs[0] <= -(W'(in_i) <<< GUARD);
        ys[0] <= -(W'(in_q) <<< GUARD);
      end else begin
        xs[0] <= W'(in_i) <<< GUARD;
        ys[0] <= W'(in_q) <<< GUARD;
      end
    end
  end

  // Micro-rotation stages.
  for (genvar k = 0; k < ITER; k++) begin : g_rot
    always_ff @(posedge clk) begin
      if (ce) begin
        if (!ys[k][W-1]) begin
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
        end else begin
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
        end
      end
    end
  end

  // Gain compensation, drop guard bits with rounding, saturate to Q1.15.
  logic [W+16:0] scaled;
  logic [W+16:0] rounded;
  always_comb begin
    scaled  = (W+17)'(unsigned'(xs[ITER])) * (W+17)'(INV_GAIN);
    rounded = (scaled + ((W+17)'(1) << (16 + GUARD - 1))) >> (16 + GUARD);
  end

  always_ff @(posedge clk) begin
    if (ce) mag_q <= (rounded > (W+17)'(32767)) ? 16'd32767 : rounded[15:0];
  end

  // Valid and sample delay line, same length as the datapath.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vld <= '0;
    else if (ce) vld <= {vld[STAGES-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      di[0] <= in_i;
      dq[0] <= in_q;
      for (int s = 1; s < STAGES; s++) begin
        di[s] <= di[s-1];
        dq[s] <= dq[s-1];
      end
    end
  end

  assign out_valid = vld[STAGES-1];
  assign out_mag   = mag_q;
  assign out_i     = di[STAGES-1];
  assign out_q     = dq[STAGES-1];

endmodule
