// mp_core: parallel memory polynomial predistorter, eight samples per clock.
//
// Each 256-bit AXI-Stream beat carries LANES complex samples (lane 0, bits
// [31:0], is the earliest). The beat is split into its samples and every
// sample gets its own basis generator, which produces x|x|^(p-1) for
// p = 1..ORDER. Each output lane j then has a coefficient multiplication
// block that takes the basis terms of samples n, n-1, .., n-TAPS+1. For the
// low lanes some of those samples belong to the previous beat, so the basis
// terms of the last TAPS-1 lanes of every beat are kept in a history
// register. The products with the active coefficient set are summed into the
// predistorted sample y(n) (Eq. 3/5 of the memory polynomial).
//
// Coefficients: coef_we writes coef_data (I low, Q high, Q4.12) into a
// shadow bank at coef_addr = m*ORDER + p-1; a coef_commit pulse copies the
// whole shadow bank into the active bank in one cycle, so the datapath never
// mixes two sets. After reset the active bank is the identity (c_{0,1} = 1,
// others 0), so samples pass unchanged until a set is committed.
//
// Flow control: the pipeline advances when the output register is empty or
// accepted (ce = !m_tvalid | m_tready), and s_axis_tready equals ce. Latency
// is LATENCY = ITER + ORDER + 3 enabled cycles (24 with the defaults);
// throughput is one beat (8 samples) per cycle. tlast travels with the data.
// Lane count, order, memory depth, basis generators, CORDIC and the stream
// width follow the published design; lane order, the shadow bank, reset
// values and the stall scheme are this design's choices.
module mp_core #(
  parameter int unsigned LANES = dpd_pkg::LANES,
  parameter int unsigned ORDER = dpd_pkg::MP_ORDER,
  parameter int unsigned TAPS  = dpd_pkg::MP_TAPS,
  parameter int unsigned ITER  = 16
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // input sample stream
  input  logic [2*dpd_pkg::SAMPLE_W*LANES-1:0] s_axis_tdata,
  input  logic                                 s_axis_tvalid,
  input  logic                                 s_axis_tlast,
  output logic                                 s_axis_tready,
  // predistorted output stream
  output logic [2*dpd_pkg::SAMPLE_W*LANES-1:0] m_axis_tdata,
  output logic                                 m_axis_tvalid,
  output logic                                 m_axis_tlast,
  input  logic                                 m_axis_tready,
  // coefficient I/Q update port
  input  logic                                 coef_we,
  input  logic [dpd_pkg::COEF_AW-1:0]          coef_addr,
  input  dpd_pkg::cplx_t                       coef_data,
  input  logic                                 coef_commit
);
  import dpd_pkg::*;

  localparam int unsigned N       = TAPS * ORDER;
  localparam int unsigned BG_LAT  = ITER + 2 + (ORDER - 2) + 1;
  localparam int unsigned LATENCY = BG_LAT + 2;
  localparam int unsigned HIST    = (TAPS > 1) ? TAPS - 1 : 1;

  logic ce;
  assign ce            = !m_axis_tvalid || m_axis_tready;
  assign s_axis_tready = ce;

  // ---------------- coefficient banks ----------------
  cplx_t [N-1:0] shadow, active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0;
      active <= '0;
      active[0].i <= sample_t'(1 << COEF_FRAC);
    end else begin
      if (coef_we && coef_addr < COEF_AW'(N)) shadow[coef_addr] <= coef_data;
      if (coef_commit) active <= shadow;
    end
  end

  // ---------------- basis generation ----------------
  cplx_t [LANES-1:0]              x_in;
  cplx_t [LANES-1:0][ORDER-1:0]   bv;
  logic  [LANES-1:0]              bv_valid;

  assign x_in = s_axis_tdata;

  for (genvar j = 0; j < LANES; j++) begin : g_basis
    basis_gen #(.ORDER(ORDER), .ITER(ITER)) u_bg (
      .clk, .rst_n, .ce,
      .in_valid (s_axis_tvalid),
      .in_x     (x_in[j]),
      .out_valid(bv_valid[j]),
      .out_v    (bv[j])
    );
  end

  // Basis terms of the last TAPS-1 lanes of the previous beat.
  cplx_t [HIST-1:0][ORDER-1:0] hist;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist <= '0;
    else if (ce && bv_valid[0]) begin
      for (int h = 0; h < HIST; h++) hist[h] <= bv[LANES-HIST+h];
    end
  end

  // ---------------- coefficient multiplication ----------------
  cplx_t [LANES-1:0] y;
  logic  [LANES-1:0] y_valid;

  for (genvar j = 0; j < LANES; j++) begin : g_cm
    cplx_t [TAPS-1:0][ORDER-1:0] taps;
    always_comb begin
      for (int m = 0; m < TAPS; m++) begin
        if (j - m >= 0) taps[m] = bv[j-m];
        else            taps[m] = hist[HIST+j-m];
      end
    end
    coef_mult #(.ORDER(ORDER), .TAPS(TAPS)) u_cm (
      .clk, .rst_n, .ce,
      .in_valid (bv_valid[j]),
      .in_v     (taps),
      .coef     (active),
      .out_valid(y_valid[j]),
      .out_y    (y[j])
    );
  end

  // tlast delay line, same length as the datapath.
  logic [LATENCY-1:0] last_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  last_d <= '0;
    else if (ce) last_d <= {last_d[LATENCY-2:0], s_axis_tlast && s_axis_tvalid};
  end

  assign m_axis_tdata  = y;
  assign m_axis_tvalid = y_valid[0];
  assign m_axis_tlast  = last_d[LATENCY-1];

  // All lanes run in lockstep.
  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    y_valid == {LANES{y_valid[0]}});

  // AXI-Stream rule: a stalled output beat stays valid and unchanged.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
