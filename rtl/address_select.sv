// address_select: chooses the coefficient set from the signal power and the
// signal standard, and keeps the predistorter's coefficients refreshed.
//
// Power measurement: it watches the accepted beats of the transmitted stream
// and accumulates |x|^2 = I^2 + Q^2 over a window of 2^WIN_LOG2 samples. At
// the end of each window the mean power is compared with NUM_SETS-1
// thresholds that belong to the selected standard; the number of thresholds
// reached is the set index (0..NUM_SETS-1, i.e. sets 1..8 of the power
// table). Set k (1-based) is meant for a signal at BASE_DBFS[std] + (k-1)
// dBFS, so the threshold between sets k and k+1 sits half a dB above set
// k's level. 0 dBFS is taken as mean |x|^2 = 2^30 (a full-scale Q1.15
// amplitude). The default offsets -20/-18/-10 dBFS for 3G/4G/5G give
// exactly the power table of the published design: set 1 at -20 dBFS for
// 3G, -18 dBFS for 4G and -10 dBFS for 5G, one dB per set.
//
// Coefficient update: while upd_en is high it sweeps continuously. Each
// sweep latches the set (the measured one when auto_sel is high, manual_set
// otherwise), reads the NUM_COEF coefficients of that set from the LUT (two
// cycles per coefficient: read, then write to the predistorter's shadow
// bank) and finishes with one coef_commit pulse. With one idle cycle
// between sweeps, a commit follows every 2*NUM_COEF + 2 = 52 cycles.
//
// coef_data is the LUT read data passed straight on: the LUT's registered
// read already lines it up with coef_we.
//
// Choosing the set from power and standard and constantly updating the
// coefficients follow the published design; the window length, the
// threshold placement, the 0 dBFS reference and the sweep order are this
// design's choices.
module address_select #(
  parameter int unsigned LANES     = dpd_pkg::LANES,
  parameter int unsigned NUM_SETS  = dpd_pkg::NUM_SETS,
  parameter int unsigned NUM_COEF  = dpd_pkg::NUM_COEF,
  parameter int unsigned COEF_AW   = dpd_pkg::COEF_AW,
  parameter int unsigned WIN_LOG2  = 10,
  parameter int          BASE_DBFS [3] = '{-20, -18, -10}
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // monitored stream (accepted beats only)
  input  logic [2*dpd_pkg::SAMPLE_W*LANES-1:0] mon_tdata,
  input  logic                                 mon_fire,
  // control
  input  dpd_pkg::std_e                        std_sel,
  input  logic                                 auto_sel,
  input  logic [$clog2(NUM_SETS)-1:0]          manual_set,
  input  logic                                 upd_en,
  // coefficient LUT read port
  output logic                                 lut_re,
  output logic [$clog2(NUM_SETS)+COEF_AW-1:0]  lut_raddr,
  input  dpd_pkg::cplx_t                       lut_rdata,
  // predistorter coefficient port
  output logic                                 coef_we,
  output logic [COEF_AW-1:0]                   coef_addr,
  output dpd_pkg::cplx_t                       coef_data,
  output logic                                 coef_commit,
  // status
  output logic [31:0]                          mean_pow,
  output logic                                 pow_valid,
  output logic [$clog2(NUM_SETS)-1:0]          meas_set,
  output logic [$clog2(NUM_SETS)-1:0]          active_set
);
  import dpd_pkg::*;

  localparam int unsigned SW     = $clog2(NUM_SETS);
  localparam int unsigned BPW    = 2 * SAMPLE_W + $clog2(LANES) + 1;  // beat power width
  localparam int unsigned ACC_W  = 2 * SAMPLE_W + WIN_LOG2 + 1;
  localparam int unsigned BEATS  = (1 << WIN_LOG2) / LANES;           // beats per window
  localparam int unsigned BCNT_W = $clog2(BEATS) + 1;

  // ---------------- thresholds ----------------
  logic [ACC_W-1:0] thr [3][NUM_SETS-1];
  for (genvar s = 0; s < 3; s++) begin : g_std
    for (genvar k = 0; k < NUM_SETS - 1; k++) begin : g_thr
      localparam real    DB = real'(BASE_DBFS[s]) + real'(k) + 0.5;
      localparam longint TH = longint'((2.0 ** 30) * (10.0 ** (DB / 10.0)));
      assign thr[s][k] = ACC_W'(TH);
    end
  end

  // ---------------- power measurement ----------------
  logic [BPW-1:0]    beat_pow;
  logic [BPW-1:0]    beat_pow_q;
  logic              fire_q;
  logic [ACC_W-1:0]  acc;
  logic [BCNT_W-1:0] bcnt;

  always_comb begin
    beat_pow = '0;
    for (int j = 0; j < LANES; j++) begin
      cplx_t x;
      x = mon_tdata[32*j +: 32];
      beat_pow += BPW'(unsigned'(32'(x.i) * 32'(x.i)))
                + BPW'(unsigned'(32'(x.q) * 32'(x.q)));
    end
  end

  logic [ACC_W-1:0] acc_next;
  logic [ACC_W-1:0] mean_next;
  assign acc_next  = acc + ACC_W'(beat_pow_q);
  assign mean_next = acc_next >> WIN_LOG2;

  std_e std_eff;
  assign std_eff = (std_sel == STD_3G || std_sel == STD_4G) ? std_sel : STD_5G;

  logic [SW-1:0] level;
  always_comb begin
    level = '0;
    for (int k = 0; k < NUM_SETS - 1; k++)
      if (mean_next >= thr[std_eff][k]) level = SW'(k + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_pow_q <= '0;
      fire_q     <= 1'b0;
      acc        <= '0;
      bcnt       <= '0;
      mean_pow   <= '0;
      pow_valid  <= 1'b0;
      meas_set   <= '0;
    end else begin
      beat_pow_q <= beat_pow;
      fire_q     <= mon_fire;
      if (fire_q) begin
        if (bcnt == BCNT_W'(BEATS - 1)) begin
          acc       <= '0;
          bcnt      <= '0;
          mean_pow  <= 32'(mean_next);
          pow_valid <= 1'b1;
          meas_set  <= level;
        end else begin
          acc  <= acc_next;
          bcnt <= bcnt + 1'b1;
        end
      end
    end
  end

  // ---------------- coefficient update sweep ----------------
  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR, S_COMMIT} state_e;
  state_e           state;
  logic [COEF_AW-1:0] cidx;
  logic [SW-1:0]    sweep_set;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cidx       <= '0;
      sweep_set  <= '0;
      active_set <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (upd_en) begin
          sweep_set <= auto_sel ? meas_set : manual_set;
          cidx      <= '0;
          state     <= S_RD;
        end
        S_RD:   state <= S_WR;
        S_WR:   if (cidx == COEF_AW'(NUM_COEF - 1)) state <= S_COMMIT;
                else begin
                  cidx  <= cidx + 1'b1;
                  state <= S_RD;
                end
        S_COMMIT: begin
          active_set <= sweep_set;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign lut_re      = (state == S_RD);
  assign lut_raddr   = {sweep_set, cidx};
  assign coef_we     = (state == S_WR);
  assign coef_addr   = cidx;
  assign coef_data   = lut_rdata;
  assign coef_commit = (state == S_COMMIT);

endmodule
