// dpd_top: baseband part of the multi-standard LUT digital predistorter.
//
// One set of memory polynomial coefficients, trained for one signal standard
// at one power level, also linearizes the amplifier for other standards if
// those are sent at a matching power level offset. The design therefore
// keeps eight coefficient sets in a look-up table and picks one from the
// measured signal power and the signal standard:
//
//   host stream -> signal_stimulus -> mp_core -> m_axis (to the RF DAC path)
//                                  \-> address_select -> coef_lut -> mp_core
//   AXI-Lite -> axil_regs (control, status, LUT loading)
//
// address_select watches the stream between the buffer and the predistorter,
// averages its power, maps power and standard to a set, and keeps copying
// that set from the LUT into mp_core's shadow bank, committing it after each
// full copy. mp_core processes 8 samples per clock on a 256-bit AXI-Stream
// with a 5th-order, 5-tap memory polynomial.
//
// Ports: AXI4-Lite slave for the host processor (see axil_regs for the map),
// an AXI-Stream slave that loads the signal buffer, and the predistorted
// AXI-Stream master that goes to the RF data converter. The RF data
// converter, DAC, mixers and amplifiers lie outside this design. The block
// structure follows the published system diagram; the register map, the
// buffer loading and all widths not stated there are this design's.
module dpd_top #(
  parameter int unsigned STIM_DEPTH = 8750,
  parameter int unsigned WIN_LOG2   = 10,
  parameter int unsigned ITER       = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // AXI4-Lite control slave
  input  logic [11:0]                   s_axil_awaddr,
  input  logic                          s_axil_awvalid,
  output logic                          s_axil_awready,
  input  logic [31:0]                   s_axil_wdata,
  input  logic [3:0]                    s_axil_wstrb,
  input  logic                          s_axil_wvalid,
  output logic                          s_axil_wready,
  output logic [1:0]                    s_axil_bresp,
  output logic                          s_axil_bvalid,
  input  logic                          s_axil_bready,
  input  logic [11:0]                   s_axil_araddr,
  input  logic                          s_axil_arvalid,
  output logic                          s_axil_arready,
  output logic [31:0]                   s_axil_rdata,
  output logic [1:0]                    s_axil_rresp,
  output logic                          s_axil_rvalid,
  input  logic                          s_axil_rready,
  // signal from the host
  input  logic [dpd_pkg::BEAT_W-1:0]    s_axis_tdata,
  input  logic                          s_axis_tvalid,
  input  logic                          s_axis_tlast,
  output logic                          s_axis_tready,
  // predistorted signal to the RF data converter
  output logic [dpd_pkg::BEAT_W-1:0]    m_axis_tdata,
  output logic                          m_axis_tvalid,
  output logic                          m_axis_tlast,
  input  logic                          m_axis_tready
);
  import dpd_pkg::*;

  localparam int unsigned SW    = $clog2(NUM_SETS);
  localparam int unsigned LEN_W = $clog2(STIM_DEPTH + 1);

  // control
  logic          play_en, load_en, auto_sel, upd_en;
  std_e          std_sel;
  logic [SW-1:0] manual_set, active_set, meas_set;
  logic          pow_valid;
  logic [31:0]   mean_pow;
  logic [LEN_W-1:0] length;

  // LUT ports
  logic                  lut_we, lut_re;
  logic [SW+COEF_AW-1:0] lut_waddr, lut_raddr;
  cplx_t                 lut_wdata, lut_rdata;

  // coefficient port of the predistorter
  logic               coef_we, coef_commit;
  logic [COEF_AW-1:0] coef_addr;
  cplx_t              coef_data;

  // stream between buffer and predistorter
  logic [BEAT_W-1:0] st_tdata;
  logic              st_tvalid, st_tlast, st_tready;

  axil_regs #(.AW(12), .LEN_W(LEN_W)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .play_en, .load_en, .auto_sel, .upd_en, .std_sel, .manual_set,
    .lut_we, .lut_waddr, .lut_wdata,
    .active_set, .meas_set, .pow_valid, .mean_pow, .length
  );

  signal_stimulus #(.DEPTH(STIM_DEPTH)) u_stim (
    .clk, .rst_n, .load_en, .play_en,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tlast, .s_axis_tready,
    .m_axis_tdata (st_tdata),
    .m_axis_tvalid(st_tvalid),
    .m_axis_tlast (st_tlast),
    .m_axis_tready(st_tready),
    .length
  );

  coef_lut u_lut (
    .clk,
    .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .re(lut_re), .raddr(lut_raddr), .rdata(lut_rdata)
  );

  address_select #(.WIN_LOG2(WIN_LOG2)) u_addr (
    .clk, .rst_n,
    .mon_tdata (st_tdata),
    .mon_fire  (st_tvalid && st_tready),
    .std_sel, .auto_sel, .manual_set, .upd_en,
    .lut_re, .lut_raddr, .lut_rdata,
    .coef_we, .coef_addr, .coef_data, .coef_commit,
    .mean_pow, .pow_valid, .meas_set, .active_set
  );

  mp_core #(.ITER(ITER)) u_mp (
    .clk, .rst_n,
    .s_axis_tdata (st_tdata),
    .s_axis_tvalid(st_tvalid),
    .s_axis_tlast (st_tlast),
    .s_axis_tready(st_tready),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tlast, .m_axis_tready,
    .coef_we, .coef_addr, .coef_data, .coef_commit
  );

endmodule
