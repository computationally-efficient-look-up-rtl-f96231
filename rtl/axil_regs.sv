// axil_regs: AXI4-Lite register file through which the host processor
// controls the predistorter and loads the coefficient look-up table.
//
// Register map (byte addresses, 32-bit registers):
//   0x000 CTRL   rw  [0] play_en  [1] load_en  [2] auto_sel  [3] upd_en
//   0x004 STD    rw  [1:0] signal standard: 0 = 3G, 1 = 4G, 2 = 5G
//   0x008 SET    rw  [SW-1:0] coefficient set used when auto_sel = 0
//   0x00C STATUS ro  [SW-1:0] set in the predistorter, [SW+7:8] measured set,
//                    [16] a power measurement has completed
//   0x010 POWER  ro  mean |x|^2 of the last window (0 dBFS = 2^30)
//   0x014 LENGTH ro  beats held by the signal buffer
//   0x400 + 4*(set*32 + k)  wo  LUT entry k of a set: [15:0] I, [31:16] Q
// Reads of write-only or unused addresses return 0; all responses are OKAY.
//
// The LUT write port is driven straight from the write channels (address
// bits and data), qualified by lut_we; BRESP and RRESP are always OKAY.
//
// A write is taken when AWVALID and WVALID are both high and no response is
// pending; BVALID follows one cycle later. A read answers one cycle after
// ARVALID. WSTRB is ignored (whole-register writes). A register interface
// over AXI-Lite for coefficient updates follows the published design, which
// updates coefficients from the processor over AXI-Lite; the register map
// and handshake details are this design's.
module axil_regs #(
  parameter int unsigned AW       = 12,
  parameter int unsigned NUM_SETS = dpd_pkg::NUM_SETS,
  parameter int unsigned COEF_AW  = dpd_pkg::COEF_AW,
  parameter int unsigned LEN_W    = 14
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0]                       s_axil_awaddr,
  input  logic                                s_axil_awvalid,
  output logic                                s_axil_awready,
  input  logic [31:0]                         s_axil_wdata,
  input  logic [3:0]                          s_axil_wstrb,
  input  logic                                s_axil_wvalid,
  output logic                                s_axil_wready,
  output logic [1:0]                          s_axil_bresp,
  output logic                                s_axil_bvalid,
  input  logic                                s_axil_bready,
  input  logic [AW-1:0]                       s_axil_araddr,
  input  logic                                s_axil_arvalid,
  output logic                                s_axil_arready,
  output logic [31:0]                         s_axil_rdata,
  output logic [1:0]                          s_axil_rresp,
  output logic                                s_axil_rvalid,
  input  logic                                s_axil_rready,
  // control outputs
  output logic                                play_en,
  output logic                                load_en,
  output logic                                auto_sel,
  output logic                                upd_en,
  output dpd_pkg::std_e                       std_sel,
  output logic [$clog2(NUM_SETS)-1:0]         manual_set,
  // LUT write port
  output logic                                lut_we,
  output logic [$clog2(NUM_SETS)+COEF_AW-1:0] lut_waddr,
  output dpd_pkg::cplx_t                      lut_wdata,
  // status inputs
  input  logic [$clog2(NUM_SETS)-1:0]         active_set,
  input  logic [$clog2(NUM_SETS)-1:0]         meas_set,
  input  logic                                pow_valid,
  input  logic [31:0]                         mean_pow,
  input  logic [LEN_W-1:0]                    length
);
  import dpd_pkg::*;

  localparam int unsigned SW = $clog2(NUM_SETS);
  localparam int unsigned LA = SW + COEF_AW;   // LUT word address width

  logic wr_fire, rd_fire;
  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign wr_fire        = s_axil_awready;
  assign s_axil_arready = !s_axil_rvalid;
  assign rd_fire        = s_axil_arvalid && s_axil_arready;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  logic is_lut_w;
  assign is_lut_w = s_axil_awaddr[10];

  // ---------------- writes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      play_en       <= 1'b0;
      load_en       <= 1'b0;
      auto_sel      <= 1'b0;
      upd_en        <= 1'b0;
      std_sel       <= STD_5G;
      manual_set    <= '0;
      s_axil_bvalid <= 1'b0;
    end else begin
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        if (!is_lut_w) begin
          unique case (s_axil_awaddr[9:2])
            8'h00: {upd_en, auto_sel, load_en, play_en} <= s_axil_wdata[3:0];
            8'h01: std_sel    <= std_e'(s_axil_wdata[1:0]);
            8'h02: manual_set <= s_axil_wdata[SW-1:0];
            default: ;
          endcase
        end
      end else if (s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end
    end
  end

  assign lut_we    = wr_fire && is_lut_w;
  assign lut_waddr = s_axil_awaddr[LA+1:2];
  assign lut_wdata = s_axil_wdata;

  // ---------------- reads ----------------
  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    if (!s_axil_araddr[10]) begin
      unique case (s_axil_araddr[9:2])
        8'h00: rd_mux = {28'd0, upd_en, auto_sel, load_en, play_en};
        8'h01: rd_mux = {30'd0, std_sel};
        8'h02: rd_mux = 32'(manual_set);
        8'h03: rd_mux = {15'd0, pow_valid, 8'(meas_set), 8'(active_set)};
        8'h04: rd_mux = mean_pow;
        8'h05: rd_mux = 32'(length);
        default: rd_mux = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else if (rd_fire) begin
      s_axil_rvalid <= 1'b1;
      s_axil_rdata  <= rd_mux;
    end else if (s_axil_rready) begin
      s_axil_rvalid <= 1'b0;
    end
  end

  // AXI rules: a pending response holds until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
