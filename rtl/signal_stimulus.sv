// signal_stimulus: on-chip signal buffer that feeds the predistorter.
//
// The host sends a test signal (one standard at one power level) as a
// 256-bit AXI-Stream of 8-sample beats. While load_en is high the buffer
// stores the incoming beats from address 0 on, until the beat marked tlast
// or until it is full; the number of stored beats is then reported on
// length. While play_en is high (and load_en low) it streams the stored
// beats out over and over, marking the last beat of each pass with tlast,
// so that the transmitter sees a continuous signal.
//
// The read is a registered memory read that happens only when the output
// register is empty or being taken, so the output honours backpressure
// without a separate FIFO. Dropping play_en restarts playback from address
// 0. DEPTH defaults to 8750 beats = 70,000 samples, the length of the test
// signals of the published measurements. The block's role comes from the
// published system diagram; its loading and playback scheme is this
// design's choice.
module signal_stimulus #(
  parameter int unsigned DEPTH = 8750,
  parameter int unsigned DW    = dpd_pkg::BEAT_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load_en,
  input  logic                      play_en,
  // from the host
  input  logic [DW-1:0]             s_axis_tdata,
  input  logic                      s_axis_tvalid,
  input  logic                      s_axis_tlast,
  output logic                      s_axis_tready,
  // to the predistorter
  output logic [DW-1:0]             m_axis_tdata,
  output logic                      m_axis_tvalid,
  output logic                      m_axis_tlast,
  input  logic                      m_axis_tready,
  output logic [$clog2(DEPTH+1)-1:0] length
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          done;
  logic          wr_fire, rd_adv, playing;

  assign s_axis_tready = load_en && !done;
  assign wr_fire       = s_axis_tvalid && s_axis_tready;
  assign playing       = play_en && !load_en && (length != '0);
  assign rd_adv        = playing && (!m_axis_tvalid || m_axis_tready);

  // ---------------- loading ----------------
  always_ff @(posedge clk) begin
    if (wr_fire) mem[wr_ptr] <= s_axis_tdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      done   <= 1'b0;
      length <= '0;
    end else if (!load_en) begin
      wr_ptr <= '0;
      done   <= 1'b0;
    end else if (wr_fire) begin
      if (s_axis_tlast || wr_ptr == AW'(DEPTH - 1)) begin
        done   <= 1'b1;
        length <= LW'(wr_ptr) + 1'b1;
      end else begin
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  // ---------------- playback ----------------
  always_ff @(posedge clk) begin
    if (rd_adv) m_axis_tdata <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr        <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tlast  <= 1'b0;
    end else if (!playing) begin
      rd_ptr <= '0;
      if (m_axis_tready) m_axis_tvalid <= 1'b0;
    end else if (rd_adv) begin
      m_axis_tvalid <= 1'b1;
      m_axis_tlast  <= (LW'(rd_ptr) == length - 1'b1);
      rd_ptr        <= (LW'(rd_ptr) == length - 1'b1) ? '0 : rd_ptr + 1'b1;
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
