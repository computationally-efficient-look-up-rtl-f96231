// signal_stimulus_tb: loads a short signal into the buffer through the host
// stream (with random gaps), checks the reported length and that loading
// stops at tlast, then plays it back several times under random
// backpressure: the beats must come out in order, wrap around, carry tlast
// on the last beat of each pass, and stay stable while stalled. Loading a
// signal longer than the buffer must stop at DEPTH beats.
module signal_stimulus_tb;
  import dpd_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned LW    = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0, load_en = 1'b0, play_en = 1'b0;
  logic [BEAT_W-1:0] s_axis_tdata = '0, m_axis_tdata;
  logic s_axis_tvalid = 1'b0, s_axis_tlast = 1'b0, s_axis_tready;
  logic m_axis_tvalid, m_axis_tlast, m_axis_tready = 1'b0;
  logic [LW-1:0] length;
  int checks = 0, failures = 0;

  signal_stimulus #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BEAT_W-1:0] sig [DEPTH + 8];

  function automatic logic [BEAT_W-1:0] rand_beat();
    logic [BEAT_W-1:0] b;
    for (int k = 0; k < BEAT_W / 32; k++) b[32*k +: 32] = $urandom;
    return b;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("failed: %s", what);
    end
  endtask

  task automatic load(int n);
    int sent = 0;
    load_en = 1'b1;
    while (sent < n + 4 && !(sent > 0 && !s_axis_tready && s_axis_tvalid == 1'b0)) begin
      s_axis_tvalid = (sent < n) && ($urandom_range(0, 3) != 0);
      s_axis_tdata  = sig[sent];
      s_axis_tlast  = (sent == n - 1);
      #1;
      if (s_axis_tvalid && s_axis_tready) sent++;
      @(negedge clk);
      if (sent >= n) break;
    end
    s_axis_tvalid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int n, idx, passes;
    logic [BEAT_W-1:0] held;
    logic stalled;
    for (int k = 0; k < DEPTH + 8; k++) sig[k] = rand_beat();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    n = 13;
    load(n);
    check(length == LW'(n), "length after load");
    check(!s_axis_tready, "no more beats accepted after tlast");
    load_en = 1'b0;
    @(negedge clk);

    play_en = 1'b1;
    idx = 0; passes = 0; stalled = 1'b0;
    for (int c = 0; c < 400; c++) begin
      m_axis_tready = ($urandom_range(0, 2) != 0);
      #1;
      if (stalled) check(m_axis_tvalid && m_axis_tdata == held, "stable while stalled");
      if (m_axis_tvalid) begin
        held = m_axis_tdata;
        stalled = !m_axis_tready;
      end else stalled = 1'b0;
      if (m_axis_tvalid && m_axis_tready) begin
        check(m_axis_tdata == sig[idx], "beat order");
        check(m_axis_tlast == (idx == n - 1), "tlast at end of pass");
        if (idx == n - 1) passes++;
        idx = (idx == n - 1) ? 0 : idx + 1;
      end
      @(negedge clk);
    end
    check(passes >= 10, "several playback passes");
    play_en = 1'b0;
    m_axis_tready = 1'b1;
    repeat (3) @(negedge clk);

    // over-long load stops at DEPTH
    for (int k = 0; k < DEPTH + 8; k++) sig[k] = rand_beat();
    load_en = 1'b1;
    for (int k = 0; k < DEPTH + 8; k++) begin
      s_axis_tvalid = 1'b1; s_axis_tdata = sig[k]; s_axis_tlast = 1'b0;
      @(negedge clk);
    end
    s_axis_tvalid = 1'b0;
    check(length == LW'(DEPTH), "full buffer length");
    load_en = 1'b0;
    play_en = 1'b1;
    m_axis_tready = 1'b1;
    idx = 0;
    for (int c = 0; c < DEPTH + 10; c++) begin
      #1;
      if (m_axis_tvalid) begin
        check(m_axis_tdata == sig[idx], "full buffer playback");
        idx = (idx == DEPTH - 1) ? 0 : idx + 1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
