// axil_regs_tb: drives the AXI4-Lite register file as a host would.
//
// Checks the reset values, write-then-read of CTRL/STD/SET and the matching
// control outputs, the read-only status registers (STATUS, POWER, LENGTH)
// against their inputs, and that a write into the LUT window produces one
// LUT write pulse with the right word address and data. Address and data
// phases are offered in both orders and responses are taken with random
// delays, so the response-hold rules are exercised.
module axil_regs_tb;
  import dpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 1'b0, s_axil_awready;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0] s_axil_wstrb = 4'hf;
  logic s_axil_wvalid = 1'b0, s_axil_wready;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic s_axil_bvalid, s_axil_bready = 1'b0;
  logic s_axil_arvalid = 1'b0, s_axil_arready;
  logic s_axil_rvalid, s_axil_rready = 1'b0;
  logic play_en, load_en, auto_sel, upd_en;
  std_e std_sel;
  logic [SET_W-1:0] manual_set;
  logic lut_we;
  logic [SET_W+COEF_AW-1:0] lut_waddr;
  cplx_t lut_wdata;
  logic [SET_W-1:0] active_set = '0, meas_set = '0;
  logic pow_valid = 1'b0;
  logic [31:0] mean_pow = '0;
  logic [13:0] length = '0;
  int checks = 0, failures = 0;

  axil_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LUT write monitor
  int lut_writes = 0;
  logic [SET_W+COEF_AW-1:0] last_waddr;
  cplx_t last_wdata;
  always @(negedge clk) if (lut_we) begin
    lut_writes++;
    last_waddr = lut_waddr;
    last_wdata = lut_wdata;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("failed: %s", what);
    end
  endtask

  task automatic axil_write(logic [11:0] addr, logic [31:0] data);
    int order = $urandom_range(0, 2);
    s_axil_awaddr = addr; s_axil_wdata = data;
    if (order != 0) begin
      // offer one channel a cycle early; nothing may happen yet
      s_axil_awvalid = (order == 1);
      s_axil_wvalid  = (order == 2);
      @(negedge clk);
      check(!s_axil_bvalid, "no write with one channel only");
    end
    s_axil_awvalid = 1'b1;
    s_axil_wvalid  = 1'b1;
    #1;
    while (!(s_axil_awready && s_axil_wready)) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    s_axil_awvalid = 1'b0;
    s_axil_wvalid  = 1'b0;
    repeat ($urandom_range(0, 3)) begin
      check(s_axil_bvalid, "bvalid held");
      @(negedge clk);
    end
    check(s_axil_bvalid && s_axil_bresp == 2'b00, "write response");
    s_axil_bready = 1'b1;
    @(negedge clk);
    s_axil_bready = 1'b0;
  endtask

  task automatic axil_read(logic [11:0] addr, output logic [31:0] data);
    s_axil_araddr = addr; s_axil_arvalid = 1'b1;
    #1;
    while (!s_axil_arready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    s_axil_arvalid = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    check(s_axil_rvalid && s_axil_rresp == 2'b00, "read response");
    data = s_axil_rdata;
    s_axil_rready = 1'b1;
    @(negedge clk);
    s_axil_rready = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    check(!play_en && !load_en && !auto_sel && !upd_en && std_sel == STD_5G, "reset values");
    axil_read(12'h000, d);
    check(d == 32'h0, "CTRL reset read");

    for (int v = 0; v < 16; v++) begin
      axil_write(12'h000, 32'(v));
      check({upd_en, auto_sel, load_en, play_en} == 4'(v), "CTRL outputs");
      axil_read(12'h000, d);
      check(d == 32'(v), "CTRL readback");
    end
    for (int s = 0; s < 3; s++) begin
      axil_write(12'h004, 32'(s));
      check(std_sel == std_e'(s), "STD output");
      axil_read(12'h004, d);
      check(d == 32'(s), "STD readback");
    end
    for (int m = 0; m < NUM_SETS; m++) begin
      axil_write(12'h008, 32'(m));
      check(manual_set == SET_W'(m), "SET output");
      axil_read(12'h008, d);
      check(d == 32'(m), "SET readback");
    end

    for (int n = 0; n < 20; n++) begin
      active_set = SET_W'($urandom); meas_set = SET_W'($urandom); pow_valid = 1'($urandom);
      mean_pow = $urandom; length = 14'($urandom);
      axil_read(12'h00C, d);
      check(d == {15'd0, pow_valid, 5'd0, meas_set, 5'd0, active_set}, "STATUS");
      axil_read(12'h010, d);
      check(d == mean_pow, "POWER");
      axil_read(12'h014, d);
      check(d == 32'(length), "LENGTH");
    end

    for (int n = 0; n < 100; n++) begin
      int set, k;
      logic [31:0] w;
      set = $urandom_range(0, NUM_SETS - 1);
      k = $urandom_range(0, MP_ORDER * MP_TAPS - 1);
      w = $urandom;
      n0 = lut_writes;
      axil_write(12'h400 + 12'(4 * (set * 32 + k)), w);
      check(lut_writes == n0 + 1, "one LUT write per access");
      check(last_waddr == {SET_W'(set), COEF_AW'(k)} && last_wdata == w, "LUT write address/data");
    end
    // register writes do not touch the LUT
    n0 = lut_writes;
    axil_write(12'h004, 32'd1);
    check(lut_writes == n0, "no LUT write for a register");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
