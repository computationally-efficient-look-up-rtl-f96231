// coef_lut_tb: fills all eight coefficient sets with distinct random words,
// reads every address back in random order and checks the one-cycle read
// latency, that a read only updates rdata when re is high, and that a read
// of an address written in the same cycle returns the old word.
module coef_lut_tb;
  import dpd_pkg::*;

  localparam int unsigned AWL   = SET_W + COEF_AW;
  localparam int unsigned DEPTH = 1 << AWL;

  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AWL-1:0] waddr = '0, raddr = '0;
  cplx_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  cplx_t model [DEPTH];

  coef_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rd(cplx_t e, string what);
    checks++;
    if (rdata != e) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, rdata, e);
    end
  endtask

  initial begin
    int a;
    cplx_t held;
    @(negedge clk);
    for (int k = 0; k < DEPTH; k++) begin
      we = 1'b1; waddr = AWL'(k); wdata = cplx_t'($urandom);
      model[k] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      a = $urandom_range(0, DEPTH - 1);
      re = 1'b1; raddr = AWL'(a);
      @(negedge clk);
      expect_rd(model[a], "read");
      // re low: rdata holds
      held = rdata;
      re = 1'b0; raddr = AWL'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      expect_rd(held, "hold");
    end
    // read during write of the same address returns the old word
    a = 77;
    re = 1'b1; raddr = AWL'(a); we = 1'b1; waddr = AWL'(a); wdata = ~model[a];
    @(negedge clk);
    expect_rd(model[a], "read-during-write");
    model[a] = ~model[a];
    we = 1'b0;
    @(negedge clk);
    expect_rd(model[a], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
