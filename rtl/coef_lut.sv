// coef_lut: look-up table of predistorter coefficient sets.
//
// Holds NUM_SETS sets of 2^COEF_AW complex coefficient slots (of which the
// memory polynomial uses ORDER*TAPS = 25). A set corresponds to one column
// of the power-level table: the same set serves every signal standard, each
// at its own power level offset. The address is {set, coefficient index}.
// It is a simple dual-port memory: one write port, loaded by the host, and
// one read port with a one-cycle registered read used by the address
// selection to refresh the predistorter.
//
// Timing: rdata is valid the cycle after re. A read and a write to the same
// address in the same cycle return the old word. Contents are cleared to
// zero only by writing; the table is not reset. The eight sets follow the
// published design; the depth per set, word format and port arrangement are
// this design's choices.
module coef_lut #(
  parameter int unsigned NUM_SETS = dpd_pkg::NUM_SETS,
  parameter int unsigned COEF_AW  = dpd_pkg::COEF_AW
) (
  input  logic                                 clk,
  input  logic                                 we,
  input  logic [$clog2(NUM_SETS)+COEF_AW-1:0]  waddr,
  input  dpd_pkg::cplx_t                       wdata,
  input  logic                                 re,
  input  logic [$clog2(NUM_SETS)+COEF_AW-1:0]  raddr,
  output dpd_pkg::cplx_t                       rdata
);
  import dpd_pkg::*;

  localparam int unsigned DEPTH = NUM_SETS << COEF_AW;

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
