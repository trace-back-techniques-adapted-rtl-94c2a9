// Decision vector memory.
//
// Holds one decision vector per address. In the plain trace-back scheme the
// vector of input symbol t is written at address t; in the combined scheme one
// word is written every m symbols. The trace-back unit reads it backwards,
// one word per clock.
//
// Interface: one write port (we, waddr, wdata) and one read port (re, raddr)
// whose data appears on rdata on the clock edge after re (synchronous read,
// the behaviour of an SRAM macro). Read and write are independent; reading an
// address in the cycle it is written returns the old word. The contents are
// not reset. The depth (L_Sin words) and width (M(log2 M + 1) bits) follow
// the trace-back architecture; the single-cycle synchronous read is a choice
// of this design.
module mtb_decision_memory #(
  parameter int unsigned DEPTH = mtb_pkg::DEF_L_SIN,
  parameter int unsigned WIDTH = mtb_pkg::DEF_M * (mtb_pkg::path_w(mtb_pkg::DEF_M) + 1),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
