// Last-in first-out buffer for the decoded sequence.
//
// Trace-back produces the decoded bits from the end of the sequence towards
// its start; the LIFO turns them back into time order. It is a register array
// with a stack pointer: `push` writes `din` on top, `pop` removes the top
// word. `dout` shows the top word combinationally while the buffer is not
// empty. Pushing when full or popping when empty is an error (asserted).
// Push and pop in the same cycle replace the top word.
module mtb_lifo #(
  parameter int unsigned DEPTH = mtb_pkg::DEF_L_SIN,
  parameter int unsigned WIDTH = 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic [CW-1:0]    count,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [CW-1:0]    top_c;
  logic [AW-1:0]    top;      // index of the top word
  logic [AW-1:0]    next;     // index of the first free slot

  assign top_c = count - 1'b1;
  assign top   = top_c[AW-1:0];
  assign next  = count[AW-1:0];

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = empty ? '0 : mem[top];

  // Storage: a push writes the slot above the top, or the top itself when a
  // pop happens in the same cycle.
  always_ff @(posedge clk) begin
    if (push) mem[pop ? top : next] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            count <= '0;
    else if (push && !pop) count <= count + 1'b1;
    else if (pop && !push) count <= count - 1'b1;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push && !pop |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
