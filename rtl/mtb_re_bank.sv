// Reduced register-exchange bank of the combined scheme.
//
// Instead of carrying the whole survivor path, each survivor row holds only
// log2 M + m bits: the number (rank) its ancestor had among the survivors at
// the last flush, m trellis steps ago, and the decision bits gathered since.
// Every trellis step each survivor row is extended into two candidate rows
// (decision bit 0 and 1 appended), 2M candidate rows in all, and the
// path-metric / sorting stage selects M of them: sel[j] = {predecessor rank,
// decision bit} names the candidate that becomes survivor j. On the m-th step
// (`flush`) the M selected rows, M(log2 M + m) bits, are the word for the
// trace-back memory (`word`, combinational, valid with `flush`), and the bank
// restarts: row j takes path number j and clears its decision bits.
//
// Decision-bit order inside a row: the newest bit enters at the MSB, so a
// finished row is {path number, d(t), d(t-1), ..., d(t-m+1)}, which is the
// order the trace-back shift register consumes. The row format and the
// m-step flush follow the combined scheme; the bit order, the reset values and
// the `upd`/`flush` controls are choices of this design.
module mtb_re_bank #(
  parameter int unsigned M     = mtb_pkg::DEF_M,
  parameter int unsigned MSTEP = mtb_pkg::DEF_MSTEP,
  localparam int unsigned PW   = mtb_pkg::path_w(M),
  localparam int unsigned RW   = PW + MSTEP
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     upd,
  input  logic                     flush,
  input  logic [M-1:0][PW:0]       sel,
  output logic [M-1:0][RW-1:0]     word,
  output logic [M-1:0][RW-1:0]     rows
);

  logic [2*M-1:0][RW-1:0] cand;

  // Extension: candidate 2p+d is survivor p with decision bit d shifted in.
  always_comb begin
    for (int p = 0; p < int'(M); p++) begin
      for (int d = 0; d < 2; d++) begin
        logic [MSTEP:0] shifted;
        shifted = {1'(d), rows[p][MSTEP-1:0]};
        cand[2*p+d] = {rows[p][RW-1:MSTEP], shifted[MSTEP:1]};
      end
    end
    // Selection by the sorter's result.
    for (int j = 0; j < int'(M); j++) word[j] = cand[sel[j]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(M); j++) rows[j] <= {PW'(j), {MSTEP{1'b0}}};
    end else if (upd) begin
      for (int j = 0; j < int'(M); j++)
        rows[j] <= flush ? {PW'(j), {MSTEP{1'b0}}} : word[j];
    end
  end

endmodule
