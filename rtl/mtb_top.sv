// Survivor memory management for an M-algorithm trellis decoder: the plain
// trace-back memory and the combined register-exchange / trace-back memory,
// side by side on one input.
//
// Both take the per-symbol result of the path-metric / sorting stage (one
// {predecessor rank, decision bit} entry per survivor, best path first) and
// the end state of the best path with the last symbol of a frame, and both
// deliver the decoded sequence of the frame: the plain trace-back memory one
// bit per clock, the combined one m bits per clock. The input is accepted only
// when both are ready, so the two always decode the same frames and their
// outputs can be compared. Frames are L_SIN symbols; see the two subsystems
// for timing.
module mtb_top #(
  parameter int unsigned M     = mtb_pkg::DEF_M,
  parameter int unsigned K     = mtb_pkg::DEF_K,
  parameter int unsigned MSTEP = mtb_pkg::DEF_MSTEP,
  parameter int unsigned L_SIN = mtb_pkg::DEF_L_SIN,
  localparam int unsigned PW   = mtb_pkg::path_w(M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the path-metric / sorting stage
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [M-1:0][PW:0]   in_sel,
  input  logic [K-2:0]         in_best_state,
  // plain trace-back: one decoded bit per clock
  output logic                 tb_out_valid,
  output logic                 tb_out_bit,
  output logic                 tb_out_last,
  // combined scheme: MSTEP decoded bits per clock
  output logic                 cb_out_valid,
  output logic [MSTEP-1:0]     cb_out_bits,
  output logic                 cb_out_last
);

  logic tb_ready, cb_ready;

  assign in_ready = tb_ready && cb_ready;

  mtb_tb_smu #(.M(M), .K(K), .L_SIN(L_SIN)) u_tb_smu (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (in_valid && cb_ready),
    .in_ready      (tb_ready),
    .in_sel        (in_sel),
    .in_best_state (in_best_state),
    .out_valid     (tb_out_valid),
    .out_bit       (tb_out_bit),
    .out_last      (tb_out_last)
  );

  mtb_combined_smu #(.M(M), .K(K), .MSTEP(MSTEP), .L_SIN(L_SIN)) u_cb_smu (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (in_valid && tb_ready),
    .in_ready      (cb_ready),
    .in_sel        (in_sel),
    .in_best_state (in_best_state),
    .out_valid     (cb_out_valid),
    .out_bits      (cb_out_bits),
    .out_last      (cb_out_last)
  );

endmodule
