// Directed test of the worked example configuration: M = 2 survivors on a
// 4-state trellis, an 8-symbol sequence, m = 2 for the combined scheme.
//
// The best path visits the states 10, 01, 00, 00, 00, 10, 11, 01, 00 (time 0
// to 8), i.e. its input bits are 0,0,0,0,1,1,0,0. Its rank among the two
// survivors changes along the way (ranks below), so the trace back must follow
// the path-number field from one entry position to the other. The entries of
// the competing survivor are filler values of this test. Both decoded outputs
// must give 0,0,0,0,1,1,0,0; the plain trace back must take 8 cycles and the
// combined one 4 ("the entire sequence is decoded" in L_SIN/m steps).
module tb_mtb_example_path;
  localparam int M = 2, K = 3, MSTEP = 2, L_SIN = 8, PW = 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [M-1:0][PW:0] in_sel = '0;
  logic [K-2:0] in_best_state = '0;
  logic tb_out_valid, tb_out_bit, tb_out_last;
  logic cb_out_valid, cb_out_last;
  logic [MSTEP-1:0] cb_out_bits;

  int checks = 0, failures = 0;
  int tb_steps = 0, cb_steps = 0;
  logic [1:0] states [9] = '{2'b10, 2'b01, 2'b00, 2'b00, 2'b00, 2'b10, 2'b11, 2'b01, 2'b00};
  int         rank   [8] = '{0, 0, 1, 0, 1, 1, 0, 0};
  logic [7:0] expect_bits = 8'b0011_0000;   // bit t = input of symbol t
  logic [7:0] got_tb = '0, got_cb = '0;
  int         n_tb = 0, n_cb = 0;

  always #5 clk = ~clk;

  mtb_top dut (.*);

  always @(negedge clk) begin
    if (dut.u_tb_smu.u_tb.trace_step) tb_steps++;
    if (dut.u_cb_smu.u_tb.trace_step) cb_steps++;
    if (tb_out_valid) begin got_tb[n_tb] = tb_out_bit; n_tb++; end
    if (cb_out_valid) begin got_cb[2*n_cb +: 2] = cb_out_bits; n_cb++; end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < L_SIN; t++) begin
      @(negedge clk);
      in_valid = 1;
      // best path entry: predecessor rank, decision bit = LSB of predecessor state
      in_sel[rank[t]]     = {1'((t == 0) ? 0 : rank[t-1]), states[t][0]};
      // competing survivor: filler
      in_sel[1 - rank[t]] = {1'(t % 2), 1'((t / 2) % 2)};
      in_best_state = (t == L_SIN - 1) ? states[8] : 2'b11;
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    wait (n_tb == L_SIN && n_cb == L_SIN / MSTEP);
    repeat (2) @(negedge clk);
    checks++;
    if (got_tb !== expect_bits) begin
      failures++;
      $display("ERROR: plain trace back decoded %b, expected %b (bit 0 = first symbol)", got_tb, expect_bits);
    end
    checks++;
    if (got_cb !== expect_bits) begin
      failures++;
      $display("ERROR: combined scheme decoded %b, expected %b", got_cb, expect_bits);
    end
    checks++;
    if (tb_steps != L_SIN) begin
      failures++;
      $display("ERROR: plain trace back took %0d steps, expected %0d", tb_steps, L_SIN);
    end
    checks++;
    if (cb_steps != L_SIN / MSTEP) begin
      failures++;
      $display("ERROR: combined trace back took %0d steps, expected %0d", cb_steps, L_SIN / MSTEP);
    end
    $display("decoded: plain %b combined %b, trace-back steps %0d / %0d", got_tb, got_cb, tb_steps, cb_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
