// Frame-level checker for the two survivor memories.
//
// Runs FRAMES random frames of L_SIN symbols through one survivor memory
// (KIND 0: plain trace-back, mtb_tb_smu; KIND 1: combined scheme,
// mtb_combined_smu). The reference M-algorithm model of mtb_ref_pkg makes the
// per-symbol sorter results and knows the decoded sequence of the best path;
// every decoded bit is compared with it. Input gaps are inserted at random
// (GAP_PCT percent) and the stall cycles while a frame is being traced are
// counted. The latency from the last input symbol to the first decoded output
// is checked against L_SIN/STEP + 1 cycles (one cycle per trace-back step, one
// for the start, none extra for the read), and the output must be L_SIN/STEP
// back-to-back groups.
module mtb_smu_harness #(
  parameter int KIND    = 0,
  parameter int M       = 2,
  parameter int K       = 3,
  parameter int MSTEP   = 2,
  parameter int L_SIN   = 8,
  parameter int FRAMES  = 20,
  parameter int GAP_PCT = 30
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output bit   finished
);


  localparam int PW   = mtb_pkg::path_w(M);
  localparam int STEP = (KIND == 0) ? 1 : MSTEP;
  localparam int NW   = L_SIN / STEP;

  logic                in_valid, in_ready;
  logic [M-1:0][PW:0]  in_sel;
  logic [K-2:0]        in_best;
  logic                out_valid, out_last;
  logic [STEP-1:0]     out_bits;

  if (KIND == 0) begin : g_tb
    mtb_tb_smu #(.M(M), .K(K), .L_SIN(L_SIN)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_sel(in_sel), .in_best_state(in_best),
      .out_valid(out_valid), .out_bit(out_bits[0]), .out_last(out_last));
  end else begin : g_cb
    mtb_combined_smu #(.M(M), .K(K), .MSTEP(MSTEP), .L_SIN(L_SIN)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_sel(in_sel), .in_best_state(in_best),
      .out_valid(out_valid), .out_bits(out_bits), .out_last(out_last));
  end

  int            cyc;
  int            last_acc_cyc;
  bit [mtb_ref_pkg::MAXL-1:0] exp_q [$];
  int            frames_out;

  always @(posedge clk) cyc <= cyc + 1;

  // Driver: all inputs change on the falling edge.
  initial begin
    automatic mtb_ref_pkg::malg_model #(M, K) mdl = new();
    int unsigned sel [M];
    in_valid = 0; in_sel = '0; in_best = '0; stalls = 0; cyc = 0;
    @(posedge rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      mdl.init();
      for (int t = 0; t < L_SIN; t++) begin
        mdl.step(sel);
        @(negedge clk);
        while ($urandom_range(99) < GAP_PCT) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        for (int j = 0; j < M; j++) in_sel[j] = (PW+1)'(sel[j]);
        in_best = (t == L_SIN - 1) ? (K-1)'(mdl.best_state()) : (K-1)'($urandom);
        while (!in_ready) begin
          stalls++;
          @(negedge clk);
        end
        // accepted on the coming rising edge
        if (t == L_SIN - 1) begin
          last_acc_cyc = cyc + 1;
          exp_q.push_back(mdl.best_bits());
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Monitor: outputs sampled on the falling edge.
  initial begin
    int idx, first;
    bit in_frame;
    checks = 0; failures = 0; finished = 0; frames_out = 0;
    idx = 0; in_frame = 0; first = 0;
    forever begin
      @(negedge clk);
      if (!rst_n) continue;
      if (in_frame && !out_valid) begin
        failures++;
        $display("ERROR: output gap in frame %0d", frames_out);
      end
      if (out_valid) begin
        if (!in_frame) begin
          in_frame = 1;
          first    = cyc;
          checks++;
          if (first - last_acc_cyc != NW + 1) begin
            failures++;
            $display("ERROR: latency %0d cycles, expected %0d", first - last_acc_cyc, NW + 1);
          end
        end
        if (exp_q.size() == 0) begin
          failures++;
          $display("ERROR: output without a frame");
        end else begin
          for (int i = 0; i < STEP; i++) begin
            checks++;
            if (out_bits[i] !== exp_q[0][idx * STEP + i]) begin
              failures++;
              $display("ERROR: frame %0d symbol %0d: got %0b expected %0b",
                       frames_out, idx * STEP + i, out_bits[i], exp_q[0][idx * STEP + i]);
            end
          end
        end
        idx++;
        if (out_last) begin
          checks++;
          if (idx != NW) begin
            failures++;
            $display("ERROR: frame %0d had %0d output groups, expected %0d", frames_out, idx, NW);
          end
          if (exp_q.size() != 0) void'(exp_q.pop_front());
          idx = 0; in_frame = 0;
          frames_out++;
          if (frames_out == FRAMES) finished = 1;
        end
      end
    end
  end

endmodule
