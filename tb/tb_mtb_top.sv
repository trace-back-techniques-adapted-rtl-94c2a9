// End-to-end testbench of the survivor memory top at its default parameters
// (M = 2 survivors, 4-state trellis, 8-symbol frames, m = 2).
//
// A reference M algorithm (full-path register exchange in software) decodes
// random frames; its per-symbol sorter results drive the top, and both decoded
// outputs, the plain trace-back bit stream and the combined scheme's m-bit
// groups, are compared with the best path's input bits. Counted mechanisms,
// each of which must happen: frames written, input stalls while a frame is
// traced, trace-back runs of both kinds, bank flushes of the combined scheme
// (words written every m symbols), and LIFO read-outs. The cycle counts of
// both trace backs are checked: L_SIN steps for the plain one, L_SIN/m for the
// combined one.
module tb_mtb_top;
  localparam int M = mtb_pkg::DEF_M, K = mtb_pkg::DEF_K;
  localparam int MSTEP = mtb_pkg::DEF_MSTEP, L_SIN = mtb_pkg::DEF_L_SIN;
  localparam int PW = mtb_pkg::path_w(M);
  localparam int FRAMES = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [M-1:0][PW:0] in_sel = '0;
  logic [K-2:0] in_best_state = '0;
  logic tb_out_valid, tb_out_bit, tb_out_last;
  logic cb_out_valid, cb_out_last;
  logic [MSTEP-1:0] cb_out_bits;

  int checks = 0, failures = 0;
  int n_frames_in = 0, n_stalls = 0, n_tb_trace = 0, n_cb_trace = 0;
  int n_flush = 0, n_tb_out = 0, n_cb_out = 0;
  int cyc = 0, last_acc = 0;
  bit [mtb_ref_pkg::MAXL-1:0] exp_tb [$], exp_cb [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mtb_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  // Driver
  initial begin
    automatic mtb_ref_pkg::malg_model #(M, K) mdl = new();
    int unsigned sel [M];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      mdl.init();
      for (int t = 0; t < L_SIN; t++) begin
        mdl.step(sel);
        @(negedge clk);
        while ($urandom_range(99) < 20) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        for (int j = 0; j < M; j++) in_sel[j] = (PW+1)'(sel[j]);
        in_best_state = (t == L_SIN - 1) ? (K-1)'(mdl.best_state()) : (K-1)'($urandom);
        while (!in_ready) begin
          n_stalls++;
          @(negedge clk);
        end
        if (t == L_SIN - 1) begin
          last_acc = cyc + 1;
          n_frames_in++;
          exp_tb.push_back(mdl.best_bits());
          exp_cb.push_back(mdl.best_bits());
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Internal activity counters (bank flushes, trace-back cycles).
  int tb_trace_cycles = 0, cb_trace_cycles = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_cb_smu.flush) n_flush++;
    if (dut.u_tb_smu.u_tb.trace_step) tb_trace_cycles++;
    if (dut.u_cb_smu.u_tb.trace_step) cb_trace_cycles++;
  end

  // Plain trace-back output checker
  initial begin
    int idx, first;
    idx = 0;
    forever begin
      @(negedge clk);
      if (tb_out_valid) begin
        if (idx == 0) begin
          first = cyc;
          chk(first - last_acc == L_SIN + 1,
              $sformatf("trace-back latency %0d, expected %0d", first - last_acc, L_SIN + 1));
          n_tb_trace++;
        end
        chk(exp_tb.size() > 0 && tb_out_bit == exp_tb[0][idx],
            $sformatf("trace back: frame %0d bit %0d", n_tb_out, idx));
        idx++;
        if (tb_out_last) begin
          chk(idx == L_SIN, "trace back: frame length");
          void'(exp_tb.pop_front());
          idx = 0;
          n_tb_out++;
        end
      end
    end
  end

  // Combined scheme output checker
  initial begin
    int idx, first;
    idx = 0;
    forever begin
      @(negedge clk);
      if (cb_out_valid) begin
        if (idx == 0) begin
          first = cyc;
          chk(first - last_acc == L_SIN / MSTEP + 1,
              $sformatf("combined latency %0d, expected %0d", first - last_acc, L_SIN / MSTEP + 1));
          n_cb_trace++;
        end
        for (int i = 0; i < MSTEP; i++)
          chk(exp_cb.size() > 0 && cb_out_bits[i] == exp_cb[0][idx * MSTEP + i],
              $sformatf("combined: frame %0d bit %0d", n_cb_out, idx * MSTEP + i));
        idx++;
        if (cb_out_last) begin
          chk(idx == L_SIN / MSTEP, "combined: frame length");
          void'(exp_cb.pop_front());
          idx = 0;
          n_cb_out++;
        end
      end
    end
  end

  initial begin
    wait (n_tb_out == FRAMES && n_cb_out == FRAMES);
    repeat (3) @(posedge clk);
    chk(tb_trace_cycles == FRAMES * L_SIN,
        $sformatf("plain trace back took %0d cycles, expected %0d", tb_trace_cycles, FRAMES * L_SIN));
    chk(cb_trace_cycles == FRAMES * L_SIN / MSTEP,
        $sformatf("combined trace back took %0d cycles, expected %0d", cb_trace_cycles, FRAMES * L_SIN / MSTEP));
    chk(n_flush == FRAMES * L_SIN / MSTEP,
        $sformatf("%0d bank flushes, expected %0d", n_flush, FRAMES * L_SIN / MSTEP));
    $display("mechanisms: frames=%0d stalls=%0d tb_traces=%0d cb_traces=%0d flushes=%0d tb_readouts=%0d cb_readouts=%0d",
             n_frames_in, n_stalls, n_tb_trace, n_cb_trace, n_flush, n_tb_out, n_cb_out);
    chk(n_frames_in > 0, "no frame written");
    chk(n_stalls > 0, "input never stalled");
    chk(n_tb_trace > 0, "no plain trace back");
    chk(n_cb_trace > 0, "no combined trace back");
    chk(n_flush > 0, "no bank flush");
    chk(n_tb_out > 0 && n_cb_out > 0, "no LIFO read-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
