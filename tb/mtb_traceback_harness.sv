// Frame checker for the trace-back unit alone.
//
// The reference M algorithm produces FRAMES random frames. The harness packs
// the decision words itself, STEP trellis steps per word (entry j = rank of
// survivor j's ancestor STEP steps earlier and the STEP decision bits of the
// chain, newest at the MSB), writes them into a decision memory, starts the
// trace back with the best path's end state and compares the decoded groups
// with the model. Checks: every decoded bit, the group count, that output
// starts NWORDS cycles after start (one word per clock) and is back-to-back,
// and that `busy` is high for the whole operation.
module mtb_traceback_harness #(
  parameter int M      = 2,
  parameter int K      = 3,
  parameter int STEP   = 1,
  parameter int L_SIN  = 8,
  parameter int FRAMES = 10
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);


  localparam int PW = mtb_pkg::path_w(M);
  localparam int EW = PW + STEP;
  localparam int NW = L_SIN / STEP;
  localparam int AW = (NW > 1) ? $clog2(NW) : 1;

  logic                 start = 0, busy, done;
  logic [K-2:0]         start_state = '0;
  logic                 rd_en, we = 0;
  logic [AW-1:0]        rd_addr, waddr = '0;
  logic [M-1:0][EW-1:0] wdata = '0;
  logic [M*EW-1:0]      rd_word;
  logic                 out_valid, out_last;
  logic [STEP-1:0]      out_bits;

  mtb_decision_memory #(.DEPTH(NW), .WIDTH(M*EW)) u_mem (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_word));

  mtb_traceback #(.M(M), .K(K), .STEP(STEP), .NWORDS(NW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .start_state(start_state),
    .busy(busy), .done(done), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_word),
    .out_valid(out_valid), .out_bits(out_bits), .out_last(out_last));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  initial begin
    automatic mtb_ref_pkg::malg_model #(M, K) mdl = new();
    int unsigned sel [M];
    int unsigned hsel [L_SIN][M];
    bit [mtb_ref_pkg::MAXL-1:0] exp_bits;
    int p, cyc, idx;
    checks = 0; failures = 0; finished = 0;
    @(posedge rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      mdl.init();
      for (int t = 0; t < L_SIN; t++) begin
        mdl.step(sel);
        for (int j = 0; j < M; j++) hsel[t][j] = sel[j];
      end
      exp_bits = mdl.best_bits();
      // pack and write the words
      for (int w = 0; w < NW; w++) begin
        @(negedge clk);
        we = 1; waddr = AW'(w);
        for (int j = 0; j < M; j++) begin
          logic [STEP-1:0] d;
          p = j;
          for (int s = STEP - 1; s >= 0; s--) begin
            d[s] = hsel[w * STEP + s][p][0];
            p    = hsel[w * STEP + s][p] >> 1;
          end
          wdata[j] = {PW'(p), d};
        end
      end
      @(negedge clk);
      we = 0; start = 1; start_state = (K-1)'(mdl.best_state());
      @(negedge clk);
      start = 0; start_state = '0;
      cyc = 1; idx = 0;
      while (!out_valid) begin
        chk(busy, "busy low during trace back");
        @(negedge clk);
        cyc++;
        if (cyc > 4 * NW + 8) break;
      end
      chk(cyc - 1 == NW, $sformatf("output started %0d cycles after start, expected %0d", cyc - 1, NW));
      while (out_valid) begin
        for (int i = 0; i < STEP; i++)
          chk(out_bits[i] == exp_bits[idx * STEP + i],
              $sformatf("frame %0d symbol %0d", f, idx * STEP + i));
        idx++;
        if (out_last) begin
          chk(done, "done missing with the last group");
          @(negedge clk);
          break;
        end
        @(negedge clk);
      end
      chk(idx == NW, $sformatf("%0d groups, expected %0d", idx, NW));
      chk(!busy, "busy still high after the last group");
    end
    finished = 1;
  end

endmodule
