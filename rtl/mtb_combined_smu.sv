// Combined register-exchange / trace-back survivor memory for the M algorithm.
//
// Same input as the plain trace-back memory: per input symbol, one entry
// {predecessor rank, decision bit} per survivor, in increasing path-metric
// order. A small register-exchange bank (log2 M + m bits per row) gathers m
// trellis steps; every m symbols its M rows, one word of M(log2 M + m) bits,
// are written to the trace-back memory, so a frame of L_SIN symbols needs only
// L_SIN/m words. The trace back then reads one word per clock and decodes m
// bits per step: the frame is traced in L_SIN/m cycles instead of L_SIN.
//
// Interface: identical to the plain trace-back memory except that the decoded
// sequence leaves as groups of m bits (out_bits[i] is the bit of symbol
// m*g + i of group g), one group per clock, earliest group first.
// L_SIN must be a multiple of MSTEP.
//
// Timing for a frame: L_SIN input cycles, one settling cycle, L_SIN/m trace
// steps plus one of read latency, L_SIN/m output cycles. The handshake and
// single buffering are choices of this design.
module mtb_combined_smu #(
  parameter int unsigned M     = mtb_pkg::DEF_M,
  parameter int unsigned K     = mtb_pkg::DEF_K,
  parameter int unsigned MSTEP = mtb_pkg::DEF_MSTEP,
  parameter int unsigned L_SIN = mtb_pkg::DEF_L_SIN,
  localparam int unsigned PW   = mtb_pkg::path_w(M),
  localparam int unsigned RW   = PW + MSTEP,
  localparam int unsigned NW   = L_SIN / MSTEP,
  localparam int unsigned AW   = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned SCW  = (MSTEP > 1) ? $clog2(MSTEP) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [M-1:0][PW:0]   in_sel,
  input  logic [K-2:0]         in_best_state,
  output logic                 out_valid,
  output logic [MSTEP-1:0]     out_bits,
  output logic                 out_last
);

  logic [SCW-1:0]       sub_cnt;      // symbols gathered in the bank
  logic [AW-1:0]        wr_addr;      // word counter
  logic                 accept, flush, last_in;
  logic                 frame_full, tb_start, tb_busy, tb_done;
  logic [K-2:0]         best_state_q;
  logic [M-1:0][RW-1:0] word, rows;
  logic                 rd_en;
  logic [AW-1:0]        rd_addr;
  logic [M*RW-1:0]      rd_word;
  logic [M-1:0][RW-1:0] rd_data;

  assign accept   = in_valid && in_ready;
  assign flush    = accept && (32'(sub_cnt) == MSTEP - 1);
  assign last_in  = flush && (32'(wr_addr) == NW - 1);
  assign in_ready = !frame_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_cnt      <= '0;
      wr_addr      <= '0;
      frame_full   <= 1'b0;
      tb_start     <= 1'b0;
      best_state_q <= '0;
    end else begin
      tb_start <= last_in;
      if (accept) sub_cnt <= flush ? '0 : sub_cnt + 1'b1;
      if (flush)  wr_addr <= last_in ? '0 : wr_addr + 1'b1;
      if (last_in) begin
        frame_full   <= 1'b1;
        best_state_q <= in_best_state;
      end else if (tb_done) begin
        frame_full   <= 1'b0;
      end
    end
  end

  mtb_re_bank #(.M(M), .MSTEP(MSTEP)) u_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .upd   (accept),
    .flush (flush),
    .sel   (in_sel),
    .word  (word),
    .rows  (rows)
  );

  mtb_decision_memory #(.DEPTH(NW), .WIDTH(M*RW)) u_mem (
    .clk   (clk),
    .we    (flush),
    .waddr (wr_addr),
    .wdata (word),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (rd_word)
  );

  assign rd_data = rd_word;

  mtb_traceback #(.M(M), .K(K), .STEP(MSTEP), .NWORDS(NW)) u_tb (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (tb_start),
    .start_state (best_state_q),
    .busy        (tb_busy),
    .done        (tb_done),
    .rd_en       (rd_en),
    .rd_addr     (rd_addr),
    .rd_data     (rd_data),
    .out_valid   (out_valid),
    .out_bits    (out_bits),
    .out_last    (out_last)
  );

  initial begin
    assert (L_SIN % MSTEP == 0) else $error("L_SIN must be a multiple of MSTEP");
  end

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n) tb_busy |-> !accept);

endmodule
