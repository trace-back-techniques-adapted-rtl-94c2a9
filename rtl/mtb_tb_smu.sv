// Trace-back survivor memory for the M algorithm.
//
// The path-metric / sorting stage (outside this block) delivers, for every
// input symbol, one entry per surviving path in increasing order of path
// metric: in_sel[j] = {path number of the predecessor of survivor j among the
// previous step's sorted survivors, decision bit}. The decision bit is 0 when
// the upper transition into the survivor's state survived, 1 otherwise (the
// LSB of the predecessor state). The M entries form the decision vector of
// M(log2 M + 1) bits, written at the address equal to the symbol number.
// After L_SIN vectors the frame is complete: the unit traces the best path
// back from the last vector to the first (one vector per clock) and then
// outputs the L_SIN decoded bits in time order.
//
// Interface: in_valid/in_ready handshake, one vector per accepted cycle; with
// the last vector of the frame, in_best_state gives the state in which the
// least-metric survivor (entry 0) ends. in_ready is low from the last vector
// until the last decoded bit has left. out_valid/out_bit/out_last carry the
// decoded sequence, bit of symbol 0 first, with no back-pressure.
//
// Timing for a frame: L_SIN input cycles, one cycle for the last write to
// settle, L_SIN trace-back cycles (plus one of read latency) and L_SIN output
// cycles. The frame length, the handshake and the single-buffered memory
// (input waits while a frame is traced) are choices of this design.
module mtb_tb_smu #(
  parameter int unsigned M     = mtb_pkg::DEF_M,
  parameter int unsigned K     = mtb_pkg::DEF_K,
  parameter int unsigned L_SIN = mtb_pkg::DEF_L_SIN,
  localparam int unsigned PW   = mtb_pkg::path_w(M),
  localparam int unsigned EW   = PW + 1,
  localparam int unsigned AW   = (L_SIN > 1) ? $clog2(L_SIN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [M-1:0][EW-1:0] in_sel,
  input  logic [K-2:0]         in_best_state,
  output logic                 out_valid,
  output logic                 out_bit,
  output logic                 out_last
);

  logic [AW-1:0]        wr_addr;
  logic                 accept, last_in;
  logic                 tb_start, tb_busy, tb_done;
  logic                 frame_full;
  logic [K-2:0]         best_state_q;
  logic                 rd_en;
  logic [AW-1:0]        rd_addr;
  logic [M-1:0][EW-1:0] rd_data;
  logic [M*EW-1:0]      rd_word;

  assign accept  = in_valid && in_ready;
  assign last_in = accept && (32'(wr_addr) == L_SIN - 1);
  assign in_ready = !frame_full;

  // Write side: symbol counter = write address.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr      <= '0;
      frame_full   <= 1'b0;
      tb_start     <= 1'b0;
      best_state_q <= '0;
    end else begin
      tb_start <= last_in;
      if (accept) wr_addr <= last_in ? '0 : wr_addr + 1'b1;
      if (last_in) begin
        frame_full   <= 1'b1;
        best_state_q <= in_best_state;
      end else if (tb_done) begin
        frame_full   <= 1'b0;
      end
    end
  end

  mtb_decision_memory #(.DEPTH(L_SIN), .WIDTH(M*EW)) u_mem (
    .clk   (clk),
    .we    (accept),
    .waddr (wr_addr),
    .wdata (in_sel),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (rd_word)
  );

  assign rd_data = rd_word;

  mtb_traceback #(.M(M), .K(K), .STEP(1), .NWORDS(L_SIN)) u_tb (
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
    .out_bits    (out_bit),
    .out_last    (out_last)
  );

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n) tb_busy |-> !accept);

endmodule
