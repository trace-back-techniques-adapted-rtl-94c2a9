// Trace-back unit: path-number multiplexer, visited-state shift register and
// decoded-sequence LIFO, with the sequencer that drives them.
//
// After the last decision vector of a sequence is in memory, `start` (with the
// state in which the least-metric path ends, `start_state`) begins the trace
// back. The unit then reads the memory from the last word down to word 0, one
// word per clock. In each step the multiplexer picks, from the word just read,
// the entry named by the path-number register (entry 0, the best path, for
// the first word), the picked path number is kept for the next, older word,
// the entry's STEP decision bits enter the visited-state shift register, and
// the STEP decoded bits that leave the register are pushed onto the LIFO.
// When all NWORDS words are traced, the LIFO is emptied one group per clock on
// `out_bits`/`out_valid`, oldest symbols first; `out_last` marks the final
// group and `done` pulses with it.
//
// Timing: `start` issues the read of the last word; the NWORDS trace-back
// steps follow in the next NWORDS cycles (one step per clock, the memory has
// one cycle of read latency), then NWORDS output cycles. `busy` is high from
// the cycle after `start` until the last output group. out_bits[i] is the
// decoded bit of symbol STEP*g + i of output group g.
//
// The one-word-per-clock trace back with a multiplexer, a path-number register,
// a K-1 bit shift register and a LIFO is the architecture described for the
// M algorithm; STEP > 1 is the combined scheme, which decodes STEP bits per
// step. The start/busy/done handshake and the memory port timing are choices
// of this design.
module mtb_traceback #(
  parameter int unsigned M      = mtb_pkg::DEF_M,
  parameter int unsigned K      = mtb_pkg::DEF_K,
  parameter int unsigned STEP   = 1,
  parameter int unsigned NWORDS = mtb_pkg::DEF_L_SIN,
  localparam int unsigned PW    = mtb_pkg::path_w(M),
  localparam int unsigned EW    = PW + STEP,
  localparam int unsigned AW    = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 start,
  input  logic [K-2:0]         start_state,
  output logic                 busy,
  output logic                 done,
  // decision memory read port
  output logic                 rd_en,
  output logic [AW-1:0]        rd_addr,
  input  logic [M-1:0][EW-1:0] rd_data,
  // decoded sequence
  output logic                 out_valid,
  output logic [STEP-1:0]      out_bits,
  output logic                 out_last
);

  typedef enum logic [1:0] {S_IDLE, S_TRACE, S_OUT} state_e;

  localparam int unsigned CW = $clog2(NWORDS + 1);

  state_e          st;
  logic [AW-1:0]   step_cnt;      // words traced so far in S_TRACE
  logic            trace_step;
  logic [STEP-1:0] sel_dec;
  logic [STEP-1:0] dec_bits;
  logic [CW-1:0]   lifo_count;
  logic            lifo_empty, lifo_full;
  logic            pop;
  logic [PW-1:0]   cur_ptr;       // path-number register
  logic [K-2:0]    cur_state;     // visited state

  assign trace_step = (st == S_TRACE);

  // Read the last word on start, then one older word per trace-back step.
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = AW'(NWORDS - 1);
    if (st == S_IDLE) begin
      rd_en   = start;
    end else if (st == S_TRACE) begin
      rd_en   = (32'(step_cnt) < NWORDS - 1);
      rd_addr = AW'(NWORDS - 2 - 32'(step_cnt));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      step_cnt <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          st       <= S_TRACE;
          step_cnt <= '0;
        end
        S_TRACE: begin
          if (32'(step_cnt) == NWORDS - 1) st <= S_OUT;
          step_cnt <= step_cnt + 1'b1;
        end
        S_OUT: if (32'(lifo_count) == 1) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  mtb_path_select #(.M(M), .STEP(STEP)) u_mux (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (st == S_IDLE && start),
    .init_ptr ('0),
    .step     (trace_step),
    .vec      (rd_data),
    .dec      (sel_dec),
    .ptr      (cur_ptr)
  );

  mtb_state_sr #(.K(K), .STEP(STEP)) u_sr (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (st == S_IDLE && start),
    .load_state (start_state),
    .shift      (trace_step),
    .din        (sel_dec),
    .dout       (dec_bits),
    .state      (cur_state)
  );

  assign pop = (st == S_OUT) && !lifo_empty;

  mtb_lifo #(.DEPTH(NWORDS), .WIDTH(STEP)) u_lifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (trace_step),
    .din   (dec_bits),
    .pop   (pop),
    .dout  (out_bits),
    .count (lifo_count),
    .empty (lifo_empty),
    .full  (lifo_full)
  );

  assign out_valid = pop;
  assign out_last  = pop && (32'(lifo_count) == 1);
  assign done      = out_last;
  assign busy      = (st != S_IDLE);

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == S_IDLE);
  a_lifo_room:     assert property (@(posedge clk) disable iff (!rst_n) trace_step |-> !lifo_full);

endmodule
