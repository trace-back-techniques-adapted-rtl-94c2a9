// Visited-state shift register of the trace-back unit (K - 1 bits).
//
// Tracing back, the state visited one trellis step earlier is the current
// state shifted left by one with the decision bit appended at the LSB, and the
// MSB of each visited state is one decoded bit. This register holds the
// current visited state; `load` sets it to the state the best path ends in.
// On `shift` it takes STEP decision bits at once: the K - 1 + STEP bit string
// {state, din} is the run of input bits from newest to oldest, its top STEP
// bits leave as decoded bits (`dout`) and its low K - 1 bits become the new
// state. STEP = 1 is the plain trace-back; STEP = m decodes m bits per step
// (combined scheme). din[STEP-1] must be the newest decision bit.
//
// `dout` is combinational and valid in the cycle `shift` is asserted;
// dout[i] is the bit of the (i)-th oldest of the STEP symbols decoded.
module mtb_state_sr #(
  parameter int unsigned K    = mtb_pkg::DEF_K,
  parameter int unsigned STEP = 1,
  localparam int unsigned SW  = K - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [SW-1:0]   load_state,
  input  logic            shift,
  input  logic [STEP-1:0] din,
  output logic [STEP-1:0] dout,
  output logic [SW-1:0]   state
);

  logic [SW+STEP-1:0] run;

  always_comb begin
    run  = {state, din};
    dout = run[SW+STEP-1 -: STEP];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (load)  state <= load_state;
    else if (shift) state <= run[SW-1:0];
  end

endmodule
