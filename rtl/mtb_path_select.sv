// Path-number multiplexer of the trace-back unit.
//
// A decision vector read from memory holds one entry per surviving path, in
// the order the sorter ranked the paths (entry 0 = least path metric). Each
// entry is {path number of the predecessor, decision bits}: the path number
// (log2 M bits, the MSBs) says which entry of the previous vector continues
// this path, the STEP decision bits (LSBs) are the surviving-transition bits.
// The multiplexer picks the entry named by the path-number register and sends
// its decision bits on; on every trace-back step the register takes the
// picked entry's path number, so the next vector is read at the right place.
//
// Interface: `load` sets the register to `init_ptr` (the path to start from);
// `step` advances it. `dec` is combinational from `vec` and the register.
// Entry j sits at vec[j], i.e. bits [j*EW +: EW] of the word (entry 0, the
// best path, in the least significant bits). STEP = 1 gives the
// plain trace-back entry of log2 M + 1 bits; STEP = m the combined scheme.
module mtb_path_select #(
  parameter int unsigned M    = mtb_pkg::DEF_M,
  parameter int unsigned STEP = 1,
  localparam int unsigned PW  = mtb_pkg::path_w(M),
  localparam int unsigned EW  = PW + STEP
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [PW-1:0]           init_ptr,
  input  logic                    step,
  input  logic [M-1:0][EW-1:0]    vec,
  output logic [STEP-1:0]         dec,
  output logic [PW-1:0]           ptr
);

  logic [EW-1:0] entry;

  always_comb begin
    entry = vec[ptr];
    dec   = entry[STEP-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ptr <= '0;
    else if (load) ptr <= init_ptr;
    else if (step) ptr <= entry[EW-1:STEP];
  end

endmodule
