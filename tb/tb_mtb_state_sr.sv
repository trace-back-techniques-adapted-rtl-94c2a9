// Testbench of the visited-state shift register, with one and with two
// decision bits per step, against a bit-level model: the decoded output is
// the MSB side of {state, din} and the new state its low K-1 bits. Also
// replays the plain trace-back rule on a known bit sequence: loading the final
// state and shifting in the decision bits must give back the sequence.
module tb_mtb_state_sr;
  localparam int K = 4, SW = K - 1;
  logic clk = 0, rst_n = 0;
  logic load1 = 0, shift1 = 0, load2 = 0, shift2 = 0;
  logic [SW-1:0] ls1 = '0, ls2 = '0, st1, st2;
  logic [0:0] din1 = '0, dout1;
  logic [1:0] din2 = '0, dout2;
  logic [SW-1:0] r1 = '0, r2 = '0;
  logic [SW:0]   run1;
  logic [SW+1:0] run2;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mtb_state_sr #(.K(K), .STEP(1)) dut1 (.clk, .rst_n, .load(load1), .load_state(ls1),
    .shift(shift1), .din(din1), .dout(dout1), .state(st1));
  mtb_state_sr #(.K(K), .STEP(2)) dut2 (.clk, .rst_n, .load(load2), .load_state(ls2),
    .shift(shift2), .din(din2), .dout(dout2), .state(st2));

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    bit [31:0] seq;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      chk(8'(st1), 8'(r1), "state1");
      chk(8'(st2), 8'(r2), "state2");
      load1 = ($urandom_range(7) == 0); shift1 = 1'($urandom); ls1 = SW'($urandom); din1 = 1'($urandom);
      load2 = ($urandom_range(7) == 0); shift2 = 1'($urandom); ls2 = SW'($urandom); din2 = 2'($urandom);
      run1 = {r1, din1};
      run2 = {r2, din2};
      #1;
      chk(8'(dout1), 8'(run1[SW]), "dout1");
      chk(8'(dout2), 8'(run2[SW+1:SW]), "dout2");
      if (load1) r1 = ls1; else if (shift1) r1 = run1[SW-1:0];
      if (load2) r2 = ls2; else if (shift2) r2 = run2[SW-1:0];
    end
    // Trace a known sequence b[0..19]: the state after symbol t holds b[t-1]
    // (MSB) .. b[t-K+1]; the decision bit of symbol t is b[t-K+1] (0 before 0).
    seq = $urandom;
    @(negedge clk);
    shift1 = 0; load1 = 1;
    ls1 = {seq[19], seq[18], seq[17]};
    for (int t = 19; t >= 0; t--) begin
      @(negedge clk);
      load1 = 0; shift1 = 1;
      din1 = (t - SW >= 0) ? seq[t - SW] : 1'b0;
      #1;
      chk(8'(dout1), 8'(seq[t]), "decoded bit");
    end
    @(negedge clk); shift1 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
