// Testbench of the combined register-exchange / trace-back survivor memory:
// the default configuration (M = 2, m = 2, 4 states, 8-symbol frames, traced
// in 4 steps), M = 4 with m = 4 and 16 states, m = 3 with 24-symbol frames,
// and M = 8 with m = 8 and 64 states, all checked bit by bit against the
// reference M algorithm, with the trace-back latency checked to be one cycle
// per m symbols.
module tb_mtb_combined_smu;
  logic clk = 0, rst_n = 0;
  int   c0, f0, s0, c1, f1, s1, c2, f2, s2, c3, f3, s3, checks, failures;
  bit   d0, d1, d2, d3;

  always #5 clk = ~clk;

  mtb_smu_harness #(.KIND(1)) h0 (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .stalls(s0), .finished(d0));
  mtb_smu_harness #(.KIND(1), .M(4), .K(5), .MSTEP(4), .L_SIN(32), .FRAMES(10)) h1 (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .stalls(s1), .finished(d1));
  mtb_smu_harness #(.KIND(1), .M(2), .K(4), .MSTEP(3), .L_SIN(24), .FRAMES(10)) h2 (
    .clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .stalls(s2), .finished(d2));
  mtb_smu_harness #(.KIND(1), .M(8), .K(7), .MSTEP(8), .L_SIN(64), .FRAMES(6)) h3 (
    .clk(clk), .rst_n(rst_n), .checks(c3), .failures(f3), .stalls(s3), .finished(d3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    repeat (2) @(posedge clk);
    checks   = c0 + c1 + c2 + c3 + 1;
    failures = f0 + f1 + f2 + f3;
    if (s0 == 0 || s1 == 0 || s2 == 0 || s3 == 0) begin
      failures++;
      $display("ERROR: input was never stalled by a trace back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
