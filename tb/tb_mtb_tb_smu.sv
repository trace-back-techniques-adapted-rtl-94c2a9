// Testbench of the plain trace-back survivor memory: the default configuration
// (M = 2, 4 states, 8-symbol frames), M = 4 (16 states, 32-symbol frames) and
// M = 8 (64 states, 64-symbol frames), all checked bit by bit against the
// reference M algorithm, with the trace-back latency checked to be one cycle
// per symbol.
module tb_mtb_tb_smu;
  logic clk = 0, rst_n = 0;
  int   c0, f0, s0, c1, f1, s1, c2, f2, s2, checks, failures;
  bit   d0, d1, d2;

  always #5 clk = ~clk;

  mtb_smu_harness #(.KIND(0)) h0 (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .stalls(s0), .finished(d0));
  mtb_smu_harness #(.KIND(0), .M(4), .K(5), .L_SIN(32), .FRAMES(10)) h1 (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .stalls(s1), .finished(d1));
  mtb_smu_harness #(.KIND(0), .M(8), .K(7), .L_SIN(64), .FRAMES(6)) h2 (
    .clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .stalls(s2), .finished(d2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    repeat (2) @(posedge clk);
    checks   = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    if (s0 == 0 || s1 == 0 || s2 == 0) begin
      failures++;
      $display("ERROR: input was never stalled by a trace back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
