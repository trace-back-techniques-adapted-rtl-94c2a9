// Testbench of the trace-back unit: one decision word per symbol (M = 2 and
// M = 4) and two symbols per word (the combined scheme's format), each traced
// from words packed by the testbench out of a reference M-algorithm run.
module tb_mtb_traceback;
  logic clk = 0, rst_n = 0;
  int   c0, f0, c1, f1, c2, f2;
  bit   d0, d1, d2;

  always #5 clk = ~clk;

  mtb_traceback_harness #(.STEP(1)) h0 (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .finished(d0));
  mtb_traceback_harness #(.M(4), .K(5), .STEP(1), .L_SIN(32)) h1 (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .finished(d1));
  mtb_traceback_harness #(.STEP(2)) h2 (
    .clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .finished(d2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
