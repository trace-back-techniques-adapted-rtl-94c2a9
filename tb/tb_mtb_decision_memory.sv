// Testbench of the decision vector memory: random writes and reads against a
// reference array, checking the one-cycle read latency, that a read of the
// address being written returns the old word, and that a read without `re`
// holds the previous data.
module tb_mtb_decision_memory;
  localparam int DEPTH = 8, WIDTH = 4;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [2:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] expect_q;
  bit   expect_v;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mtb_decision_memory dut (.*);

  initial begin
    // fill every address first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 3'(a); wdata = 4'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // check the read issued in the previous cycle
      if (expect_v) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("ERROR: read got %h expected %h", rdata, expect_q);
        end
      end else if (i > 0) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("ERROR: data changed without a read");
        end
      end
      we = 1'($urandom); waddr = 3'($urandom); wdata = 4'($urandom);
      re = 1'($urandom); raddr = ($urandom_range(3) == 0) ? waddr : 3'($urandom);
      expect_v = re;
      if (re) expect_q = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
