// Testbench of the decoded-sequence LIFO: random push/pop traffic against a
// queue model, checking top word, count, empty and full; plus one complete
// fill and drain that must return the words in reverse order.
module tb_mtb_lifo;
  localparam int DEPTH = 8, WIDTH = 3;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic [3:0] count;
  logic empty, full;
  logic [WIDTH-1:0] q [$];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mtb_lifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  task automatic compare();
    checks++;
    if (count !== 4'(q.size()) || empty !== (q.size() == 0) || full !== (q.size() == DEPTH)
        || (q.size() > 0 && dout !== q[$])) begin
      failures++;
      $display("ERROR: count %0d empty %0b full %0b dout %0d, model size %0d top %0d",
               count, empty, full, dout, q.size(), q.size() ? q[$] : 0);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      compare();
      push = 1'($urandom) && (q.size() < DEPTH);
      pop  = 1'($urandom) && (q.size() > 0);
      din  = WIDTH'($urandom);
      if (push && pop) q[$] = din;
      else if (push)   q.push_back(din);
      else if (pop)    void'(q.pop_back());
    end
    @(negedge clk); push = 0; pop = 0;
    while (q.size() > 0) begin
      @(negedge clk); compare(); pop = 1; void'(q.pop_back());
    end
    @(negedge clk); pop = 0;
    // fill then drain
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); push = 1; din = WIDTH'(i); q.push_back(din);
    end
    @(negedge clk); push = 0; compare();
    for (int i = DEPTH - 1; i >= 0; i--) begin
      checks++;
      if (dout !== WIDTH'(i)) begin
        failures++;
        $display("ERROR: drain got %0d expected %0d", dout, i);
      end
      pop = 1; @(negedge clk);
    end
    pop = 0; q.delete();
    #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
