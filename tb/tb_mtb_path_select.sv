// Testbench of the path-number multiplexer: random decision vectors (M = 4,
// entries of 2 path-number bits and 2 decision bits), checking the selected
// decision bits and the path-number register after load and after each step.
module tb_mtb_path_select;
  localparam int M = 4, STEP = 2, PW = 2, EW = PW + STEP;
  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0;
  logic [PW-1:0] init_ptr = '0, ptr;
  logic [M-1:0][EW-1:0] vec = '0;
  logic [STEP-1:0] dec;
  int   ref_ptr = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mtb_path_select #(.M(M), .STEP(STEP)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (ptr !== PW'(ref_ptr)) begin
        failures++;
        $display("ERROR: ptr %0d expected %0d", ptr, ref_ptr);
      end
      vec = {M{EW'($urandom)}};
      for (int j = 0; j < M; j++) vec[j] = EW'($urandom);
      #1;
      checks++;
      if (dec !== vec[ref_ptr][STEP-1:0]) begin
        failures++;
        $display("ERROR: dec %b expected %b", dec, vec[ref_ptr][STEP-1:0]);
      end
      load = ($urandom_range(9) == 0);
      step = 1'($urandom);
      init_ptr = PW'($urandom);
      if (load)      ref_ptr = init_ptr;
      else if (step) ref_ptr = vec[ref_ptr][EW-1:STEP];
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
