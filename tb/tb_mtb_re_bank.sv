// Testbench of the reduced register-exchange bank (M = 4, m = 3): random
// sorter results against a model that follows each survivor's predecessor
// chain. At every flush each row of the word must hold the rank its ancestor
// had m steps earlier and the m decision bits of the chain, newest first; the
// bank must then restart with row j = {j, 0}.
module tb_mtb_re_bank;
  localparam int M = 4, MSTEP = 3, PW = 2, RW = PW + MSTEP;
  logic clk = 0, rst_n = 0;
  logic upd = 0, flush = 0;
  logic [M-1:0][PW:0] sel = '0;
  logic [M-1:0][RW-1:0] word, rows;
  int   m_pn [M];
  int   m_dec [M];
  int   n_pn [M], n_dec [M];
  int   sub = 0;
  int   checks = 0, failures = 0, flushes = 0;

  always #5 clk = ~clk;

  mtb_re_bank #(.M(M), .MSTEP(MSTEP)) dut (.*);

  initial begin
    for (int j = 0; j < M; j++) begin m_pn[j] = j; m_dec[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      for (int j = 0; j < M; j++) begin
        checks++;
        if (rows[j] !== {PW'(m_pn[j]), MSTEP'(m_dec[j])}) begin
          failures++;
          $display("ERROR: row %0d = %b expected %0d/%b", j, rows[j], m_pn[j], m_dec[j]);
        end
      end
      upd = ($urandom_range(3) != 0);
      flush = upd && (sub == MSTEP - 1);
      for (int j = 0; j < M; j++) sel[j] = (PW+1)'($urandom);
      for (int j = 0; j < M; j++) begin
        int p;
        p = sel[j][PW:1];
        n_pn[j]  = m_pn[p];
        n_dec[j] = (int'(sel[j][0]) << (MSTEP - 1)) | (m_dec[p] >> 1);
      end
      #1;
      if (flush) begin
        flushes++;
        for (int j = 0; j < M; j++) begin
          checks++;
          if (word[j] !== {PW'(n_pn[j]), MSTEP'(n_dec[j])}) begin
            failures++;
            $display("ERROR: word row %0d = %b expected %0d/%b", j, word[j], n_pn[j], n_dec[j]);
          end
        end
      end
      if (upd) begin
        sub = flush ? 0 : sub + 1;
        for (int j = 0; j < M; j++) begin
          m_pn[j]  = flush ? j : n_pn[j];
          m_dec[j] = flush ? 0 : n_dec[j];
        end
      end
    end
    checks++;
    if (flushes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
