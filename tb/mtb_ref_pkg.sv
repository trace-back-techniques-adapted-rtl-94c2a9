// Reference M-algorithm decoder for the testbenches.
//
// A software M algorithm on a binary trellis of 2**(K-1) states. The next
// state is {input bit, state[K-2:1]}, so the two transitions into a state come
// from predecessors that differ only in the LSB, and the decision bit of a
// survivor is the LSB of its predecessor (0 = upper transition). Each step
// every survivor is extended into two candidates with a random branch metric,
// merged candidates (same state) keep the smaller metric, and the M best are
// kept in increasing metric order (ties broken by candidate number). Each
// survivor keeps its complete input history, so the decoded sequence of the
// best path is known without any trace back: it is the independent reference
// the survivor memories are checked against.
//
// step() returns what the hardware receives per symbol: for survivor j the
// pair {rank of its predecessor among the previous survivors, decision bit}.
package mtb_ref_pkg;

  localparam int MAXL = 1024;

  class malg_model #(int M = 2, int K = 3);
    localparam int NS = 1 << (K - 1);
    localparam int PW = (M > 1) ? $clog2(M) : 1;

    int unsigned      state  [M];
    int unsigned      metric [M];
    bit [MAXL-1:0]    hist   [M];
    int               t;

    // Start a frame from M distinct random states.
    function void init();
      bit used [NS];
      foreach (used[i]) used[i] = 0;
      for (int j = 0; j < M; j++) begin
        int unsigned s;
        do s = $urandom_range(NS - 1); while (used[s]);
        used[s]   = 1;
        state[j]  = s;
        metric[j] = $urandom_range(15);
        hist[j]   = '0;
      end
      t = 0;
    endfunction

    // One trellis step; sel[j] = {predecessor rank, decision bit}.
    function void step(output int unsigned sel [M]);
      int unsigned c_state [2*M], c_metric [2*M], c_par [2*M], c_u [2*M];
      bit          c_live  [2*M];
      int unsigned order   [$];
      int unsigned n_state [M], n_metric [M];
      bit [MAXL-1:0] n_hist [M];
      for (int p = 0; p < M; p++)
        for (int u = 0; u < 2; u++) begin
          int c = 2 * p + u;
          c_state[c]  = (u << (K - 2)) | (state[p] >> 1);
          c_metric[c] = metric[p] + $urandom_range(15);
          c_par[c]    = p;
          c_u[c]      = u;
          c_live[c]   = 1;
        end
      // Suppression of merged paths.
      for (int a = 0; a < 2 * M; a++)
        for (int b = a + 1; b < 2 * M; b++)
          if (c_live[a] && c_live[b] && c_state[a] == c_state[b]) begin
            if (c_metric[b] < c_metric[a]) c_live[a] = 0;
            else                           c_live[b] = 0;
          end
      // Selection of the M best (insertion sort, stable).
      for (int c = 0; c < 2 * M; c++)
        if (c_live[c]) begin
          int pos = order.size();
          for (int i = 0; i < order.size(); i++)
            if (c_metric[c] < c_metric[order[i]]) begin pos = i; break; end
          order.insert(pos, c);
        end
      for (int j = 0; j < M; j++) begin
        int c = order[j];
        int p = c_par[c];
        sel[j]      = (p << 1) | (state[p] & 1);
        n_state[j]  = c_state[c];
        n_metric[j] = c_metric[c];
        n_hist[j]   = hist[p];
        n_hist[j][t] = c_u[c][0];
      end
      state  = n_state;
      metric = n_metric;
      hist   = n_hist;
      t++;
    endfunction

    function int unsigned best_state();
      return state[0];
    endfunction

    function bit [MAXL-1:0] best_bits();
      return hist[0];
    endfunction
  endclass

endpackage
