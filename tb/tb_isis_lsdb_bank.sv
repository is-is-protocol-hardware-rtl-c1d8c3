// tb_isis_lsdb_bank: applies adds, stale adds and purges to one LSDB bank
// and compares the active copy with an independent model (per node: has an
// LSP, sequence number, metric to every other node). It also checks that a
// reader sees the old active row until the swap, that each applied update
// swaps the copies once, and the update latency.
module tb_isis_lsdb_bank;
  import isis_pkg::*;
  logic clk = 0, rst = 1;
  logic upd_valid, busy, upd_done, upd_applied, lk_hit, lk_has_lsp, rd_has_lsp, q_hit,
        n_known, act_sel;
  lsp_t upd_lsp;
  node_id_t lk_id, rd_id, q_id, n_id;
  node_id_t [N_NODES-1:0] ids_out;
  idx_t lk_idx, rd_idx, sp_idx, q_idx, n_idx;
  logic [31:0] lk_seq, rd_seq;
  row_t rd_row, sp_row;
  logic [15:0] swaps;
  int checks = 0, failures = 0;

  isis_lsdb_bank dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // model over node IDs 1..7 (index u = 0..6 of this array)
  bit          m_has [7];
  logic [31:0] m_seq [7];
  int          m_met [7][7];
  int          exp_swaps = 0;

  function automatic node_id_t nid(int u);
    return {48'h0000_1921_6800 + 48'(u), 8'h00};
  endfunction

  task automatic apply(input int u, input logic [31:0] seq, input bit purge,
                       input int n, input int nb [4], input int mt [4]);
    lsp_t l;
    int cyc;
    bit newer, exp_applied;
    row_t old_row;
    l = '0;
    l.id = nid(u); l.seq = seq; l.lifetime = purge ? 16'd0 : 16'd1200; l.cnt = 3'(n);
    for (int i = 0; i < n; i++) begin l.nbr_id[i] = nid(nb[i]); l.nbr_metric[i] = metric_t'(mt[i]); end
    // what the reader sees before
    lk_id = nid(u); #1;
    rd_idx = lk_idx; #1;
    old_row = rd_row;
    @(negedge clk);
    upd_lsp = l; upd_valid = 1;
    @(negedge clk);
    upd_valid = 0;
    cyc = 1;
    while (!upd_done) begin
      // active copy unchanged while the update runs (the zeroing of a purge
      // is the only write to the active copy)
      if (!purge && m_has[u]) chk(rd_row == old_row, "active row stable during update");
      @(negedge clk); cyc++;
    end
    newer = !m_has[u] || seq > m_seq[u];
    exp_applied = purge ? m_has[u] : newer;
    chk(upd_applied == exp_applied, "applied");
    if (exp_applied) begin
      exp_swaps++;
      if (purge) chk(cyc == N_NODES + 3, "purge latency");
      else       chk(cyc == n + 1 + 1 + N_NODES + 1 + 1, "add latency");
      if (purge) begin
        m_has[u] = 0; m_seq[u] = 0;
        for (int v = 0; v < 7; v++) m_met[u][v] = 0;
      end else begin
        m_has[u] = 1; m_seq[u] = seq;
        for (int v = 0; v < 7; v++) m_met[u][v] = 0;
        for (int i = 0; i < n; i++) if (nb[i] != u) m_met[u][nb[i]] = mt[i];
      end
    end
    chk(swaps == 16'(exp_swaps), "swap count");
  endtask

  task automatic compare();
    for (int u = 0; u < 7; u++) begin
      lk_id = nid(u); #1;
      chk(lk_has_lsp == m_has[u], "has lsp");
      if (m_has[u]) begin
        chk(lk_seq == m_seq[u], "seq");
        rd_idx = lk_idx; #1;
        for (int v = 0; v < 7; v++) begin
          q_id = nid(v); #1;
          if (m_met[u][v] != 0) begin
            chk(q_hit && int'(rd_row[q_idx]) == m_met[u][v], "metric");
            sp_idx = lk_idx; #1;
            chk(sp_row == rd_row, "spp port");
            n_idx = q_idx; #1;
            chk(n_id == nid(v) && ids_out[q_idx] == nid(v), "index to id");
          end else if (q_hit) chk(rd_row[q_idx] == '0, "no link");
        end
      end
    end
  endtask

  initial begin
    int nb [4], mt [4];
    upd_valid = 0; upd_lsp = '0; lk_id = '0; rd_idx = '0; sp_idx = '0; q_id = '0; n_idx = '0;
    for (int u = 0; u < 7; u++) begin m_has[u] = 0; m_seq[u] = 0; for (int v = 0; v < 7; v++) m_met[u][v] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    nb = '{1, 2, 0, 0}; mt = '{5, 3, 0, 0};  apply(0, 1, 0, 2, nb, mt); compare();
    nb = '{0, 3, 0, 0}; mt = '{5, 2, 0, 0};  apply(1, 1, 0, 2, nb, mt); compare();
    nb = '{4, 0, 0, 0}; mt = '{9, 0, 0, 0};  apply(0, 1, 0, 1, nb, mt); compare();  // stale
    nb = '{1, 0, 0, 0}; mt = '{7, 0, 0, 0};  apply(0, 2, 0, 1, nb, mt); compare();  // newer
    nb = '{0, 0, 0, 0}; mt = '{0, 0, 0, 0};  apply(1, 0, 1, 0, nb, mt); compare();  // purge
    nb = '{0, 0, 0, 0}; mt = '{0, 0, 0, 0};  apply(5, 0, 1, 0, nb, mt); compare();  // purge of unknown
    for (int t = 0; t < 150; t++) begin
      int u, n;
      u = $urandom % 7; n = $urandom % 5;
      for (int i = 0; i < 4; i++) begin nb[i] = $urandom % 7; mt[i] = 1 + $urandom % 63; end
      // distinct neighbours
      for (int i = 1; i < 4; i++) for (int j = 0; j < i; j++) if (nb[i] == nb[j]) nb[i] = u;
      if ($urandom % 5 == 0) apply(u, 0, 1, 0, nb, mt);
      else begin
        // drop duplicates of u
        apply(u, m_seq[u] + 32'($urandom % 3), 0, n, nb, mt);
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
