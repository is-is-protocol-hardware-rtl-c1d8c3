// tb_isis_mp: drives the main processor through the protocol sequence of a
// regular IS and then of a designated IS. The processor is surrounded by the
// real data path and shortest path processor; the testbench writes records
// straight into the ingress buffers and drains the egress buffers itself.
// Regular IS: hello exchange (stay in HELLO, then helloDone), own LSP in
// egDB, database exchange, LSDB update, SPF (checked through route lookups),
// a repeated hello (adjAvailable), a CSNP that reveals a missing and an
// outdated LSP (PSNP with exactly those two), the flooded LSP (snpDone, new
// routes) and a CSNP with nothing missing (snpNone). DIS: LSPs learnt, CSNP
// sent on its timer with the right summaries, PSNP answered with the LSP.
// Every event of the state machine must be seen at least once.
module tb_isis_mp;
  import isis_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  // configuration
  logic [7:0] afiValue = 8'h49, nsel = 0, psnID = 8'h01;
  logic [15:0] areaAddress = 16'h0001;
  sys_id_t systemID = 48'h0000_0000_00A1;   // this system, "Y"
  logic nselSet = 0, dis = 0;
  logic [7:0] cfg_afi, cfg_psn; logic [15:0] cfg_area; sys_id_t cfg_sysid; logic cfg_dis;
  node_id_t cfg_own_id; logic [79:0] cfg_net;
  // ingress injection
  logic in_valid = 0; buf_cls_t in_cls = BUF_IIH; iih_t in_iih = '0; lsp_t in_lsp = '0;
  snp_t in_snp = '0;
  logic [N_BUF-1:0] in_pop, in_empty, eg_full;
  iih_t hd_in_iih, hd_eg_iih, eg_iih;
  lsp_t hd_in_db, hd_in_lsp1, hd_in_lsp2, hd_eg_db, hd_eg_lsp1, hd_eg_lsp2, eg_lsp, upd_lsp;
  snp_t hd_in_csnp, hd_in_psnp, hd_eg_csnp, hd_eg_psnp, eg_snp;
  logic eg_valid, tx_avail, tx_pop = 0; buf_cls_t eg_cls, tx_cls;
  logic [7:0] drops;
  logic [1:0] upd_valid, db_done, lk_has_lsp, rd_has_lsp;
  node_id_t lk_id; idx_t [1:0] lk_idx; logic [1:0][31:0] lk_seq, rd_seq; idx_t rd_idx;
  node_id_t [1:0] rd_id; row_t [1:0] rd_row; node_id_t [1:0][N_NODES-1:0] ids;
  logic spp_start, spp_level, spp_done, spp_busy; idx_t spp_src, sp_idx, q_idx, nh_idx;
  row_t sp_row; logic q_hit, q_level = 0, q_reach; node_id_t q_id = '0, n_id;
  dist_t q_dist; logic [15:0] spp_cycles; logic [1:0][15:0] lsdb_swaps;
  logic db_phase; mp_state_t st; logic [11:0] ev;

  isis_datapath u_dp (
    .clk, .rst, .afiValue, .areaAddress, .systemID, .nsel, .nselSet, .psnID, .dis,
    .cfg_afi, .cfg_area, .cfg_sysid, .cfg_psn, .cfg_dis, .cfg_own_id, .cfg_net,
    .in_valid, .in_cls, .in_iih, .in_lsp, .in_snp, .in_pop, .in_empty, .hd_in_iih,
    .hd_in_db, .hd_in_lsp1, .hd_in_lsp2, .hd_in_csnp, .hd_in_psnp, .eg_valid, .eg_cls,
    .eg_iih, .eg_lsp, .eg_snp, .eg_full, .tx_avail, .tx_cls, .tx_pop, .hd_eg_iih,
    .hd_eg_db, .hd_eg_lsp1, .hd_eg_lsp2, .hd_eg_csnp, .hd_eg_psnp, .drops,
    .upd_valid, .upd_lsp, .db_done, .lk_id, .lk_idx, .lk_has_lsp, .lk_seq, .rd_idx,
    .rd_has_lsp, .rd_id, .rd_seq, .rd_row, .ids, .sp_level(spp_level), .sp_idx, .sp_row,
    .q_level, .q_id, .q_hit, .q_idx, .n_idx(nh_idx), .n_id, .lsdb_swaps
  );
  isis_mp #(.HELLO_PERIOD(2000), .CSNP_PERIOD(3000), .DB_QUIET(50), .SNP_WINDOW(100)) dut (
    .clk, .rst, .cfg_sysid, .cfg_own_id, .cfg_dis, .rx_evt(in_valid), .rx_cls(in_cls),
    .in_empty, .in_pop, .hd_iih(hd_in_iih), .hd_db(hd_in_db), .hd_lsp1(hd_in_lsp1),
    .hd_lsp2(hd_in_lsp2), .hd_csnp(hd_in_csnp), .hd_psnp(hd_in_psnp), .eg_full, .eg_valid,
    .eg_cls, .eg_iih, .eg_lsp, .eg_snp, .upd_valid, .upd_lsp, .db_done, .lk_id, .lk_idx,
    .lk_has_lsp, .lk_seq, .rd_idx, .rd_has_lsp, .rd_id, .rd_seq, .rd_row, .ids,
    .spp_start, .spp_level, .spp_src, .spp_done, .db_phase, .state_o(st), .events_o(ev)
  );
  isis_spp u_spp (
    .clk, .rst, .start(spp_start), .level(spp_level), .src(spp_src), .row_idx(sp_idx),
    .row(sp_row), .busy(spp_busy), .done(spp_done), .cycles(spp_cycles),
    .q_level, .q_idx, .q_reach, .q_dist, .q_nexthop(nh_idx)
  );

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog, state %0d", st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // event counters and egress capture
  int evc [12];
  iih_t q_iih[$]; lsp_t q_db[$], q_l1[$]; snp_t q_cs[$], q_ps[$];
  always @(posedge clk) begin
    for (int i = 0; i < 12; i++) if (!rst && ev[i]) evc[i]++;
    if (tx_pop && tx_avail)
      case (tx_cls)
        BUF_IIH:  q_iih.push_back(hd_eg_iih);
        BUF_DB:   q_db.push_back(hd_eg_db);
        BUF_LSP1: q_l1.push_back(hd_eg_lsp1);
        BUF_CSNP: q_cs.push_back(hd_eg_csnp);
        BUF_PSNP: q_ps.push_back(hd_eg_psnp);
        default: ;
      endcase
  end
  always @(negedge clk) tx_pop = tx_avail;

  function automatic node_id_t nd(input logic [7:0] x);
    return {40'h0, x, 8'h00};
  endfunction
  localparam logic [7:0] Y = 8'hA1, Z = 8'hA2, X = 8'hA3, W = 8'hA4;

  task automatic inj_iih(input logic [7:0] src, input bit lists);
    @(negedge clk);
    in_valid = 1; in_cls = BUF_IIH; in_iih = '0; in_iih.src = {40'h0, src};
    in_iih.nbr_valid = lists; in_iih.nbr = lists ? systemID : '0;
    @(negedge clk); in_valid = 0;
  endtask
  task automatic inj_lsp(input buf_cls_t c, input logic [7:0] id, input logic [31:0] seq,
                         input int n, input logic [7:0] nb [3], input int mt [3]);
    @(negedge clk);
    in_valid = 1; in_cls = c; in_lsp = '0; in_lsp.id = nd(id); in_lsp.seq = seq;
    in_lsp.lifetime = 16'd1200; in_lsp.cnt = 3'(n);
    for (int i = 0; i < n; i++) begin in_lsp.nbr_id[i] = nd(nb[i]); in_lsp.nbr_metric[i] = metric_t'(mt[i]); end
    @(negedge clk); in_valid = 0;
  endtask
  task automatic inj_snp(input buf_cls_t c, input int n, input logic [7:0] e [4],
                         input logic [31:0] s [4]);
    @(negedge clk);
    in_valid = 1; in_cls = c; in_snp = '0; in_snp.src = nd(Z); in_snp.cnt = 4'(n);
    for (int i = 0; i < n; i++) begin in_snp.ent_id[i] = nd(e[i]); in_snp.ent_seq[i] = s[i]; end
    @(negedge clk); in_valid = 0;
  endtask
  task automatic wait_state(input mp_state_t s, input int limit);
    int n = 0;
    while (st != s && n < limit) begin @(posedge clk); n++; end
    chk(st == s, $sformatf("reach state %0d", s));
  endtask
  task automatic route(input logic [7:0] dst, input int d, input logic [7:0] hop);
    q_level = 0; q_id = nd(dst); #1;
    chk(q_hit && q_reach && int'(q_dist) == d && n_id == nd(hop),
        $sformatf("route to %h: dist %0d hop %h", dst, q_dist, n_id[15:8]));
  endtask

  initial begin
    logic [7:0] nb [3]; int mt [3]; logic [7:0] e [4]; logic [31:0] s [4];
    for (int i = 0; i < 12; i++) evc[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // ---- regular IS ----
    repeat (20) @(posedge clk);
    chk(q_iih.size() == 1 && !q_iih[0].nbr_valid && q_iih[0].src == systemID, "first hello, no neighbour");
    inj_iih(Z, 0);
    wait_state(ST_HELLO, 20);
    repeat (10) @(posedge clk);
    chk(st == ST_HELLO, "stays in HELLO until listed");
    chk(q_iih.size() == 2 && q_iih[1].nbr_valid && q_iih[1].nbr == {40'h0, Z}, "reply names Z");
    inj_iih(Z, 1);
    wait_state(ST_DBX, 20);
    repeat (2) @(posedge clk);
    chk(evc[1] == 1, "helloDone");
    repeat (10) @(posedge clk);
    chk(q_db.size() == 1 && q_db[0].id == nd(Y) && q_db[0].seq == 1 && q_db[0].cnt == 1 &&
        q_db[0].nbr_id[0] == nd(Z) && q_db[0].nbr_metric[0] == 10, "own LSP seq 1 in egDB");
    nb = '{Y, X, 0}; mt = '{10, 5, 0};  inj_lsp(BUF_DB, Z, 1, 2, nb, mt);
    nb = '{Z, 0, 0}; mt = '{5, 0, 0};   inj_lsp(BUF_DB, X, 1, 1, nb, mt);
    wait_state(ST_LSDB, 200);
    wait_state(ST_SPF, 200);
    wait_state(ST_IDLE, 200);
    route(Z, 10, Z);
    route(X, 15, Z);
    route(Y, 0, Y);
    inj_iih(Z, 1);
    wait_state(ST_HELLO, 20);
    wait_state(ST_IDLE, 20);
    repeat (2) @(posedge clk);
    chk(evc[0] == 1, "adjAvailable");
    // CSNP: Y and Z current, X newer, W missing
    e = '{Y, Z, X, W}; s = '{1, 1, 2, 1};
    inj_snp(BUF_CSNP, 4, e, s);
    wait_state(ST_SNP, 20);
    repeat (30) @(posedge clk);
    chk(q_ps.size() == 1 && q_ps[0].cnt == 2 && q_ps[0].ent_id[0] == nd(X) &&
        q_ps[0].ent_seq[0] == 2 && q_ps[0].ent_id[1] == nd(W), "PSNP asks for X and W");
    nb = '{Z, W, 0}; mt = '{5, 1, 0};   inj_lsp(BUF_LSP1, X, 2, 2, nb, mt);
    nb = '{X, 0, 0}; mt = '{1, 0, 0};   inj_lsp(BUF_LSP1, W, 1, 1, nb, mt);
    wait_state(ST_LSDB, 400);
    repeat (2) @(posedge clk);
    chk(evc[7] == 1, "snpDone");
    wait_state(ST_IDLE, 400);
    route(W, 16, Z);
    // CSNP with nothing new
    e = '{Y, Z, X, W}; s = '{1, 1, 2, 1};
    inj_snp(BUF_CSNP, 4, e, s);
    wait_state(ST_SNP, 20);
    wait_state(ST_IDLE, 400);
    repeat (2) @(posedge clk);
    chk(evc[6] >= 1 && q_ps.size() == 1, "snpNone, no PSNP");

    // ---- designated IS ----
    @(negedge clk); rst = 1; dis = 1; systemID = {40'h0, Z};
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    q_cs.delete(); q_l1.delete();
    nb = '{Y, 0, 0}; mt = '{7, 0, 0};  inj_lsp(BUF_LSP1, X, 4, 1, nb, mt);
    nb = '{X, 0, 0}; mt = '{7, 0, 0};  inj_lsp(BUF_LSP1, Y, 9, 1, nb, mt);
    // learnt, then the CSNP timer fires
    repeat (3200) @(posedge clk);
    chk(q_cs.size() >= 1, "CSNP sent on timer");
    if (q_cs.size() >= 1)
      chk(q_cs[0].cnt == 2 && q_cs[0].src == nd(Z) &&
          ((q_cs[0].ent_id[0] == nd(X) && q_cs[0].ent_seq[0] == 4 && q_cs[0].ent_seq[1] == 9) ||
           (q_cs[0].ent_id[0] == nd(Y) && q_cs[0].ent_seq[0] == 9 && q_cs[0].ent_seq[1] == 4)),
          "CSNP summaries");
    wait_state(ST_IDLE, 400);
    e = '{X, 0, 0, 0}; s = '{4, 0, 0, 0};
    inj_snp(BUF_PSNP, 1, e, s);
    wait_state(ST_SNP, 20);
    repeat (40) @(posedge clk);
    chk(q_l1.size() == 1 && q_l1[0].id == nd(X) && q_l1[0].seq == 4 && q_l1[0].cnt == 1 &&
        q_l1[0].nbr_id[0] == nd(Y) && q_l1[0].nbr_metric[0] == 7, "PSNP answered with LSP X");
    wait_state(ST_IDLE, 400);
    for (int i = 0; i < 12; i++) chk(evc[i] > 0, $sformatf("event %0d seen", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
