// tb_isis_datapath: checks the data path as a whole: configuration
// registers, that every ingress class lands in its own buffer in order,
// that egress records leave in priority order through the egress port,
// that an overflowing buffer counts drops, and that the level-1 and level-2
// LSDBs are kept apart and reached through the right port muxes.
module tb_isis_datapath;
  import isis_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic [7:0] afiValue = 8'h49, nsel = 8'h00, psnID = 8'h07;
  logic [15:0] areaAddress = 16'h0003;
  sys_id_t systemID = 48'h0011_2233_4455;
  logic nselSet = 0, dis = 1;
  logic [7:0] cfg_afi, cfg_psn; logic [15:0] cfg_area; sys_id_t cfg_sysid; logic cfg_dis;
  node_id_t cfg_own_id; logic [79:0] cfg_net;
  logic in_valid = 0; buf_cls_t in_cls = BUF_IIH; iih_t in_iih = '0; lsp_t in_lsp = '0;
  snp_t in_snp = '0;
  logic [N_BUF-1:0] in_pop = '0, in_empty, eg_full;
  iih_t hd_in_iih, hd_eg_iih, eg_iih = '0;
  lsp_t hd_in_db, hd_in_lsp1, hd_in_lsp2, hd_eg_db, hd_eg_lsp1, hd_eg_lsp2, eg_lsp = '0,
        upd_lsp = '0;
  snp_t hd_in_csnp, hd_in_psnp, hd_eg_csnp, hd_eg_psnp, eg_snp = '0;
  logic eg_valid = 0, tx_avail, tx_pop = 0; buf_cls_t eg_cls = BUF_IIH, tx_cls;
  logic [7:0] drops;
  logic [1:0] upd_valid = '0, db_done, lk_has_lsp, rd_has_lsp;
  node_id_t lk_id = '0; idx_t [1:0] lk_idx; logic [1:0][31:0] lk_seq, rd_seq; idx_t rd_idx = '0;
  node_id_t [1:0] rd_id; row_t [1:0] rd_row; node_id_t [1:0][N_NODES-1:0] ids;
  logic sp_level = 0; idx_t sp_idx = '0, q_idx, n_idx = '0; row_t sp_row;
  logic q_level = 0, q_hit; node_id_t q_id = '0, n_id; logic [1:0][15:0] lsdb_swaps;

  isis_datapath dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [31:0] tag_of(input buf_cls_t c, input int k);
    return 32'(int'(c) * 100 + k);
  endfunction

  task automatic push_in(input buf_cls_t c, input int k);
    @(negedge clk);
    in_valid = 1; in_cls = c; in_iih = '0; in_lsp = '0; in_snp = '0;
    in_iih.nbr = 48'(tag_of(c, k)); in_lsp.seq = tag_of(c, k); in_snp.ent_seq[0] = tag_of(c, k);
    @(negedge clk); in_valid = 0;
  endtask
  task automatic push_eg(input buf_cls_t c, input int k);
    @(negedge clk);
    eg_valid = 1; eg_cls = c; eg_iih = '0; eg_lsp = '0; eg_snp = '0;
    eg_iih.nbr = 48'(tag_of(c, k)); eg_lsp.seq = tag_of(c, k); eg_snp.ent_seq[0] = tag_of(c, k);
    @(negedge clk); eg_valid = 0;
  endtask
  function automatic logic [31:0] head_in(input buf_cls_t c);
    case (c)
      BUF_IIH:  return hd_in_iih.nbr[31:0];
      BUF_DB:   return hd_in_db.seq;
      BUF_LSP1: return hd_in_lsp1.seq;
      BUF_LSP2: return hd_in_lsp2.seq;
      BUF_CSNP: return hd_in_csnp.ent_seq[0];
      default:  return hd_in_psnp.ent_seq[0];
    endcase
  endfunction
  function automatic logic [31:0] head_eg(input buf_cls_t c);
    case (c)
      BUF_IIH:  return hd_eg_iih.nbr[31:0];
      BUF_DB:   return hd_eg_db.seq;
      BUF_LSP1: return hd_eg_lsp1.seq;
      BUF_LSP2: return hd_eg_lsp2.seq;
      BUF_CSNP: return hd_eg_csnp.ent_seq[0];
      default:  return hd_eg_psnp.ent_seq[0];
    endcase
  endfunction

  task automatic lsdb_add(input bit l2, input logic [7:0] a, input logic [7:0] b, input int m);
    @(negedge clk);
    upd_lsp = '0; upd_lsp.id = {40'h0, a, 8'h0}; upd_lsp.seq = 1; upd_lsp.lifetime = 1200;
    upd_lsp.cnt = 1; upd_lsp.nbr_id[0] = {40'h0, b, 8'h0}; upd_lsp.nbr_metric[0] = metric_t'(m);
    upd_valid[l2] = 1;
    @(negedge clk); upd_valid = '0;
    while (!db_done[l2]) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; afiValue = 0; systemID = 0;
    chk(cfg_afi == 8'h49 && cfg_area == 16'h0003 && cfg_sysid == 48'h0011_2233_4455 &&
        cfg_psn == 8'h07 && cfg_dis && cfg_own_id == {48'h0011_2233_4455, 8'h00} &&
        cfg_net == {8'h49, 16'h0003, 48'h0011_2233_4455, 8'h00}, "configuration");
    // ingress: two records per class, in reverse class order
    for (int c = N_BUF - 1; c >= 0; c--) begin push_in(buf_cls_t'(c), 1); push_in(buf_cls_t'(c), 2); end
    chk(in_empty == '0, "all ingress buffers filled");
    for (int c = 0; c < N_BUF; c++)
      for (int k = 1; k <= 2; k++) begin
        chk(head_in(buf_cls_t'(c)) == tag_of(buf_cls_t'(c), k), $sformatf("ingress class %0d order", c));
        @(negedge clk); in_pop = 6'(1 << c); @(negedge clk); in_pop = '0;
      end
    chk(in_empty == '1, "ingress drained");
    // egress: one record per class, drained in priority order
    for (int c = N_BUF - 1; c >= 0; c--) push_eg(buf_cls_t'(c), 5);
    for (int c = 0; c < N_BUF; c++) begin
      #1;
      chk(tx_avail && tx_cls == buf_cls_t'(c) && head_eg(buf_cls_t'(c)) == tag_of(buf_cls_t'(c), 5),
          $sformatf("egress priority %0d", c));
      @(negedge clk); tx_pop = 1; @(negedge clk); tx_pop = 0;
    end
    #1 chk(!tx_avail, "egress drained");
    // overflow of egIIH
    for (int k = 0; k < 6; k++) push_eg(BUF_IIH, k);
    chk(eg_full[BUF_IIH] && drops == 8'd2, "overflow counted");
    // LSDBs of the two levels
    lsdb_add(0, 8'h01, 8'h02, 9);
    lsdb_add(1, 8'h01, 8'h03, 4);
    lk_id = {40'h0, 8'h01, 8'h0}; #1;
    chk(lk_has_lsp == 2'b11, "both levels hold node 1");
    q_level = 0; q_id = {40'h0, 8'h02, 8'h0}; sp_level = 0; sp_idx = lk_idx[0]; #1;
    chk(q_hit && sp_row[q_idx] == 9, "level 1 row through SPP port");
    q_level = 1; #1;
    chk(!q_hit, "node 2 unknown on level 2");
    q_id = {40'h0, 8'h03, 8'h0}; sp_level = 1; sp_idx = lk_idx[1]; #1;
    chk(q_hit && sp_row[q_idx] == 4, "level 2 row through SPP port");
    n_idx = q_idx; #1;
    chk(n_id == {40'h0, 8'h03, 8'h0}, "index to ID on level 2");
    chk(lsdb_swaps[0] == 1 && lsdb_swaps[1] == 1, "one swap per level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
