// isis_datapath: the data path of the IS-IS engine. It holds the system
// input registers, the six ingress buffers (inIIH, inDB, inLSP-L1, inLSP-L2,
// inCSNP, inPSNP), the six egress buffers (egIIH ... egPSNP), the
// multiplexers and demultiplexers between them and the processors, and the
// link state databases of level 1 and level 2, each an active/standby pair.
//
// The ingress packet processor writes one record (in_valid, in_cls and the
// record of that class); the main processor pops ingress buffers (in_pop),
// writes egress records (eg_valid, eg_cls) and drives the LSDB update,
// lookup and read ports; the egress packet processor is offered the
// highest-priority non-empty egress buffer (tx_avail, tx_cls) and pops it
// with tx_pop. The shortest path processor reads LSDB rows of level
// sp_level through sp_idx/sp_row. The route query port maps a node ID of
// level q_level to its row index (q_hit, q_idx) and a row index back to a
// node ID (n_idx, n_id). Buffer depth is BUF_DEPTH records for every buffer.
// The set of components follows the data path figure of the document;
// buffer depth and port structure are this design's choices.
// The low octet of cfg_own_id is always zero (see isis_sys_inputs).
module isis_datapath
  import isis_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst,
  // configuration inputs
  input  logic [7:0]         afiValue,
  input  logic [15:0]        areaAddress,
  input  sys_id_t            systemID,
  input  logic [7:0]         nsel,
  input  logic               nselSet,
  input  logic [7:0]         psnID,
  input  logic               dis,
  output logic [7:0]         cfg_afi,
  output logic [15:0]        cfg_area,
  output sys_id_t            cfg_sysid,
  output logic [7:0]         cfg_psn,
  output logic               cfg_dis,
  output node_id_t           cfg_own_id,
  output logic [79:0]        cfg_net,
  // from the ingress packet processor
  input  logic               in_valid,
  input  buf_cls_t           in_cls,
  input  iih_t               in_iih,
  input  lsp_t               in_lsp,
  input  snp_t               in_snp,
  // ingress buffers to the main processor
  input  logic [N_BUF-1:0]   in_pop,
  output logic [N_BUF-1:0]   in_empty,
  output iih_t               hd_in_iih,
  output lsp_t               hd_in_db,
  output lsp_t               hd_in_lsp1,
  output lsp_t               hd_in_lsp2,
  output snp_t               hd_in_csnp,
  output snp_t               hd_in_psnp,
  // egress buffers from the main processor
  input  logic               eg_valid,
  input  buf_cls_t           eg_cls,
  input  iih_t               eg_iih,
  input  lsp_t               eg_lsp,
  input  snp_t               eg_snp,
  output logic [N_BUF-1:0]   eg_full,
  // egress buffers to the egress packet processor
  output logic               tx_avail,
  output buf_cls_t           tx_cls,
  input  logic               tx_pop,
  output iih_t               hd_eg_iih,
  output lsp_t               hd_eg_db,
  output lsp_t               hd_eg_lsp1,
  output lsp_t               hd_eg_lsp2,
  output snp_t               hd_eg_csnp,
  output snp_t               hd_eg_psnp,
  output logic [7:0]         drops,
  // LSDB ports, [0] = level 1, [1] = level 2
  input  logic [1:0]         upd_valid,
  input  lsp_t               upd_lsp,
  output logic [1:0]         db_done,
  input  node_id_t           lk_id,
  output idx_t [1:0]         lk_idx,
  output logic [1:0]         lk_has_lsp,
  output logic [1:0][31:0]   lk_seq,
  input  idx_t               rd_idx,
  output logic [1:0]         rd_has_lsp,
  output node_id_t [1:0]     rd_id,
  output logic [1:0][31:0]   rd_seq,
  output row_t [1:0]         rd_row,
  output node_id_t [1:0][N_NODES-1:0] ids,
  input  logic               sp_level,
  input  idx_t               sp_idx,
  output row_t               sp_row,
  input  logic               q_level,
  input  node_id_t           q_id,
  output logic               q_hit,
  output idx_t               q_idx,
  input  idx_t               n_idx,
  output node_id_t           n_id,
  output logic [1:0][15:0]   lsdb_swaps
);
  // ---- system inputs ----
  isis_sys_inputs u_sys (
    .clk, .rst, .afiValue, .areaAddress, .systemID, .nsel, .nsel_set(nselSet),
    .psnID, .dis, .cfg_afi, .cfg_area, .cfg_sysid, .cfg_nsel(), .cfg_psn,
    .cfg_dis, .cfg_own_id, .cfg_net
  );

  // ---- mux / demux ----
  logic [N_BUF-1:0] in_push, eg_push, eg_pop, eg_empty, in_full;
  logic [N_BUF-1:0][7:0] drop_in, drop_eg;
  isis_mux_demux u_mux (
    .in_valid, .in_cls, .in_push, .eg_valid, .eg_cls, .eg_push,
    .eg_empty, .tx_avail, .tx_cls, .tx_pop, .eg_pop
  );

  // ---- ingress buffers ----
  isis_fifo #(.T(iih_t), .DEPTH(BUF_DEPTH)) u_in_iih (.clk, .rst, .push(in_push[BUF_IIH]),
    .din(in_iih), .pop(in_pop[BUF_IIH]), .dout(hd_in_iih), .empty(in_empty[BUF_IIH]),
    .full(in_full[BUF_IIH]), .drops(drop_in[BUF_IIH]));
  isis_fifo #(.T(lsp_t), .DEPTH(BUF_DEPTH)) u_in_db (.clk, .rst, .push(in_push[BUF_DB]),
    .din(in_lsp), .pop(in_pop[BUF_DB]), .dout(hd_in_db), .empty(in_empty[BUF_DB]),
    .full(in_full[BUF_DB]), .drops(drop_in[BUF_DB]));
  isis_fifo #(.T(lsp_t), .DEPTH(BUF_DEPTH)) u_in_lsp1 (.clk, .rst, .push(in_push[BUF_LSP1]),
    .din(in_lsp), .pop(in_pop[BUF_LSP1]), .dout(hd_in_lsp1), .empty(in_empty[BUF_LSP1]),
    .full(in_full[BUF_LSP1]), .drops(drop_in[BUF_LSP1]));
  isis_fifo #(.T(lsp_t), .DEPTH(BUF_DEPTH)) u_in_lsp2 (.clk, .rst, .push(in_push[BUF_LSP2]),
    .din(in_lsp), .pop(in_pop[BUF_LSP2]), .dout(hd_in_lsp2), .empty(in_empty[BUF_LSP2]),
    .full(in_full[BUF_LSP2]), .drops(drop_in[BUF_LSP2]));
  isis_fifo #(.T(snp_t), .DEPTH(BUF_DEPTH)) u_in_csnp (.clk, .rst, .push(in_push[BUF_CSNP]),
    .din(in_snp), .pop(in_pop[BUF_CSNP]), .dout(hd_in_csnp), .empty(in_empty[BUF_CSNP]),
    .full(in_full[BUF_CSNP]), .drops(drop_in[BUF_CSNP]));
  isis_fifo #(.T(snp_t), .DEPTH(BUF_DEPTH)) u_in_psnp (.clk, .rst, .push(in_push[BUF_PSNP]),
    .din(in_snp), .pop(in_pop[BUF_PSNP]), .dout(hd_in_psnp), .empty(in_empty[BUF_PSNP]),
    .full(in_full[BUF_PSNP]), .drops(drop_in[BUF_PSNP]));

  // ---- egress buffers ----
  isis_fifo #(.T(iih_t), .DEPTH(BUF_DEPTH)) u_eg_iih (.clk, .rst, .push(eg_push[BUF_IIH]),
    .din(eg_iih), .pop(eg_pop[BUF_IIH]), .dout(hd_eg_iih), .empty(eg_empty[BUF_IIH]),
    .full(eg_full[BUF_IIH]), .drops(drop_eg[BUF_IIH]));
  isis_fifo #(.T(lsp_t), .DEPTH(BUF_DEPTH)) u_eg_db (.clk, .rst, .push(eg_push[BUF_DB]),
    .din(eg_lsp), .pop(eg_pop[BUF_DB]), .dout(hd_eg_db), .empty(eg_empty[BUF_DB]),
    .full(eg_full[BUF_DB]), .drops(drop_eg[BUF_DB]));
  isis_fifo #(.T(lsp_t), .DEPTH(BUF_DEPTH)) u_eg_lsp1 (.clk, .rst, .push(eg_push[BUF_LSP1]),
    .din(eg_lsp), .pop(eg_pop[BUF_LSP1]), .dout(hd_eg_lsp1), .empty(eg_empty[BUF_LSP1]),
    .full(eg_full[BUF_LSP1]), .drops(drop_eg[BUF_LSP1]));
  isis_fifo #(.T(lsp_t), .DEPTH(BUF_DEPTH)) u_eg_lsp2 (.clk, .rst, .push(eg_push[BUF_LSP2]),
    .din(eg_lsp), .pop(eg_pop[BUF_LSP2]), .dout(hd_eg_lsp2), .empty(eg_empty[BUF_LSP2]),
    .full(eg_full[BUF_LSP2]), .drops(drop_eg[BUF_LSP2]));
  isis_fifo #(.T(snp_t), .DEPTH(BUF_DEPTH)) u_eg_csnp (.clk, .rst, .push(eg_push[BUF_CSNP]),
    .din(eg_snp), .pop(eg_pop[BUF_CSNP]), .dout(hd_eg_csnp), .empty(eg_empty[BUF_CSNP]),
    .full(eg_full[BUF_CSNP]), .drops(drop_eg[BUF_CSNP]));
  isis_fifo #(.T(snp_t), .DEPTH(BUF_DEPTH)) u_eg_psnp (.clk, .rst, .push(eg_push[BUF_PSNP]),
    .din(eg_snp), .pop(eg_pop[BUF_PSNP]), .dout(hd_eg_psnp), .empty(eg_empty[BUF_PSNP]),
    .full(eg_full[BUF_PSNP]), .drops(drop_eg[BUF_PSNP]));

  // total records lost to full buffers (saturating)
  always_comb begin
    logic [11:0] sum;
    sum = '0;
    for (int i = 0; i < N_BUF; i++) sum = sum + 12'(drop_in[i]) + 12'(drop_eg[i]);
    drops = (sum > 12'd255) ? 8'hFF : sum[7:0];
  end

  // ---- LSDBs ----
  logic [1:0]       busy, upd_applied, lk_hit, q_hit_l, n_known, act_sel;
  idx_t [1:0]       q_idx_l;
  node_id_t [1:0]   n_id_l;
  row_t [1:0]       sp_row_l;
  for (genvar l = 0; l < 2; l++) begin : g_lsdb
    isis_lsdb_bank u_bank (
      .clk, .rst,
      .upd_valid(upd_valid[l]), .upd_lsp, .busy(busy[l]), .upd_done(db_done[l]),
      .upd_applied(upd_applied[l]),
      .lk_id, .lk_hit(lk_hit[l]), .lk_idx(lk_idx[l]), .lk_has_lsp(lk_has_lsp[l]),
      .lk_seq(lk_seq[l]),
      .rd_idx, .rd_id(rd_id[l]), .rd_has_lsp(rd_has_lsp[l]), .rd_seq(rd_seq[l]),
      .rd_row(rd_row[l]),
      .sp_idx, .sp_row(sp_row_l[l]),
      .q_id, .q_hit(q_hit_l[l]), .q_idx(q_idx_l[l]),
      .n_idx, .n_id(n_id_l[l]), .n_known(n_known[l]),
      .ids_out(ids[l]), .act_sel(act_sel[l]), .swaps(lsdb_swaps[l])
    );
  end
  assign sp_row = sp_row_l[sp_level];
  assign q_hit  = q_hit_l[q_level];
  assign q_idx  = q_idx_l[q_level];
  assign n_id   = n_id_l[q_level];
endmodule
