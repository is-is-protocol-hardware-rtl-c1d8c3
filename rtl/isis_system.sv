// isis_system: a hardware IS-IS (Intermediate System to Intermediate System)
// routing engine. It takes IS-IS PDUs in on ingressPacket, keeps adjacencies
// and the level-1 and level-2 link state databases up to date, computes the
// shortest path tree of each level in hardware, and sends its own hellos,
// LSPs, CSNPs and PSNPs on egressPacket.
//
// Structure: a control unit of four processors - the main processor (the
// protocol state machine, reported on isState), the ingress packet processor
// (parses and buffers received PDUs), the shortest path processor (Dijkstra
// over the active LSDB) and the egress packet processor (serialises PDUs) -
// around a data path of packet buffers, system input registers and the
// active/standby LSDB pairs.
//
// Interface: PDUs are octet streams, one octet per clock with *Valid, *Sop on
// the first and *Eop on the last octet; egress PDUs are separated by at least
// one idle cycle. The configuration inputs (afiValue, areaAddress, systemID,
// nsel/nselSet, psnID, dis) are sampled while reset is high. reset is
// synchronous and active high. The route query port gives, for a node ID of
// level rtLevel (0 = L1, 1 = L2), whether it is known (rtHit) and reachable
// (rtReach), its path metric (rtDist) and the node ID of the first hop
// (rtNextHop). mpEvents pulses once per main-processor event (bit order in
// isis_mp: adjAvailable, helloDone, dbDone, lspdbDone, spfDone, snpProc,
// snpNone, snpDone, CSNP queued, PSNP queued, LSP answered, hello queued).
// The I/O list follows the document's system view; the stream framing, the
// route query and the status outputs are this design's additions.
module isis_system
  import isis_pkg::*;
#(
  parameter int unsigned HELLO_PERIOD = 4096,
  parameter int unsigned CSNP_PERIOD  = 8192,
  parameter int unsigned DB_QUIET     = 256,
  parameter int unsigned SNP_WINDOW   = 512,
  parameter int unsigned BUF_DEPTH    = 4
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [7:0]  ingressPacket,
  input  logic        ingressValid,
  input  logic        ingressSop,
  input  logic        ingressEop,
  input  logic [7:0]  afiValue,
  input  logic [15:0] areaAddress,
  input  sys_id_t     systemID,
  input  logic [7:0]  nsel,
  input  logic        nselSet,
  input  logic [7:0]  psnID,
  input  logic        dis,
  output logic [7:0]  egressPacket,
  output logic        egressValid,
  output logic        egressSop,
  output logic        egressEop,
  output mp_state_t   isState,
  input  logic        rtLevel,
  input  node_id_t    rtNodeId,
  output logic        rtHit,
  output logic        rtReach,
  output dist_t       rtDist,
  output node_id_t    rtNextHop,
  output logic [11:0] mpEvents,
  output logic [1:0][15:0] lsdbSwaps,
  output logic [15:0] spfCycles,
  output logic [15:0] rxDropped,
  output logic [7:0]  bufDrops,
  output logic [79:0] net
);
  logic clk, rst;
  assign clk = clock;
  assign rst = reset;

  // configuration
  logic [7:0]  cfg_afi, cfg_psn;
  logic [15:0] cfg_area;
  sys_id_t     cfg_sysid;
  logic        cfg_dis;
  node_id_t    cfg_own_id;

  // ingress processor -> data path
  logic     ip_valid;
  buf_cls_t ip_cls;
  iih_t     ip_iih;
  lsp_t     ip_lsp;
  snp_t     ip_snp;
  logic     db_phase;

  // data path <-> main processor
  logic [N_BUF-1:0] in_pop, in_empty, eg_full;
  iih_t hd_in_iih, hd_eg_iih, eg_iih;
  lsp_t hd_in_db, hd_in_lsp1, hd_in_lsp2, hd_eg_db, hd_eg_lsp1, hd_eg_lsp2, eg_lsp, upd_lsp;
  snp_t hd_in_csnp, hd_in_psnp, hd_eg_csnp, hd_eg_psnp, eg_snp;
  logic eg_valid;
  buf_cls_t eg_cls, tx_cls;
  logic tx_avail, tx_pop;
  logic [1:0] upd_valid, db_done, lk_has_lsp, rd_has_lsp;
  node_id_t lk_id;
  idx_t [1:0] lk_idx;
  logic [1:0][31:0] lk_seq, rd_seq;
  idx_t rd_idx;
  node_id_t [1:0] rd_id;
  row_t [1:0] rd_row;
  node_id_t [1:0][N_NODES-1:0] ids;

  // shortest path processor
  logic spp_start, spp_level, spp_done, spp_busy;
  idx_t spp_src, sp_idx, q_idx, nh_idx;
  row_t sp_row;
  logic q_hit;

  isis_ipp u_ipp (
    .clk, .rst, .rx_valid(ingressValid), .rx_data(ingressPacket), .rx_sop(ingressSop),
    .rx_eop(ingressEop), .cfg_afi, .cfg_area, .cfg_sysid, .db_phase,
    .out_valid(ip_valid), .out_cls(ip_cls), .out_iih(ip_iih), .out_lsp(ip_lsp),
    .out_snp(ip_snp), .rx_dropped(rxDropped)
  );

  isis_mp #(
    .HELLO_PERIOD(HELLO_PERIOD), .CSNP_PERIOD(CSNP_PERIOD),
    .DB_QUIET(DB_QUIET), .SNP_WINDOW(SNP_WINDOW)
  ) u_mp (
    .clk, .rst, .cfg_sysid, .cfg_own_id, .cfg_dis,
    .rx_evt(ip_valid), .rx_cls(ip_cls),
    .in_empty, .in_pop, .hd_iih(hd_in_iih), .hd_db(hd_in_db), .hd_lsp1(hd_in_lsp1),
    .hd_lsp2(hd_in_lsp2), .hd_csnp(hd_in_csnp), .hd_psnp(hd_in_psnp),
    .eg_full, .eg_valid, .eg_cls, .eg_iih, .eg_lsp, .eg_snp,
    .upd_valid, .upd_lsp, .db_done, .lk_id, .lk_idx, .lk_has_lsp, .lk_seq,
    .rd_idx, .rd_has_lsp, .rd_id, .rd_seq, .rd_row, .ids,
    .spp_start, .spp_level, .spp_src, .spp_done,
    .db_phase, .state_o(isState), .events_o(mpEvents)
  );

  isis_spp u_spp (
    .clk, .rst, .start(spp_start), .level(spp_level), .src(spp_src),
    .row_idx(sp_idx), .row(sp_row), .busy(spp_busy), .done(spp_done), .cycles(spfCycles),
    .q_level(rtLevel), .q_idx, .q_reach(rtReach), .q_dist(rtDist), .q_nexthop(nh_idx)
  );

  isis_epp u_epp (
    .clk, .rst, .tx_avail, .tx_cls, .tx_pop,
    .hd_iih(hd_eg_iih), .hd_db(hd_eg_db), .hd_lsp1(hd_eg_lsp1), .hd_lsp2(hd_eg_lsp2),
    .hd_csnp(hd_eg_csnp), .hd_psnp(hd_eg_psnp),
    .cfg_afi, .cfg_area, .cfg_sysid, .cfg_psn, .cfg_dis,
    .tx_valid(egressValid), .tx_data(egressPacket), .tx_sop(egressSop),
    .tx_eop(egressEop), .tx_count()
  );

  isis_datapath #(.BUF_DEPTH(BUF_DEPTH)) u_dp (
    .clk, .rst, .afiValue, .areaAddress, .systemID, .nsel, .nselSet, .psnID, .dis,
    .cfg_afi, .cfg_area, .cfg_sysid, .cfg_psn, .cfg_dis, .cfg_own_id, .cfg_net(net),
    .in_valid(ip_valid), .in_cls(ip_cls), .in_iih(ip_iih), .in_lsp(ip_lsp), .in_snp(ip_snp),
    .in_pop, .in_empty, .hd_in_iih, .hd_in_db, .hd_in_lsp1, .hd_in_lsp2, .hd_in_csnp,
    .hd_in_psnp, .eg_valid, .eg_cls, .eg_iih, .eg_lsp, .eg_snp, .eg_full,
    .tx_avail, .tx_cls, .tx_pop, .hd_eg_iih, .hd_eg_db, .hd_eg_lsp1, .hd_eg_lsp2,
    .hd_eg_csnp, .hd_eg_psnp, .drops(bufDrops),
    .upd_valid, .upd_lsp, .db_done, .lk_id, .lk_idx, .lk_has_lsp, .lk_seq,
    .rd_idx, .rd_has_lsp, .rd_id, .rd_seq, .rd_row, .ids,
    .sp_level(spp_level), .sp_idx, .sp_row,
    .q_level(rtLevel), .q_id(rtNodeId), .q_hit, .q_idx, .n_idx(nh_idx), .n_id(rtNextHop),
    .lsdb_swaps(lsdbSwaps)
  );
  assign rtHit = q_hit;
endmodule
