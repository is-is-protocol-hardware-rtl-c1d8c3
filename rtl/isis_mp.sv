// isis_mp: the main processor, the state machine of the control unit. It
// reads the records the ingress packet processor left in the ingress
// buffers, keeps the adjacency table, drives the two LSDB banks and the
// shortest path processor, and leaves records for the egress packet
// processor in the egress buffers.
//
// States and the events that move between them (state_o):
//   IDLE  -> HELLO   a hello is waiting in inIIH
//   HELLO -> IDLE    adjAvailable: the sender already has an adjacency that
//                    is up; the hello is dropped
//   HELLO -> DBX     helloDone: the sender listed our system ID, so the
//                    adjacency comes up; a hello naming it is sent back.
//                    A first hello from an unknown system creates the
//                    adjacency, is answered with a hello naming the sender
//                    and the state machine stays in HELLO for the next one.
//   DBX   -> LSDB    dbDone: our own LSP (new sequence number) and every LSP
//                    of our database have been queued in egDB and no LSP
//                    has arrived for DB_QUIET cycles
//   LSDB  -> SPF     lspdbDone: our own LSPs and all buffered LSPs (inDB,
//                    inLSP-L1, inLSP-L2) have been applied to the LSDBs
//   SPF   -> IDLE    spfDone: the shortest path processor ran on level 1
//                    and level 2 (for each level where we have an LSP)
//   IDLE  -> SNP     snpProc: a CSNP, PSNP or LSP is waiting, or, as DIS,
//                    the CSNP timer expired
//   SNP   -> LSDB    snpDone: at the end of the window LSPs are buffered
//   SNP   -> IDLE    snpNone: at the end of the window nothing is buffered
// In SNP the DIS sends one CSNP per level summarising its LSDB, and answers
// each PSNP by queueing the requested LSPs in egLSP-L1/L2; a regular IS
// compares a received CSNP with its LSDB and queues a PSNP for every LSP it
// lacks or holds an older copy of. The window (SNP_WINDOW cycles) restarts
// whenever a PSNP or an LSP arrives. In IDLE a hello is sent every
// HELLO_PERIOD cycles (first one right after reset). events_o carries one
// pulse per named transition and per PDU queued (see the ev_* assigns).
// The states and transition names follow the control unit state machine of
// the document; the timers, adjacency handling details and SNP comparison
// rules are this design's choices.
module isis_mp
  import isis_pkg::*;
#(
  parameter int unsigned HELLO_PERIOD = 4096,
  parameter int unsigned CSNP_PERIOD  = 8192,
  parameter int unsigned DB_QUIET     = 256,
  parameter int unsigned SNP_WINDOW   = 512,
  parameter int unsigned DEF_METRIC   = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  sys_id_t                 cfg_sysid,
  input  node_id_t                cfg_own_id,
  input  logic                    cfg_dis,
  // status from the ingress packet processor
  input  logic                    rx_evt,
  input  buf_cls_t                rx_cls,
  // ingress buffers
  input  logic [N_BUF-1:0]        in_empty,
  output logic [N_BUF-1:0]        in_pop,
  input  iih_t                    hd_iih,
  input  lsp_t                    hd_db,
  input  lsp_t                    hd_lsp1,
  input  lsp_t                    hd_lsp2,
  input  snp_t                    hd_csnp,
  input  snp_t                    hd_psnp,
  // egress buffers
  input  logic [N_BUF-1:0]        eg_full,
  output logic                    eg_valid,
  output buf_cls_t                eg_cls,
  output iih_t                    eg_iih,
  output lsp_t                    eg_lsp,
  output snp_t                    eg_snp,
  // LSDB banks [0] = level 1, [1] = level 2
  output logic [1:0]              upd_valid,
  output lsp_t                    upd_lsp,
  input  logic [1:0]              db_done,
  output node_id_t                lk_id,
  input  idx_t [1:0]              lk_idx,
  input  logic [1:0]              lk_has_lsp,
  input  logic [1:0][31:0]        lk_seq,
  output idx_t                    rd_idx,
  input  logic [1:0]              rd_has_lsp,
  input  node_id_t [1:0]          rd_id,
  input  logic [1:0][31:0]        rd_seq,
  input  row_t [1:0]              rd_row,
  input  node_id_t [1:0][N_NODES-1:0] ids,
  // shortest path processor
  output logic                    spp_start,
  output logic                    spp_level,
  output idx_t                    spp_src,
  input  logic                    spp_done,
  // status
  output logic                    db_phase,
  output mp_state_t               state_o,
  output logic [11:0]             events_o
);
  localparam int unsigned MAX_ADJ = N_NODES - 1;
  localparam int unsigned TW = 16;

  mp_state_t   st;
  logic [3:0]  step;
  logic [3:0]  e;            // entry / row counter
  logic        wl;           // level being worked on
  snp_t        wsnp;         // record being built
  logic [1:0]  own_dirty;
  logic [1:0][31:0] own_seq;
  logic        csnp_due;
  logic [TW-1:0] hello_t, csnp_t, quiet_t;

  // adjacency table
  logic        adj_v  [MAX_ADJ];
  logic        adj_up [MAX_ADJ];
  logic        adj_l2 [MAX_ADJ];
  sys_id_t     adj_id [MAX_ADJ];

  // ---------------- combinational helpers ----------------
  // adjacency lookup for the hello at the head of inIIH
  logic  adj_hit, adj_free_ok;
  int    adj_ix, adj_free;
  always_comb begin
    adj_hit = 1'b0; adj_ix = 0; adj_free_ok = 1'b0; adj_free = 0;
    for (int i = MAX_ADJ-1; i >= 0; i--) begin
      if (adj_v[i] && adj_id[i] == hd_iih.src && adj_l2[i] == hd_iih.level2) begin
        adj_hit = 1'b1; adj_ix = i;
      end
      if (!adj_v[i]) begin adj_free_ok = 1'b1; adj_free = i; end
    end
  end

  // our own LSP for each level: every adjacency that is up, DEF_METRIC each
  function automatic lsp_t own_lsp(input logic l2);
    lsp_t r;
    r = '0;
    r.level2   = l2;
    r.id       = cfg_own_id;
    r.seq      = own_seq[l2];
    r.lifetime = LSP_LIFETIME;
    for (int i = 0; i < MAX_ADJ; i++)
      if (adj_v[i] && adj_up[i] && adj_l2[i] == l2 && r.cnt < 3'(MAXNBR)) begin
        r.nbr_id[r.cnt]     = {adj_id[i], 8'h00};
        r.nbr_metric[r.cnt] = metric_t'(DEF_METRIC);
        r.cnt               = r.cnt + 1'b1;
      end
    return r;
  endfunction

  logic [1:0] has_up_adj;
  always_comb begin
    has_up_adj = '0;
    for (int i = 0; i < MAX_ADJ; i++)
      if (adj_v[i] && adj_up[i]) has_up_adj[adj_l2[i]] = 1'b1;
  end

  // LSP record rebuilt from LSDB row rd_idx of level wl
  function automatic lsp_t row_lsp(input logic l2);
    lsp_t r;
    r = '0;
    r.level2   = l2;
    r.id       = rd_id[l2];
    r.seq      = rd_seq[l2];
    r.lifetime = LSP_LIFETIME;
    for (int v = 0; v < N_NODES; v++)
      if (rd_row[l2][v] != '0 && r.cnt < 3'(MAXNBR)) begin
        r.nbr_id[r.cnt]     = ids[l2][v];
        r.nbr_metric[r.cnt] = rd_row[l2][v];
        r.cnt               = r.cnt + 1'b1;
      end
    return r;
  endfunction

  logic lsp_waiting;
  assign lsp_waiting = !in_empty[BUF_DB] || !in_empty[BUF_LSP1] || !in_empty[BUF_LSP2];

  // LSDB lookup and row index by state
  always_comb begin
    lk_id  = cfg_own_id;
    rd_idx = idx_t'(e);
    if (st == ST_SNP) begin
      if (step == 4'd2) lk_id = hd_csnp.ent_id[e];
      if (step == 4'd4) lk_id = hd_psnp.ent_id[e];
      if (step == 4'd4) rd_idx = lk_idx[wl];
    end
  end

  assign db_phase = (st == ST_DBX);
  assign state_o  = st;

  // event pulses
  logic ev_adj_avail, ev_hello_done, ev_db_done, ev_lsdb_done, ev_spf_done,
        ev_snp_proc, ev_snp_none, ev_snp_done, ev_csnp_tx, ev_psnp_tx,
        ev_lsp_answer, ev_hello_tx;
  assign events_o = {ev_hello_tx, ev_lsp_answer, ev_psnp_tx, ev_csnp_tx,
                     ev_snp_done, ev_snp_none, ev_snp_proc, ev_spf_done,
                     ev_lsdb_done, ev_db_done, ev_hello_done, ev_adj_avail};

  // ---------------- sequential control ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st <= ST_IDLE; step <= '0; e <= '0; wl <= 1'b0; wsnp <= '0;
      own_dirty <= '0; own_seq <= '0; csnp_due <= 1'b0;
      hello_t <= '0; csnp_t <= '0; quiet_t <= '0;
      for (int i = 0; i < MAX_ADJ; i++) begin
        adj_v[i] <= 1'b0; adj_up[i] <= 1'b0; adj_l2[i] <= 1'b0; adj_id[i] <= '0;
      end
      in_pop <= '0; eg_valid <= 1'b0; eg_cls <= BUF_IIH; eg_iih <= '0; eg_lsp <= '0;
      eg_snp <= '0; upd_valid <= '0; upd_lsp <= '0; spp_start <= 1'b0;
      spp_level <= 1'b0; spp_src <= '0;
      {ev_hello_tx, ev_lsp_answer, ev_psnp_tx, ev_csnp_tx, ev_snp_done, ev_snp_none,
       ev_snp_proc, ev_spf_done, ev_lsdb_done, ev_db_done, ev_hello_done,
       ev_adj_avail} <= '0;
    end else begin
      in_pop    <= '0;
      eg_valid  <= 1'b0;
      upd_valid <= '0;
      spp_start <= 1'b0;
      {ev_hello_tx, ev_lsp_answer, ev_psnp_tx, ev_csnp_tx, ev_snp_done, ev_snp_none,
       ev_snp_proc, ev_spf_done, ev_lsdb_done, ev_db_done, ev_hello_done,
       ev_adj_avail} <= '0;

      // timers
      if (hello_t != '0) hello_t <= hello_t - 1'b1;
      if (cfg_dis) begin
        if (csnp_t == '0) begin
          csnp_t   <= TW'(CSNP_PERIOD - 1);
          csnp_due <= 1'b1;
        end else csnp_t <= csnp_t - 1'b1;
      end

      case (st)
        // ---------------------------------------------------------------
        ST_IDLE: begin
          step <= '0; e <= '0;
          if (in_pop != '0) begin
            // a pop issued in the last state is still taking effect
          end else if (!in_empty[BUF_IIH]) begin
            st <= ST_HELLO;
          end else if (!in_empty[BUF_CSNP] || !in_empty[BUF_PSNP] || lsp_waiting ||
                       (cfg_dis && csnp_due)) begin
            st          <= ST_SNP;
            ev_snp_proc <= 1'b1;
            quiet_t     <= TW'(SNP_WINDOW);
            wl          <= 1'b0;
          end else if (hello_t == '0 && !eg_valid && !eg_full[BUF_IIH]) begin
            // periodic hello, naming the first known adjacency
            eg_valid      <= 1'b1;
            eg_cls        <= BUF_IIH;
            eg_iih        <= '0;
            eg_iih.src    <= cfg_sysid;
            for (int i = MAX_ADJ-1; i >= 0; i--)
              if (adj_v[i]) begin
                eg_iih.nbr_valid <= 1'b1;
                eg_iih.nbr       <= adj_id[i];
                eg_iih.level2    <= adj_l2[i];
              end
            hello_t     <= TW'(HELLO_PERIOD - 1);
            ev_hello_tx <= 1'b1;
          end
        end
        // ---------------------------------------------------------------
        ST_HELLO: begin
          if (!in_empty[BUF_IIH] && !in_pop[BUF_IIH] && !eg_valid && !eg_full[BUF_IIH]) begin
            in_pop[BUF_IIH] <= 1'b1;
            if (adj_hit && adj_up[adj_ix]) begin
              st           <= ST_IDLE;       // adjAvailable
              ev_adj_avail <= 1'b1;
            end else if (!adj_hit && !adj_free_ok) begin
              st <= ST_IDLE;                 // table full: hello dropped
            end else begin
              if (!adj_hit) begin
                adj_v[adj_free]  <= 1'b1;
                adj_id[adj_free] <= hd_iih.src;
                adj_l2[adj_free] <= hd_iih.level2;
                adj_up[adj_free] <= hd_iih.nbr_valid;
              end else if (hd_iih.nbr_valid) begin
                adj_up[adj_ix] <= 1'b1;
              end
              eg_valid         <= 1'b1;
              eg_cls           <= BUF_IIH;
              eg_iih.level2    <= hd_iih.level2;
              eg_iih.src       <= cfg_sysid;
              eg_iih.nbr_valid <= 1'b1;
              eg_iih.nbr       <= hd_iih.src;
              ev_hello_tx      <= 1'b1;
              if (hd_iih.nbr_valid) begin
                st            <= ST_DBX;     // helloDone
                step          <= '0;
                e             <= '0;
                ev_hello_done <= 1'b1;
              end
            end
          end
        end
        // ---------------------------------------------------------------
        ST_DBX: begin
          case (step)
            4'd0, 4'd1: begin                // own LSP of level 1, then 2
              if (!has_up_adj[step[0]]) begin
                step <= step + 1'b1;
              end else if (!eg_valid && !eg_full[BUF_DB]) begin
                own_seq[step[0]]   <= own_seq[step[0]] + 1'b1;
                own_dirty[step[0]] <= 1'b1;
                eg_valid           <= 1'b1;
                eg_cls             <= BUF_DB;
                eg_lsp             <= own_lsp(step[0]);
                eg_lsp.seq         <= own_seq[step[0]] + 1'b1;
                step               <= step + 1'b1;
              end
              wl <= 1'b0;
              e  <= '0;
            end
            4'd2: begin                      // every other LSP we hold
              if (!(rd_has_lsp[wl] && rd_id[wl] != cfg_own_id) || !eg_valid && !eg_full[BUF_DB]) begin
                if (rd_has_lsp[wl] && rd_id[wl] != cfg_own_id) begin
                  eg_valid <= 1'b1;
                  eg_cls   <= BUF_DB;
                  eg_lsp   <= row_lsp(wl);
                end
                if (e == 4'(N_NODES-1)) begin
                  e <= '0;
                  if (wl) begin
                    step    <= 4'd3;
                    quiet_t <= TW'(DB_QUIET);
                  end
                  wl <= ~wl;
                end else e <= e + 1'b1;
              end
            end
            default: begin                   // wait for the database to settle
              if (rx_evt && rx_cls == BUF_DB) quiet_t <= TW'(DB_QUIET);
              else if (quiet_t != '0)         quiet_t <= quiet_t - 1'b1;
              else begin
                st         <= ST_LSDB;       // dbDone
                step       <= '0;
                ev_db_done <= 1'b1;
              end
            end
          endcase
        end
        // ---------------------------------------------------------------
        ST_LSDB: begin
          if (step == 4'd0) begin
            if (own_dirty[0]) begin
              upd_valid[0] <= 1'b1; upd_lsp <= own_lsp(1'b0); own_dirty[0] <= 1'b0;
              wl <= 1'b0; step <= 4'd1;
            end else if (own_dirty[1]) begin
              upd_valid[1] <= 1'b1; upd_lsp <= own_lsp(1'b1); own_dirty[1] <= 1'b0;
              wl <= 1'b1; step <= 4'd1;
            end else if (!in_empty[BUF_DB]) begin
              upd_valid[hd_db.level2] <= 1'b1; upd_lsp <= hd_db; in_pop[BUF_DB] <= 1'b1;
              wl <= hd_db.level2; step <= 4'd1;
            end else if (!in_empty[BUF_LSP1]) begin
              upd_valid[0] <= 1'b1; upd_lsp <= hd_lsp1; in_pop[BUF_LSP1] <= 1'b1;
              wl <= 1'b0; step <= 4'd1;
            end else if (!in_empty[BUF_LSP2]) begin
              upd_valid[1] <= 1'b1; upd_lsp <= hd_lsp2; in_pop[BUF_LSP2] <= 1'b1;
              wl <= 1'b1; step <= 4'd1;
            end else begin
              st           <= ST_SPF;        // lspdbDone
              step         <= '0;
              ev_lsdb_done <= 1'b1;
            end
          end else if (db_done[wl]) begin
            step <= 4'd0;
          end
        end
        // ---------------------------------------------------------------
        ST_SPF: begin
          case (step)
            4'd0, 4'd2: begin
              if (lk_has_lsp[step[1]]) begin
                spp_start <= 1'b1;
                spp_level <= step[1];
                spp_src   <= lk_idx[step[1]];
                step      <= step + 1'b1;
              end else step <= step + 4'd2;
            end
            4'd1, 4'd3: if (spp_done) step <= step + 1'b1;
            default: begin
              st          <= ST_IDLE;        // spfDone
              step        <= '0;
              ev_spf_done <= 1'b1;
            end
          endcase
        end
        // ---------------------------------------------------------------
        ST_SNP: begin
          if (rx_evt && (rx_cls == BUF_PSNP || rx_cls == BUF_LSP1 || rx_cls == BUF_LSP2))
            quiet_t <= TW'(SNP_WINDOW);
          case (step)
            4'd0: begin                      // dispatch
              e <= '0;
              wsnp <= '0;
              if (cfg_dis && csnp_due) begin
                csnp_due <= 1'b0;
                wl       <= 1'b0;
                step     <= 4'd1;
              end else if (!in_empty[BUF_CSNP]) begin
                wl   <= hd_csnp.level2;
                step <= 4'd2;
              end else if (!in_empty[BUF_PSNP]) begin
                wl   <= hd_psnp.level2;
                step <= 4'd4;
              end else if (rx_evt) begin
                // window restarted above
              end else if (quiet_t != '0) begin
                quiet_t <= quiet_t - 1'b1;
              end else if (lsp_waiting) begin
                st          <= ST_LSDB;      // snpDone
                step        <= '0;
                ev_snp_done <= 1'b1;
              end else begin
                st          <= ST_IDLE;      // snpNone
                step        <= '0;
                ev_snp_none <= 1'b1;
              end
            end
            4'd1: begin                      // DIS: build CSNP of level wl
              if (rd_has_lsp[wl]) begin
                wsnp.ent_id[wsnp.cnt]  <= rd_id[wl];
                wsnp.ent_seq[wsnp.cnt] <= rd_seq[wl];
                wsnp.cnt               <= wsnp.cnt + 1'b1;
              end
              if (e == 4'(N_NODES-1)) step <= 4'd3;
              else e <= e + 1'b1;
            end
            4'd3: begin                      // DIS: queue the CSNP
              if (!eg_valid && !eg_full[BUF_CSNP]) begin
                if (wsnp.cnt != '0) begin
                  eg_valid     <= 1'b1;
                  eg_cls       <= BUF_CSNP;
                  eg_snp       <= wsnp;
                  eg_snp.src   <= cfg_own_id;
                  eg_snp.level2 <= wl;
                  ev_csnp_tx   <= 1'b1;
                end
                wsnp <= '0;
                e    <= '0;
                if (wl) begin
                  step    <= 4'd0;
                  quiet_t <= TW'(SNP_WINDOW);
                end else begin
                  wl   <= 1'b1;
                  step <= 4'd1;
                end
              end
            end
            4'd2: begin                      // IS: compare CSNP with LSDB
              if (e < 4'(hd_csnp.cnt) &&
                  (!lk_has_lsp[wl] || lk_seq[wl] < hd_csnp.ent_seq[e])) begin
                wsnp.ent_id[wsnp.cnt]  <= hd_csnp.ent_id[e];
                wsnp.ent_seq[wsnp.cnt] <= hd_csnp.ent_seq[e];
                wsnp.cnt               <= wsnp.cnt + 1'b1;
              end
              if (e >= 4'(hd_csnp.cnt) || e == 4'(MAXENT-1)) step <= 4'd5;
              else e <= e + 1'b1;
            end
            4'd5: begin                      // IS: queue the PSNP, drop the CSNP
              if (!eg_valid && !eg_full[BUF_PSNP]) begin
                in_pop[BUF_CSNP] <= 1'b1;
                if (wsnp.cnt != '0) begin
                  eg_valid      <= 1'b1;
                  eg_cls        <= BUF_PSNP;
                  eg_snp        <= wsnp;
                  eg_snp.src    <= cfg_own_id;
                  eg_snp.level2 <= wl;
                  ev_psnp_tx    <= 1'b1;
                  quiet_t       <= TW'(SNP_WINDOW);
                end
                step <= 4'd6;
              end
            end
            4'd4: begin                      // DIS: answer a PSNP with LSPs
              if (e >= 4'(hd_psnp.cnt) || e == 4'(MAXENT)) begin
                in_pop[BUF_PSNP] <= 1'b1;
                step             <= 4'd6;
              end else if (!lk_has_lsp[wl]) begin
                e <= e + 1'b1;
              end else if (!eg_valid && !eg_full[wl ? BUF_LSP2 : BUF_LSP1]) begin
                eg_valid      <= 1'b1;
                eg_cls        <= wl ? BUF_LSP2 : BUF_LSP1;
                eg_lsp        <= row_lsp(wl);
                ev_lsp_answer <= 1'b1;
                e             <= e + 1'b1;
              end
            end
            default: step <= 4'd0;           // let a pop take effect
          endcase
        end
        default: st <= ST_IDLE;
      endcase
    end
  end
endmodule
