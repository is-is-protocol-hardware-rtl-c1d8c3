// isis_lsdb_bank: the link state database of one routing level, kept as an
// active copy and a standby copy (active LSDB-Lx / standby LSDB-Lx).
//
// The database is an adjacency matrix: row i holds the metric from node i to
// every node (0 = no link) together with the sequence number of node i's LSP.
// A shared node table maps each 7-octet node ID to a row index; an ID is
// given the first free index the first time it is seen (as the source of an
// LSP or as a neighbour in one) and keeps it.
//
// Readers (the shortest path processor, the main processor) only ever see
// the active copy, so they keep working while an update runs. An update is a
// parsed LSP offered on upd_valid while busy is low:
//  * add (lifetime > 0): LSPs whose sequence number is not newer than the
//    stored one are ignored. Otherwise the source and neighbour IDs are
//    mapped to indices (one ID per cycle), the new row is written into the
//    standby copy, every other row is copied from the active copy into the
//    standby copy (one row per cycle), and the two copies swap roles.
//  * delete (lifetime = 0, a purge): the row is replaced by zeros in the
//    active copy (and cleared in the standby copy), the other rows are copied
//    from active to standby skipping the zeroed row, and the copies swap.
// upd_done pulses when the update is over; upd_applied tells whether it
// changed the database. An add takes cnt+1 mapping cycles, one write cycle,
// N_NODES copy cycles and one swap cycle; a delete takes N_NODES+2 cycles.
// The active/standby scheme and the add/delete sequences follow the data
// path description; the matrix layout, the node table and the sequence
// number rule are this design's choices. Both copies start all zero.
module isis_lsdb_bank
  import isis_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  // update
  input  logic     upd_valid,
  input  lsp_t     upd_lsp,
  output logic     busy,
  output logic     upd_done,
  output logic     upd_applied,
  // lookup by ID (main processor)
  input  node_id_t lk_id,
  output logic     lk_hit,
  output idx_t     lk_idx,
  output logic     lk_has_lsp,
  output logic [31:0] lk_seq,
  // read by index (main processor)
  input  idx_t     rd_idx,
  output node_id_t rd_id,
  output logic     rd_has_lsp,
  output logic [31:0] rd_seq,
  output row_t     rd_row,
  // read by index (shortest path processor)
  input  idx_t     sp_idx,
  output row_t     sp_row,
  // route query: ID to index, index to ID
  input  node_id_t q_id,
  output logic     q_hit,
  output idx_t     q_idx,
  input  idx_t     n_idx,
  output node_id_t n_id,
  output logic     n_known,
  output node_id_t [N_NODES-1:0] ids_out,
  output logic     act_sel,
  output logic [15:0] swaps
);
  typedef enum logic [2:0] {B_IDLE, B_MAP, B_WSTBY, B_ZERO, B_COPY, B_SWAP} bstate_t;

  row_t            rows  [2][N_NODES];
  logic [31:0]     seqs  [2][N_NODES];
  logic            has   [2][N_NODES];
  node_id_t        ids   [N_NODES];
  logic            known [N_NODES];

  bstate_t         st;
  lsp_t            cur;
  logic [2:0]      k;
  idx_t            own, r;
  row_t            newrow;
  logic            stby;

  assign stby = ~act_sel;
  assign busy = (st != B_IDLE);

  function automatic logic find(input node_id_t id, output idx_t ix);
    find = 1'b0;
    ix   = '0;
    for (int i = 0; i < N_NODES; i++)
      if (known[i] && ids[i] == id && !find) begin
        find = 1'b1;
        ix   = idx_t'(i);
      end
  endfunction

  // lookup ports
  always_comb begin
    lk_hit     = find(lk_id, lk_idx);
    lk_has_lsp = lk_hit && has[act_sel][lk_idx];
    lk_seq     = seqs[act_sel][lk_idx];
    q_hit      = find(q_id, q_idx);
  end

  assign rd_id      = ids[rd_idx];
  assign rd_has_lsp = known[rd_idx] && has[act_sel][rd_idx];
  assign rd_seq     = seqs[act_sel][rd_idx];
  assign rd_row     = rows[act_sel][rd_idx];
  assign sp_row     = rows[act_sel][sp_idx];
  assign n_id       = ids[n_idx];
  assign n_known    = known[n_idx];
  always_comb
    for (int i = 0; i < N_NODES; i++) ids_out[i] = ids[i];

  // mapping step: ID handled in cycle k and the index it gets
  node_id_t map_id;
  logic     map_hit, map_free_ok;
  idx_t     map_hit_idx, map_free_idx;
  always_comb begin
    map_id       = (k == 0) ? cur.id : cur.nbr_id[k-1];
    map_hit      = find(map_id, map_hit_idx);
    map_free_ok  = 1'b0;
    map_free_idx = '0;
    for (int i = N_NODES-1; i >= 0; i--)
      if (!known[i]) begin
        map_free_ok  = 1'b1;
        map_free_idx = idx_t'(i);
      end
  end

  // decision on a new update
  logic  new_hit;
  idx_t  new_idx;
  always_comb new_hit = find(upd_lsp.id, new_idx);

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= B_IDLE;
      act_sel     <= 1'b0;
      swaps       <= '0;
      upd_done    <= 1'b0;
      upd_applied <= 1'b0;
      k           <= '0;
      own         <= '0;
      r           <= '0;
      newrow      <= '0;
      cur         <= '0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < N_NODES; i++) begin
          rows[b][i] <= '0;
          seqs[b][i] <= '0;
          has[b][i]  <= 1'b0;
        end
      for (int i = 0; i < N_NODES; i++) begin
        ids[i]   <= '0;
        known[i] <= 1'b0;
      end
    end else begin
      upd_done <= 1'b0;
      case (st)
        B_IDLE: if (upd_valid) begin
          cur    <= upd_lsp;
          newrow <= '0;
          k      <= '0;
          if (upd_lsp.lifetime == 16'd0) begin
            if (new_hit && has[act_sel][new_idx]) begin
              own <= new_idx;
              st  <= B_ZERO;
            end else begin
              upd_done    <= 1'b1;
              upd_applied <= 1'b0;
            end
          end else if (new_hit && has[act_sel][new_idx] &&
                       upd_lsp.seq <= seqs[act_sel][new_idx]) begin
            upd_done    <= 1'b1;   // not newer: ignored
            upd_applied <= 1'b0;
          end else begin
            st <= B_MAP;
          end
        end
        B_MAP: begin
          if (!map_hit && map_free_ok) begin
            ids[map_free_idx]   <= map_id;
            known[map_free_idx] <= 1'b1;
          end
          if (k == 0) begin
            if (!map_hit && !map_free_ok) begin
              st          <= B_IDLE;  // node table full: LSP dropped
              upd_done    <= 1'b1;
              upd_applied <= 1'b0;
            end else begin
              own <= map_hit ? map_hit_idx : map_free_idx;
            end
          end else if (map_hit || map_free_ok) begin
            if ((map_hit ? map_hit_idx : map_free_idx) != own)
              newrow[map_hit ? map_hit_idx : map_free_idx] <= cur.nbr_metric[k-1];
          end
          if (st == B_MAP && !(k == 0 && !map_hit && !map_free_ok)) begin
            if (k == cur.cnt) st <= B_WSTBY;
            k <= k + 1'b1;
          end
        end
        B_WSTBY: begin
          rows[stby][own] <= newrow;
          seqs[stby][own] <= cur.seq;
          has[stby][own]  <= 1'b1;
          r  <= '0;
          st <= B_COPY;
        end
        B_ZERO: begin
          rows[act_sel][own] <= '0;
          has[act_sel][own]  <= 1'b0;
          rows[stby][own]    <= '0;
          seqs[stby][own]    <= '0;
          has[stby][own]     <= 1'b0;
          r  <= '0;
          st <= B_COPY;
        end
        B_COPY: begin
          if (r != own) begin
            rows[stby][r] <= rows[act_sel][r];
            seqs[stby][r] <= seqs[act_sel][r];
            has[stby][r]  <= has[act_sel][r];
          end
          if (r == idx_t'(N_NODES-1)) st <= B_SWAP;
          else r <= r + 1'b1;
        end
        B_SWAP: begin
          act_sel     <= ~act_sel;
          swaps       <= swaps + 1'b1;
          upd_done    <= 1'b1;
          upd_applied <= 1'b1;
          st          <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
