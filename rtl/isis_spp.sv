// isis_spp: the shortest path processor. It runs Dijkstra's algorithm on the
// active LSDB of one level and keeps, per level, the distance, reachability
// and first hop (next hop seen from this system) of every node.
//
// start (with level and src, the row index of this system) clears the
// level's tables and sets dtab[src] = 0. Each iteration then
//  * SELECT: scans the N_NODES nodes, one per cycle, for the unvisited node u
//    with the smallest finite distance; if there is none the run ends;
//  * RELAX: reads row u of the LSDB (row_idx -> row, combinational) and
//    relaxes all N_NODES outgoing links in parallel in one cycle:
//    dtab[v] = dtab[u] + metric(u,v) when that is smaller, with first hop
//    v itself when u is the source, otherwise the first hop of u.
// A run therefore takes at most N_NODES*(N_NODES+2)+2 cycles (65 cycles for
// seven nodes); cycles reports the length of the last run. done pulses at
// the end. Metric 0 in the LSDB means no link. Results are read through the
// query port (q_level, q_idx). That the processor computes the shortest path
// tree with Dijkstra's algorithm follows the document; the one-node-per-cycle
// scan and the parallel relaxation are this design's choices.
module isis_spp
  import isis_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   level,
  input  idx_t   src,
  output idx_t   row_idx,
  input  row_t   row,
  output logic   busy,
  output logic   done,
  output logic [15:0] cycles,
  input  logic   q_level,
  input  idx_t   q_idx,
  output logic   q_reach,
  output dist_t  q_dist,
  output idx_t   q_nexthop
);
  typedef enum logic [1:0] {P_IDLE, P_SELECT, P_RELAX} pstate_t;

  pstate_t st;
  logic    lvl;
  idx_t    s, u, scan;
  logic    found;
  dist_t   best;
  dist_t   dtab    [2][N_NODES];
  idx_t    nh      [2][N_NODES];
  logic    visited [N_NODES];

  assign busy    = (st != P_IDLE);
  assign row_idx = u;
  assign q_dist    = dtab[q_level][q_idx];
  assign q_reach   = (dtab[q_level][q_idx] != DIST_INF);
  assign q_nexthop = nh[q_level][q_idx];

  // candidate distances through u, saturating at DIST_INF
  dist_t cand [N_NODES];
  always_comb
    for (int v = 0; v < N_NODES; v++) begin
      logic [DIST_W:0] sum;
      sum = {1'b0, dtab[lvl][u]} + (DIST_W+1)'(row[v]);
      cand[v] = sum[DIST_W] ? DIST_INF : sum[DIST_W-1:0];
    end

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= P_IDLE;
      done   <= 1'b0;
      cycles <= '0;
      lvl    <= 1'b0;
      s      <= '0;
      u      <= '0;
      scan   <= '0;
      found  <= 1'b0;
      best   <= DIST_INF;
      for (int l = 0; l < 2; l++)
        for (int v = 0; v < N_NODES; v++) begin
          dtab[l][v] <= DIST_INF;
          nh[l][v]   <= '0;
        end
      for (int v = 0; v < N_NODES; v++) visited[v] <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st != P_IDLE) cycles <= cycles + 1'b1;
      case (st)
        P_IDLE: if (start) begin
          lvl    <= level;
          s      <= src;
          cycles <= 16'd1;
          for (int v = 0; v < N_NODES; v++) begin
            dtab[level][v] <= (idx_t'(v) == src) ? '0 : DIST_INF;
            nh[level][v]   <= src;
            visited[v]     <= 1'b0;
          end
          scan  <= '0;
          found <= 1'b0;
          best  <= DIST_INF;
          st    <= P_SELECT;
        end
        P_SELECT: begin
          if (!visited[scan] && dtab[lvl][scan] != DIST_INF &&
              (!found || dtab[lvl][scan] < best)) begin
            found <= 1'b1;
            best  <= dtab[lvl][scan];
            u     <= scan;
          end
          if (scan == idx_t'(N_NODES-1)) begin
            scan <= '0;
            if (found || (!visited[scan] && dtab[lvl][scan] != DIST_INF)) begin
              st <= P_RELAX;
            end else begin
              st   <= P_IDLE;
              done <= 1'b1;
            end
          end else begin
            scan <= scan + 1'b1;
          end
        end
        P_RELAX: begin
          visited[u] <= 1'b1;
          for (int v = 0; v < N_NODES; v++)
            if (row[v] != '0 && !visited[v] && idx_t'(v) != u &&
                cand[v] < dtab[lvl][v]) begin
              dtab[lvl][v] <= cand[v];
              nh[lvl][v]   <= (u == s) ? idx_t'(v) : nh[lvl][u];
            end
          found <= 1'b0;
          best  <= DIST_INF;
          st    <= P_SELECT;
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
