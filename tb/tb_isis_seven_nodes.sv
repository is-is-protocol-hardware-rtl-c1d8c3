// tb_isis_seven_nodes: shortest paths over seven-node networks, run through
// the whole engine at its default parameters.
//
// One engine, Y (system ID ..A1), is a regular IS on a LAN. The testbench
// plays the six other routers (..A2 to ..A7) of a seven-node network. On
// level 1, three of them (A2, A3, A4) bring up adjacencies with Y; on level
// 2, two of them (A2, A5) do. Each hello lists Y, so every hello takes Y
// through helloDone, database exchange, LSDB update and SPF. The engine's
// own LSP then advertises metric 10 to each of its neighbours on that level.
//
// Each round draws a random topology for the six routers. Each router links
// to each other node with probability one half (one quarter in odd rounds),
// at a metric of 1 to 63.
// The testbench sends the six LSPs with a new sequence number, three at a
// time. Three is below the ingress buffer depth, and the testbench waits for
// Y to return to IDLE between batches. After the last batch, every route on
// Y's query port is checked against a reference Dijkstra run in the
// testbench:
//   - reachability and path metric must match exactly;
//   - the first hop must start some shortest path (ties are allowed);
//   - the SPF run must fit the engine's 65-cycle bound and stay under the
//     200 cycles quoted for seven-node networks.
// 32 rounds run on level 1 and 32 on level 2. The topologies and the
// reference computation are the testbench's own.
module tb_isis_seven_nodes;
  import isis_pkg::*;
  import isis_tb_pkg::*;
  localparam int N = 7;
  localparam int ROUNDS = 32;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic [7:0] in_d = 0, out_d;
  logic in_v = 0, in_s = 0, in_e = 0, out_v, out_s, out_e;
  mp_state_t state;
  logic rt_level = 0, rt_hit, rt_reach;
  node_id_t rt_id = '0, rt_nh;
  dist_t rt_dist;
  logic [11:0] ev;
  logic [1:0][15:0] swaps;
  logic [15:0] spf_cyc, rx_drop;
  logic [7:0] buf_drop;
  logic [79:0] net;

  isis_system u_y (
    .clock(clk), .reset(rst), .ingressPacket(in_d), .ingressValid(in_v),
    .ingressSop(in_s), .ingressEop(in_e), .afiValue(8'h49), .areaAddress(16'h0001),
    .systemID(48'h0000_0000_00A1), .nsel(8'h00), .nselSet(1'b0), .psnID(8'h00), .dis(1'b0),
    .egressPacket(out_d), .egressValid(out_v), .egressSop(out_s), .egressEop(out_e),
    .isState(state), .rtLevel(rt_level), .rtNodeId(rt_id), .rtHit(rt_hit),
    .rtReach(rt_reach), .rtDist(rt_dist), .rtNextHop(rt_nh), .mpEvents(ev),
    .lsdbSwaps(swaps), .spfCycles(spf_cyc), .rxDropped(rx_drop), .bufDrops(buf_drop),
    .net(net)
  );

  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: state %0d", state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  // ---- ingress: frames are sent back to back from a queue ----
  bq_t rxq[$];
  initial begin
    bq_t f;
    forever begin
      @(negedge clk);
      if (rxq.size() > 0) begin
        f = rxq.pop_front();
        for (int i = 0; i < f.size(); i++) begin
          in_v = 1; in_d = f[i]; in_s = (i == 0); in_e = (i == f.size() - 1);
          @(negedge clk);
        end
        in_v = 0; in_s = 0; in_e = 0;
      end
    end
  end
  int pdus_out = 0;
  always @(posedge clk) if (out_v && out_e) pdus_out++;
  int n_spf = 0, n_hello_done = 0, max_spf = 0;
  always @(posedge clk)
    if (!rst) begin
      if (ev[4]) n_spf++;
      if (ev[1]) n_hello_done++;
    end

  function automatic sys_id_t sid(input int k);
    return 48'h0000_0000_00A1 + 48'(k);
  endfunction
  function automatic node_id_t nid(input int k);
    return {sid(k), 8'h00};
  endfunction

  // wait until everything queued has been received and Y has stayed in
  // IDLE for 16 cycles in a row
  task automatic settle();
    int n, quiet;
    n = 0; quiet = 0;
    while (quiet < 16 && n < 100000) begin
      @(posedge clk); n++;
      if (state == ST_IDLE && rxq.size() == 0 && !in_v) quiet++;
      else quiet = 0;
    end
  endtask

  // ---- reference shortest paths ----
  typedef int mat_t [N][N];
  function automatic void dijkstra(input mat_t m, input int src, output int d [N]);
    bit done [N];
    for (int i = 0; i < N; i++) begin d[i] = -1; done[i] = 0; end
    d[src] = 0;
    for (int it = 0; it < N; it++) begin
      int u = -1;
      for (int i = 0; i < N; i++)
        if (!done[i] && d[i] >= 0 && (u < 0 || d[i] < d[u])) u = i;
      if (u < 0) break;
      done[u] = 1;
      for (int v = 0; v < N; v++)
        if (m[u][v] > 0 && (d[v] < 0 || d[u] + m[u][v] < d[v])) d[v] = d[u] + m[u][v];
    end
  endfunction

  task automatic check_routes(input bit l2, input mat_t m, input string tag);
    int d [N];
    int dh [N][N];
    dijkstra(m, 0, d);
    for (int h = 1; h < N; h++) begin
      int t [N];
      dijkstra(m, h, t);
      for (int v = 0; v < N; v++) dh[h][v] = t[v];
    end
    rt_level = l2;
    for (int v = 1; v < N; v++) begin
      int hop;
      bit hop_ok;
      rt_id = nid(v); #1;
      hop = -1;
      for (int h = 1; h < N; h++) if (rt_nh == nid(h)) hop = h;
      hop_ok = hop > 0 && m[0][hop] > 0 && dh[hop][v] >= 0 && m[0][hop] + dh[hop][v] == d[v];
      if (d[v] < 0)
        chk(rt_hit && !rt_reach, $sformatf("%s node %0d unreachable", tag, v));
      else
        chk(rt_hit && rt_reach && int'(rt_dist) == d[v] && hop_ok,
            $sformatf("%s node %0d: got reach %0d dist %0d hop %h, expected dist %0d",
                      tag, v, rt_reach, rt_dist, rt_nh[15:8], d[v]));
    end
  endtask

  initial begin
    mat_t m;
    int adj [2][$];
    logic [55:0] ids [8];
    logic [5:0]  met [8];
    int pairs, reach_total, unreach_total, multi_hop;
    int sw_before;
    adj[0] = '{1, 2, 3};
    adj[1] = '{1, 4};
    pairs = 0; reach_total = 0; unreach_total = 0; multi_hop = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (50) @(posedge clk);
    for (int l2 = 0; l2 < 2; l2++) begin
      // adjacencies: each neighbour's hello lists Y
      foreach (adj[l2][a]) begin
        int hd;
        hd = n_hello_done;
        rxq.push_back(mk_iih(l2[0], sid(adj[l2][a]), 1, sid(0), 8'h49, 16'h0001, '0));
        settle();
        chk(n_hello_done == hd + 1, $sformatf("L%0d adjacency with node %0d", l2 + 1, adj[l2][a]));
      end
      for (int r = 0; r < ROUNDS; r++) begin
        for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) m[i][j] = 0;
        foreach (adj[l2][a]) m[0][adj[l2][a]] = 10;
        for (int i = 1; i < N; i++)
          for (int j = 0; j < N; j++)
            if (j != i && $urandom_range(3, 0) < ((r % 2 == 0) ? 2 : 1))
              m[i][j] = $urandom_range(63, 1);
        sw_before = int'(swaps[l2]);
        for (int i = 1; i < N; i++) begin
          int n;
          n = 0;
          for (int j = 0; j < N; j++)
            if (m[i][j] > 0) begin ids[n] = nid(j); met[n] = 6'(m[i][j]); n++; end
          rxq.push_back(mk_lsp(l2[0], nid(i), 32'(r + 1), 16'd1200, n, ids, met));
          if (i % 3 == 0) settle();
        end
        settle();
        chk(int'(swaps[l2]) - sw_before == N - 1,
            $sformatf("L%0d round %0d: six LSDB swaps (%0d)", l2 + 1, r, int'(swaps[l2]) - sw_before));
        chk(spf_cyc > 0 && spf_cyc <= 16'(N * (N + 2) + 2) && spf_cyc <= 200,
            $sformatf("L%0d round %0d: SPF in %0d cycles", l2 + 1, r, spf_cyc));
        if (int'(spf_cyc) > max_spf) max_spf = int'(spf_cyc);
        check_routes(l2[0], m, $sformatf("L%0d round %0d", l2 + 1, r));
        begin
          int d [N];
          dijkstra(m, 0, d);
          for (int v = 1; v < N; v++) begin
            pairs++;
            if (d[v] < 0) unreach_total++;
            else begin
              reach_total++;
              if (d[v] > 10) multi_hop++;
            end
          end
        end
      end
    end
    chk(n_spf >= 2 * ROUNDS, "SPF ran every round");
    chk(multi_hop > 0 && unreach_total > 0, "paths of several hops and unreachable nodes both occurred");
    chk(rx_drop == 0 && buf_drop == 0, "nothing dropped");
    $display("routes checked %0d (reachable %0d, of which beyond one hop %0d; unreachable %0d)",
             pairs, reach_total, multi_hop, unreach_total);
    $display("SPF runs %0d, longest %0d cycles; PDUs sent %0d; run %0d cycles",
             n_spf, max_spf, pdus_out, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
