// tb_isis_spp: runs the shortest path processor on random 7-node graphs
// (both levels) and checks every node's distance and reachability against
// an all-pairs Floyd-Warshall reference, that every first hop is a direct
// neighbour of the source lying on a shortest path, and that a run takes no
// more than 200 cycles, the hardware figure for networks of seven nodes.
module tb_isis_spp;
  import isis_pkg::*;
  logic clk = 0, rst = 1;
  logic start, level, busy, done, q_level, q_reach;
  idx_t src, row_idx, q_idx, q_nexthop;
  row_t row;
  logic [15:0] cycles;
  dist_t q_dist;
  int checks = 0, failures = 0, max_cyc = 0;
  int mat [2][N_NODES][N_NODES];

  isis_spp dut (.*);
  always_comb
    for (int v = 0; v < N_NODES; v++) row[v] = metric_t'(mat[level_q][row_idx][v]);
  logic level_q;

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  localparam int INF = 1 << 20;

  task automatic run_and_check(input int l, input int s);
    int d [N_NODES][N_NODES];
    int n;
    for (int i = 0; i < N_NODES; i++)
      for (int j = 0; j < N_NODES; j++)
        d[i][j] = (i == j) ? 0 : (mat[l][i][j] != 0 ? mat[l][i][j] : INF);
    for (int k = 0; k < N_NODES; k++)
      for (int i = 0; i < N_NODES; i++)
        for (int j = 0; j < N_NODES; j++)
          if (d[i][k] + d[k][j] < d[i][j]) d[i][j] = d[i][k] + d[k][j];
    @(negedge clk);
    level_q = l[0]; level = l[0]; src = idx_t'(s); start = 1;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    chk(int'(cycles) <= 200, "at most 200 cycles");
    chk(int'(cycles) <= N_NODES * (N_NODES + 2) + 2, "cycle bound");
    if (int'(cycles) > max_cyc) max_cyc = int'(cycles);
    for (int v = 0; v < N_NODES; v++) begin
      q_level = l[0]; q_idx = idx_t'(v); #1;
      chk(q_reach == (d[s][v] < INF), "reach");
      if (d[s][v] < INF) begin
        chk(int'(q_dist) == d[s][v], "distance");
        if (v != s)
          chk(mat[l][s][q_nexthop] != 0 &&
              mat[l][s][q_nexthop] + d[q_nexthop][v] == d[s][v], "first hop");
        else chk(q_nexthop == idx_t'(s), "self hop");
      end
    end
  endtask

  initial begin
    start = 0; level = 0; src = '0; q_level = 0; q_idx = '0; level_q = 0;
    for (int l = 0; l < 2; l++)
      for (int i = 0; i < N_NODES; i++)
        for (int j = 0; j < N_NODES; j++) mat[l][i][j] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // a line 0-1-2-3 on level 1, a ring on level 2
    mat[0][0][1] = 4; mat[0][1][0] = 4; mat[0][1][2] = 6; mat[0][2][1] = 6;
    mat[0][2][3] = 1; mat[0][3][2] = 1;
    for (int i = 0; i < N_NODES; i++) begin
      mat[1][i][(i + 1) % N_NODES] = 3; mat[1][(i + 1) % N_NODES][i] = 3;
    end
    run_and_check(0, 0);
    run_and_check(1, 2);
    // level 1 results must survive a level 2 run
    q_level = 0; q_idx = 3; #1;
    chk(q_reach && q_dist == 11 && q_nexthop == 1, "level tables kept apart");
    for (int t = 0; t < 200; t++) begin
      int l;
      l = t % 2;
      for (int i = 0; i < N_NODES; i++)
        for (int j = 0; j < N_NODES; j++)
          mat[l][i][j] = (i != j && $urandom % 100 < 40) ? 1 + $urandom % 63 : 0;
      run_and_check(l, $urandom % N_NODES);
    end
    $display("longest run %0d cycles", max_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
