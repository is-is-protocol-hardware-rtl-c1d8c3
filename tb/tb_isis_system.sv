// tb_isis_system: end-to-end test of two IS-IS engines at their default
// parameters on a simulated LAN. Engine Y (system ID ..A1) is a regular IS,
// engine Z (..A2) is the designated IS. Every PDU one engine sends is
// delivered, octet by octet, to the other. The testbench also plays router
// X (..A3), which sits behind Z: its PDUs go to Z only. The run follows the
// protocol: hellos and adjacencies (Y-Z, X-Z), database exchange, LSDB
// update and SPF; X then announces its own LSP and that of W (..A4) to Z;
// Z's periodic CSNP shows Y that they are missing, Y asks with a PSNP, Z
// answers and Y computes routes to X and W through Z. X then raises its
// sequence number with a cheaper link to W (the same CSNP/PSNP cycle
// carries it to Y), and finally purges its LSP, after which W is
// unreachable from Y. Routes are read through Y's route query port and
// compared with hand-computed path metrics. Each mechanism (adjacency up,
// adjacency already known, database exchange, LSDB swap, SPF, CSNP, PSNP,
// PSNP answered, SNP window ending with and without LSPs, purge) is counted
// and must occur at least once; no PDU may be dropped.
module tb_isis_system;
  import isis_pkg::*;
  import isis_tb_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  typedef struct {
    logic [7:0] data; logic valid, sop, eop;
  } oct_t;

  // ---- the two engines ----
  logic [7:0] in_d [2], out_d [2];
  logic in_v [2], in_s [2], in_e [2], out_v [2], out_s [2], out_e [2];
  mp_state_t state [2];
  logic rt_level = 0, rt_hit, rt_reach, rt_hit_z, rt_reach_z;
  node_id_t rt_id = '0, rt_nh, rt_nh_z;
  dist_t rt_dist, rt_dist_z;
  logic [11:0] ev [2];
  logic [1:0][15:0] swaps [2];
  logic [15:0] spf_cyc [2], rx_drop [2];
  logic [7:0] buf_drop [2];
  logic [79:0] net [2];
  localparam sys_id_t SYS_Y = 48'h0000_0000_00A1, SYS_Z = 48'h0000_0000_00A2,
                      SYS_X = 48'h0000_0000_00A3, SYS_W = 48'h0000_0000_00A4;

  isis_system u_y (
    .clock(clk), .reset(rst), .ingressPacket(in_d[0]), .ingressValid(in_v[0]),
    .ingressSop(in_s[0]), .ingressEop(in_e[0]), .afiValue(8'h49), .areaAddress(16'h0001),
    .systemID(SYS_Y), .nsel(8'h00), .nselSet(1'b0), .psnID(8'h00), .dis(1'b0),
    .egressPacket(out_d[0]), .egressValid(out_v[0]), .egressSop(out_s[0]),
    .egressEop(out_e[0]), .isState(state[0]), .rtLevel(rt_level), .rtNodeId(rt_id),
    .rtHit(rt_hit), .rtReach(rt_reach), .rtDist(rt_dist), .rtNextHop(rt_nh),
    .mpEvents(ev[0]), .lsdbSwaps(swaps[0]), .spfCycles(spf_cyc[0]), .rxDropped(rx_drop[0]),
    .bufDrops(buf_drop[0]), .net(net[0])
  );
  isis_system u_z (
    .clock(clk), .reset(rst), .ingressPacket(in_d[1]), .ingressValid(in_v[1]),
    .ingressSop(in_s[1]), .ingressEop(in_e[1]), .afiValue(8'h49), .areaAddress(16'h0001),
    .systemID(SYS_Z), .nsel(8'h00), .nselSet(1'b0), .psnID(8'h01), .dis(1'b1),
    .egressPacket(out_d[1]), .egressValid(out_v[1]), .egressSop(out_s[1]),
    .egressEop(out_e[1]), .isState(state[1]), .rtLevel(rt_level), .rtNodeId(rt_id),
    .rtHit(rt_hit_z), .rtReach(rt_reach_z), .rtDist(rt_dist_z), .rtNextHop(rt_nh_z),
    .mpEvents(ev[1]), .lsdbSwaps(swaps[1]), .spfCycles(spf_cyc[1]), .rxDropped(rx_drop[1]),
    .bufDrops(buf_drop[1]), .net(net[1])
  );

  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: states %0d %0d", state[0], state[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  // ---- LAN: frame queues per receiving engine ----
  bq_t rxq0[$], rxq1[$];       // frames waiting for Y, for Z
  bq_t cur [2];
  int  pdus [2];
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++)
      if (out_v[s]) begin
        if (out_s[s]) cur[s].delete();
        cur[s].push_back(out_d[s]);
        if (out_e[s]) begin
          pdus[s]++;
          if (s == 0) rxq1.push_back(cur[s]); else rxq0.push_back(cur[s]);
        end
      end
  end
  for (genvar r = 0; r < 2; r++) begin : g_drv
    initial begin
      bq_t f;
      in_v[r] = 0; in_s[r] = 0; in_e[r] = 0; in_d[r] = 0;
      forever begin
        @(negedge clk);
        if (r == 0 ? rxq0.size() > 0 : rxq1.size() > 0) begin
          f = (r == 0) ? rxq0.pop_front() : rxq1.pop_front();
          for (int i = 0; i < f.size(); i++) begin
            in_v[r] = 1; in_d[r] = f[i]; in_s[r] = (i == 0); in_e[r] = (i == f.size() - 1);
            @(negedge clk);
          end
          in_v[r] = 0; in_s[r] = 0; in_e[r] = 0;
        end
      end
    end
  end

  // ---- mechanism counters ----
  int evc [2][12];
  always @(posedge clk)
    if (!rst)
      for (int s = 0; s < 2; s++)
        for (int i = 0; i < 12; i++) if (ev[s][i]) evc[s][i]++;

  function automatic node_id_t nd(input sys_id_t s);
    return {s, 8'h00};
  endfunction

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask
  task automatic wait_idle_both();
    int n = 0;
    while ((state[0] != ST_IDLE || state[1] != ST_IDLE || rxq0.size() || rxq1.size()) && n < 50000) begin
      @(posedge clk); n++;
    end
  endtask
  task automatic route_y(input sys_id_t dst, input bit reach, input int d, input sys_id_t hop);
    rt_level = 0; rt_id = nd(dst); #1;
    if (reach)
      chk(rt_hit && rt_reach && int'(rt_dist) == d && rt_nh == nd(hop),
          $sformatf("Y route to %h: reach %0d dist %0d hop %h", dst[7:0], rt_reach, rt_dist, rt_nh[15:8]));
    else
      chk(!rt_reach, $sformatf("Y: %h unreachable", dst[7:0]));
  endtask
  task automatic x_sends(input bq_t f, input bit to_y);
    rxq1.push_back(f);
    if (to_y) rxq0.push_back(f);
  endtask

  int seen_purge = 0;
  initial begin
    logic [55:0] ids [8];
    logic [5:0]  met [8];
    int sw0, p0;
    for (int s = 0; s < 2; s++) begin pdus[s] = 0; for (int i = 0; i < 12; i++) evc[s][i] = 0; end
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 0;
    // X comes up behind Z and already lists Z in its hello
    wait_cycles(50);
    x_sends(mk_iih(0, SYS_X, 1, SYS_Z, 8'h49, 16'h0001, '0), 0);
    // adjacencies, database exchange, SPF
    wait_cycles(3000);
    wait_idle_both();
    chk(evc[0][1] >= 1 && evc[1][1] >= 2, "adjacencies came up (Y-Z, and Z-X at Z)");
    route_y(SYS_Z, 1, 10, SYS_Z);
    chk(spf_cyc[0] > 0 && spf_cyc[0] <= 200, $sformatf("SPF run in %0d cycles", spf_cyc[0]));
    // X announces its own LSP and W's
    ids[0] = nd(SYS_Z); met[0] = 5; ids[1] = nd(SYS_W); met[1] = 3;
    x_sends(mk_lsp(0, nd(SYS_X), 1, 1200, 2, ids, met), 0);
    ids[0] = nd(SYS_X); met[0] = 3;
    x_sends(mk_lsp(0, nd(SYS_W), 1, 1200, 1, ids, met), 0);
    // wait for Z's next CSNP, Y's PSNP and Z's answer
    wait (evc[1][8] >= 2 && evc[0][9] >= 1);
    wait_cycles(200);
    wait_idle_both();
    route_y(SYS_X, 1, 20, SYS_Z);
    route_y(SYS_W, 1, 23, SYS_Z);
    // X raises its sequence number with a cheaper link to W
    ids[0] = nd(SYS_Z); met[0] = 5; ids[1] = nd(SYS_W); met[1] = 1;
    x_sends(mk_lsp(0, nd(SYS_X), 2, 1200, 2, ids, met), 0);
    p0 = evc[0][9];
    wait (evc[0][9] > p0);
    wait_cycles(200);
    wait_idle_both();
    route_y(SYS_W, 1, 21, SYS_Z);
    // X purges its LSP (flooded to both)
    sw0 = swaps[0][0];
    x_sends(mk_lsp(0, nd(SYS_X), 3, 0, 0, ids, met), 1);
    wait_cycles(200);
    wait_idle_both();
    if (swaps[0][0] > sw0) seen_purge++;
    route_y(SYS_W, 0, 0, SYS_Z);
    route_y(SYS_X, 1, 20, SYS_Z);
    // Z's own view
    rt_id = nd(SYS_Y); #1;
    chk(rt_hit_z && rt_reach_z && rt_dist_z == 10 && rt_nh_z == nd(SYS_Y), "Z route to Y");
    // mechanism counts
    chk(evc[0][1] > 0, "Y helloDone");
    chk(evc[0][0] + evc[1][0] > 0, "adjAvailable");
    chk(evc[0][2] > 0 && evc[1][2] > 0, "dbDone");
    chk(evc[0][3] > 0 && evc[1][3] > 0, "lspdbDone");
    chk(evc[0][4] > 0 && evc[1][4] > 0, "spfDone");
    chk(evc[0][5] > 0 && evc[1][5] > 0, "snpProc");
    chk(evc[0][6] + evc[1][6] > 0, "snpNone");
    chk(evc[0][7] > 0, "snpDone at Y");
    chk(evc[1][8] > 0, "CSNP by the DIS");
    chk(evc[0][9] > 0, "PSNP by Y");
    chk(evc[1][10] > 0, "PSNP answered by the DIS");
    chk(swaps[0][0] > 0 && swaps[1][0] > 0, "LSDB active/standby swaps");
    chk(seen_purge > 0, "purge applied");
    chk(rx_drop[0] == 0 && rx_drop[1] == 0 && buf_drop[0] == 0 && buf_drop[1] == 0, "nothing dropped");
    $display("PDUs sent: Y %0d, Z %0d; LSDB swaps Y %0d Z %0d; last SPF %0d cycles; run %0d cycles",
             pdus[0], pdus[1], swaps[0][0], swaps[1][0], spf_cyc[0], cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
