// tb_isis_sys_inputs: checks that the configuration registers load under
// reset, hold afterwards, clear the NSAP selector when it is not set, and
// assemble the node ID and network entity title.
module tb_isis_sys_inputs;
  import isis_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] afiValue, nsel, psnID, cfg_afi, cfg_nsel, cfg_psn;
  logic [15:0] areaAddress, cfg_area;
  sys_id_t systemID, cfg_sysid;
  logic nsel_set, dis, cfg_dis;
  node_id_t cfg_own_id;
  logic [79:0] cfg_net;
  int checks = 0, failures = 0;

  isis_sys_inputs dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int run = 0; run < 4; run++) begin
      logic [7:0] a, n, p; logic [15:0] ar; logic [47:0] s; logic d, ns;
      a = 8'($urandom); n = 8'($urandom) | 8'h01; p = 8'($urandom); ar = 16'($urandom);
      s = {16'($urandom), 32'($urandom)}; d = run[0]; ns = run[1];
      rst = 1; afiValue = a; nsel = n; psnID = p; areaAddress = ar; systemID = s;
      dis = d; nsel_set = ns;
      repeat (2) @(posedge clk);
      @(negedge clk); rst = 0;
      // change the inputs: the registers must hold
      afiValue = ~a; nsel = ~n; psnID = ~p; areaAddress = ~ar; systemID = ~s; dis = ~d;
      repeat (3) @(posedge clk);
      #1;
      chk(cfg_afi == a && cfg_area == ar && cfg_sysid == s && cfg_psn == p && cfg_dis == d, "hold");
      chk(cfg_nsel == (ns ? n : 8'h00), "nsel");
      chk(cfg_own_id == {s, 8'h00}, "own id");
      chk(cfg_net == {a, ar, s, (ns ? n : 8'h00)}, "net");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
