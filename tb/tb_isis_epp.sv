// tb_isis_epp: offers random hello, LSP, CSNP and PSNP records to the egress
// packet processor and compares every transmitted octet, and the framing
// (sop, eop, one idle cycle between PDUs), with the reference PDU builders.
// It also checks that the record is popped exactly once per PDU.
module tb_isis_epp;
  import isis_pkg::*;
  import isis_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic tx_avail, tx_pop, cfg_dis, tx_valid, tx_sop, tx_eop;
  buf_cls_t tx_cls;
  iih_t hd_iih;
  lsp_t hd_db, hd_lsp1, hd_lsp2;
  snp_t hd_csnp, hd_psnp;
  logic [7:0] cfg_afi, cfg_psn, tx_data;
  logic [15:0] cfg_area, tx_count;
  sys_id_t cfg_sysid;
  int checks = 0, failures = 0, pops = 0;

  isis_epp dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  bq_t rx;
  int gap_ok = 1, last_eop = -10, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (tx_pop) pops++;
    if (tx_valid) begin
      if (tx_sop) begin
        rx.delete();
        if (cyc - last_eop < 2) gap_ok = 0;
      end
      rx.push_back(tx_data);
      if (tx_eop) last_eop = cyc;
    end
  end

  function automatic logic [55:0] rid();
    return {16'($urandom), 32'($urandom), 8'($urandom % 2)};
  endfunction

  initial begin
    logic [55:0] ids [8];
    logic [5:0]  met [8];
    logic [31:0] sq [8];
    bq_t exp;
    tx_avail = 0; tx_cls = BUF_IIH; hd_iih = '0; hd_db = '0; hd_lsp1 = '0; hd_lsp2 = '0;
    hd_csnp = '0; hd_psnp = '0;
    cfg_afi = 8'h49; cfg_area = 16'h0002; cfg_sysid = 48'h0000_0c12_3456; cfg_psn = 8'h01;
    cfg_dis = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      int kind, n, p0;
      bit l2;
      kind = $urandom % 4; l2 = $urandom % 2; cfg_dis = $urandom % 2;
      @(negedge clk);
      case (kind)
        0: begin
          hd_iih = '0; hd_iih.level2 = l2; hd_iih.nbr_valid = $urandom % 2;
          hd_iih.nbr = {16'($urandom), 32'($urandom)};
          tx_cls = BUF_IIH;
          exp = mk_iih(l2, cfg_sysid, hd_iih.nbr_valid, hd_iih.nbr, cfg_afi, cfg_area,
                       cfg_dis ? {cfg_sysid, cfg_psn} : 56'd0);
        end
        1: begin
          lsp_t r;
          n = $urandom % (MAXNBR + 1);
          r = '0; r.level2 = l2; r.id = rid(); r.seq = $urandom; r.lifetime = 16'($urandom);
          r.cnt = 3'(n);
          for (int i = 0; i < 8; i++) begin ids[i] = rid(); met[i] = 6'(1 + $urandom % 63); end
          for (int i = 0; i < MAXNBR; i++) begin r.nbr_id[i] = ids[i]; r.nbr_metric[i] = met[i]; end
          case ($urandom % 3)
            0: begin hd_db = r;   tx_cls = BUF_DB;   end
            1: begin hd_lsp1 = r; tx_cls = BUF_LSP1; end
            default: begin hd_lsp2 = r; tx_cls = BUF_LSP2; end
          endcase
          exp = mk_lsp(l2, r.id, r.seq, r.lifetime, n, ids, met);
        end
        default: begin
          snp_t r;
          bit c;
          c = (kind == 2);
          n = $urandom % (MAXENT + 1);
          r = '0; r.level2 = l2; r.src = rid(); r.cnt = 4'(n);
          for (int i = 0; i < 8; i++) begin ids[i] = rid(); sq[i] = $urandom; end
          for (int i = 0; i < MAXENT; i++) begin r.ent_id[i] = ids[i]; r.ent_seq[i] = sq[i]; end
          if (c) begin hd_csnp = r; tx_cls = BUF_CSNP; end
          else   begin hd_psnp = r; tx_cls = BUF_PSNP; end
          exp = mk_snp(c, l2, r.src, n, ids, sq);
        end
      endcase
      p0 = pops;
      tx_avail = 1;
      #1;
      while (!tx_pop) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      tx_avail = 0;
      chk(pops == p0 + 1, "popped once");
      wait (tx_valid && tx_eop);
      @(posedge clk); #1;
      chk(rx.size() == exp.size(), $sformatf("length kind %0d", kind));
      for (int i = 0; i < exp.size() && i < rx.size(); i++)
        chk(rx[i] == exp[i], $sformatf("octet %0d kind %0d", i, kind));
      // keep offering while the last PDU finishes: no pop during the gap
      tx_avail = 1;
      #1;
      chk(!tx_pop, "no pop in the idle cycle after eop");
      tx_avail = 0;
    end
    chk(gap_ok == 1, "idle cycle between PDUs");
    chk(int'(tx_count) == 200, "PDU count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
