// tb_isis_ipp: feeds reference PDUs (hellos, LSPs, CSNPs, PSNPs of both
// levels, with random IDs, sequence numbers and metrics) into the ingress
// packet processor and checks the record, buffer class and timing of each
// hand-off, the routing of LSPs to the DB buffer during database exchange,
// the area check on level-1 hellos, the skipping of unknown TLVs and the
// dropping of PDUs with a wrong discriminator.
module tb_isis_ipp;
  import isis_pkg::*;
  import isis_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic rx_valid, rx_sop, rx_eop, db_phase, out_valid;
  logic [7:0] rx_data, cfg_afi;
  logic [15:0] cfg_area, rx_dropped;
  sys_id_t cfg_sysid;
  buf_cls_t out_cls;
  iih_t out_iih;
  lsp_t out_lsp;
  snp_t out_snp;
  int checks = 0, failures = 0, n_out = 0, exp_drop = 0;

  isis_ipp dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // capture of hand-offs
  buf_cls_t got_cls; iih_t got_iih; lsp_t got_lsp; snp_t got_snp; int got_at, eop_at, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rx_valid && rx_eop) eop_at = cyc;
    if (out_valid) begin
      n_out++; got_cls = out_cls; got_iih = out_iih; got_lsp = out_lsp; got_snp = out_snp;
      got_at = cyc;
    end
  end

  task automatic send(input bq_t q);
    for (int i = 0; i < q.size(); i++) begin
      @(negedge clk);
      rx_valid = 1; rx_data = q[i]; rx_sop = (i == 0); rx_eop = (i == q.size() - 1);
    end
    @(negedge clk);
    rx_valid = 0; rx_sop = 0; rx_eop = 0;
    @(negedge clk);
  endtask

  function automatic logic [55:0] rid();
    return {16'($urandom), 32'($urandom), 8'($urandom % 2)};
  endfunction

  initial begin
    logic [55:0] ids [8];
    logic [5:0]  met [8];
    logic [31:0] sq [8];
    bq_t q;
    int n_prev;
    rx_valid = 0; rx_sop = 0; rx_eop = 0; rx_data = 0; db_phase = 0;
    cfg_afi = 8'h49; cfg_area = 16'h0001; cfg_sysid = 48'h1921_6800_1001;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      int kind, n;
      bit l2;
      kind = $urandom % 5; l2 = $urandom % 2;
      n_prev = n_out;
      case (kind)
        0: begin // hello, sometimes listing us, sometimes from a foreign area
          bit lists, foreign;
          logic [47:0] s;
          lists = $urandom % 2; foreign = ($urandom % 4 == 0);
          s = {16'($urandom), 32'($urandom)};
          q = mk_iih(l2, s, 1, lists ? cfg_sysid : {16'($urandom), 32'($urandom)},
                     foreign ? 8'h39 : cfg_afi, cfg_area, '0);
          send(q);
          if (foreign && !l2) begin
            chk(n_out == n_prev, "foreign L1 hello dropped"); exp_drop++;
          end else begin
            chk(n_out == n_prev + 1 && got_cls == BUF_IIH, "hello class");
            chk(got_iih.src == s && got_iih.level2 == l2 && got_iih.nbr_valid == lists, "hello fields");
          end
        end
        1, 2: begin // LSP with 0..8 neighbours (beyond MAXNBR dropped)
          logic [55:0] id; logic [31:0] seq; logic [15:0] life;
          n = $urandom % 9; id = rid(); seq = $urandom; life = ($urandom % 4 == 0) ? 16'd0 : 16'd1200;
          for (int i = 0; i < 8; i++) begin ids[i] = rid(); met[i] = 6'(1 + $urandom % 63); end
          db_phase = (kind == 2);
          q = mk_lsp(l2, id, seq, life, n, ids, met);
          // an unknown TLV (type 128) n_prev the IS reachability TLV
          q.insert(27, 8'd128); q.insert(28, 8'd2); q.insert(29, 8'hAA); q.insert(30, 8'hBB);
          send(q);
          chk(n_out == n_prev + 1, "lsp accepted");
          chk(got_cls == (db_phase ? BUF_DB : (l2 ? BUF_LSP2 : BUF_LSP1)), "lsp class");
          chk(got_lsp.id == id && got_lsp.seq == seq && got_lsp.lifetime == life &&
              got_lsp.level2 == l2, "lsp header");
          chk(int'(got_lsp.cnt) == (n > MAXNBR ? MAXNBR : n), "lsp count");
          for (int i = 0; i < n && i < MAXNBR; i++)
            chk(got_lsp.nbr_id[i] == ids[i] && got_lsp.nbr_metric[i] == met[i], "lsp neighbour");
          chk(got_at == eop_at + 1, "one cycle after the last octet");
          db_phase = 0;
        end
        3: begin // CSNP or PSNP
          bit c; logic [55:0] s;
          c = $urandom % 2; n = $urandom % 8; s = rid();
          for (int i = 0; i < 8; i++) begin ids[i] = rid(); sq[i] = $urandom; end
          q = mk_snp(c, l2, s, n, ids, sq);
          send(q);
          chk(n_out == n_prev + 1 && got_cls == (c ? BUF_CSNP : BUF_PSNP), "snp class");
          chk(got_snp.src == s && got_snp.level2 == l2 && int'(got_snp.cnt) == n, "snp header");
          for (int i = 0; i < n; i++)
            chk(got_snp.ent_id[i] == ids[i] && got_snp.ent_seq[i] == sq[i], "snp entry");
        end
        default: begin // wrong discriminator
          for (int i = 0; i < 8; i++) begin ids[i] = rid(); met[i] = 1; end
          q = mk_lsp(l2, rid(), 1, 1200, 2, ids, met);
          q[0] = 8'h82;
          send(q);
          chk(n_out == n_prev, "bad discriminator dropped"); exp_drop++;
        end
      endcase
    end
    chk(int'(rx_dropped) == exp_drop, "drop count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
