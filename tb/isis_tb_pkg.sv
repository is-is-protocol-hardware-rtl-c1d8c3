// isis_tb_pkg: reference PDU builders for the testbenches. Each function
// returns the octets of one IS-IS PDU, written directly from the ISO/IEC
// 10589 field layout (common header, fixed PDU header, TLVs), so that the
// packet processors can be checked against an independent description of
// the wire format. Checksums are zero, as the engine sends them.
package isis_tb_pkg;
  typedef logic [7:0] bq_t[$];

  function automatic void put(ref bq_t q, input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction

  function automatic void hdr(ref bq_t q, input logic [7:0] hlen, input logic [7:0] t);
    put(q, 64'h83, 1); put(q, 64'(hlen), 1); put(q, 64'h01, 1); put(q, 64'h00, 1);
    put(q, 64'(t), 1); put(q, 64'h01, 1); put(q, 64'h00, 1); put(q, 64'h00, 1);
  endfunction

  function automatic void setlen(ref bq_t q, input int at);
    q[at]     = 8'(q.size() >> 8);
    q[at + 1] = 8'(q.size());
  endfunction

  // LAN hello; nbr listed in TLV 6 when has_nbr
  function automatic bq_t mk_iih(input bit l2, input logic [47:0] src, input bit has_nbr,
                                 input logic [47:0] nbr, input logic [7:0] afi,
                                 input logic [15:0] area, input logic [55:0] lan_id);
    bq_t q;
    hdr(q, 8'd27, l2 ? 8'd16 : 8'd15);
    put(q, l2 ? 64'd2 : 64'd1, 1); put(q, 64'(src), 6); put(q, 64'd30, 2);
    put(q, 64'd0, 2); put(q, 64'd64, 1); put(q, 64'(lan_id), 7);
    put(q, 64'd1, 1); put(q, 64'd4, 1); put(q, 64'd3, 1); put(q, 64'(afi), 1);
    put(q, 64'(area), 2);
    if (has_nbr) begin put(q, 64'd6, 1); put(q, 64'd6, 1); put(q, 64'(nbr), 6); end
    setlen(q, 17);
    return q;
  endfunction

  // LSP with an IS reachability TLV of n neighbours
  function automatic bq_t mk_lsp(input bit l2, input logic [55:0] id, input logic [31:0] seq,
                                 input logic [15:0] life, input int n,
                                 input logic [55:0] nid [8], input logic [5:0] met [8]);
    bq_t q;
    hdr(q, 8'd27, l2 ? 8'd20 : 8'd18);
    put(q, 64'd0, 2); put(q, 64'(life), 2); put(q, 64'(id), 7); put(q, 64'd0, 1);
    put(q, 64'(seq), 4); put(q, 64'd0, 2); put(q, l2 ? 64'd3 : 64'd1, 1);
    put(q, 64'd2, 1); put(q, 64'(1 + 11 * n), 1); put(q, 64'd0, 1);
    for (int i = 0; i < n; i++) begin
      put(q, 64'(met[i]), 1); put(q, 64'h80, 1); put(q, 64'h80, 1); put(q, 64'h80, 1);
      put(q, 64'(nid[i]), 7);
    end
    setlen(q, 8);
    return q;
  endfunction

  // CSNP (csnp = 1) or PSNP with n LSP entries
  function automatic bq_t mk_snp(input bit csnp, input bit l2, input logic [55:0] src,
                                 input int n, input logic [55:0] eid [8],
                                 input logic [31:0] eseq [8]);
    bq_t q;
    if (csnp) hdr(q, 8'd33, l2 ? 8'd25 : 8'd24);
    else      hdr(q, 8'd17, l2 ? 8'd27 : 8'd26);
    put(q, 64'd0, 2); put(q, 64'(src), 7);
    if (csnp) begin put(q, 64'd0, 8); put(q, 64'hFFFF_FFFF_FFFF_FFFF, 8); end
    put(q, 64'd9, 1); put(q, 64'(16 * n), 1);
    for (int i = 0; i < n; i++) begin
      put(q, 64'd1200, 2); put(q, 64'(eid[i]), 7); put(q, 64'd0, 1);
      put(q, 64'(eseq[i]), 4); put(q, 64'd0, 2);
    end
    setlen(q, 8);
    return q;
  endfunction
endpackage
