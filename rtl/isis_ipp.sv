// isis_ipp: the ingress packet processor. It parses IS-IS PDUs arriving as
// a byte stream and turns each accepted PDU into a record for one of the six
// ingress buffers, telling the main processor what kind of PDU came in.
//
// Input: one octet per cycle on rx_data when rx_valid is high, rx_sop on the
// first octet (the 0x83 protocol discriminator of the common header), rx_eop
// on the last. The PDU type is octet 4 of the common header and octet 1 gives
// where the variable-length TLV part begins. Fixed fields are taken at their
// ISO/IEC 10589 offsets:
//   LAN hello (types 15, 16): source system ID, octets 9-14;
//   LSP (18, 20): remaining lifetime 10-11, LSP ID 12-18, sequence 20-23;
//   CSNP (24, 25) and PSNP (26, 27): source ID, octets 10-16.
// The TLV walker reads type, length and value of each TLV and understands
//   1 area addresses  (a level-1 hello must carry our AFI + area address),
//   6 IS neighbours   (a hello that lists our system ID sets nbr_valid),
//   2 IS reachability (LSP neighbours: metric and 7-octet neighbour ID),
//   9 LSP entries     (CSNP/PSNP summaries: LSP ID and sequence number);
// other TLVs are skipped. Entries beyond the record size are dropped.
// One cycle after rx_eop the record appears on out_valid/out_cls with the
// matching out_iih/out_lsp/out_snp; that pulse is also the status signal to
// the main processor. LSPs go to the DB buffer while db_phase is high
// (database exchange), otherwise to the LSP buffer of their level. PDUs with
// a wrong discriminator, an unknown type or a foreign area are counted in
// rx_dropped. Checksums are not verified. Which buffers exist and that this
// processor parses, buffers and reports packet types follows the document;
// the octet layout is the IS-IS standard and the rest is this design's own.
module isis_ipp
  import isis_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        rx_sop,
  input  logic        rx_eop,
  input  logic [7:0]  cfg_afi,
  input  logic [15:0] cfg_area,
  input  sys_id_t     cfg_sysid,
  input  logic        db_phase,
  output logic        out_valid,
  output buf_cls_t    out_cls,
  output iih_t        out_iih,
  output lsp_t        out_lsp,
  output snp_t        out_snp,
  output logic [15:0] rx_dropped
);
  typedef enum logic [1:0] {T_TYPE, T_LEN, T_VAL} tstate_t;

  logic [7:0]  k;          // index of the octet being received
  logic        in_pkt;
  logic        fin;        // last octet was received in the previous cycle
  logic        nlpid_ok;
  logic [4:0]  ptype;
  logic [7:0]  hdr_len;
  logic        area_ok;
  tstate_t     tst;
  logic [7:0]  ttype, tlen, vcnt, eb;
  logic [55:0] acc_id;
  logic [31:0] acc_seq;
  metric_t     acc_metric;
  logic [15:0] acc_area;
  iih_t        iih;
  lsp_t        lsp;
  snp_t        snp;

  logic [7:0]  kk;
  assign kk = rx_sop ? 8'd0 : k;

  function automatic logic is_iih(input logic [4:0] t);
    return t == PDU_L1_IIH || t == PDU_L2_IIH;
  endfunction
  function automatic logic is_lsp(input logic [4:0] t);
    return t == PDU_L1_LSP || t == PDU_L2_LSP;
  endfunction
  function automatic logic is_snp(input logic [4:0] t);
    return t == PDU_L1_CSNP || t == PDU_L2_CSNP || t == PDU_L1_PSNP || t == PDU_L2_PSNP;
  endfunction

  // ---- octet-by-octet parsing ----
  always_ff @(posedge clk) begin
    if (rst) begin
      k <= '0; in_pkt <= 1'b0; fin <= 1'b0; nlpid_ok <= 1'b0; ptype <= '0;
      hdr_len <= '0; area_ok <= 1'b0; tst <= T_TYPE; ttype <= '0; tlen <= '0;
      vcnt <= '0; eb <= '0; acc_id <= '0; acc_seq <= '0; acc_metric <= '0;
      acc_area <= '0; iih <= '0; lsp <= '0; snp <= '0;
    end else begin
      fin <= 1'b0;
      if (rx_valid && (rx_sop || in_pkt)) begin
        k <= kk + 1'b1;
        in_pkt <= !rx_eop;
        fin    <= rx_eop;
        if (rx_sop) begin
          iih <= '0; lsp <= '0; snp <= '0; area_ok <= 1'b0;
          tst <= T_TYPE; nlpid_ok <= (rx_data == ISIS_NLPID);
        end
        if (kk == 8'd1) hdr_len <= rx_data;
        if (kk == 8'd4) begin
          ptype      <= rx_data[4:0];
          iih.level2 <= (rx_data[4:0] == PDU_L2_IIH);
          lsp.level2 <= (rx_data[4:0] == PDU_L2_LSP);
          snp.level2 <= (rx_data[4:0] == PDU_L2_CSNP || rx_data[4:0] == PDU_L2_PSNP);
        end
        if (kk >= 8'd8 && (kk < hdr_len || hdr_len < 8'd8)) begin
          // fixed part of the PDU-specific header
          if (is_iih(ptype) && kk >= 8'd9 && kk <= 8'd14)
            iih.src <= {iih.src[39:0], rx_data};
          if (is_lsp(ptype)) begin
            if (kk == 8'd10 || kk == 8'd11) lsp.lifetime <= {lsp.lifetime[7:0], rx_data};
            if (kk >= 8'd12 && kk <= 8'd18) lsp.id  <= {lsp.id[47:0], rx_data};
            if (kk >= 8'd20 && kk <= 8'd23) lsp.seq <= {lsp.seq[23:0], rx_data};
          end
          if (is_snp(ptype) && kk >= 8'd10 && kk <= 8'd16)
            snp.src <= {snp.src[47:0], rx_data};
        end else if (kk >= 8'd8) begin
          // TLV part
          case (tst)
            T_TYPE: begin ttype <= rx_data; tst <= T_LEN; end
            T_LEN: begin
              tlen <= rx_data; vcnt <= '0; eb <= '0;
              tst  <= (rx_data == 8'd0) ? T_TYPE : T_VAL;
            end
            default: begin
              vcnt <= vcnt + 1'b1;
              if (vcnt + 8'd1 == tlen) tst <= T_TYPE;
              case (ttype)
                8'd1: begin  // area addresses: length, AFI, area address
                  acc_area <= {acc_area[7:0], rx_data};
                  if (vcnt == 8'd3 && {acc_area, rx_data} == {cfg_afi, cfg_area})
                    area_ok <= 1'b1;
                end
                8'd6: begin  // IS neighbours: 6-octet SNPAs
                  acc_id <= {acc_id[47:0], rx_data};
                  eb     <= (eb == 8'd5) ? 8'd0 : eb + 1'b1;
                  if (eb == 8'd5 && {acc_id[39:0], rx_data} == cfg_sysid) begin
                    iih.nbr_valid <= 1'b1;
                    iih.nbr       <= cfg_sysid;
                  end
                end
                8'd2: if (vcnt != 8'd0) begin  // IS reachability, after virtual flag
                  eb <= (eb == 8'd10) ? 8'd0 : eb + 1'b1;
                  if (eb == 8'd0) acc_metric <= rx_data[METRIC_W-1:0];
                  if (eb >= 8'd4) acc_id <= {acc_id[47:0], rx_data};
                  if (eb == 8'd10 && lsp.cnt < 3'(MAXNBR)) begin
                    lsp.nbr_id[lsp.cnt]     <= {acc_id[47:0], rx_data};
                    lsp.nbr_metric[lsp.cnt] <= acc_metric;
                    lsp.cnt                 <= lsp.cnt + 1'b1;
                  end
                end
                8'd9: begin  // LSP entries: lifetime, LSP ID, sequence, checksum
                  eb <= (eb == 8'd15) ? 8'd0 : eb + 1'b1;
                  if (eb >= 8'd2 && eb <= 8'd8)  acc_id  <= {acc_id[47:0], rx_data};
                  if (eb >= 8'd10 && eb <= 8'd13) acc_seq <= {acc_seq[23:0], rx_data};
                  if (eb == 8'd15 && snp.cnt < 4'(MAXENT)) begin
                    snp.ent_id[snp.cnt]  <= acc_id;
                    snp.ent_seq[snp.cnt] <= acc_seq;
                    snp.cnt              <= snp.cnt + 1'b1;
                  end
                end
                default: ;
              endcase
            end
          endcase
        end
      end
    end
  end

  // ---- record hand-off, one cycle after the last octet ----
  logic accept;
  always_comb begin
    accept  = 1'b0;
    out_cls = BUF_IIH;
    if (nlpid_ok) begin
      if (is_iih(ptype)) begin
        accept  = iih.level2 || area_ok;
        out_cls = BUF_IIH;
      end else if (is_lsp(ptype)) begin
        accept  = 1'b1;
        out_cls = db_phase ? BUF_DB : (lsp.level2 ? BUF_LSP2 : BUF_LSP1);
      end else if (ptype == PDU_L1_CSNP || ptype == PDU_L2_CSNP) begin
        accept  = 1'b1;
        out_cls = BUF_CSNP;
      end else if (ptype == PDU_L1_PSNP || ptype == PDU_L2_PSNP) begin
        accept  = 1'b1;
        out_cls = BUF_PSNP;
      end
    end
  end
  assign out_valid = fin && accept;
  assign out_iih   = iih;
  assign out_lsp   = lsp;
  assign out_snp   = snp;

  always_ff @(posedge clk) begin
    if (rst)                  rx_dropped <= '0;
    else if (fin && !accept)  rx_dropped <= rx_dropped + 1'b1;
  end
endmodule
