// isis_epp: the egress packet processor. It takes records from the egress
// buffers and sends them as IS-IS PDUs, one octet per cycle, on tx_data with
// tx_valid, tx_sop on the first octet and tx_eop on the last.
//
// When the egress mux offers a record (tx_avail, tx_cls) and the processor
// is idle, it copies the head record of that buffer, pops it (tx_pop, one
// cycle) and sends it; after tx_eop it leaves one idle cycle before the next
// PDU. The octets are a pure function of the copied record, the
// configuration and the octet index, so a PDU of L octets takes L+2 cycles
// from pop to the next possible pop. Formats (ISO/IEC 10589 offsets):
//   hello: LAN IIH (type 15/16, 27-octet header) with area addresses TLV 1
//          and, when the record names a neighbour, IS neighbours TLV 6;
//          the LAN ID carries our system ID and psnID when we are the DIS;
//          33 or 41 octets;
//   LSP:   type 18/20, 27-octet header, IS reachability TLV 2 with 11 octets
//          per neighbour (delay, expense and error metrics marked
//          unsupported); 30 + 11*cnt octets; records from the DB buffer and
//          both LSP buffers are sent this way;
//   CSNP:  type 24/25, 33-octet header covering the whole LSP ID range, LSP
//          entries TLV 9 with 16 octets per entry; 35 + 16*cnt octets;
//   PSNP:  type 26/27, 17-octet header, TLV 9; 19 + 16*cnt octets.
// Checksums are sent as zero and summaries carry a lifetime of 1200 s.
// That this processor sends the hellos, LSPs, CSNPs and PSNPs follows the
// document; the fixed-priority order and all formatting are this design's.
module isis_epp
  import isis_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        tx_avail,
  input  buf_cls_t    tx_cls,
  output logic        tx_pop,
  input  iih_t        hd_iih,
  input  lsp_t        hd_db,
  input  lsp_t        hd_lsp1,
  input  lsp_t        hd_lsp2,
  input  snp_t        hd_csnp,
  input  snp_t        hd_psnp,
  input  logic [7:0]  cfg_afi,
  input  logic [15:0] cfg_area,
  input  sys_id_t     cfg_sysid,
  input  logic [7:0]  cfg_psn,
  input  logic        cfg_dis,
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  output logic        tx_sop,
  output logic        tx_eop,
  output logic [15:0] tx_count
);
  typedef enum logic [1:0] {K_IIH, K_LSP, K_CSNP, K_PSNP} kind_t;
  typedef enum logic [1:0] {E_IDLE, E_SEND, E_GAP} estate_t;

  estate_t    st;
  kind_t      kind;
  iih_t       r_iih;
  lsp_t       r_lsp;
  snp_t       r_snp;
  logic [7:0] k, len;

  function automatic logic [7:0] oct(input logic [63:0] f, input int nbytes, input int i);
    // octet i (0 = most significant) of an nbytes-wide field
    return 8'(f >> (8 * (nbytes - 1 - i)));
  endfunction

  function automatic logic [7:0] common_hdr(input int i, input logic [7:0] hl, input logic [4:0] t);
    case (i)
      0: return ISIS_NLPID;
      1: return hl;
      2: return 8'h01;
      4: return {3'b000, t};
      5: return 8'h01;
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] iih_len(input iih_t r);
    return r.nbr_valid ? 8'd41 : 8'd33;
  endfunction
  function automatic logic [7:0] lsp_len(input lsp_t r);
    return 8'd30 + 8'd11 * 8'(r.cnt);
  endfunction
  function automatic logic [7:0] snp_len(input snp_t r, input logic csnp);
    return (csnp ? 8'd35 : 8'd19) + 8'd16 * 8'(r.cnt);
  endfunction

  function automatic logic [7:0] iih_oct(input iih_t r, input int i);
    logic [55:0] lan_id;
    lan_id = cfg_dis ? {cfg_sysid, cfg_psn} : 56'd0;
    if (i < 8)   return common_hdr(i, 8'd27, r.level2 ? PDU_L2_IIH : PDU_L1_IIH);
    if (i == 8)  return r.level2 ? 8'h02 : 8'h01;
    if (i <= 14) return oct(64'(cfg_sysid), 6, i - 9);
    if (i <= 16) return oct(64'd30, 2, i - 15);
    if (i <= 18) return oct(64'(iih_len(r)), 2, i - 17);
    if (i == 19) return 8'd64;
    if (i <= 26) return oct(64'(lan_id), 7, i - 20);
    case (i)
      27: return 8'd1;
      28: return 8'd4;
      29: return 8'd3;
      30: return cfg_afi;
      31: return cfg_area[15:8];
      32: return cfg_area[7:0];
      33: return 8'd6;
      34: return 8'd6;
      default: return oct(64'(r.nbr), 6, i - 35);
    endcase
  endfunction

  function automatic logic [7:0] lsp_oct(input lsp_t r, input int i);
    int e, o;
    if (i < 8)   return common_hdr(i, 8'd27, r.level2 ? PDU_L2_LSP : PDU_L1_LSP);
    if (i <= 9)  return oct(64'(lsp_len(r)), 2, i - 8);
    if (i <= 11) return oct(64'(r.lifetime), 2, i - 10);
    if (i <= 18) return oct(64'(r.id), 7, i - 12);
    if (i == 19) return 8'h00;
    if (i <= 23) return oct(64'(r.seq), 4, i - 20);
    if (i <= 25) return 8'h00;
    if (i == 26) return r.level2 ? 8'h03 : 8'h01;
    if (i == 27) return 8'd2;
    if (i == 28) return 8'd1 + 8'd11 * 8'(r.cnt);
    if (i == 29) return 8'h00;
    e = (i - 30) / 11;
    o = (i - 30) % 11;
    if (e >= MAXNBR) return 8'h00;
    if (o == 0) return 8'(r.nbr_metric[e]);
    if (o <= 3) return 8'h80;
    return oct(64'(r.nbr_id[e]), 7, o - 4);
  endfunction

  function automatic logic [7:0] snp_oct(input snp_t r, input logic csnp, input int i);
    int base, e, o;
    base = csnp ? 35 : 19;
    if (i < 8)   return common_hdr(i, csnp ? 8'd33 : 8'd17,
                   csnp ? (r.level2 ? PDU_L2_CSNP : PDU_L1_CSNP)
                        : (r.level2 ? PDU_L2_PSNP : PDU_L1_PSNP));
    if (i <= 9)  return oct(64'(snp_len(r, csnp)), 2, i - 8);
    if (i <= 16) return oct(64'(r.src), 7, i - 10);
    if (csnp && i <= 24) return 8'h00;
    if (csnp && i <= 32) return 8'hFF;
    if (i == base - 2) return 8'd9;
    if (i == base - 1) return 8'd16 * 8'(r.cnt);
    e = (i - base) / 16;
    o = (i - base) % 16;
    if (e >= MAXENT) return 8'h00;
    if (o <= 1)  return oct(64'(LSP_LIFETIME), 2, o);
    if (o <= 8)  return oct(64'(r.ent_id[e]), 7, o - 2);
    if (o == 9)  return 8'h00;
    if (o <= 13) return oct(64'(r.ent_seq[e]), 4, o - 10);
    return 8'h00;
  endfunction

  always_comb begin
    case (kind)
      K_IIH:   tx_data = iih_oct(r_iih, int'(k));
      K_LSP:   tx_data = lsp_oct(r_lsp, int'(k));
      K_CSNP:  tx_data = snp_oct(r_snp, 1'b1, int'(k));
      default: tx_data = snp_oct(r_snp, 1'b0, int'(k));
    endcase
  end

  assign tx_valid = (st == E_SEND);
  assign tx_sop   = (st == E_SEND) && (k == 8'd0);
  assign tx_eop   = (st == E_SEND) && (k == len - 8'd1);
  assign tx_pop   = (st == E_IDLE) && tx_avail;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= E_IDLE; kind <= K_IIH; k <= '0; len <= '0;
      r_iih <= '0; r_lsp <= '0; r_snp <= '0; tx_count <= '0;
    end else begin
      case (st)
        E_IDLE: if (tx_avail) begin
          k  <= '0;
          st <= E_SEND;
          case (tx_cls)
            BUF_IIH:  begin kind <= K_IIH;  r_iih <= hd_iih;  len <= iih_len(hd_iih); end
            BUF_DB:   begin kind <= K_LSP;  r_lsp <= hd_db;   len <= lsp_len(hd_db); end
            BUF_LSP1: begin kind <= K_LSP;  r_lsp <= hd_lsp1; len <= lsp_len(hd_lsp1); end
            BUF_LSP2: begin kind <= K_LSP;  r_lsp <= hd_lsp2; len <= lsp_len(hd_lsp2); end
            BUF_CSNP: begin kind <= K_CSNP; r_snp <= hd_csnp; len <= snp_len(hd_csnp, 1'b1); end
            default:  begin kind <= K_PSNP; r_snp <= hd_psnp; len <= snp_len(hd_psnp, 1'b0); end
          endcase
        end
        E_SEND: begin
          k <= k + 1'b1;
          if (k == len - 8'd1) begin
            st       <= E_GAP;
            tx_count <= tx_count + 1'b1;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
