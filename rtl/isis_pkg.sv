// isis_pkg: types and constants shared by the IS-IS routing engine.
//
// The engine does not keep raw PDUs in its buffers. The ingress packet
// processor parses each PDU into one of three fixed-format records (hello,
// link state PDU, sequence number PDU), and the egress packet processor turns
// records of the same formats back into PDU bytes. Nodes of the routing graph
// are named by a 7-octet node ID: the 6-octet system ID followed by the
// pseudonode octet. Link metrics are 6-bit IS-IS "narrow" metrics; a metric of
// zero means "no link", which is also how a deleted LSP reads in the LSDB.
// N_NODES (seven) is the largest network the shortest path engine was
// evaluated on; the record sizes (MAXNBR, MAXENT) are this design's choice.
package isis_pkg;

  localparam int unsigned N_NODES  = 7;   // routing graph nodes per level
  localparam int unsigned IDX_W    = $clog2(N_NODES);
  localparam int unsigned MAXNBR   = N_NODES - 1; // neighbour entries per LSP
  localparam int unsigned MAXENT   = N_NODES; // LSP entries per CSNP/PSNP
  localparam int unsigned METRIC_W = 6;   // narrow metric, 0 = no link
  localparam int unsigned DIST_W   = 10;  // path metric (max 1023)
  localparam logic [DIST_W-1:0] DIST_INF = '1;

  // IS-IS PDU type codes (ISO/IEC 10589)
  localparam logic [4:0] PDU_L1_IIH  = 5'd15;
  localparam logic [4:0] PDU_L2_IIH  = 5'd16;
  localparam logic [4:0] PDU_L1_LSP  = 5'd18;
  localparam logic [4:0] PDU_L2_LSP  = 5'd20;
  localparam logic [4:0] PDU_L1_CSNP = 5'd24;
  localparam logic [4:0] PDU_L2_CSNP = 5'd25;
  localparam logic [4:0] PDU_L1_PSNP = 5'd26;
  localparam logic [4:0] PDU_L2_PSNP = 5'd27;
  localparam logic [7:0] ISIS_NLPID  = 8'h83;

  localparam logic [15:0] LSP_LIFETIME = 16'd1200;  // seconds, as advertised

  typedef logic [47:0] sys_id_t;
  typedef logic [55:0] node_id_t;       // system ID + pseudonode octet
  typedef logic [METRIC_W-1:0] metric_t;
  typedef logic [DIST_W-1:0]   dist_t;
  typedef logic [IDX_W-1:0]    idx_t;
  typedef metric_t [N_NODES-1:0] row_t; // one LSDB row: metric to every node

  // Hello (IIH). Ingress: nbr_valid = the sender listed our system ID.
  // Egress: nbr_valid = list nbr in the IS-neighbours TLV.
  typedef struct packed {
    logic    level2;
    sys_id_t src;
    logic    nbr_valid;
    sys_id_t nbr;
  } iih_t;

  // Link state PDU. lifetime == 0 is a purge (delete).
  typedef struct packed {
    logic                      level2;
    node_id_t                  id;
    logic [31:0]               seq;
    logic [15:0]               lifetime;
    logic [2:0]                cnt;
    node_id_t [MAXNBR-1:0]     nbr_id;
    metric_t  [MAXNBR-1:0]     nbr_metric;
  } lsp_t;

  // Complete / partial sequence number PDU: list of LSP summaries.
  typedef struct packed {
    logic                      level2;
    node_id_t                  src;
    logic [3:0]                cnt;
    node_id_t [MAXENT-1:0]     ent_id;
    logic [MAXENT-1:0][31:0]   ent_seq;
  } snp_t;

  // Buffer classes, in the order of the data path figure.
  typedef enum logic [2:0] {
    BUF_IIH = 3'd0, BUF_DB = 3'd1, BUF_LSP1 = 3'd2,
    BUF_LSP2 = 3'd3, BUF_CSNP = 3'd4, BUF_PSNP = 3'd5
  } buf_cls_t;
  localparam int unsigned N_BUF = 6;

  // Main processor states (control unit state machine).
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0, ST_HELLO = 3'd1, ST_DBX = 3'd2,
    ST_LSDB = 3'd3, ST_SPF = 3'd4, ST_SNP = 3'd5
  } mp_state_t;

endpackage
