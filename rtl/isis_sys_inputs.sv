// isis_sys_inputs: the "system inputs" registers of the data path. They hold
// the configuration of this intermediate system: the AFI octet and area
// address (together the area ID), the 6-octet system ID, the NSAP selector,
// the pseudonode ID used when acting as designated IS, and the DIS flag.
//
// The registers load from the configuration inputs while reset is asserted
// and hold their value afterwards, so the configuration is fixed for one run
// of the protocol. The NSAP selector is cleared by reset and only loaded when
// nsel_set is high, so an uninitialised selector reads zero. The registers
// also assemble the network entity title (area ID, system ID, selector) and
// the node ID of this system in the routing graph (system ID, pseudonode 0).
// The pseudonode octet of cfg_own_id is therefore a constant zero: a router's
// own node is never a pseudonode.
// The list of inputs follows the system's I/O description; the area address
// width (16 bits) and the load-under-reset policy are this design's choices.
module isis_sys_inputs
  import isis_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  afiValue,
  input  logic [15:0] areaAddress,
  input  sys_id_t     systemID,
  input  logic [7:0]  nsel,
  input  logic        nsel_set,
  input  logic [7:0]  psnID,
  input  logic        dis,
  output logic [7:0]  cfg_afi,
  output logic [15:0] cfg_area,
  output sys_id_t     cfg_sysid,
  output logic [7:0]  cfg_nsel,
  output logic [7:0]  cfg_psn,
  output logic        cfg_dis,
  output node_id_t    cfg_own_id,
  output logic [79:0] cfg_net
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_afi   <= afiValue;
      cfg_area  <= areaAddress;
      cfg_sysid <= systemID;
      cfg_nsel  <= nsel_set ? nsel : 8'h00;
      cfg_psn   <= psnID;
      cfg_dis   <= dis;
    end
  end

  assign cfg_own_id = {cfg_sysid, 8'h00};
  assign cfg_net    = {cfg_afi, cfg_area, cfg_sysid, cfg_nsel};
endmodule
