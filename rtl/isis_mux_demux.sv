// isis_mux_demux: the multiplexers and demultiplexers that regulate the flow
// of records between the processors and the twelve packet buffers.
//
// Three independent parts, all combinational:
//  * ingress demux: a record from the ingress packet processor (in_valid,
//    in_cls) becomes a push into exactly one in-buffer (in_push, one-hot).
//  * egress demux: a record from the main processor (eg_valid, eg_cls)
//    becomes a push into exactly one eg-buffer (eg_push, one-hot).
//  * egress mux: among the eg-buffers that hold a record (eg_empty low), the
//    one with the lowest class number (IIH first, PSNP last) is offered to
//    the egress packet processor (tx_avail, tx_cls); tx_pop from the egress
//    processor is steered back to that buffer as a one-hot eg_pop.
// The fixed priority order of the egress mux is this design's choice.
module isis_mux_demux
  import isis_pkg::*;
(
  input  logic             in_valid,
  input  buf_cls_t         in_cls,
  output logic [N_BUF-1:0] in_push,
  input  logic             eg_valid,
  input  buf_cls_t         eg_cls,
  output logic [N_BUF-1:0] eg_push,
  input  logic [N_BUF-1:0] eg_empty,
  output logic             tx_avail,
  output buf_cls_t         tx_cls,
  input  logic             tx_pop,
  output logic [N_BUF-1:0] eg_pop
);
  always_comb begin
    in_push = '0;
    eg_push = '0;
    if (in_valid) in_push[in_cls] = 1'b1;
    if (eg_valid) eg_push[eg_cls] = 1'b1;
  end

  always_comb begin
    tx_avail = 1'b0;
    tx_cls   = BUF_IIH;
    for (int i = N_BUF-1; i >= 0; i--) begin
      if (!eg_empty[i]) begin
        tx_avail = 1'b1;
        tx_cls   = buf_cls_t'(i);
      end
    end
    eg_pop = '0;
    if (tx_pop && tx_avail) eg_pop[tx_cls] = 1'b1;
  end
endmodule
