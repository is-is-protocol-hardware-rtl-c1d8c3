// isis_fifo: the packet buffer used for every ingress ("in...") and egress
// ("eg...") buffer of the data path: inIIH, inDB, inLSP-L1, inLSP-L2, inCSNP,
// inPSNP and the six matching eg... buffers.
//
// A synchronous first-in first-out queue of DEPTH entries of type T (a parsed
// packet record). push writes din at the tail when the buffer is not full;
// pop removes the head when it is not empty. dout always shows the head
// (first-word fall-through), so a consumer reads dout and pulses pop in the
// same cycle. A push into a full buffer is dropped and counted in drops. The
// data path figure names the buffers; their depth, record format and overflow
// policy are this design's choices.
module isis_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       push,
  input  T           din,
  input  logic       pop,
  output T           dout,
  output logic       empty,
  output logic       full,
  output logic [7:0] drops
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     count;
  logic            do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      drops  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop)
        rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (!do_push && do_pop) count <= count - 1'b1;
      if (push && full && drops != '1) drops <= drops + 1'b1;
    end
  end

  // a consumer must not pop an empty buffer
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));
endmodule
