// tb_isis_mux_demux: checks the one-hot push demultiplexers and the fixed
// priority egress multiplexer for every class and every egress buffer
// occupancy pattern.
module tb_isis_mux_demux;
  import isis_pkg::*;
  logic in_valid, eg_valid, tx_avail, tx_pop;
  buf_cls_t in_cls, eg_cls, tx_cls;
  logic [N_BUF-1:0] in_push, eg_push, eg_empty, eg_pop;
  int checks = 0, failures = 0;

  isis_mux_demux dut (.*);
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int c = 0; c < N_BUF; c++)
      for (int v = 0; v < 2; v++) begin
        in_valid = v[0]; eg_valid = v[0]; in_cls = buf_cls_t'(c); eg_cls = buf_cls_t'(5 - c);
        eg_empty = '1; tx_pop = 0;
        #1;
        chk(in_push == (v ? 6'(1 << c) : 6'd0), "in demux");
        chk(eg_push == (v ? 6'(1 << (5 - c)) : 6'd0), "eg demux");
      end
    for (int m = 0; m < 64; m++) begin
      int first;
      first = -1;
      for (int i = N_BUF - 1; i >= 0; i--) if (!m[i]) first = i;
      eg_empty = 6'(m); in_valid = 0; eg_valid = 0;
      for (int p = 0; p < 2; p++) begin
        tx_pop = p[0];
        #1;
        chk(tx_avail == (first >= 0), "avail");
        if (first >= 0) chk(tx_cls == buf_cls_t'(first), "priority");
        chk(eg_pop == ((p && first >= 0) ? 6'(1 << first) : 6'd0), "pop");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
