// tb_isis_fifo: checks the packet buffer against a queue model under random
// push/pop traffic: head value, empty and full flags, and the drop counter
// when pushing into a full buffer.
module tb_isis_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1;
  logic push, pop, empty, full;
  logic [15:0] din, dout;
  logic [7:0] drops;
  int checks = 0, failures = 0, exp_drops = 0;
  logic [15:0] model[$];

  isis_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) chk(dout == model[0], "head");
      push = ($urandom % 2) == 1;
      pop  = ($urandom % 3) == 0 && model.size() > 0;
      din  = 16'($urandom);
      @(posedge clk);
      #1;
      begin
        int old;
        old = model.size();
        if (pop) void'(model.pop_front());
        if (push) begin
          if (old < DEPTH) model.push_back(din);
          else exp_drops++;
        end
      end
    end
    chk(int'(drops) == (exp_drops > 255 ? 255 : exp_drops), "drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
