// tb_spike_fifo - random push/pop traffic against a queue model: data
// order, full/empty flags, first-word-fall-through output and the sticky
// overflow flag on a push into a full queue.
module tb_spike_fifo;
  localparam int W = 9, D = 4;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, empty, overflow;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  spike_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == D), "full flag");
      if (q.size() > 0) chk(dout == q[0], $sformatf("dout %0d exp %0d", dout, q[0]));
      push = ($urandom % 3) != 0;
      pop  = (($urandom % 3) != 0) && !empty;
      din  = W'($urandom);
      begin
        automatic int n_before = q.size();
        @(posedge clk);
        if (pop) void'(q.pop_front());
        // a push while full is dropped, even with a pop in the same cycle
        if (push && n_before != D) q.push_back(din);
      end
    end
    @(negedge clk); push = 0; pop = 0;
    // fill completely, then overflow
    rst_n = 0; q.delete(); @(negedge clk); rst_n = 1;
    chk(!overflow, "overflow cleared by reset");
    for (int i = 0; i < D; i++) begin
      push = 1; din = W'(i + 100); @(negedge clk);
    end
    chk(full && !overflow, "full, no overflow yet");
    push = 1; din = 9'h1ff; @(negedge clk); push = 0;
    chk(overflow, "overflow after push into full");
    for (int i = 0; i < D; i++) begin
      chk(dout == W'(i + 100), "order after overflow");
      pop = 1; @(negedge clk); pop = 0;
    end
    chk(empty, "empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
