// tb_neuron_decoder - each event strobes exactly the named neuron for one
// cycle with its weight and polarity; no event, no strobe; a slot beyond
// the last neuron strobes none.
module tb_neuron_decoder;
  import stdp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_exc = 0, syn_exc;
  slot_t in_slot = '0;
  logic [W_OUT_W-1:0] in_weight = '0, syn_weight;
  logic [N_LOCAL-1:0] syn_strobe;
  int checks = 0, failures = 0;

  neuron_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(syn_strobe == '0, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      automatic int s = $urandom % 32;
      automatic logic [7:0] w = 8'($urandom);
      automatic logic e = 1'($urandom);
      in_valid = 1; in_slot = slot_t'(s); in_weight = w; in_exc = e;
      @(negedge clk);
      in_valid = 0; in_weight = ~w;
      if (s < int'(N_LOCAL)) begin
        chk(syn_strobe == (N_LOCAL)'(1) << s, $sformatf("strobe slot %0d", s));
        chk(syn_weight == w && syn_exc == e, "weight and polarity");
      end else begin
        chk(syn_strobe == '0, "no strobe outside the board");
      end
      @(negedge clk);
      chk(syn_strobe == '0, "strobe lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
