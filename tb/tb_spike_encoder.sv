// tb_spike_encoder - local spikes and bus spikes into FIFO writes: every
// spike appears exactly once with the right address, lowest slot first,
// bus spikes ahead of local ones, and nothing is written while the FIFO is
// full.
module tb_spike_encoder;
  localparam int NL = 6, AW = 9;
  logic clk = 0, rst_n = 0;
  logic [NL-1:0] spike_in = '0;
  logic [AW-1:0] board_base = 9'd100;
  logic bus_rx_valid = 0, bus_rx_ready;
  logic [AW-1:0] bus_rx_addr = '0;
  logic fifo_push, fifo_full = 0;
  logic [AW-1:0] fifo_din;
  int checks = 0, failures = 0;
  int seen [int];
  int full_cycles = 0;

  spike_encoder #(.N_LOCAL(NL), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] got[$];
  always @(posedge clk) if (rst_n && fifo_push) begin
    chk(!fifo_full, "push while full");
    got.push_back(fifo_din);
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // three local spikes at once: served lowest slot first
    spike_in = 6'b101010; @(negedge clk); spike_in = '0;
    repeat (5) @(negedge clk);
    chk(got.size() == 3, "three writes");
    if (got.size() == 3) begin
      chk(got[0] == 101 && got[1] == 103 && got[2] == 105, "order 101,103,105");
    end
    got.delete();
    // bus spike and local spikes together: bus first
    spike_in = 6'b000011; bus_rx_valid = 1; bus_rx_addr = 9'd7;
    @(negedge clk); spike_in = '0;
    chk(bus_rx_ready, "bus taken");
    bus_rx_valid = 0;
    repeat (4) @(negedge clk);
    chk(got.size() == 3 && got[0] == 7 && got[1] == 100 && got[2] == 101,
        "bus first then 100,101");
    got.delete();
    // FIFO full holds the pending spikes and the bus
    fifo_full = 1; spike_in = 6'b100000; @(negedge clk); spike_in = '0;
    bus_rx_valid = 1; bus_rx_addr = 9'd9;
    repeat (3) begin
      @(negedge clk);
      chk(!bus_rx_ready, "bus held while full");
    end
    chk(got.size() == 0, "nothing written while full");
    fifo_full = 0; @(negedge clk); bus_rx_valid = 0;
    repeat (3) @(negedge clk);
    chk(got.size() == 2 && got[0] == 9 && got[1] == 105, "released after full");
    got.delete();
    // random traffic: every spike exactly once
    for (int i = 0; i < 300; i++) begin
      logic [NL-1:0] s;
      s = NL'($urandom) & NL'($urandom);
      // only spike neurons not pending, so none merges
      s &= ~dut.pending;
      spike_in = s;
      fifo_full = ($urandom % 4) == 0;
      for (int k = 0; k < NL; k++) if (s[k]) seen[100 + k] = seen.exists(100 + k) ? seen[100 + k] + 1 : 1;
      @(negedge clk);
    end
    spike_in = '0; fifo_full = 0;
    repeat (NL + 2) @(negedge clk);
    foreach (got[i]) begin
      chk(seen.exists(int'(got[i])) && seen[int'(got[i])] > 0, "unexpected write");
      if (seen.exists(int'(got[i]))) seen[int'(got[i])]--;
    end
    foreach (seen[a]) chk(seen[a] == 0, $sformatf("spike of %0d lost", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
