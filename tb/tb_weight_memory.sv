// tb_weight_memory - host writes of weight and plastic flag, processor
// read and write-back (the flag is kept), host read-back, against an
// associative-array model, with the one-cycle read latency.
module tb_weight_memory;
  import stdp_pkg::*;
  localparam int N = 12, NL = 5;
  logic clk = 0;
  logic cfg_we = 0, cfg_plastic = 0, rd_en = 0, wr_en = 0, rplastic;
  addr_t cfg_pre = '0, host_rd_pre = '0, rd_pre = '0, wr_pre = '0;
  slot_t cfg_slot = '0, host_rd_slot = '0, rd_slot = '0, wr_slot = '0;
  weight_t cfg_w = '0, host_rd_w, rdata, wr_w = '0;
  int checks = 0, failures = 0;
  weight_t mw [N][NL];
  logic    mp [N][NL];

  weight_memory #(.N(N), .NL(NL)) dut (.*);

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
    @(negedge clk);
    for (int p = 0; p < N; p++)
      for (int s = 0; s < NL; s++) begin
        mw[p][s] = weight_t'($urandom); mp[p][s] = 1'($urandom);
        cfg_we = 1; cfg_pre = addr_t'(p); cfg_slot = slot_t'(s);
        cfg_w = mw[p][s]; cfg_plastic = mp[p][s];
        @(negedge clk);
      end
    cfg_we = 0;
    for (int i = 0; i < 400; i++) begin
      automatic int p = $urandom % N, s = $urandom % NL;
      automatic int p2 = $urandom % N, s2 = $urandom % NL;
      rd_en = 1; rd_pre = addr_t'(p); rd_slot = slot_t'(s);
      host_rd_pre = addr_t'(p2); host_rd_slot = slot_t'(s2);
      @(negedge clk);
      rd_en = 0;
      chk(rdata == mw[p][s] && rplastic == mp[p][s], "processor read");
      chk(host_rd_w == mw[p2][s2], "host read");
      // write back a new weight
      wr_en = 1; wr_pre = addr_t'(p); wr_slot = slot_t'(s); wr_w = weight_t'($urandom);
      mw[p][s] = wr_w;
      @(negedge clk);
      wr_en = 0;
    end
    // every entry still holds the right weight and flag
    for (int p = 0; p < N; p++)
      for (int s = 0; s < NL; s++) begin
        rd_en = 1; rd_pre = addr_t'(p); rd_slot = slot_t'(s); @(negedge clk);
        chk(rdata == mw[p][s] && rplastic == mp[p][s], "final contents");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
