// tb_stdp_coproc - the two kinds of co-processor against a model:
//   P/Q kind: SPIKE restarts the trace at 1.0, READ returns A * trace.
//   eps kind: SPIKE stores 1 - trace (the inverter) and restarts the
//   trace; READ returns the stored efficacy; a first spike gives 1.0.
// Random traffic with a short tick; then the efficacy of two spikes dt
// apart is compared with 1 - exp(-dt/tau). The tick period derived from
// tau and the clock frequency is checked at the default sizes.
module tb_stdp_coproc;
  import stdp_pkg::*;
  localparam int N = 8, S = 4, TICK = 30;
  localparam frac_t AMP = 16'h3000;
  logic clk = 0, rst_n = 0;
  logic   req [2];
  cp_op_e op  [2];
  logic [$clog2(N)-1:0] idx [2];
  logic   ready [2], rvalid [2];
  frac_t  rdata [2];
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint tr [2][N];
  frac_t  eff [N];
  frac_t  expq [2][$];

  stdp_coproc #(.EFFICACY(1'b0), .N(N), .DECAY_SHIFT(S), .AMPLITUDE(AMP),
                .TICK_CYCLES(TICK)) dut_p (
    .clk, .rst_n, .req(req[0]), .op(op[0]), .idx(idx[0]), .ready(ready[0]),
    .rvalid(rvalid[0]), .rdata(rdata[0]));
  stdp_coproc #(.EFFICACY(1'b1), .N(N), .DECAY_SHIFT(S),
                .TICK_CYCLES(TICK)) dut_e (
    .clk, .rst_n, .req(req[1]), .op(op[1]), .idx(idx[1]), .ready(ready[1]),
    .rvalid(rvalid[1]), .rdata(rdata[1]));

  // default sizes: only the derived tick periods are looked at
  logic d_ready, d_rvalid;
  frac_t d_rdata;
  stdp_coproc dut_def (.clk, .rst_n, .req(1'b0), .op(CP_READ), .idx('0),
                       .ready(d_ready), .rvalid(d_rvalid), .rdata(d_rdata));
  stdp_coproc #(.TAU_US(88000)) dut_def2 (.clk, .rst_n, .req(1'b0), .op(CP_READ),
                       .idx('0), .ready(), .rvalid(), .rdata());

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #4000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic frac_t top16(input longint v);
    return frac_t'(v >> 8);
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      if (rvalid[u]) begin
        chk(expq[u].size() > 0 && rdata[u] == expq[u][0],
            $sformatf("unit %0d rdata %0h exp %0h", u, rdata[u],
                      expq[u].size() > 0 ? expq[u][0] : 0));
        if (expq[u].size() > 0) void'(expq[u].pop_front());
      end
      if (req[u] && ready[u]) begin
        if (u == 0) begin
          automatic longint sc = longint'(top16(tr[0][idx[0]])) * longint'(AMP);
          expq[0].push_back(frac_t'(sc >> 16));
          if (op[0] == CP_SPIKE) tr[0][idx[0]] = longint'(16'hffff) << 8;
        end else begin
          if (op[1] == CP_SPIKE) begin
            eff[idx[1]] = ~top16(tr[1][idx[1]]);
            expq[1].push_back(eff[idx[1]]);
            tr[1][idx[1]] = longint'(16'hffff) << 8;
          end else begin
            expq[1].push_back(eff[idx[1]]);
          end
        end
      end
    end
    if ((cyc % longint'(TICK)) == longint'(TICK) - 1)
      for (int u = 0; u < 2; u++)
        for (int i = 0; i < N; i++)
          tr[u][i] = tr[u][i] - ((tr[u][i] + (1 << S) - 1) >> S);
    cyc++;
  end

  initial begin
    for (int u = 0; u < 2; u++) begin
      req[u] = 0; op[u] = CP_READ; idx[u] = '0;
      for (int i = 0; i < N; i++) tr[u][i] = 0;
    end
    for (int i = 0; i < N; i++) eff[i] = '0;
    chk(dut_def.TICK_CYCLES == 2896, $sformatf("tick for tau_p %0d", dut_def.TICK_CYCLES));
    chk(dut_def2.TICK_CYCLES == 17221, $sformatf("tick for tau_post %0d", dut_def2.TICK_CYCLES));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int u = 0; u < 2; u++)
        if (!req[u] || ready[u]) begin
          req[u] = ($urandom % 3) == 0;
          op[u]  = ($urandom % 3 == 0) ? CP_SPIKE : CP_READ;
          idx[u] = $clog2(N)'($urandom);
        end
    end
    @(negedge clk); req[0] = 0; req[1] = 0;
    // efficacy after two spikes 20 ticks apart on a fresh neuron
    repeat ((200 + 64) * TICK) @(negedge clk);   // everything back to zero
    wait (ready[1]); @(negedge clk);
    req[1] = 1; op[1] = CP_SPIKE; idx[1] = 5; @(negedge clk); req[1] = 0;
    chk(rdata[1] == 16'hffff, "first spike: efficacy 1");
    repeat (20 * TICK) @(negedge clk);
    wait (ready[1]); @(negedge clk);
    req[1] = 1; op[1] = CP_SPIKE; idx[1] = 5; @(negedge clk); req[1] = 0;
    @(negedge clk);
    req[1] = 1; op[1] = CP_READ; idx[1] = 5; @(negedge clk); req[1] = 0;
    begin
      real e;
      e = 65535.0 * (1.0 - $exp(-20.0 * -$ln(1.0 - 1.0 / 16.0)));
      chk(real'(rdata[1]) > e * 0.98 && real'(rdata[1]) < e * 1.02,
          $sformatf("1 - exp(-dt/tau): %0d vs %f", rdata[1], e));
    end
    repeat (2) @(negedge clk);
    chk(expq[0].size() == 0 && expq[1].size() == 0, "all answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
