// tb_exp_decay - random loads and reads against a model that multiplies
// every stored value by (1 - 2^-S), rounding the step up, at each tick,
// with GUARD hidden fraction bits. The model keeps its own tick counter
// from reset; it checks that requests wait (ready low) during the clearing
// pass and during every sweep, that values reach zero, and that the decay
// follows exp(-t/tau) with tau = TICK / -ln(1 - 2^-S).
module tb_exp_decay;
  import stdp_pkg::*;
  localparam int N = 8, W = 16, G = 8, S = 3, TICK = 24;
  logic clk = 0, rst_n = 0;
  logic req = 0, ready, rvalid;
  ed_op_e op = ED_READ;
  logic [$clog2(N)-1:0] idx = '0;
  logic [W-1:0] load_val = '0, rdata;
  int checks = 0, failures = 0;
  int stalls = 0, ticks = 0;
  longint cyc = 0;
  longint model [N];
  logic [W-1:0] expq[$];

  exp_decay #(.N(N), .W(W), .GUARD(G), .DECAY_SHIFT(S), .TICK_CYCLES(TICK)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: requests first, then the tick decays everything
  always @(posedge clk) if (rst_n) begin
    if (rvalid) begin
      chk(expq.size() > 0 && rdata == expq[0],
          $sformatf("rdata %0h exp %0h", rdata, expq.size() > 0 ? expq[0] : 0));
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (req && ready) begin
      expq.push_back(W'(model[idx] >> G));
      if (op == ED_LOAD) model[idx] = longint'(load_val) << G;
    end
    if (req && !ready) stalls++;
    if ((cyc % longint'(TICK)) == longint'(TICK) - 1) begin
      ticks++;
      for (int i = 0; i < N; i++)
        model[i] = model[i] - ((model[i] + (1 << S) - 1) >> S);
    end
    cyc++;
  end

  // ready must be low while clearing and for N cycles after each tick
  always @(negedge clk) if (rst_n) begin
    if (cyc < longint'(N)) chk(!ready, "busy while clearing");
    else if ((cyc % longint'(TICK)) < longint'(N) && cyc >= longint'(TICK)) chk(!ready, "busy while sweeping");
    else chk(ready, "ready between sweeps");
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (!req || ready) begin
        req = ($urandom % 3) == 0;
        op = ($urandom % 4 == 0) ? ED_LOAD : ED_READ;
        idx = $clog2(N)'($urandom);
        load_val = W'($urandom);
      end
    end
    @(negedge clk); req = 0;
    // decay curve: load 1.0, read after 10 ticks, compare with exp()
    wait (ready); @(negedge clk);
    req = 1; op = ED_LOAD; idx = 0; load_val = '1;
    @(negedge clk); req = 0;
    repeat (10 * TICK) @(negedge clk);
    wait (ready); @(negedge clk);
    req = 1; op = ED_READ; idx = 0; @(negedge clk); req = 0;
    begin
      real e;
      e = 65535.0 * $exp(-10.0 * -$ln(1.0 - 1.0 / 8.0));
      chk(real'(rdata) > e * 0.98 && real'(rdata) < e * 1.02, "exp(-t/tau)");
    end
    // without loads every value reaches zero
    repeat ((150 + 8 * G) * TICK) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      wait (ready); @(negedge clk);
      req = 1; op = ED_READ; idx = $clog2(N)'(i); @(negedge clk); req = 0;
      chk(rdata == 0, "decayed to zero");
    end
    repeat (3) @(negedge clk);
    chk(stalls > 0, "some requests waited for a sweep");
    chk(expq.size() == 0, "every request answered");
    $display("ticks=%0d stalls=%0d", ticks, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
