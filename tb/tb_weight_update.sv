// tb_weight_update - LTP and LTD steps on random operands against a
// reference computed with the same truncating fixed-point steps, a
// real-valued check of the result, the bounds 0 and 255 (8-bit scale), the
// clamping of a weight configured outside them, and the latency start->done.
module tb_weight_update;
  import stdp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, ltp = 0, done;
  weight_t w_in = '0, w_out;
  frac_t eps_i = '0, eps_j = '0, f = '0;
  int checks = 0, failures = 0;

  weight_update dut (.*);

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

  localparam longint HI = 255 << 12;

  function automatic longint ref_w(input bit l, input longint w, input longint a,
                                   input longint b, input longint c);
    longint k, span, d;
    if (w > HI) w = HI;
    k = (a * b) >> 16;
    k = (k * c) >> 16;
    span = l ? HI - w : w;
    d = (k * span) >> 16;
    return l ? w + d : w - d;
  endfunction

  task automatic run(input bit l, input weight_t w, input frac_t a, input frac_t b,
                     input frac_t c);
    int lat;
    longint e;
    real r, wr;
    @(negedge clk);
    start = 1; ltp = l; w_in = w; eps_i = a; eps_j = b; f = c;
    @(negedge clk);
    start = 0; w_in = '0; eps_i = '0; eps_j = '0; f = '0; ltp = ~l;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("latency %0d", lat));
    e = ref_w(l, longint'(w), longint'(a), longint'(b), longint'(c));
    chk(longint'(w_out) == e, $sformatf("ltp=%0b w=%0d -> %0d exp %0d", l, w, w_out, e));
    chk(longint'(w_out) <= HI, "upper bound");
    wr = (w > weight_t'(HI)) ? real'(HI) : real'(w);
    r = real'(a) / 65536.0 * real'(b) / 65536.0 * real'(c) / 65536.0;
    wr = l ? wr + r * (real'(HI) - wr) : wr - r * wr;
    chk((real'(w_out) - wr) < 40.0 && (wr - real'(w_out)) < 40.0, "real-valued result");
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // full efficacy and full amplitude: the weight jumps almost to the bound
    run(1, 20'd127 << 12, 16'hffff, 16'hffff, 16'hffff);
    run(0, 20'd127 << 12, 16'hffff, 16'hffff, 16'hffff);
    // nothing happens when a term is zero
    run(1, 20'd50 << 12, 16'h0000, 16'hffff, 16'h1000);
    run(0, 20'd50 << 12, 16'hffff, 16'hffff, 16'h0000);
    // configured above the upper bound: clamped first
    run(1, 20'hfffff, 16'h8000, 16'h8000, 16'h8000);
    for (int i = 0; i < 300; i++)
      run(1'($urandom), weight_t'($urandom % (255 << 12)), frac_t'($urandom),
          frac_t'($urandom), frac_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
