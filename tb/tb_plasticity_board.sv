// tb_plasticity_board - the whole board on the three-neuron example
// network: neurons 0 and 1 are on this board (slots 0 and 1), neuron 30 is
// on another board and reaches this one over the bus.
//   0 -> 1   weight 23, plastic, excitatory
//   1 -> 30  plastic, inhibitory (stored on the other board)
//   30 -> 0  weight 12, plastic, excitatory
//   30 -> 1  weight 91, not plastic, excitatory
// Rounds of 20 ms: neuron 0 fires at 0 ms, neuron 1 at 4 ms, neuron 30 at
// 8 ms; in the last round 0 and 1 fire together, then a burst of bus spikes
// fills the spike FIFO. Every weight event to a neuron is compared with a
// real-valued model of the STDP rule (tb/stdp_ref.svh), so are the final
// weights; forwards to the bus, polarity and the untouched non-plastic
// weight are checked. The clock is taken as 10 MHz to keep the run short.
// Each mechanism is counted and must happen: LTP and LTD updates,
// non-plastic delivery, bus forward, spikes received from the bus,
// co-processor stalls and a full spike FIFO.
module tb_plasticity_board;
  import stdp_pkg::*;
  `include "stdp_ref.svh"

  localparam int CLK_KHZ = 10000;
  localparam int NN = 31, ROUNDS = 12;
  localparam int A_RAW = 4096;

  logic clk = 0, rst_n = 0;
  addr_t board_base = '0;
  logic [N_LOCAL-1:0] spike_in = '0, syn_strobe;
  logic [W_OUT_W-1:0] syn_weight;
  logic syn_exc;
  logic bus_rx_valid = 0, bus_rx_ready, bus_tx_valid, bus_tx_ready = 1;
  addr_t bus_rx_addr = '0, bus_tx_src, bus_tx_dst;
  logic cfg_col_we = 0, cfg_list_we = 0, cfg_w_we = 0, cfg_w_plastic = 0;
  addr_t cfg_col_addr = '0, cfg_list_data = '0, cfg_w_pre = '0, host_rd_pre = '0;
  lut_col_t cfg_col = '0;
  lptr_t cfg_list_addr = '0;
  slot_t cfg_w_slot = '0, host_rd_slot = '0;
  weight_t cfg_w = '0, host_rd_w;
  logic busy, stall, fifo_overflow;
  int checks = 0, failures = 0;

  plasticity_board #(.CLK_KHZ(CLK_KHZ)) dut (.*);

  always #50 clk = ~clk;   // 100 ns

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (ROUNDS * 200000 + 400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  stdp_ref m;
  bit exc [NN];

  // expected weight events
  typedef struct { int slot; real w; bit e; } ev_t;
  ev_t evq[$];
  int n_ev = 0, n_fwd = 0, n_nonplastic = 0, n_remote = 0, n_stall = 0,
      n_full = 0, n_ltp = 0, n_ltd = 0;

  always @(posedge clk) if (rst_n) begin
    if (|syn_strobe) begin
      n_ev++;
      if (evq.size() == 0) chk(0, "unexpected weight event");
      else begin
        automatic ev_t e = evq.pop_front();
        automatic real w8 = e.w / 4096.0;
        chk(syn_strobe == (N_LOCAL)'(1) << e.slot, $sformatf("event slot exp %0d", e.slot));
        chk(syn_exc == e.e, "event polarity");
        chk(real'(syn_weight) > w8 - 1.5 && real'(syn_weight) < w8 + 0.5,
            $sformatf("event weight %0d, model %f", syn_weight, w8));
        if (syn_strobe[1] && syn_weight == 8'd91) n_nonplastic++;
      end
    end
    if (bus_tx_valid && bus_tx_ready) begin
      n_fwd++;
      chk(bus_tx_src == 1 && bus_tx_dst == 30, "forward 1 -> 30");
    end
    if (stall) n_stall++;
    if (dut.fifo_full) n_full++;
    if (dut.wu_start && dut.wu_ltp) n_ltp++;
    if (dut.wu_start && !dut.wu_ltp) n_ltd++;
    if (dut.fifo_pop && dut.fifo_dout == 30) n_remote++;
  end

  task automatic cfg_col_w(input int a, input bit l, input bit e, input int pb, input int pl,
                           input int rb, input int rl);
    @(negedge clk);
    cfg_col_we = 1; cfg_col_addr = addr_t'(a);
    cfg_col = '{is_local: l, excitatory: e, post_base: lptr_t'(pb), post_len: llen_t'(pl),
                pre_base: lptr_t'(rb), pre_len: llen_t'(rl)};
    @(negedge clk); cfg_col_we = 0;
  endtask

  task automatic cfg_list_w(input int p, input int a);
    @(negedge clk);
    cfg_list_we = 1; cfg_list_addr = lptr_t'(p); cfg_list_data = addr_t'(a);
    @(negedge clk); cfg_list_we = 0;
  endtask

  task automatic cfg_weight(input int pre, input int post, input int w8, input bit p);
    @(negedge clk);
    cfg_w_we = 1; cfg_w_pre = addr_t'(pre); cfg_w_slot = slot_t'(post);
    cfg_w = weight_t'(w8) << 12; cfg_w_plastic = p;
    @(negedge clk); cfg_w_we = 0;
    m.w[pre][post] = real'(w8) * 4096.0;
  endtask

  // post lists in LUT order
  int post_list [NN][$];

  function automatic void expect_events(int n);
    foreach (post_list[n][k]) begin
      automatic int i = post_list[n][k];
      if (m.loc[i]) evq.push_back('{i, m.w[n][i], exc[n]});
    end
  endfunction

  function automatic real now_us();
    return real'(cyc) * 1000.0 / real'(CLK_KHZ);
  endfunction

  task automatic local_spike(input logic [N_LOCAL-1:0] mask);
    @(negedge clk);
    spike_in = mask;
    for (int k = 0; k < 2; k++) if (mask[k]) begin
      m.spike(k, now_us());
      expect_events(k);
    end
    @(negedge clk);
    spike_in = '0;
  endtask

  task automatic bus_spike(input int a);
    @(negedge clk);
    bus_rx_valid = 1; bus_rx_addr = addr_t'(a);
    @(posedge clk);
    while (!bus_rx_ready) @(posedge clk);
    m.spike(a, now_us());
    expect_events(a);
    @(negedge clk);
    bus_rx_valid = 0;
  endtask

  task automatic wait_ms(input real ms);
    repeat (int'(ms * real'(CLK_KHZ))) @(negedge clk);
  endtask

  initial begin
    automatic real a = real'(A_RAW) / 65536.0;
    m = new(NN, 14800.0, 33800.0, 28000.0, 88000.0, a, a);
    m.loc[0] = 1; m.loc[1] = 1;
    m.conn[0][1] = 1;  m.plas[0][1] = 1;
    m.conn[1][30] = 1; m.plas[1][30] = 1;
    m.conn[30][0] = 1; m.plas[30][0] = 1;
    m.conn[30][1] = 1; m.plas[30][1] = 0;
    exc[0] = 1; exc[1] = 0; exc[30] = 1;
    post_list[0] = '{1}; post_list[1] = '{30}; post_list[30] = '{0, 1};
    bus_tx_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // look-up table: lists packed as post(0) pre(0) post(1) pre(1) post(30) pre(30)
    cfg_list_w(0, 1);  cfg_list_w(1, 30);
    cfg_list_w(2, 30); cfg_list_w(3, 0); cfg_list_w(4, 30);
    cfg_list_w(5, 0);  cfg_list_w(6, 1); cfg_list_w(7, 1);
    cfg_col_w(0, 1, 1, 0, 1, 1, 1);
    cfg_col_w(1, 1, 0, 2, 1, 3, 2);
    cfg_col_w(30, 0, 1, 5, 2, 7, 1);
    cfg_weight(0, 1, 23, 1);
    cfg_weight(30, 0, 12, 1);
    cfg_weight(30, 1, 91, 0);
    repeat (600) @(negedge clk);       // co-processors clear their RAMs
    for (int r = 0; r < ROUNDS; r++) begin
      bus_tx_ready = (r % 2 == 0);     // the bus is sometimes slow to take a forward
      local_spike((N_LOCAL)'(2'b01));
      wait_ms(4.0);
      local_spike((N_LOCAL)'(2'b10));
      repeat (50) @(negedge clk);
      bus_tx_ready = 1;
      wait_ms(4.0);
      bus_spike(30);
      wait_ms(12.0);
    end
    local_spike((N_LOCAL)'(2'b11));
    wait_ms(3.0);
    for (int b = 0; b < 24; b++) bus_spike(30);
    wait (!busy && dut.fifo_empty);
    repeat (20) @(negedge clk);
    chk(evq.size() == 0, $sformatf("%0d weight events missing", evq.size()));
    // final weights
    foreach (m.conn[j, i]) if (m.conn[j][i] && m.loc[i]) begin
      automatic real tol = 0.03 * m.mag[j][i] + 64.0;
      host_rd_pre = addr_t'(j); host_rd_slot = slot_t'(i);
      @(negedge clk); @(negedge clk);
      chk(real'(host_rd_w) > m.w[j][i] - tol && real'(host_rd_w) < m.w[j][i] + tol,
          $sformatf("weight %0d->%0d = %0d, model %f", j, i, host_rd_w, m.w[j][i]));
      $display("weight %0d->%0d: %0d/255 (model %f)", j, i, host_rd_w >> 12, m.w[j][i] / 4096.0);
    end
    host_rd_pre = 30; host_rd_slot = 1; @(negedge clk); @(negedge clk);
    chk(host_rd_w == weight_t'(91) << 12, "non-plastic weight untouched");
    chk(!fifo_overflow, "no spike lost");
    $display("events=%0d ltp=%0d ltd=%0d nonplastic=%0d forwards=%0d remote=%0d stall_cycles=%0d fifo_full_cycles=%0d",
             n_ev, n_ltp, n_ltd, n_nonplastic, n_fwd, n_remote, n_stall, n_full);
    chk(n_ltp > 0, "LTP happened");
    chk(n_ltd > 0, "LTD happened");
    chk(n_nonplastic > 0, "non-plastic delivery happened");
    chk(n_fwd == ROUNDS + 1, "one forward per spike of neuron 1");
    chk(n_remote > 0, "bus spikes processed");
    chk(n_stall > 0, "co-processor stall happened");
    chk(n_full > 0, "spike FIFO full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
