// tb_plasticity_board_full - the board at its default sizes (50 MHz,
// 500 neuron addresses, 25 local neurons) running the all-to-all
// experiment: 25 local neurons, every neuron connected to every neuron
// including itself (625 plastic excitatory synapses), all weights starting
// at 127. The neurons fire regularly and phase-locked, neuron n+1 DT_MS
// after neuron n, each with period 25 * DT_MS. Each spike makes the board
// apply LTD on the 25 synapses leaving the neuron (and deliver their
// weights) and LTP on the 25 synapses entering it.
// Checks: every weight event against the real-valued model of the rule
// (tb/stdp_ref.svh), all 625 final weights, and the time the board takes
// for one spike (50 synapses), which must stay below DT_MS. 40 rounds of
// 50 ms make 2 s of network time.
module tb_plasticity_board_full;
  import stdp_pkg::*;
  `include "stdp_ref.svh"

  localparam int CLK_KHZ = 50000;
  localparam int NN = 25, ROUNDS = 40;
  localparam real DT_MS = 2.0;

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

  plasticity_board dut (.*);

  always #10 clk = ~clk;   // 20 ns, 50 MHz

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (ROUNDS * 25 * int'(DT_MS * 50000.0) + 1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  stdp_ref m;

  typedef struct { int slot; real w; real tol; } ev_t;
  ev_t evq[$];
  int n_ev = 0, n_ltp = 0, n_ltd = 0, n_stall = 0;
  longint busy_start = 0, max_busy = 0;

  always @(posedge clk) if (rst_n) begin
    if (|syn_strobe) begin
      n_ev++;
      if (evq.size() == 0) chk(0, "unexpected weight event");
      else begin
        automatic ev_t e = evq.pop_front();
        automatic real w8 = e.w / 4096.0;
        chk(syn_strobe == (N_LOCAL)'(1) << e.slot, $sformatf("event slot exp %0d", e.slot));
        chk(syn_exc, "excitatory");
        chk(real'(syn_weight) > w8 - 1.5 - e.tol && real'(syn_weight) < w8 + 0.5 + e.tol,
            $sformatf("event weight %0d, model %f", syn_weight, w8));
      end
    end
    if (stall) n_stall++;
    if (dut.wu_start && dut.wu_ltp) n_ltp++;
    if (dut.wu_start && !dut.wu_ltp) n_ltd++;
    if (dut.fifo_pop) busy_start = cyc;
    if (dut.busy && cyc - busy_start > max_busy) max_busy = cyc - busy_start;
  end

  function automatic real now_us();
    return real'(cyc) * 1000.0 / real'(CLK_KHZ);
  endfunction

  initial begin
    automatic real a = 4096.0 / 65536.0;
    int lp;
    m = new(NN, 14800.0, 33800.0, 28000.0, 88000.0, a, a);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // look-up table: post list then pre list of each neuron, both 0..24
    lp = 0;
    for (int n = 0; n < NN; n++) begin
      @(negedge clk);
      cfg_col_we = 1; cfg_col_addr = addr_t'(n);
      cfg_col = '{is_local: 1'b1, excitatory: 1'b1,
                  post_base: lptr_t'(lp), post_len: llen_t'(NN),
                  pre_base: lptr_t'(lp + NN), pre_len: llen_t'(NN)};
      for (int k = 0; k < 2 * NN; k++) begin
        @(negedge clk);
        cfg_col_we = 0;
        cfg_list_we = 1; cfg_list_addr = lptr_t'(lp + k); cfg_list_data = addr_t'(k % NN);
      end
      @(negedge clk); cfg_list_we = 0;
      lp += 2 * NN;
      m.loc[n] = 1;
    end
    for (int j = 0; j < NN; j++)
      for (int i = 0; i < NN; i++) begin
        @(negedge clk);
        cfg_w_we = 1; cfg_w_pre = addr_t'(j); cfg_w_slot = slot_t'(i);
        cfg_w = weight_t'(127) << 12; cfg_w_plastic = 1;
        m.conn[j][i] = 1; m.plas[j][i] = 1; m.w[j][i] = 127.0 * 4096.0;
      end
    @(negedge clk); cfg_w_we = 0;
    repeat (600) @(negedge clk);
    for (int r = 0; r < ROUNDS; r++)
      for (int n = 0; n < NN; n++) begin
        @(negedge clk);
        spike_in = (N_LOCAL)'(1) << n;
        m.spike(n, now_us());
        for (int i = 0; i < NN; i++)
          evq.push_back('{i, m.w[n][i], 0.03 * m.mag[n][i] / 4096.0});
        @(negedge clk);
        spike_in = '0;
        repeat (int'(DT_MS * 50000.0) - 2) @(negedge clk);
      end
    wait (!busy && dut.fifo_empty);
    repeat (20) @(negedge clk);
    chk(evq.size() == 0, $sformatf("%0d weight events missing", evq.size()));
    for (int j = 0; j < NN; j++)
      for (int i = 0; i < NN; i++) begin
        automatic real tol = 0.03 * m.mag[j][i] + 64.0;
        host_rd_pre = addr_t'(j); host_rd_slot = slot_t'(i);
        @(negedge clk); @(negedge clk);
        chk(real'(host_rd_w) > m.w[j][i] - tol && real'(host_rd_w) < m.w[j][i] + tol,
            $sformatf("weight %0d->%0d = %0d, model %f", j, i, host_rd_w, m.w[j][i]));
        if (i == 0 || i == j || i == (j + 1) % NN)
          $display("weight %0d->%0d: %0d/255 (model %f)", j, i, host_rd_w >> 12,
                   m.w[j][i] / 4096.0);
      end
    $display("events=%0d ltp=%0d ltd=%0d stall_cycles=%0d longest_event=%0d cycles (%f us)",
             n_ev, n_ltp, n_ltd, n_stall, max_busy, real'(max_busy) / 50.0);
    // every plastic synapse is updated, also while a trace is still zero
    chk(n_ltp == ROUNDS * NN * NN && n_ltd == ROUNDS * NN * NN,
        $sformatf("update counts %0d/%0d", n_ltp, n_ltd));
    chk(real'(max_busy) / 50.0 < DT_MS * 1000.0, "one spike handled before the next");
    chk(!fifo_overflow, "no spike lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
