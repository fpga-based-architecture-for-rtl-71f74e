// tb_processor_delay - processing delay of one spike as a function of the
// number of synaptic connections it touches, on the board at its default
// sizes (50 MHz, 500 neuron addresses, 25 local neurons).
// Local neuron 0 fires alone, once per configuration; between two firings
// its look-up-table column is rewritten with a new list length:
//   LTP   - pre list of K sources (addresses 1..K), plastic synapses
//   LTPn  - the same, non-plastic
//   LTD   - post list of K local targets (addresses 1..K, K <= 24), plastic
//   LTDn  - the same, non-plastic (the stored weight is delivered as is)
//   FWD   - post list of K remote targets (addresses 25..24+K), forwarded
// For each event the cycles the processor is busy and the cycles it waits
// for a sweeping co-processor (stall) are counted. The checks are:
//   - busy - stall = base + K * c exactly, with c = 8, 5, 10, 7 and 4
//     cycles per connection and base the cost of an event with empty lists;
//   - the number of updates, weight events and bus forwards equals K;
//   - stalls stay below one sweep (500 cycles) per co-processor tick that
//     falls inside the event.
// The table printed at the end gives the delay in microseconds per
// configuration. The largest event here, 499 LTP connections, is the most
// one spike can touch on a board (500 neuron addresses).
module tb_processor_delay;
  import stdp_pkg::*;

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

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-event counters, cleared before each firing
  int n_busy, n_stall, n_upd, n_ev, n_fwd;
  always @(posedge clk) if (rst_n) begin
    if (busy) n_busy++;
    if (busy && stall) n_stall++;
    if (dut.wu_start) n_upd++;
    if (|syn_strobe) n_ev++;
    if (bus_tx_valid && bus_tx_ready) n_fwd++;
  end

  // list memory: entries 0..498 hold addresses 1..499
  localparam int NSRC = 499;

  task automatic set_col(input int n, input lut_col_t c);
    @(negedge clk);
    cfg_col_we = 1; cfg_col_addr = addr_t'(n); cfg_col = c;
    @(negedge clk);
    cfg_col_we = 0;
  endtask

  task automatic set_plastic(input bit p);
    for (int j = 1; j <= NSRC; j++) begin
      @(negedge clk);
      cfg_w_we = 1; cfg_w_pre = addr_t'(j); cfg_w_slot = '0;
      cfg_w = weight_t'(127) << 12; cfg_w_plastic = p;
    end
    for (int i = 1; i < N_LOCAL; i++) begin
      @(negedge clk);
      cfg_w_we = 1; cfg_w_pre = '0; cfg_w_slot = slot_t'(i);
      cfg_w = weight_t'(127) << 12; cfg_w_plastic = p;
    end
    @(negedge clk); cfg_w_we = 0;
  endtask

  // fire neuron 0 once and measure
  task automatic fire(output int d, output int s);
    @(negedge clk);
    n_busy = 0; n_stall = 0; n_upd = 0; n_ev = 0; n_fwd = 0;
    spike_in = (N_LOCAL)'(1);
    @(negedge clk);
    spike_in = '0;
    repeat (3) @(negedge clk);
    wait (!busy);
    repeat (3) @(negedge clk);
    d = n_busy; s = n_stall;
  endtask

  typedef enum int { M_LTP, M_LTPN, M_LTD, M_LTDN, M_FWD } mode_e;
  localparam int COST [5] = '{8, 5, 10, 7, 4};
  localparam string MNAME [5] = '{"LTP ", "LTPn", "LTD ", "LTDn", "FWD "};

  int ks_pre [8] = '{25, 50, 100, 200, 300, 400, 450, 499};
  int ks_post [4] = '{1, 6, 12, 24};

  int base;

  task automatic run(input mode_e m, input int k);
    lut_col_t c;
    int d, s, ticks;
    c = '{is_local: 1'b1, excitatory: 1'b1, post_base: '0, post_len: '0,
          pre_base: '0, pre_len: '0};
    case (m)
      M_LTP, M_LTPN: c.pre_len = llen_t'(k);
      M_LTD, M_LTDN: c.post_len = llen_t'(k);
      default: begin c.post_base = lptr_t'(24); c.post_len = llen_t'(k); end
    endcase
    set_col(0, c);
    fire(d, s);
    chk(d - s == base + k * COST[m],
        $sformatf("%s K=%0d: %0d cycles without stalls, expected %0d", MNAME[m], k, d - s,
                  base + k * COST[m]));
    case (m)
      M_LTP: chk(n_upd == k && n_ev == 0, $sformatf("LTP K=%0d: %0d updates", k, n_upd));
      M_LTPN: chk(n_upd == 0 && n_ev == 0, "no update of a non-plastic synapse");
      M_LTD: chk(n_upd == k && n_ev == k, $sformatf("LTD K=%0d: %0d/%0d", k, n_upd, n_ev));
      M_LTDN: chk(n_upd == 0 && n_ev == k, $sformatf("LTDn K=%0d: %0d events", k, n_ev));
      default: chk(n_fwd == k && n_ev == 0, $sformatf("FWD K=%0d: %0d forwards", k, n_fwd));
    endcase
    // sweeps of the four co-processors that can overlap the event
    ticks = 4 + d / 2896 + d / 6614 + d / 5479 + d / 17221;
    chk(s <= ticks * 500, $sformatf("%s K=%0d: %0d stall cycles", MNAME[m], k, s));
    $display("%s K=%3d  delay %5d cycles = %7.2f us  (stall %4d cycles)",
             MNAME[m], k, d, real'(d) / 50.0, s);
  endtask

  initial begin
    int d, s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // list memory: 1..499 in entries 0..498
    for (int e = 0; e < NSRC; e++) begin
      @(negedge clk);
      cfg_list_we = 1; cfg_list_addr = lptr_t'(e); cfg_list_data = addr_t'(e + 1);
    end
    @(negedge clk); cfg_list_we = 0;
    // columns of the other neurons: local 1..24, remote 25..499
    for (int n = 1; n <= NSRC; n++)
      set_col(n, '{is_local: (n < N_LOCAL), excitatory: 1'b1, post_base: '0,
                   post_len: '0, pre_base: '0, pre_len: '0});
    repeat (600) @(negedge clk);
    // cost of an event with empty lists
    set_col(0, '{is_local: 1'b1, excitatory: 1'b1, post_base: '0, post_len: '0,
                 pre_base: '0, pre_len: '0});
    base = 1 << 30;
    for (int r = 0; r < 5; r++) begin
      fire(d, s);
      if (d - s < base) base = d - s;
    end
    $display("empty event: %0d cycles", base);
    chk(base > 0 && base < 20, "event overhead");
    set_plastic(1);
    foreach (ks_pre[i]) run(M_LTP, ks_pre[i]);
    foreach (ks_post[i]) run(M_LTD, ks_post[i]);
    foreach (ks_pre[i]) if (ks_pre[i] <= 475) run(M_FWD, ks_pre[i]);
    set_plastic(0);
    foreach (ks_pre[i]) run(M_LTPN, ks_pre[i]);
    foreach (ks_post[i]) run(M_LTDN, ks_post[i]);
    chk(!fifo_overflow, "no spike lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
