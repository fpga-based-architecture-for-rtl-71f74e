// tb_stdp_scheduler - the controller alone, surrounded by simple models:
// a queue as spike FIFO, arrays as look-up table and weight memory with
// one-cycle reads, co-processors that return a fixed random value per
// neuron and randomly hold ready low (stalls), a weight-update model
// w' = w +/- ((eps_i ^ eps_j ^ f) & 255) with the real latency, and a bus
// that randomly refuses. A random network of 10 neurons, 5 of them on this
// board (addresses 4..8), receives 40 random events. The test compares, in
// order, the weight events to local neurons, the bus forwards, the
// co-processor SPIKE requests of every event, and the final weights with a
// reference that walks the lists the way the controller should.
module tb_stdp_scheduler;
  import stdp_pkg::*;
  localparam int NN = 10, BASE = 4, NLOC = 5, NEV = 40;
  logic clk = 0, rst_n = 0;
  addr_t board_base = addr_t'(BASE);
  logic fifo_empty, fifo_pop;
  addr_t fifo_dout;
  addr_t col_raddr, list_rdata;
  lut_col_t col_rdata;
  lptr_t list_raddr;
  logic   cp_req [N_CP], cp_ready [N_CP], cp_rvalid [N_CP];
  cp_op_e cp_op [N_CP];
  addr_t  cp_idx [N_CP];
  frac_t  cp_rdata [N_CP];
  logic wm_rd_en, wm_rplastic, wm_wr_en;
  addr_t wm_pre; slot_t wm_slot;
  weight_t wm_rdata, wm_wr_w;
  logic wu_start, wu_ltp, wu_done;
  weight_t wu_w, wu_w_out;
  frac_t wu_eps_i, wu_eps_j, wu_f;
  logic syn_valid, syn_exc;
  slot_t syn_slot;
  logic [W_OUT_W-1:0] syn_weight;
  logic bus_tx_valid, bus_tx_ready;
  addr_t bus_tx_src, bus_tx_dst;
  logic busy, stall;
  int checks = 0, failures = 0;
  int n_stall = 0, n_bus_wait = 0;

  stdp_scheduler dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- network ----------------
  bit       conn [NN][NN];     // conn[pre][post]
  bit       plas [NN][NN];
  bit       exc  [NN];
  lut_col_t cols [NN];
  addr_t    lists [256];
  weight_t  wmem [NN][NLOC], wref [NN][NLOC];
  bit       pmem [NN][NLOC];
  frac_t    cpv  [N_CP][NN];

  function automatic bit is_loc(int a); return a >= BASE && a < BASE + NLOC; endfunction

  function automatic weight_t wu_model(bit l, weight_t w, frac_t a, frac_t b, frac_t c);
    frac_t x = (a ^ b ^ c) & frac_t'(8'hff);
    weight_t d = weight_t'(x);
    return l ? w + d : w - d;
  endfunction

  // ---------------- models ----------------
  addr_t fifo_q[$];
  assign fifo_empty = (fifo_q.size() == 0);
  assign fifo_dout  = fifo_empty ? '0 : fifo_q[0];

  logic [N_CP-1:0] rdy;
  always_comb for (int c = 0; c < int'(N_CP); c++) cp_ready[c] = rdy[c];

  int wu_cnt = 0;
  logic wu_ltp_q; weight_t wu_w_q; frac_t wu_a, wu_b, wu_c;
  assign wu_done  = (wu_cnt == 1);
  assign wu_w_out = wu_model(wu_ltp_q, wu_w_q, wu_a, wu_b, wu_c);

  // expected logs
  typedef struct { int slot; int w; bit e; } syn_t;
  syn_t  syn_exp[$], syn_got[$];
  int    fwd_exp[$], fwd_got[$];
  int    spk_exp[$], spk_got[$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (fifo_pop) void'(fifo_q.pop_front());
      col_rdata  <= cols[int'(col_raddr) % NN];
      list_rdata <= lists[int'(list_raddr) % 256];
      for (int c = 0; c < int'(N_CP); c++) begin
        cp_rvalid[c] <= cp_req[c] && cp_ready[c];
        if (cp_req[c] && cp_ready[c]) begin
          cp_rdata[c] <= cpv[c][int'(cp_idx[c])];
          if (cp_op[c] == CP_SPIKE) spk_got.push_back(c * 100 + int'(cp_idx[c]));
        end
        rdy[c] <= ($urandom % 5) != 0;
      end
      if (cp_req[0] && !cp_ready[0] || cp_req[1] && !cp_ready[1] ||
          cp_req[2] && !cp_ready[2] || cp_req[3] && !cp_ready[3]) n_stall++;
      if (wm_rd_en) begin
        wm_rdata    <= wmem[int'(wm_pre)][int'(wm_slot)];
        wm_rplastic <= pmem[int'(wm_pre)][int'(wm_slot)];
      end
      if (wm_wr_en) wmem[int'(wm_pre)][int'(wm_slot)] <= wm_wr_w;
      if (wu_start) begin
        chk(wu_cnt == 0, "start while busy");
        wu_cnt <= 3; wu_ltp_q <= wu_ltp; wu_w_q <= wu_w;
        wu_a <= wu_eps_i; wu_b <= wu_eps_j; wu_c <= wu_f;
      end else if (wu_cnt > 0) wu_cnt <= wu_cnt - 1;
      if (syn_valid) syn_got.push_back('{int'(syn_slot), int'(syn_weight), syn_exc});
      if (bus_tx_valid && bus_tx_ready) fwd_got.push_back(int'(bus_tx_src) * 100 + int'(bus_tx_dst));
      if (bus_tx_valid && !bus_tx_ready) n_bus_wait++;
      bus_tx_ready <= ($urandom % 3) != 0;
    end
  end

  initial begin
    int lp;
    for (int c = 0; c < int'(N_CP); c++) begin
      cp_rvalid[c] = 0; cp_rdata[c] = '0; rdy[c] = 1;
      for (int i = 0; i < NN; i++) cpv[c][i] = frac_t'($urandom);
    end
    bus_tx_ready = 1;
    for (int j = 0; j < NN; j++) begin
      exc[j] = 1'($urandom);
      for (int i = 0; i < NN; i++) begin
        conn[j][i] = ($urandom % 2) == 0;
        plas[j][i] = ($urandom % 4) != 0;
      end
    end
    for (int j = 0; j < NN; j++)
      for (int s = 0; s < NLOC; s++) begin
        wmem[j][s] = weight_t'($urandom); wref[j][s] = wmem[j][s];
        pmem[j][s] = plas[j][BASE + s];
      end
    lp = 0;
    for (int n = 0; n < NN; n++) begin
      cols[n].is_local   = is_loc(n);
      cols[n].excitatory = exc[n];
      cols[n].post_base  = lptr_t'(lp);
      cols[n].post_len   = '0;
      for (int i = 0; i < NN; i++) if (conn[n][i]) begin
        lists[lp++] = addr_t'(i); cols[n].post_len++;
      end
      cols[n].pre_base = lptr_t'(lp);
      cols[n].pre_len  = '0;
      for (int j = 0; j < NN; j++) if (conn[j][n]) begin
        lists[lp++] = addr_t'(j); cols[n].pre_len++;
      end
    end
    // reference
    for (int e = 0; e < NEV; e++) begin
      automatic int n = $urandom % NN;
      fifo_q.push_back(addr_t'(n));
      spk_exp.push_back(CP_EPRE * 100 + n);
      spk_exp.push_back(CP_EPST * 100 + n);
      for (int i = 0; i < NN; i++) if (conn[n][i]) begin
        if (is_loc(i)) begin
          automatic int s = i - BASE;
          if (plas[n][i])
            wref[n][s] = wu_model(0, wref[n][s], cpv[CP_EPST][i], cpv[CP_EPRE][n], cpv[CP_Q][i]);
          syn_exp.push_back('{s, int'(wref[n][s][W_W-1 -: W_OUT_W]), exc[n]});
        end else if (is_loc(n)) begin
          fwd_exp.push_back(n * 100 + i);
        end
      end
      if (is_loc(n))
        for (int j = 0; j < NN; j++) if (conn[j][n] && plas[j][n])
          wref[j][n - BASE] = wu_model(1, wref[j][n - BASE], cpv[CP_EPST][n],
                                       cpv[CP_EPRE][j], cpv[CP_P][j]);
      spk_exp.push_back(CP_P * 100 + n);
      spk_exp.push_back(CP_Q * 100 + n);
    end
    // queue is loaded before reset ends: all events are waiting
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fifo_q.size() == 0);
    @(negedge clk);
    wait (!busy);
    repeat (3) @(negedge clk);
    chk(syn_got.size() == syn_exp.size(), $sformatf("weight events %0d exp %0d", syn_got.size(), syn_exp.size()));
    foreach (syn_exp[i]) if (i < syn_got.size())
      chk(syn_got[i] == syn_exp[i], $sformatf("weight event %0d: slot %0d w %0d / exp slot %0d w %0d",
          i, syn_got[i].slot, syn_got[i].w, syn_exp[i].slot, syn_exp[i].w));
    chk(fwd_got == fwd_exp, $sformatf("bus forwards %0d exp %0d", fwd_got.size(), fwd_exp.size()));
    // the two requests of one step may be taken in either order
    for (int i = 0; i + 1 < spk_got.size(); i += 2)
      if (spk_got[i] > spk_got[i + 1]) begin
        automatic int t = spk_got[i]; spk_got[i] = spk_got[i + 1]; spk_got[i + 1] = t;
      end
    for (int i = 0; i + 1 < spk_exp.size(); i += 2)
      if (spk_exp[i] > spk_exp[i + 1]) begin
        automatic int t = spk_exp[i]; spk_exp[i] = spk_exp[i + 1]; spk_exp[i + 1] = t;
      end
    chk(spk_got == spk_exp, $sformatf("spike requests %0d exp %0d", spk_got.size(), spk_exp.size()));
    for (int j = 0; j < NN; j++)
      for (int s = 0; s < NLOC; s++)
        chk(wmem[j][s] == wref[j][s], $sformatf("weight %0d->%0d", j, BASE + s));
    chk(n_stall > 0, "co-processor stalls happened");
    chk(n_bus_wait > 0, "bus back-pressure happened");
    $display("events=%0d weight_events=%0d forwards=%0d stalls=%0d", NEV, syn_got.size(), fwd_got.size(), n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
