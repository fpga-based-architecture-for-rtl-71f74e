// plasticity_board - the STDP plasticity architecture of one daughter board.
//
// Spikes of the board's N_LOCAL analog neurons (spike_in) and spikes from
// other boards (bus_rx_*) are encoded into sender addresses and queued in the
// spike FIFO. For each queued event the scheduler looks up the sender in the
// look-up table, has the four co-processors (P with tau_p, Q with tau_q,
// eps_j with tau_pre, eps_i with tau_post) supply the STDP terms, updates
// the synaptic weights in the weight memory with the weight-update unit,
// sends the weight of each synapse onto a local neuron to that neuron
// through the decoder (syn_strobe/syn_weight/syn_exc), and forwards spikes
// whose targets sit on other boards (bus_tx_*).
// The host fills the look-up table (cfg_col_*, cfg_list_*) and the weights
// with their plastic flags (cfg_w_*) before or while spikes flow, and reads
// weights back (host_rd_*, one cycle latency).
// Timing: the co-processors decay their traces in real time, so CLK_KHZ must
// be the actual clock frequency; after reset they spend N_NEURONS cycles
// clearing before the first event can be processed.
// Block structure, time constants, the 20-bit weight with 8-bit output and
// the 0/255 bounds follow the published architecture; the clock frequency,
// the amplitudes A+ = A- = 1/16 and all interface details are this design's.
module plasticity_board
  import stdp_pkg::*;
#(
  parameter int unsigned CLK_KHZ     = 50000,
  parameter int unsigned TAU_P_US    = 14800,
  parameter int unsigned TAU_Q_US    = 33800,
  parameter int unsigned TAU_PRE_US  = 28000,
  parameter int unsigned TAU_POST_US = 88000,
  parameter int unsigned DECAY_SHIFT = 8,
  parameter frac_t       A_PLUS      = frac_t'(4096),
  parameter frac_t       A_MINUS     = frac_t'(4096),
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  addr_t              board_base,    // address of local neuron 0
  // analog neurons
  input  logic [N_LOCAL-1:0] spike_in,
  output logic [N_LOCAL-1:0] syn_strobe,
  output logic [W_OUT_W-1:0] syn_weight,
  output logic               syn_exc,
  // backplane bus
  input  logic               bus_rx_valid,
  input  addr_t              bus_rx_addr,
  output logic               bus_rx_ready,
  output logic               bus_tx_valid,
  output addr_t              bus_tx_src,
  output addr_t              bus_tx_dst,
  input  logic               bus_tx_ready,
  // configuration
  input  logic               cfg_col_we,
  input  addr_t              cfg_col_addr,
  input  lut_col_t           cfg_col,
  input  logic               cfg_list_we,
  input  lptr_t              cfg_list_addr,
  input  addr_t              cfg_list_data,
  input  logic               cfg_w_we,
  input  addr_t              cfg_w_pre,
  input  slot_t              cfg_w_slot,
  input  logic               cfg_w_plastic,
  input  weight_t            cfg_w,
  input  addr_t              host_rd_pre,
  input  slot_t              host_rd_slot,
  output weight_t            host_rd_w,
  // status
  output logic               busy,
  output logic               stall,
  output logic               fifo_overflow
);

  // spike path
  logic  fifo_push, fifo_full, fifo_pop, fifo_empty;
  addr_t fifo_din, fifo_dout;

  spike_encoder #(.N_LOCAL(N_LOCAL), .ADDR_W(ADDR_W)) u_enc (
    .clk, .rst_n, .spike_in, .board_base,
    .bus_rx_valid, .bus_rx_addr, .bus_rx_ready,
    .fifo_push, .fifo_din, .fifo_full
  );

  spike_fifo #(.WIDTH(ADDR_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .din(fifo_din), .full(fifo_full),
    .pop(fifo_pop), .dout(fifo_dout), .empty(fifo_empty),
    .overflow(fifo_overflow)
  );

  // look-up table
  addr_t    col_raddr, list_rdata;
  lut_col_t col_rdata;
  lptr_t    list_raddr;

  lookup_table u_lut (
    .clk, .cfg_col_we, .cfg_col_addr, .cfg_col,
    .cfg_list_we, .cfg_list_addr, .cfg_list_data,
    .col_raddr, .col_rdata, .list_raddr, .list_rdata
  );

  // co-processors
  logic   cp_req    [N_CP];
  cp_op_e cp_op     [N_CP];
  addr_t  cp_idx    [N_CP];
  logic   cp_ready  [N_CP];
  logic   cp_rvalid [N_CP];
  frac_t  cp_rdata  [N_CP];

  stdp_coproc #(.EFFICACY(1'b0), .TAU_US(TAU_P_US), .CLK_KHZ(CLK_KHZ),
                .DECAY_SHIFT(DECAY_SHIFT), .AMPLITUDE(A_PLUS)) u_cp_p (
    .clk, .rst_n, .req(cp_req[CP_P]), .op(cp_op[CP_P]), .idx(cp_idx[CP_P]),
    .ready(cp_ready[CP_P]), .rvalid(cp_rvalid[CP_P]), .rdata(cp_rdata[CP_P])
  );

  stdp_coproc #(.EFFICACY(1'b0), .TAU_US(TAU_Q_US), .CLK_KHZ(CLK_KHZ),
                .DECAY_SHIFT(DECAY_SHIFT), .AMPLITUDE(A_MINUS)) u_cp_q (
    .clk, .rst_n, .req(cp_req[CP_Q]), .op(cp_op[CP_Q]), .idx(cp_idx[CP_Q]),
    .ready(cp_ready[CP_Q]), .rvalid(cp_rvalid[CP_Q]), .rdata(cp_rdata[CP_Q])
  );

  stdp_coproc #(.EFFICACY(1'b1), .TAU_US(TAU_PRE_US), .CLK_KHZ(CLK_KHZ),
                .DECAY_SHIFT(DECAY_SHIFT)) u_cp_epre (
    .clk, .rst_n, .req(cp_req[CP_EPRE]), .op(cp_op[CP_EPRE]),
    .idx(cp_idx[CP_EPRE]), .ready(cp_ready[CP_EPRE]),
    .rvalid(cp_rvalid[CP_EPRE]), .rdata(cp_rdata[CP_EPRE])
  );

  stdp_coproc #(.EFFICACY(1'b1), .TAU_US(TAU_POST_US), .CLK_KHZ(CLK_KHZ),
                .DECAY_SHIFT(DECAY_SHIFT)) u_cp_epst (
    .clk, .rst_n, .req(cp_req[CP_EPST]), .op(cp_op[CP_EPST]),
    .idx(cp_idx[CP_EPST]), .ready(cp_ready[CP_EPST]),
    .rvalid(cp_rvalid[CP_EPST]), .rdata(cp_rdata[CP_EPST])
  );

  // weights
  logic    wm_rd_en, wm_wr_en, wm_rplastic;
  addr_t   wm_pre;
  slot_t   wm_slot;
  weight_t wm_rdata, wm_wr_w;

  weight_memory u_wmem (
    .clk,
    .cfg_we(cfg_w_we), .cfg_pre(cfg_w_pre), .cfg_slot(cfg_w_slot),
    .cfg_plastic(cfg_w_plastic), .cfg_w,
    .host_rd_pre, .host_rd_slot, .host_rd_w,
    .rd_en(wm_rd_en), .rd_pre(wm_pre), .rd_slot(wm_slot),
    .rdata(wm_rdata), .rplastic(wm_rplastic),
    .wr_en(wm_wr_en), .wr_pre(wm_pre), .wr_slot(wm_slot), .wr_w(wm_wr_w)
  );

  logic    wu_start, wu_ltp, wu_done;
  weight_t wu_w, wu_w_out;
  frac_t   wu_eps_i, wu_eps_j, wu_f;

  weight_update u_wu (
    .clk, .rst_n, .start(wu_start), .ltp(wu_ltp), .w_in(wu_w),
    .eps_i(wu_eps_i), .eps_j(wu_eps_j), .f(wu_f),
    .done(wu_done), .w_out(wu_w_out)
  );

  // controller
  logic               syn_valid, syn_exc_i;
  slot_t              syn_slot;
  logic [W_OUT_W-1:0] syn_weight_i;

  stdp_scheduler u_sched (
    .clk, .rst_n, .board_base,
    .fifo_empty, .fifo_dout, .fifo_pop,
    .col_raddr, .col_rdata, .list_raddr, .list_rdata,
    .cp_req, .cp_op, .cp_idx, .cp_ready, .cp_rvalid, .cp_rdata,
    .wm_rd_en, .wm_pre, .wm_slot, .wm_rdata, .wm_rplastic,
    .wm_wr_en, .wm_wr_w,
    .wu_start, .wu_ltp, .wu_w, .wu_eps_i, .wu_eps_j, .wu_f,
    .wu_done, .wu_w_out,
    .syn_valid, .syn_slot, .syn_weight(syn_weight_i), .syn_exc(syn_exc_i),
    .bus_tx_valid, .bus_tx_src, .bus_tx_dst, .bus_tx_ready,
    .busy, .stall
  );

  neuron_decoder u_dec (
    .clk, .rst_n, .in_valid(syn_valid), .in_slot(syn_slot),
    .in_weight(syn_weight_i), .in_exc(syn_exc_i),
    .syn_strobe, .syn_weight, .syn_exc
  );

endmodule
