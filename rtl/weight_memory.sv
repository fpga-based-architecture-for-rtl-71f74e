// weight_memory - synaptic weights of every synapse that ends on a neuron of
// this board.
//
// Entry (pre, slot) holds the 20-bit weight of the synapse from neuron
// address `pre` to local neuron `slot`, and a plastic flag: only plastic
// synapses are changed by the STDP rule. Synapses onto neurons of other
// boards are not stored here.
// Ports: the host writes weight and flag (cfg_*) and reads back through
// host_rd_*; the processor reads weight and flag (rd_*) and writes back the
// weight only (wr_*). All reads are synchronous: data one cycle after the
// address. The array is not reset; the host writes every entry it uses.
// Storing the weights per (pre-synaptic neuron, local post-synaptic neuron)
// follows the published weight memory; the plastic flag beside the weight
// and the port set are this design's own.
module weight_memory
  import stdp_pkg::*;
#(
  parameter int unsigned N   = N_NEURONS,
  parameter int unsigned NL  = N_LOCAL
) (
  input  logic    clk,
  // host configuration
  input  logic    cfg_we,
  input  addr_t   cfg_pre,
  input  slot_t   cfg_slot,
  input  logic    cfg_plastic,
  input  weight_t cfg_w,
  input  addr_t   host_rd_pre,
  input  slot_t   host_rd_slot,
  output weight_t host_rd_w,
  // processor
  input  logic    rd_en,
  input  addr_t   rd_pre,
  input  slot_t   rd_slot,
  output weight_t rdata,
  output logic    rplastic,
  input  logic    wr_en,
  input  addr_t   wr_pre,
  input  slot_t   wr_slot,
  input  weight_t wr_w
);

  localparam int unsigned DEPTH = N * NL;
  localparam int unsigned IW    = $clog2(DEPTH);

  weight_t w_mem [DEPTH];
  logic    p_mem [DEPTH];

  function automatic logic [IW-1:0] index(input addr_t pre, input slot_t slot);
    return IW'(pre) * IW'(NL) + IW'(slot);
  endfunction

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      w_mem[index(cfg_pre, cfg_slot)] <= cfg_w;
      p_mem[index(cfg_pre, cfg_slot)] <= cfg_plastic;
    end else if (wr_en) begin
      w_mem[index(wr_pre, wr_slot)] <= wr_w;
    end
    if (rd_en) begin
      rdata    <= w_mem[index(rd_pre, rd_slot)];
      rplastic <= p_mem[index(rd_pre, rd_slot)];
    end
    host_rd_w <= w_mem[index(host_rd_pre, host_rd_slot)];
  end

endmodule
