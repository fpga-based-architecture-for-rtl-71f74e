// lookup_table - the network configuration held by one board.
//
// One column per neuron address holds the neuron's locality (attached to
// this board or not), its polarity (excitatory or inhibitory) and where its
// post-synaptic and pre-synaptic neuron lists start and how long they are.
// The lists themselves are neuron addresses in one shared list memory, so
// lists of any length can be packed back to back; adding or removing an
// entry creates or prunes a synapse.
// The host writes columns and list entries through the cfg_* ports. The
// processor has two synchronous read ports: data appear one cycle after
// the address. A write and a read of the same word in one cycle return the
// old word. When N or LDEPTH is set below the package sizes, only the low
// address bits that index the smaller arrays are used.
// The fields follow the published look-up table (address = column index,
// locality, polarity, post list, pre list); the base/length packing and the
// read latency are choices of this design.
module lookup_table
  import stdp_pkg::*;
#(
  parameter int unsigned N          = N_NEURONS,
  parameter int unsigned LDEPTH = LIST_DEPTH
) (
  input  logic     clk,
  // configuration
  input  logic     cfg_col_we,
  input  addr_t    cfg_col_addr,
  input  lut_col_t cfg_col,
  input  logic     cfg_list_we,
  input  lptr_t    cfg_list_addr,
  input  addr_t    cfg_list_data,
  // processor reads
  input  addr_t    col_raddr,
  output lut_col_t col_rdata,
  input  lptr_t    list_raddr,
  output addr_t    list_rdata
);

  // index bits actually used when N or LDEPTH is below the package sizes
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned LW = (LDEPTH > 1) ? $clog2(LDEPTH) : 1;

  lut_col_t cols  [N];
  addr_t    lists [LDEPTH];

  always_ff @(posedge clk) begin
    if (cfg_col_we)  cols[cfg_col_addr[CW-1:0]]   <= cfg_col;
    if (cfg_list_we) lists[cfg_list_addr[LW-1:0]] <= cfg_list_data;
    col_rdata  <= cols[col_raddr[CW-1:0]];
    list_rdata <= lists[list_raddr[LW-1:0]];
  end

endmodule
