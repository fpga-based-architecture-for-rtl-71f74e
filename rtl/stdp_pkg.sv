// stdp_pkg - sizes, number formats and shared types of the STDP plasticity
// board.
//
// A board serves N_LOCAL analog neurons and knows a network of N_NEURONS
// neuron addresses (20 boards of 25 neurons). Weights are 20-bit unsigned
// values whose 8 most significant bits are what a neuron receives; the
// potentiation/depression bounds are 0 and 255 on that 8-bit scale.
// The 20-bit weight, the 8-bit output and the 25 neurons per board follow
// the published architecture; the 16-bit trace format, the list memory size
// and the 500-neuron address space are choices of this design.
//
// Traces and efficacies are unsigned fractions on TRACE_W bits, where
// all ones stands for 1.0; a bitwise NOT therefore computes 1 - x.
package stdp_pkg;

  parameter int unsigned N_NEURONS  = 500;          // 20 boards x 25 neurons
  parameter int unsigned N_LOCAL    = 25;           // analog neurons per board
  parameter int unsigned ADDR_W     = $clog2(N_NEURONS);
  parameter int unsigned SLOT_W     = $clog2(N_LOCAL);
  parameter int unsigned W_W        = 20;           // internal weight width
  parameter int unsigned W_OUT_W    = 8;            // weight sent to a neuron
  parameter int unsigned TRACE_W    = 16;           // trace / efficacy fraction
  parameter int unsigned LIST_DEPTH = 32768;        // pre + post list entries
  parameter int unsigned LIST_AW    = $clog2(LIST_DEPTH);
  parameter int unsigned LEN_W      = ADDR_W + 1;   // list length 0..N_NEURONS

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [SLOT_W-1:0]  slot_t;
  typedef logic [TRACE_W-1:0] frac_t;
  typedef logic [W_W-1:0]     weight_t;
  typedef logic [LIST_AW-1:0] lptr_t;
  typedef logic [LEN_W-1:0]   llen_t;

  // One column of the look-up table (one neuron).
  typedef struct packed {
    logic  is_local;    // neuron attached to this board
    logic  excitatory;  // polarity of the neuron's outgoing synapses
    lptr_t post_base;   // first entry of its post-synaptic list
    llen_t post_len;    // number of post-synaptic neurons
    lptr_t pre_base;    // first entry of its pre-synaptic list
    llen_t pre_len;     // number of pre-synaptic neurons
  } lut_col_t;

  // Requests understood by a co-processor.
  typedef enum logic {
    CP_READ  = 1'b0,    // return the current value
    CP_SPIKE = 1'b1     // the neuron spiked: restart its trace
  } cp_op_e;

  // Requests understood by an exponential decay block.
  typedef enum logic {
    ED_READ = 1'b0,
    ED_LOAD = 1'b1
  } ed_op_e;

  // Co-processor numbering inside the scheduler.
  parameter int unsigned CP_P    = 0;  // P(t), tau_p, indexed by pre neuron
  parameter int unsigned CP_Q    = 1;  // Q(t), tau_q, indexed by post neuron
  parameter int unsigned CP_EPRE = 2;  // eps_j, tau_pre
  parameter int unsigned CP_EPST = 3;  // eps_i, tau_post
  parameter int unsigned N_CP    = 4;

  parameter frac_t FRAC_ONE = '1;

endpackage
