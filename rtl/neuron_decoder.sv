// neuron_decoder - delivers a weight event to one of the board's analog
// neurons.
//
// An event (in_valid) names a local neuron slot, the 8-bit synaptic weight
// and the synapse polarity (excitatory or inhibitory). One cycle later the
// decoder raises the strobe of that neuron alone, syn_strobe[in_slot], for
// one cycle, with the weight and polarity on the shared syn_weight/syn_exc
// lines (held until the next event). A slot outside 0..N_LOCAL-1 strobes
// nothing. The published design only names this decoder; the one-hot
// strobe with a shared weight bus is this design's choice of interface to
// the analog neurons.
module neuron_decoder
  import stdp_pkg::*;
#(
  parameter int unsigned NL = N_LOCAL
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  slot_t              in_slot,
  input  logic [W_OUT_W-1:0] in_weight,
  input  logic               in_exc,
  output logic [NL-1:0]      syn_strobe,
  output logic [W_OUT_W-1:0] syn_weight,
  output logic               syn_exc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_strobe <= '0;
      syn_weight <= '0;
      syn_exc    <= 1'b0;
    end else begin
      syn_strobe <= '0;
      if (in_valid) begin
        for (int k = 0; k < int'(NL); k++)
          syn_strobe[k] <= (int'(in_slot) == k);
        syn_weight <= in_weight;
        syn_exc    <= in_exc;
      end
    end
  end

endmodule
