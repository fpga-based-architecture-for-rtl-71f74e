// spike_encoder - merges the spikes of the board's analog neurons and the
// spikes arriving from the backplane bus into one stream of sender
// addresses for the spike FIFO.
//
// Each local spike pulse on spike_in[k] sets a pending bit; a spike on a
// neuron that is still pending merges with it. Every cycle in which the FIFO
// is not full one address is written: a bus spike (bus_rx_valid, taken with
// bus_rx_ready in the same cycle) first, else the lowest pending slot k as
// address board_base + k, whose pending bit is then cleared. A pulse that
// arrives in the same cycle as its slot is served is kept pending.
// The published design only names this encoder (local neurons and bus into
// the FIFO); the priority order and the address mapping are this design's.
module spike_encoder #(
  parameter int unsigned N_LOCAL = 25,
  parameter int unsigned ADDR_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_LOCAL-1:0] spike_in,
  input  logic [ADDR_W-1:0] board_base,
  input  logic              bus_rx_valid,
  input  logic [ADDR_W-1:0] bus_rx_addr,
  output logic              bus_rx_ready,
  output logic              fifo_push,
  output logic [ADDR_W-1:0] fifo_din,
  input  logic              fifo_full
);

  localparam int unsigned SW = (N_LOCAL > 1) ? $clog2(N_LOCAL) : 1;

  logic [N_LOCAL-1:0] pending;
  logic [N_LOCAL-1:0] grant;
  logic [SW-1:0]      grant_slot;
  logic               any_pending;

  // Lowest pending slot.
  always_comb begin
    grant       = '0;
    grant_slot  = '0;
    any_pending = 1'b0;
    for (int k = N_LOCAL - 1; k >= 0; k--) begin
      if (pending[k]) begin
        grant_slot  = SW'(k);
        any_pending = 1'b1;
      end
    end
    if (any_pending && !fifo_full && !bus_rx_valid) grant[grant_slot] = 1'b1;
  end

  assign bus_rx_ready = !fifo_full;
  assign fifo_push    = !fifo_full && (bus_rx_valid || any_pending);
  assign fifo_din     = bus_rx_valid ? bus_rx_addr
                                     : board_base + ADDR_W'(grant_slot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= (pending & ~grant) | spike_in;
  end

endmodule
