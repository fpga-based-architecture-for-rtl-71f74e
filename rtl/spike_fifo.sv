// spike_fifo - queue of sender addresses of spikes waiting for the
// plasticity processor.
//
// A circular buffer of DEPTH words with first-word-fall-through output:
// while `empty` is low, `dout` already shows the oldest event and `pop`
// removes it at the next clock edge. `push` writes `din` at the clock edge
// unless the queue is full; a push while full is dropped and sets the sticky
// `overflow` flag (cleared by reset only). Push and pop in the same cycle are
// both performed. Count, full and empty are registered-state derived, so a
// pushed word can be popped from the next cycle on.
// The queue in front of the processor is part of the published design; the
// depth, the fall-through read and the overflow flag are this design's own.
module spike_fifo #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             overflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      count;

  logic do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == (PW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && !full;
  assign dout    = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
      if (push && full) overflow <= 1'b1;
    end
  end

  // A pop is only meaningful when something is queued.
  always_ff @(posedge clk) begin
    if (rst_n && pop) assert (!empty) else $error("spike_fifo: pop while empty");
  end

endmodule
