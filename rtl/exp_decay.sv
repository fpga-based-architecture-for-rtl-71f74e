// exp_decay - exponential decay block shared in time by all neurons.
//
// Every neuron owns one value in a RAM, kept with GUARD extra fraction bits
// below the W bits that are loaded and read, so that rounding in the decay
// steps stays far below the read resolution. Once every TICK_CYCLES
// clocks the block sweeps the RAM, one entry per clock, replacing each value
// x by x - ceil(x / 2^DECAY_SHIFT), i.e. multiplying it by (1 - 2^-DECAY_SHIFT)
// (rounding the step up lets every trace reach zero).
// A value loaded at time t0 therefore reads as roughly
// load * exp(-(t - t0) / tau) when TICK_CYCLES = tau * f_clk * -ln(1 - 2^-S).
// Between sweeps the block is idle and serves requests: READ returns the
// value of entry idx, LOAD returns the old value and writes load_val.
// Handshake: a request is taken in a cycle with req && ready; rvalid is high
// in the next cycle with rdata. ready is low during the clearing pass after
// reset (N cycles, every entry set to zero) and during a sweep (N cycles).
// The sweep must fit in a tick, N < TICK_CYCLES (checked at elaboration).
// Sharing one decay block among all neurons by using the idle cycles between
// two decay steps follows the published processor; the shift-subtract decay
// step and the tick period are this design's own.
module exp_decay
  import stdp_pkg::*;
#(
  parameter int unsigned N           = N_NEURONS,
  parameter int unsigned W           = TRACE_W,
  parameter int unsigned GUARD       = 8,
  parameter int unsigned DECAY_SHIFT = 8,
  parameter int unsigned TICK_CYCLES = 2896
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  ed_op_e           op,
  input  logic [$clog2(N)-1:0] idx,
  input  logic [W-1:0]     load_val,
  output logic             ready,
  output logic             rvalid,
  output logic [W-1:0]     rdata
);

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned TW = $clog2(TICK_CYCLES + 1);
  localparam int unsigned SW = W + GUARD;   // stored width

  if (TICK_CYCLES <= N) begin : g_bad_tick
    $error("exp_decay: a sweep of N entries must fit in TICK_CYCLES");
  end

  logic [SW-1:0] mem [N];
  logic [TW-1:0] tick_cnt;
  logic          clearing;
  logic          sweeping;   // a decay sweep is in progress
  logic [IW-1:0] sw_idx;
  logic          tick;
  logic [SW-1:0] cur;
  localparam logic [SW:0] DECAY_ONES = (SW+1)'((1 << DECAY_SHIFT) - 1);

  assign tick  = (tick_cnt == TW'(TICK_CYCLES - 1));
  assign ready = !clearing && !sweeping;
  assign cur   = mem[sw_idx];

  // Tick counter and sweep control.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_cnt <= '0;
      clearing <= 1'b1;
      sweeping <= 1'b0;
      sw_idx   <= '0;
      rvalid   <= 1'b0;
    end else begin
      rvalid   <= req && ready;
      tick_cnt <= tick ? '0 : tick_cnt + 1'b1;
      if (clearing || sweeping) begin
        if (sw_idx == IW'(N - 1)) begin
          sw_idx   <= '0;
          clearing <= 1'b0;
          sweeping <= 1'b0;
        end else begin
          sw_idx <= sw_idx + 1'b1;
        end
      end else if (tick) begin
        sweeping <= 1'b1;
      end
    end
  end

  // Value RAM: one port, shared in time between sweep and requests.
  always_ff @(posedge clk) begin
    if (clearing) begin
      mem[sw_idx] <= '0;
    end else if (sweeping) begin
      mem[sw_idx] <= cur - SW'(({1'b0, cur} + DECAY_ONES) >> DECAY_SHIFT);
    end else if (req) begin
      rdata <= mem[idx][SW-1 -: W];
      if (op == ED_LOAD) mem[idx] <= {load_val, GUARD'(0)};
    end
  end

endmodule
