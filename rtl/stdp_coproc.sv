// stdp_coproc - one of the four STDP co-processors: P(t), Q(t), eps_j or
// eps_i.
//
// Each one holds an exponential decay block (exp_decay) whose time constant
// is TAU_US, with one trace per neuron.
//   EFFICACY = 0 (P or Q): SPIKE(n) loads 1.0 into n's trace; READ(n)
//     returns the decayed trace scaled by the amplitude,
//     A * exp(-(t - t_n_last) / tau), truncated to TRACE_W bits. With the
//     default A = 1/16 the top 4 bits of rdata are therefore always 0.
//   EFFICACY = 1 (eps): SPIKE(n) loads 1.0 into n's trace and stores the
//     inverted old trace, 1 - exp(-(t_n_last - t_n_last-1) / tau), in an
//     efficacy RAM; READ(n) returns that stored efficacy. A neuron whose
//     first spike this is gets efficacy 1.0 (its trace was zero); before
//     its first spike its efficacy reads 0. Both RAMs are cleared in the
//     N cycles after reset, while ready is low.
// Handshake: a request is accepted in a cycle with req && ready; rvalid
// with rdata follows one cycle later (for SPIKE the efficacy just stored);
// requests may follow each other every cycle, a read of an efficacy being
// written in the same cycle is bypassed.
// The decay tick is TICK_CYCLES = round(TAU_US * CLK_KHZ / 1000 *
// -ln(1 - 2^-DECAY_SHIFT)) clock cycles.
// The four functions, the shared decay block with different time constants
// and the inverter after it for eps follow the published processor; the
// trace/efficacy RAM split and the number formats are this design's own.
module stdp_coproc
  import stdp_pkg::*;
#(
  parameter bit          EFFICACY    = 1'b0,
  parameter int unsigned N           = N_NEURONS,
  parameter int unsigned TAU_US      = 14800,
  parameter int unsigned CLK_KHZ     = 50000,
  parameter int unsigned DECAY_SHIFT = 8,
  parameter frac_t       AMPLITUDE   = frac_t'(4096),
  // Tick period; derived from the time constant unless overridden.
  parameter int unsigned TICK_CYCLES =
      $rtoi(real'(TAU_US) * real'(CLK_KHZ) / 1000.0
            * -$ln(1.0 - 1.0 / real'(64'd1 << DECAY_SHIFT)) + 0.5)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req,
  input  cp_op_e op,
  input  logic [$clog2(N)-1:0] idx,
  output logic   ready,
  output logic   rvalid,
  output frac_t  rdata
);

  localparam int unsigned IW = $clog2(N);

  logic   ed_rvalid;
  frac_t  ed_rdata;
  ed_op_e ed_op;
  frac_t  ed_load;

  assign ed_op   = (op == CP_SPIKE) ? ED_LOAD : ED_READ;
  assign ed_load = FRAC_ONE;

  exp_decay #(
    .N(N), .W(TRACE_W), .DECAY_SHIFT(DECAY_SHIFT), .TICK_CYCLES(TICK_CYCLES)
  ) u_exp (
    .clk, .rst_n, .req, .op(ed_op), .idx, .load_val(ed_load),
    .ready, .rvalid(ed_rvalid), .rdata(ed_rdata)
  );

  assign rvalid = ed_rvalid;

  if (EFFICACY) begin : g_eff
    frac_t         eff [N];
    frac_t         eff_q;
    logic          spike_q;
    logic [IW-1:0] idx_q;

    logic          clr;       // clearing pass after reset, N cycles
    logic [IW-1:0] clr_idx;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        spike_q <= 1'b0;
        idx_q   <= '0;
        clr     <= 1'b1;
        clr_idx <= '0;
      end else begin
        if (req && ready) begin
          spike_q <= (op == CP_SPIKE);
          idx_q   <= idx;
        end
        if (clr) begin
          clr_idx <= clr_idx + 1'b1;
          if (clr_idx == IW'(N - 1)) clr <= 1'b0;
        end
      end
    end

    // The inverter after the exponential block: eps = 1 - exp(..) = ~trace.
    always_ff @(posedge clk) begin
      // A read right behind a spike of the same neuron takes the efficacy
      // being written in this cycle (bypass).
      if (req && ready)
        eff_q <= (ed_rvalid && spike_q && idx_q == idx) ? ~ed_rdata : eff[idx];
      if (clr)                       eff[clr_idx] <= '0;
      else if (ed_rvalid && spike_q) eff[idx_q]   <= ~ed_rdata;
    end

    assign rdata = spike_q ? ~ed_rdata : eff_q;
  end else begin : g_trace
    logic [2*TRACE_W-1:0] scaled;
    assign scaled = ed_rdata * AMPLITUDE;
    assign rdata  = scaled[2*TRACE_W-1 -: TRACE_W];
  end

endmodule
