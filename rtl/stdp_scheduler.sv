// stdp_scheduler - controller of the plasticity processor: it takes one
// spike event at a time from the spike FIFO and runs the STDP work it
// causes, in the order below.
//
//  1. Pop the sender address n and read n's look-up table column.
//  2. Efficacies: SPIKE(n) to the eps_j (pre) and eps_i (post)
//     co-processors, which fix n's efficacies from its last two spikes.
//  3. Post-synaptic list of n. For each target t:
//       t local  -> LTD on synapse n->t: read Q(t), eps_i(t), eps_j(n) and
//                   the weight together; if the synapse is plastic, run the
//                   weight update and write the weight back; then send the
//                   (new) weight with n's polarity to local neuron t.
//       t remote -> if n is local, forward (n, t) on the bus; a spike that
//                   came from the bus is not forwarded again.
//  4. Pre-synaptic list of n, only if n is local. For each source j:
//       LTP on synapse j->n: read P(j), eps_j(j), eps_i(n) and the weight;
//       if plastic, update and write back. Nothing is sent.
//  5. Traces: SPIKE(n) to the P and Q co-processors, which restart n's
//     P and Q traces at 1.0 (the co-processors scale them by A+ and A-).
// Co-processor requests of one step are issued together and each waits for
// its own ready; `stall` is high in a cycle where a request waits because a
// co-processor is sweeping. Reads of the look-up table and of the weight
// memory take one cycle. Without stalls a plastic LTD synapse (post list,
// local target) takes 10 cycles including the weight event, a non-plastic
// one 7, a plastic LTP synapse (pre list) 8 and a non-plastic one 5; a
// forward takes 4 cycles if the bus takes it at once, and each event adds
// 9 cycles for the FIFO, the look-up and the co-processor spikes. The
// write-back data is the weight-update result itself (wm_wr_w = wu_w_out),
// written in the cycle wu_done is high, so that port is a straight wire.
// The event-triggered scrolling of both lists, the local/remote split and
// the simultaneous use of the four co-processors follow the published
// processor, where a PicoBlaze soft core runs this schedule; here it is a
// finite-state machine. The order of the five steps and the local slot
// numbering (address - board_base) are this design's own.
module stdp_scheduler
  import stdp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  addr_t       board_base,
  // spike FIFO
  input  logic        fifo_empty,
  input  addr_t       fifo_dout,
  output logic        fifo_pop,
  // look-up table
  output addr_t       col_raddr,
  input  lut_col_t    col_rdata,
  output lptr_t       list_raddr,
  input  addr_t       list_rdata,
  // co-processors, numbered CP_P, CP_Q, CP_EPRE, CP_EPST
  output logic        cp_req    [N_CP],
  output cp_op_e      cp_op     [N_CP],
  output addr_t       cp_idx    [N_CP],
  input  logic        cp_ready  [N_CP],
  input  logic        cp_rvalid [N_CP],
  input  frac_t       cp_rdata  [N_CP],
  // weight memory
  output logic        wm_rd_en,
  output addr_t       wm_pre,
  output slot_t       wm_slot,
  input  weight_t     wm_rdata,
  input  logic        wm_rplastic,
  output logic        wm_wr_en,
  output weight_t     wm_wr_w,
  // weight update
  output logic        wu_start,
  output logic        wu_ltp,
  output weight_t     wu_w,
  output frac_t       wu_eps_i,
  output frac_t       wu_eps_j,
  output frac_t       wu_f,
  input  logic        wu_done,
  input  weight_t     wu_w_out,
  // weight event to a local neuron
  output logic        syn_valid,
  output slot_t       syn_slot,
  output logic [W_OUT_W-1:0] syn_weight,
  output logic        syn_exc,
  // forward to another board
  output logic        bus_tx_valid,
  output addr_t       bus_tx_src,
  output addr_t       bus_tx_dst,
  input  logic        bus_tx_ready,
  // status
  output logic        busy,
  output logic        stall
);

  typedef enum logic [3:0] {
    S_IDLE, S_SCOL, S_CP, S_PLIST, S_PTGT, S_PTCOL, S_FWD,
    S_RLIST, S_RSRC, S_GATHER, S_WU, S_SEND
  } state_e;

  state_e   st, ret;
  addr_t    sender, peer;
  lut_col_t scol;
  llen_t    k;
  logic     ltp_q;
  slot_t    slot_q;
  weight_t  w_q;
  logic     plastic_q;
  logic [1:0] wm_phase;      // 0 issue, 1 wait, 2 data captured
  logic [N_CP-1:0] need, issued, got;
  cp_op_e   op_q  [N_CP];
  addr_t    idx_q [N_CP];
  frac_t    data_q[N_CP];

  logic cp_phase;
  assign cp_phase = (st == S_CP) || (st == S_GATHER);

  always_comb begin
    for (int c = 0; c < int'(N_CP); c++) begin
      cp_req[c] = cp_phase && need[c] && !issued[c];
      cp_op[c]  = op_q[c];
      cp_idx[c] = idx_q[c];
    end
  end

  always_comb begin
    stall = 1'b0;
    for (int c = 0; c < int'(N_CP); c++)
      if (cp_req[c] && !cp_ready[c]) stall = 1'b1;
  end

  assign busy       = (st != S_IDLE);
  assign fifo_pop   = (st == S_IDLE) && !fifo_empty;
  assign col_raddr  = (st == S_IDLE) ? fifo_dout : list_rdata;
  assign list_raddr = (st == S_PLIST) ? scol.post_base + lptr_t'(k)
                                      : scol.pre_base + lptr_t'(k);

  assign wm_rd_en = (st == S_GATHER) && (wm_phase == 2'd0);
  assign wm_pre   = ltp_q ? peer : sender;
  assign wm_slot  = slot_q;
  assign wm_wr_en = (st == S_WU) && wu_done;
  assign wm_wr_w  = wu_w_out;

  assign wu_start = (st == S_GATHER) && (got == need) && (wm_phase == 2'd2)
                    && plastic_q;
  assign wu_ltp   = ltp_q;
  assign wu_w     = w_q;
  assign wu_eps_i = data_q[CP_EPST];
  assign wu_eps_j = data_q[CP_EPRE];
  assign wu_f     = ltp_q ? data_q[CP_P] : data_q[CP_Q];

  assign syn_valid  = (st == S_SEND);
  assign syn_slot   = slot_q;
  assign syn_weight = w_q[W_W-1 -: W_OUT_W];
  assign syn_exc    = scol.excitatory;

  assign bus_tx_valid = (st == S_FWD);
  assign bus_tx_src   = sender;
  assign bus_tx_dst   = peer;

  function automatic slot_t local_slot(input addr_t a, input addr_t base);
    return slot_t'(a - base);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      ret       <= S_IDLE;
      sender    <= '0;
      peer      <= '0;
      scol      <= '0;
      k         <= '0;
      ltp_q     <= 1'b0;
      slot_q    <= '0;
      w_q       <= '0;
      plastic_q <= 1'b0;
      wm_phase  <= '0;
      need      <= '0;
      issued    <= '0;
      got       <= '0;
      for (int c = 0; c < int'(N_CP); c++) begin
        op_q[c]   <= CP_READ;
        idx_q[c]  <= '0;
        data_q[c] <= '0;
      end
    end else begin
      // Co-processor handshakes, in S_CP and S_GATHER.
      for (int c = 0; c < int'(N_CP); c++) begin
        if (cp_req[c] && cp_ready[c]) issued[c] <= 1'b1;
        if (cp_phase && issued[c] && !got[c] && cp_rvalid[c]) begin
          got[c]    <= 1'b1;
          data_q[c] <= cp_rdata[c];
        end
      end

      unique case (st)
        S_IDLE: if (!fifo_empty) begin
          sender <= fifo_dout;
          st     <= S_SCOL;
        end

        S_SCOL: begin
          scol <= col_rdata;
          // step 2: efficacies of the sender
          need   <= (N_CP)'((1 << CP_EPRE) | (1 << CP_EPST));
          issued <= '0;
          got    <= '0;
          op_q[CP_EPRE]  <= CP_SPIKE;  idx_q[CP_EPRE] <= sender;
          op_q[CP_EPST]  <= CP_SPIKE;  idx_q[CP_EPST] <= sender;
          k   <= '0;
          ret <= S_PLIST;
          st  <= S_CP;
        end

        S_CP: if (got == need) st <= ret;

        // step 3: post-synaptic list
        S_PLIST: begin
          if (k == scol.post_len) begin
            k  <= '0;
            st <= S_RLIST;
          end else begin
            st <= S_PTGT;
          end
        end

        S_PTGT: begin
          peer <= list_rdata;       // column read of the target starts now
          st   <= S_PTCOL;
        end

        S_PTCOL: begin
          if (col_rdata.is_local) begin
            slot_q   <= local_slot(peer, board_base);
            ltp_q    <= 1'b0;
            need     <= '1;
            need[CP_P] <= 1'b0;
            issued   <= '0;
            got      <= '0;
            wm_phase <= 2'd0;
            op_q[CP_Q]    <= CP_READ;  idx_q[CP_Q]    <= peer;
            op_q[CP_EPST] <= CP_READ;  idx_q[CP_EPST] <= peer;
            op_q[CP_EPRE] <= CP_READ;  idx_q[CP_EPRE] <= sender;
            st <= S_GATHER;
          end else if (scol.is_local) begin
            st <= S_FWD;
          end else begin
            k  <= k + 1'b1;
            st <= S_PLIST;
          end
        end

        S_FWD: if (bus_tx_ready) begin
          k  <= k + 1'b1;
          st <= S_PLIST;
        end

        // step 4: pre-synaptic list
        S_RLIST: begin
          if (!scol.is_local || k == scol.pre_len) begin
            // step 5: restart the sender's P and Q traces
            need   <= (N_CP)'((1 << CP_P) | (1 << CP_Q));
            issued <= '0;
            got    <= '0;
            op_q[CP_P] <= CP_SPIKE;  idx_q[CP_P] <= sender;
            op_q[CP_Q] <= CP_SPIKE;  idx_q[CP_Q] <= sender;
            ret <= S_IDLE;
            st  <= S_CP;
          end else begin
            st <= S_RSRC;
          end
        end

        S_RSRC: begin
          peer     <= list_rdata;
          slot_q   <= local_slot(sender, board_base);
          ltp_q    <= 1'b1;
          need     <= '1;
          need[CP_Q] <= 1'b0;
          issued   <= '0;
          got      <= '0;
          wm_phase <= 2'd0;
          op_q[CP_P]    <= CP_READ;  idx_q[CP_P]    <= list_rdata;
          op_q[CP_EPRE] <= CP_READ;  idx_q[CP_EPRE] <= list_rdata;
          op_q[CP_EPST] <= CP_READ;  idx_q[CP_EPST] <= sender;
          st <= S_GATHER;
        end

        // operands of one connection
        S_GATHER: begin
          if (wm_phase == 2'd0) wm_phase <= 2'd1;
          if (wm_phase == 2'd1) begin
            w_q       <= wm_rdata;
            plastic_q <= wm_rplastic;
            wm_phase  <= 2'd2;
          end
          if (wm_phase == 2'd2 && got == need) begin
            if (plastic_q)  st <= S_WU;
            else if (ltp_q) begin
              k  <= k + 1'b1;
              st <= S_RLIST;
            end else        st <= S_SEND;
          end
        end

        S_WU: if (wu_done) begin
          w_q <= wu_w_out;
          if (ltp_q) begin
            k  <= k + 1'b1;
            st <= S_RLIST;
          end else begin
            st <= S_SEND;
          end
        end

        S_SEND: begin
          k  <= k + 1'b1;
          st <= S_PLIST;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

  // Every weight event names a neuron of this board.
  always_ff @(posedge clk) begin
    if (rst_n && syn_valid)
      assert (int'(syn_slot) < int'(N_LOCAL))
        else $error("stdp_scheduler: weight event for a slot outside the board");
  end

endmodule
