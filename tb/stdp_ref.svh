// stdp_ref.svh - real-valued reference of the STDP rule for the board
// testbenches. It applies, event by event, in the order the board does:
//   efficacies of the sender n from its last two spikes,
//   LTD  w(n,i) -= eps_pre(n) eps_post(i) A- exp(-(t - t_i)/tau_q) (w - W_LTD)
//        for every local post-synaptic neuron i of n,
//   LTP  w(j,n) += eps_pre(j) eps_post(n) A+ exp(-(t - t_j)/tau_p) (W_LTP - w)
//        for every pre-synaptic neuron j of a local n,
//   then t_n = t.
// Weights are kept on the 20-bit scale; `mag` sums the size of all changes
// of a weight, which the testbenches use to scale their tolerance.
class stdp_ref;
  int    nn;
  real   tau_p, tau_q, tau_pre, tau_post, a_plus, a_minus, w_hi;
  bit    conn   [][];
  bit    plas   [][];
  bit    loc    [];
  real   w      [][];
  real   mag    [][];
  bit    spiked [];
  real   tlast  [];
  real   e_pre  [];
  real   e_post [];
  int    n_ltp, n_ltd;

  function new(int n, real tp, real tq, real tpre, real tpost, real ap, real am);
    nn = n; tau_p = tp; tau_q = tq; tau_pre = tpre; tau_post = tpost;
    a_plus = ap; a_minus = am; w_hi = 255.0 * 4096.0;
    conn = new[n]; plas = new[n]; w = new[n]; mag = new[n];
    foreach (conn[j]) begin
      conn[j] = new[n]; plas[j] = new[n]; w[j] = new[n]; mag[j] = new[n];
    end
    loc = new[n]; spiked = new[n]; tlast = new[n]; e_pre = new[n]; e_post = new[n];
    n_ltp = 0; n_ltd = 0;
  endfunction

  function void spike(int n, real t);
    if (spiked[n]) begin
      e_pre[n]  = 1.0 - $exp(-(t - tlast[n]) / tau_pre);
      e_post[n] = 1.0 - $exp(-(t - tlast[n]) / tau_post);
    end else begin
      e_pre[n] = 1.0; e_post[n] = 1.0;
    end
    for (int i = 0; i < nn; i++)
      if (conn[n][i] && loc[i] && plas[n][i] && spiked[i]) begin
        real d = e_pre[n] * e_post[i] * a_minus * $exp(-(t - tlast[i]) / tau_q) * w[n][i];
        w[n][i] -= d; mag[n][i] += d; n_ltd++;
      end
    if (loc[n])
      for (int j = 0; j < nn; j++)
        if (conn[j][n] && plas[j][n] && spiked[j]) begin
          real d = e_pre[j] * e_post[n] * a_plus * $exp(-(t - tlast[j]) / tau_p)
                   * (w_hi - w[j][n]);
          w[j][n] += d; mag[j][n] += d; n_ltp++;
        end
    spiked[n] = 1; tlast[n] = t;
  endfunction
endclass
