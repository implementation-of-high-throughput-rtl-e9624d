// vd_ref_pkg: behavioural reference models used by the testbenches.
//
// ref_encode() is the rate-1/2 K=3 (101, 111) encoder written out bit by bit.
// vd_ref is a T-algorithm Viterbi decoder on unbounded integer metrics (no
// modulo arithmetic, no hardware structure) for any constraint length k and
// generators g0 (Y0) and g1 (Y1), state = last k-1 inputs, newest in the
// MSB (K = 3, 101/111 by default).  Per step it computes every
// state's survivor (ties keep the branch whose dropped bit is 0), the best
// metric, purges states more than T above it, and emits the oldest bit of the
// best (lowest-numbered on ties) state's DEPTH-bit survivor.
package vd_ref_pkg;

  // {Y1, Y0} for input x with previous bits x1 = X(n-1), x2 = X(n-2)
  function automatic logic [1:0] ref_encode(input logic x, input logic x1, input logic x2);
    return {x ^ x1 ^ x2, x ^ x2};
  endfunction

  function automatic int hamming2(input logic [1:0] a, input logic [1:0] b);
    logic [1:0] d;
    d = a ^ b;
    return int'(d[0]) + int'(d[1]);
  endfunction

  // {Y1, Y0} for input x entering a coder of constraint length k in state s
  function automatic logic [1:0] ref_code(input int k, input int g0, input int g1,
                                          input int s, input logic x);
    int w;
    w = (int'(x) << (k - 1)) | s;
    return {^(w & g1), ^(w & g0)};
  endfunction

  class vd_ref;
    int          depth;
    int          thr;
    int          k, g0, g1, ns_n;
    int          pm[];
    bit          live[];
    longint      surv[];
    int          steps;
    int          purges;     // states purged in total
    int          last_opt_state;

    function new(int depth_i, int thr_i, int k_i = 3, int g0_i = 'b101, int g1_i = 'b111);
      depth = depth_i;
      thr   = thr_i;
      k     = k_i;
      g0    = g0_i;
      g1    = g1_i;
      ns_n  = 1 << (k - 1);
      pm    = new[ns_n];
      live  = new[ns_n];
      surv  = new[ns_n];
      reset();
    endfunction

    function void reset();
      foreach (pm[i]) begin pm[i] = 0; live[i] = (i == 0); surv[i] = 0; end
      steps  = 0;
      purges = 0;
    endfunction

    // one trellis step; returns 1 and the decoded bit once DEPTH steps are in
    function bit step(input logic [1:0] rx, output bit out);
      int     npm[];
      bit     nlive[];
      longint nsurv[];
      int     opt;
      int     opt_s;
      bit     have;
      npm   = new[ns_n];
      nlive = new[ns_n];
      nsurv = new[ns_n];
      // new state ns = {x, s[k-2:1]}; its predecessors are {ns[k-3:0], b}
      for (int ns = 0; ns < ns_n; ns++) begin
        logic x;
        int   best;
        bit   got;
        x = 1'((ns >> (k - 2)) & 1);
        got = 0;
        best = 0;
        nsurv[ns] = 0;
        for (int b = 0; b < 2; b++) begin
          int p;
          int c;
          p = ((ns << 1) & (ns_n - 1)) | b;
          if (live[p]) begin
            c = pm[p] + hamming2(rx, ref_code(k, g0, g1, p, x));
            if (!got || c < best) begin
              best = c;
              got = 1;
              nsurv[ns] = ((surv[p] << 1) | longint'(x)) & ((64'd1 << depth) - 1);
            end
          end
        end
        npm[ns] = best;
        nlive[ns] = got;
      end
      have = 0;
      opt = 0;
      opt_s = 0;
      for (int s = 0; s < ns_n; s++)
        if (nlive[s] && (!have || npm[s] < opt)) begin opt = npm[s]; opt_s = s; have = 1; end
      for (int s = 0; s < ns_n; s++) begin
        bit kp;
        kp = nlive[s] && (npm[s] - opt <= thr);
        if (nlive[s] && !kp) purges++;
        if (kp) begin pm[s] = npm[s]; surv[s] = nsurv[s]; end
        live[s] = kp;
      end
      last_opt_state = opt_s;
      steps++;
      out = bit'((surv[opt_s] >> (depth - 1)) & 1);
      return steps >= depth;
    endfunction
  endclass

endpackage
