// purge_unit: T-algorithm with one-step precomputation of the optimal metric.
//
// The T-algorithm keeps only the trellis states whose new path metric lies
// within a threshold T of the best (smallest) new metric; every other state is
// purged for the next step, so its ACS result and its survivor register are
// not written.  Finding the best metric after the ACS would put a second
// comparison tree in series with the ACS loop.  Instead the unit precomputes
// it from the registered metrics and the branch metrics, in parallel with the
// ACS: the best new metric equals the minimum, over every live state s and
// input bit x, of pm[s] + bm[code(s, x)].  Only the final threshold test uses
// the ACS outputs.
//
// All comparisons are modulo-2^PM_W (sign of the wrapped difference), as in
// the ACS units.  The threshold T and the single precomputation step are this
// design's choices; the design gives the scheme, not these values.
//
// Interface (combinational): pm/pm_valid = registered metrics, bm = branch
// metrics of the current symbol, new_pm/new_valid = ACS outputs.  Outputs:
// opt_pm = best new metric, opt_state = lowest-numbered state that has it,
// keep = states that survive the step.
module purge_unit
  import vd_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned G0     = G0_DEF,
  parameter int unsigned G1     = G1_DEF,
  parameter int unsigned PM_W   = PM_W_DEF,
  parameter int unsigned BM_W   = BM_W_DEF,
  parameter int unsigned T      = T_DEF,
  localparam int unsigned NS    = 1 << (K - 1),
  localparam int unsigned SW    = (K > 2) ? K - 1 : 1
) (
  input  logic [NS-1:0][PM_W-1:0]  pm,
  input  logic [NS-1:0]            pm_valid,
  input  logic [3:0][BM_W-1:0]     bm,
  input  logic [NS-1:0][PM_W-1:0]  new_pm,
  input  logic [NS-1:0]            new_valid,
  output logic [PM_W-1:0]          opt_pm,
  output logic [SW-1:0]            opt_state,
  output logic [NS-1:0]            keep
);

  // a < b in modulo arithmetic
  function automatic logic mod_lt(input logic [PM_W-1:0] a, input logic [PM_W-1:0] b);
    logic [PM_W-1:0] d;
    d = a - b;
    return d[PM_W-1];
  endfunction

  // precomputation of the optimal path metric
  always_comb begin
    logic            have;
    logic [PM_W-1:0] cand;
    have   = 1'b0;
    opt_pm = '0;
    for (int unsigned s = 0; s < NS; s++) begin
      for (int x = 0; x < 2; x++) begin
        cand = pm[s] + PM_W'(bm[code_bits(K, G0, G1, s, x[0])]);
        if (pm_valid[s] && (!have || mod_lt(cand, opt_pm))) begin
          opt_pm = cand;
          have   = 1'b1;
        end
      end
    end
  end

  // threshold test and best-state pointer
  always_comb begin
    logic            found;
    logic [PM_W-1:0] gap;
    found     = 1'b0;
    opt_state = '0;
    for (int unsigned s = 0; s < NS; s++) begin
      gap    = new_pm[s] - opt_pm;
      keep[s] = new_valid[s] && (gap <= PM_W'(T));
      if (!found && new_valid[s] && gap == '0) begin
        opt_state = SW'(s);
        found     = 1'b1;
      end
    end
  end

endmodule
