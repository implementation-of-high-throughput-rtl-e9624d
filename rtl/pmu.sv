// pmu: path metric unit, the ACS array plus the path-metric memory.
//
// One acs_unit per trellis state (2^(K-1) = 4 for K = 3) computes all new
// path metrics of a trellis step in parallel, so the decoder accepts one
// received symbol per clock.  For state ns the two predecessors are
// {ns[K-3:0], b} for b = 0/1, and the branch metric of each is looked up by
// the codeword that branch carries.
//
// The path metrics and a live flag per state are kept in registers.  With the
// T-algorithm, the purge unit returns a keep mask for the new step: a state
// that is purged keeps its old register contents (not written, to save power)
// and is marked not live, so the ACS units ignore it in the next step.  After
// reset only state 00 is live with metric 0, matching the convention that the
// encoder starts in state 00.
//
// Interface: en advances one trellis step using bm (from the BMU) and keep
// (from the purge unit).  pm/pm_valid are the registered metrics; new_pm,
// new_valid and dec are the combinational results of the current step.
module pmu
  import vd_pkg::*;
#(
  parameter int unsigned K    = K_DEF,
  parameter int unsigned G0   = G0_DEF,
  parameter int unsigned G1   = G1_DEF,
  parameter int unsigned PM_W = PM_W_DEF,
  parameter int unsigned BM_W = BM_W_DEF,
  localparam int unsigned NS  = 1 << (K - 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [3:0][BM_W-1:0]     bm,
  input  logic [NS-1:0]            keep,
  output logic [NS-1:0][PM_W-1:0]  pm,
  output logic [NS-1:0]            pm_valid,
  output logic [NS-1:0][PM_W-1:0]  new_pm,
  output logic [NS-1:0]            new_valid,
  output logic [NS-1:0]            dec
);

  for (genvar ns = 0; ns < NS; ns++) begin : g_acs
    localparam int unsigned P0 = pred_state(K, ns, 1'b0);
    localparam int unsigned P1 = pred_state(K, ns, 1'b1);
    localparam logic        X  = in_bit_of(K, ns);
    localparam logic [1:0]  C0 = code_bits(K, G0, G1, P0, X);
    localparam logic [1:0]  C1 = code_bits(K, G0, G1, P1, X);

    acs_unit #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .pm0      (pm[P0]),
      .pm1      (pm[P1]),
      .v0       (pm_valid[P0]),
      .v1       (pm_valid[P1]),
      .bm0      (bm[C0]),
      .bm1      (bm[C1]),
      .new_pm   (new_pm[ns]),
      .dec      (dec[ns]),
      .new_valid(new_valid[ns])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        pm[ns]       <= '0;
        pm_valid[ns] <= (ns == 0);
      end else if (en) begin
        pm_valid[ns] <= new_valid[ns] & keep[ns];
        if (new_valid[ns] && keep[ns]) pm[ns] <= new_pm[ns];
      end
    end
  end

endmodule
