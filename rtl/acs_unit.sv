// acs_unit: add-compare-select for one trellis state.
//
// Two branches enter every state.  The unit adds each branch metric to the
// path metric of that branch's predecessor (two carry look-ahead adders),
// compares the two candidates and keeps the smaller one as the state's new
// path metric; the decision bit says which branch survived.
//
// Path metrics use modulo normalisation: they are never rescaled and simply
// wrap around at 2^PM_W.  As long as the spread of live metrics stays below
// 2^(PM_W-1), the sign (MSB) of the wrapped difference cand1 - cand0 tells
// which candidate is smaller.  That subtraction is the comparator; it is a
// third look-ahead adder fed with ~cand0 and a carry-in of 1.
//
// T-algorithm support: a predecessor whose state was purged is flagged
// invalid and its candidate is ignored; if both are purged the state itself
// is not computed (new_valid = 0).
//
// Interface: pm0/pm1 and v0/v1 = metric and liveness of the predecessor on
// branch 0/1; bm0/bm1 = their branch metrics.  Outputs: new_pm, dec
// (1 = branch 1 survived), new_valid.  Ties keep branch 0.  Combinational;
// the path-metric registers live in the PMU.
module acs_unit
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = PM_W_DEF,
  parameter int unsigned BM_W = BM_W_DEF
) (
  input  logic [PM_W-1:0] pm0,
  input  logic [PM_W-1:0] pm1,
  input  logic            v0,
  input  logic            v1,
  input  logic [BM_W-1:0] bm0,
  input  logic [BM_W-1:0] bm1,
  output logic [PM_W-1:0] new_pm,
  output logic            dec,
  output logic            new_valid
);

  logic [PM_W-1:0] cand0, cand1, diff;
  logic            co0, co1, cod;

  // add
  cla_adder #(.W(PM_W)) u_add0 (.a(pm0), .b(PM_W'(bm0)), .cin(1'b0), .sum(cand0), .cout(co0));
  cla_adder #(.W(PM_W)) u_add1 (.a(pm1), .b(PM_W'(bm1)), .cin(1'b0), .sum(cand1), .cout(co1));
  // compare: diff = cand1 - cand0 (mod 2^PM_W); MSB set means cand1 < cand0
  cla_adder #(.W(PM_W)) u_cmp  (.a(cand1), .b(~cand0), .cin(1'b1), .sum(diff), .cout(cod));

  // select
  always_comb begin
    unique case ({v1, v0})
      2'b11:   dec = diff[PM_W-1];
      2'b10:   dec = 1'b1;
      default: dec = 1'b0;
    endcase
    new_pm    = dec ? cand1 : cand0;
    new_valid = v0 | v1;
  end

endmodule
