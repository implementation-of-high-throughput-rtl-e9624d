// viterbi_decoder: hard-decision Viterbi decoder with T-algorithm purging.
//
// Datapath, one received symbol per clock:
//   input register -> BMU (Hamming distances) -> PMU (ACS array + metric
//   registers) with the purge unit alongside -> SMU (register exchange).
// The BMU turns the received pair {Y1,Y0} into four branch metrics.  The PMU
// updates all path metrics and decision bits of one trellis step per clock.
// The purge unit precomputes the best path metric from the registered metrics
// in parallel with the ACS, and purges every state more than T above it; a
// purged state's metric register and survivor register are not written in
// that step.  The SMU outputs the oldest bit of the survivor of the best
// state.
//
// The block structure, the hard-decision metric, the modulo normalisation and
// the T-algorithm follow the design; the input register stage, the survivor
// depth and the threshold value are this design's own choices.
//
// Interface: in_valid/rx accept one symbol {Y1,Y0} per clock (gaps allowed).
// out_valid/out_bit deliver the decoded bits in order; the bit of symbol n
// appears two clocks after symbol n+DEPTH-1 was accepted.  state_live shows
// which states survived the last step and opt_pm the best path metric, for
// observation.  Synchronous active-low reset puts the decoder in state 00.
module viterbi_decoder
  import vd_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned G0    = G0_DEF,
  parameter int unsigned G1    = G1_DEF,
  parameter int unsigned PM_W  = PM_W_DEF,
  parameter int unsigned BM_W  = BM_W_DEF,
  parameter int unsigned DEPTH = DEPTH_DEF,
  parameter int unsigned T     = T_DEF,
  localparam int unsigned NS   = 1 << (K - 1),
  localparam int unsigned SW   = (K > 2) ? K - 1 : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [1:0]       rx,
  output logic             out_valid,
  output logic             out_bit,
  output logic [NS-1:0]    state_live,
  output logic [PM_W-1:0]  opt_pm
);

  logic                     sym_valid_q;
  logic [1:0]               sym_q;
  logic [3:0][BM_W-1:0]     bm;
  logic [NS-1:0][PM_W-1:0]  pm, new_pm;
  logic [NS-1:0]            pm_valid, new_valid, dec, keep;
  logic [SW-1:0]            opt_state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym_valid_q <= 1'b0;
      sym_q       <= 2'b00;
    end else begin
      sym_valid_q <= in_valid;
      if (in_valid) sym_q <= rx;
    end
  end

  bmu #(.BM_W(BM_W)) u_bmu (.rx(sym_q), .bm(bm));

  pmu #(.K(K), .G0(G0), .G1(G1), .PM_W(PM_W), .BM_W(BM_W)) u_pmu (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (sym_valid_q),
    .bm       (bm),
    .keep     (keep),
    .pm       (pm),
    .pm_valid (pm_valid),
    .new_pm   (new_pm),
    .new_valid(new_valid),
    .dec      (dec)
  );

  purge_unit #(.K(K), .G0(G0), .G1(G1), .PM_W(PM_W), .BM_W(BM_W), .T(T)) u_purge (
    .pm       (pm),
    .pm_valid (pm_valid),
    .bm       (bm),
    .new_pm   (new_pm),
    .new_valid(new_valid),
    .opt_pm   (opt_pm),
    .opt_state(opt_state),
    .keep     (keep)
  );

  smu #(.K(K), .DEPTH(DEPTH)) u_smu (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (sym_valid_q),
    .dec      (dec),
    .keep     (keep),
    .opt_state(opt_state),
    .out_valid(out_valid),
    .out_bit  (out_bit)
  );

  assign state_live = pm_valid;

endmodule
