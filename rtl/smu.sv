// smu: survivor memory unit, register-exchange organisation.
//
// Each trellis state owns a DEPTH-bit register holding the decoded input bits
// of its survivor path, newest bit in bit 0.  In every trellis step the
// register of state ns is loaded with the register of the predecessor chosen
// by the ACS decision, shifted left by one, with the input bit of the branch
// entering ns (the state's MSB) appended.  The oldest bit of the register of
// the state that holds the best path metric is the decoded output, DEPTH
// steps late.
//
// With the T-algorithm a state that is purged in the ACS does not have its
// register written in that step; it is not live, so no live state reads it.
// Because a state chosen in advance may be purged, the output is taken from
// the best state reported by the purge unit instead of a fixed state.  The
// survivor depth (5*K) and the reset value are this design's choices.
//
// Interface: en advances one step with dec/keep/opt_state of that step.  One
// cycle later out_valid pulses with out_bit, once the registers hold DEPTH
// decoded bits.  Throughput is one bit per enabled clock.
module smu
  import vd_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned DEPTH = DEPTH_DEF,
  localparam int unsigned NS   = 1 << (K - 1),
  localparam int unsigned SW   = (K > 2) ? K - 1 : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [NS-1:0]  dec,
  input  logic [NS-1:0]  keep,
  input  logic [SW-1:0]  opt_state,
  output logic           out_valid,
  output logic           out_bit
);

  logic [NS-1:0][DEPTH-1:0]   surv_q;
  logic [SW-1:0]              opt_q;
  logic [$clog2(DEPTH+1)-1:0] fill_q;

  for (genvar ns = 0; ns < NS; ns++) begin : g_reg
    localparam int unsigned P0 = pred_state(K, ns, 1'b0);
    localparam int unsigned P1 = pred_state(K, ns, 1'b1);
    localparam logic        X  = in_bit_of(K, ns);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        surv_q[ns] <= '0;
      end else if (en && keep[ns]) begin
        surv_q[ns] <= {(dec[ns] ? surv_q[P1][DEPTH-2:0] : surv_q[P0][DEPTH-2:0]), X};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      opt_q     <= '0;
      fill_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en && (fill_q >= $bits(fill_q)'(DEPTH - 1));
      if (en) begin
        opt_q <= opt_state;
        if (fill_q != $bits(fill_q)'(DEPTH)) fill_q <= fill_q + 1'b1;
      end
    end
  end

  assign out_bit = surv_q[opt_q][DEPTH-1];

endmodule
