// conv_encoder: rate-1/2 feed-forward convolutional encoder.
//
// A (K-1)-bit shift register holds the previous input bits X(n-1) .. X(n-K+1).
// For each accepted input bit X(n) the encoder emits the two parity bits
//   Y0 = parity({X(n), state} & G0),  Y1 = parity({X(n), state} & G1)
// which for the default code (K = 3, G0 = 101, G1 = 111) are
//   Y0 = X(n) ^ X(n-2),  Y1 = X(n) ^ X(n-1) ^ X(n-2).
// The code, the register and the state convention (starting in state 00)
// follow the design; which output is called Y0 and which Y1 is this design's
// choice.
//
// Interface: in_valid/in_bit accept one bit per clock; out_valid/out_code
// ({Y1,Y0}) are registered, one cycle after the input.  Synchronous,
// active-low reset clears the state to 00.
module conv_encoder
  import vd_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned G0 = G0_DEF,
  parameter int unsigned G1 = G1_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic [1:0] out_code
);

  logic [K-2:0] state_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= '0;
      out_valid <= 1'b0;
      out_code  <= 2'b00;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_code <= code_bits(K, G0, G1, int'(state_q), in_bit);
        state_q  <= {in_bit, state_q[K-2:1]};
      end
    end
  end

endmodule
