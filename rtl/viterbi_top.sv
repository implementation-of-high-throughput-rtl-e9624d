// viterbi_top: the convolutional encoder and the hard-decision Viterbi
// decoder of the rate-1/2, K = 3 (generators 101, 111) code, side by side.
//
// The encoder (transmit side) and the decoder (receive side) share only the
// clock and reset; each has its own ports, so the channel between them is
// whatever the user connects.  See conv_encoder and viterbi_decoder for the
// function and timing of each half.
module viterbi_top
  import vd_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned G0    = G0_DEF,
  parameter int unsigned G1    = G1_DEF,
  parameter int unsigned PM_W  = PM_W_DEF,
  parameter int unsigned BM_W  = BM_W_DEF,
  parameter int unsigned DEPTH = DEPTH_DEF,
  parameter int unsigned T     = T_DEF,
  localparam int unsigned NS   = 1 << (K - 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // encoder
  input  logic             enc_in_valid,
  input  logic             enc_in_bit,
  output logic             enc_out_valid,
  output logic [1:0]       enc_out_code,
  // decoder
  input  logic             dec_in_valid,
  input  logic [1:0]       dec_rx,
  output logic             dec_out_valid,
  output logic             dec_out_bit,
  output logic [NS-1:0]    dec_state_live,
  output logic [PM_W-1:0]  dec_opt_pm
);

  conv_encoder #(.K(K), .G0(G0), .G1(G1)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (enc_in_valid),
    .in_bit   (enc_in_bit),
    .out_valid(enc_out_valid),
    .out_code (enc_out_code)
  );

  viterbi_decoder #(.K(K), .G0(G0), .G1(G1), .PM_W(PM_W), .BM_W(BM_W),
                    .DEPTH(DEPTH), .T(T)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dec_in_valid),
    .rx        (dec_rx),
    .out_valid (dec_out_valid),
    .out_bit   (dec_out_bit),
    .state_live(dec_state_live),
    .opt_pm    (dec_opt_pm)
  );

endmodule
