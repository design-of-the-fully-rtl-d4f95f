// trellis_codec: the complete trellis encoder-decoder, an RSC encoder (K = 3, r = 1/2) whose
// serial output is carried over a channel to the matching trellis decoder.
//
// Message bits enter on a valid/ready handshake and are encoded by rsc_encoder; output_mux
// sends each coded pair as two channel bits, systematic first. The channel is modelled by the
// chan_flip input, which inverts the channel bit of the cycle it is high in, so the effect of
// channel errors can be studied. trellis_decoder re-pairs the bits, runs the trellis search
// and returns the message bits. The encoder and decoder and their connection follow the design
// description; the channel-error input and the observation ports are this design's choice.
//
// Timing: one message bit per two clock cycles (the serial channel carries two bits per
// message bit). A message bit accepted in cycle t is sent on the channel in cycles t+2 and t+3
// and, once DEPTH-1 further message bits have followed it, leaves the decoder one cycle after
// the parity bit of the symbol that completes the window. rst_n is active low and synchronous.
module trellis_codec
  import trellis_pkg::*;
#(
  parameter logic [K-1:0] G1_FF   = G1_FF_DEFAULT,
  parameter logic [K-1:0] G2_FB   = G2_FB_DEFAULT,
  parameter int unsigned  DEPTH   = 15,
  parameter int unsigned  PM_W    = 6,
  parameter int unsigned  PM_INIT = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // message in
  input  logic            msg_valid,
  output logic            msg_ready,
  input  logic            msg_bit,
  // channel
  input  logic            chan_flip,   // invert the channel bit of this cycle
  output logic            chan_valid,
  output logic            chan_first,  // systematic bit of a pair
  output logic            chan_bit,    // bit as received by the decoder
  output state_t          enc_state,
  // decoded message out
  output logic            dec_valid,
  output logic            dec_bit,
  output state_t          dec_state,
  output logic [PM_W-1:0] dec_growth
);

  logic pair_valid, pair_ready, pair_sys, pair_par;
  logic tx_valid, tx_first, tx_bit;

  rsc_encoder #(.G1_FF(G1_FF), .G2_FB(G2_FB)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (msg_valid),
    .in_ready  (msg_ready),
    .in_bit    (msg_bit),
    .out_valid (pair_valid),
    .out_ready (pair_ready),
    .out_sys   (pair_sys),
    .out_par   (pair_par),
    .state     (enc_state)
  );

  output_mux u_mux (
    .clk        (clk),
    .rst_n      (rst_n),
    .pair_valid (pair_valid),
    .pair_ready (pair_ready),
    .pair_sys   (pair_sys),
    .pair_par   (pair_par),
    .ser_valid  (tx_valid),
    .ser_first  (tx_first),
    .ser_bit    (tx_bit)
  );

  assign chan_valid = tx_valid;
  assign chan_first = tx_first;
  assign chan_bit   = tx_bit ^ (chan_flip & tx_valid);

  trellis_decoder #(
    .G1_FF(G1_FF), .G2_FB(G2_FB), .DEPTH(DEPTH), .PM_W(PM_W), .PM_INIT(PM_INIT)
  ) u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .ser_valid   (chan_valid),
    .ser_first   (chan_first),
    .ser_bit     (chan_bit),
    .out_valid   (dec_valid),
    .out_bit     (dec_bit),
    .best_state  (dec_state),
    .best_growth (dec_growth)
  );

endmodule
