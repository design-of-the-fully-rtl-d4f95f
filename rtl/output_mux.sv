// output_mux: multiplexes the encoder's two outputs, the systematic bit and the parity bit,
// bit by bit into one serial channel stream.
//
// A coded pair is taken on a valid/ready handshake (pair_valid, pair_ready, pair_sys,
// pair_par) and sent over the next two cycles: the systematic bit first, then the parity bit.
// ser_valid marks a channel bit and ser_first marks the systematic bit of each pair, so the
// receiver can re-pair the stream. The serial channel has no backpressure. A new pair is
// accepted in the cycle the parity bit of the previous one is sent, so a steady stream of
// pairs leaves as an unbroken stream of bits, one pair per two cycles; a pair accepted in
// cycle t appears on the channel in cycles t+1 and t+2.
// Bit-by-bit multiplexing of the two outputs follows the design description; the order
// (systematic first), the framing flag and the handshake are this design's choice.
module output_mux (
  input  logic clk,
  input  logic rst_n,
  input  logic pair_valid,
  output logic pair_ready,
  input  logic pair_sys,
  input  logic pair_par,
  output logic ser_valid,
  output logic ser_first,
  output logic ser_bit
);

  logic held_par;     // parity bit waiting for its slot
  logic par_pending;  // the next slot carries held_par

  // Free when nothing is pending: either idle or the systematic bit has just been sent
  // and the parity bit is going out now.
  assign pair_ready = !par_pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_par    <= 1'b0;
      par_pending <= 1'b0;
      ser_valid   <= 1'b0;
      ser_first   <= 1'b0;
      ser_bit     <= 1'b0;
    end else if (par_pending) begin
      ser_valid   <= 1'b1;
      ser_first   <= 1'b0;
      ser_bit     <= held_par;
      par_pending <= 1'b0;
    end else if (pair_valid) begin
      ser_valid   <= 1'b1;
      ser_first   <= 1'b1;
      ser_bit     <= pair_sys;
      held_par    <= pair_par;
      par_pending <= 1'b1;
    end else begin
      ser_valid   <= 1'b0;
      ser_first   <= 1'b0;
    end
  end

endmodule
