// rsc_encoder: the trellis encoder, a recursive systematic convolutional encoder with
// constraint length K = 3 and rate 1/2.
//
// A conventional feed-forward convolutional encoder is made recursive by feeding a modulo-2
// sum of the register contents back into the register input, so the register holds
// a(k) = u(k) + g2[1] a(k-1) + g2[2] a(k-2). Each message bit u(k) yields two coded bits: the
// systematic bit u(k) and the parity bit p(k) = g1[0] a(k) + g1[1] a(k-1) + g1[2] a(k-2).
// The recursive structure, K, r and the systematic/feed-forward pair of outputs follow the
// design description; the polynomials (g1 = 5, g2 = 7 octal) and the handshake are this
// design's choice (see trellis_pkg).
//
// Interface: message bits arrive on a valid/ready handshake (in_valid, in_ready, in_bit).
// The coded pair leaves on a second valid/ready handshake (out_valid, out_ready, out_sys,
// out_par). The output is registered: a bit accepted in cycle t gives its pair in cycle t+1.
// One bit per cycle is accepted while the output side is ready. rst_n is an active-low
// synchronous reset that clears the register to the all-zero state. state is the encoder
// state {a(k-1), a(k-2)} after the last accepted bit.
module rsc_encoder
  import trellis_pkg::*;
#(
  parameter logic [K-1:0] G1_FF = G1_FF_DEFAULT,   // feed-forward polynomial g1
  parameter logic [K-1:0] G2_FB = G2_FB_DEFAULT    // feedback polynomial g2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  logic   in_bit,
  output logic   out_valid,
  input  logic   out_ready,
  output logic   out_sys,
  output logic   out_par,
  output state_t state
);

  logic accept;

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_sys   <= 1'b0;
      out_par   <= 1'b0;
    end else begin
      if (accept) begin
        state     <= rsc_next_state(G2_FB, state, in_bit);
        out_sys   <= in_bit;
        out_par   <= rsc_parity(G1_FF, G2_FB, state, in_bit);
        out_valid <= 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
