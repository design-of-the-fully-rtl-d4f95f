// trellis_pkg: constants and trellis functions shared by the encoder and the decoder.
//
// The code is a recursive systematic convolutional (RSC) code of constraint length K = 3 and
// rate 1/2, with generator matrix G(D) = [1, g1(D)/g2(D)]: the first output is the message bit
// itself, the second is the feed-forward polynomial g1 applied to the recursive register, whose
// input is the message bit plus the feedback polynomial g2 applied to the same register.
// K = 3 and r = 1/2 are the design's figures; the polynomials themselves are this design's
// choice, the common pair g1 = 1 + D^2 (octal 5) and g2 = 1 + D + D^2 (octal 7).
//
// Polynomial encoding: bit i of a polynomial is the coefficient of D^i. Bit 0 of the feedback
// polynomial must be 1.
// Encoder state: s = {a(k-1), a(k-2)}, the two previous values of the recursive register input
// a(k) = u(k) + g2[1] a(k-1) + g2[2] a(k-2) (mod 2).
// Branch label: {systematic bit, parity bit}, systematic bit in the MSB.
package trellis_pkg;

  localparam int unsigned K          = 3;             // constraint length
  localparam int unsigned MEM        = K - 1;         // encoder memory (register stages)
  localparam int unsigned NUM_STATES = 1 << MEM;      // trellis states
  localparam int unsigned SYM_W      = 2;             // coded bits per message bit (1/r)
  localparam int unsigned NUM_LABELS = 1 << SYM_W;    // distinct branch labels

  localparam logic [K-1:0] G1_FF_DEFAULT = 3'b101;    // feed-forward g1 = 1 + D^2
  localparam logic [K-1:0] G2_FB_DEFAULT = 3'b111;    // feedback     g2 = 1 + D + D^2

  typedef logic [MEM-1:0]   state_t;
  typedef logic [SYM_W-1:0] sym_t;

  // Recursive register input a(k) for message bit u in state s.
  function automatic logic rsc_feedback(input logic [K-1:0] g2, input state_t s, input logic u);
    return u ^ (g2[1] & s[1]) ^ (g2[2] & s[0]);
  endfunction

  // Parity output for message bit u in state s.
  function automatic logic rsc_parity(input logic [K-1:0] g1, input logic [K-1:0] g2,
                                      input state_t s, input logic u);
    logic a;
    a = rsc_feedback(g2, s, u);
    return (g1[0] & a) ^ (g1[1] & s[1]) ^ (g1[2] & s[0]);
  endfunction

  // Next state after message bit u in state s.
  function automatic state_t rsc_next_state(input logic [K-1:0] g2, input state_t s,
                                            input logic u);
    return {rsc_feedback(g2, s, u), s[1]};
  endfunction

  // Message bit that moves state s into next state ns, whose MSB is a(k). The two predecessors
  // of ns are the states {ns[0], x} for x = 0, 1.
  function automatic logic rsc_input_for(input logic [K-1:0] g2, input state_t s,
                                         input state_t ns);
    return ns[1] ^ (g2[1] & s[1]) ^ (g2[2] & s[0]);
  endfunction

  // Branch label {u, p} of the transition from s into ns.
  function automatic sym_t rsc_label(input logic [K-1:0] g1, input logic [K-1:0] g2,
                                     input state_t s, input state_t ns);
    logic u;
    u = rsc_input_for(g2, s, ns);
    return {u, rsc_parity(g1, g2, s, u)};
  endfunction

endpackage
