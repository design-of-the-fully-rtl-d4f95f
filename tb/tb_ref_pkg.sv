// tb_ref_pkg: reference models for the testbenches, written independently of the RTL.
// The encoder model keeps the recursive register as an integer shift register for the code
// with feedback 1 + D + D^2 and feed-forward 1 + D^2 (octal 7 and 5). ref_step gives the
// trellis transition of a model state, for the decoder-side testbenches.
package tb_ref_pkg;

  typedef struct {
    int unsigned reg_a;   // bit 0: a(k-1), bit 1: a(k-2)
  } enc_model_t;

  // Encode one bit: returns {sys, par} and advances the model.
  function automatic logic [1:0] ref_encode(ref enc_model_t m, input logic u);
    logic a1, a2, a, p;
    a1 = m.reg_a[0];
    a2 = m.reg_a[1];
    a  = u ^ a1 ^ a2;
    p  = a ^ a2;
    m.reg_a = ((m.reg_a << 1) | int'(a)) & 3;
    return {u, p};
  endfunction

  // Model state in the RTL's numbering {a(k-1), a(k-2)}.
  function automatic logic [1:0] ref_state(input enc_model_t m);
    return {m.reg_a[0], m.reg_a[1]};
  endfunction

  // Transition from RTL-numbered state s = {a(k-1), a(k-2)} on message bit u:
  // returns {next state, sys, par}.
  function automatic logic [3:0] ref_step(input logic [1:0] s, input logic u);
    enc_model_t m;
    logic [1:0] sp;
    m.reg_a = {30'd0, s[0], s[1]};
    sp = ref_encode(m, u);
    return {ref_state(m), sp};
  endfunction

endpackage
