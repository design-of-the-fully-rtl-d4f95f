// inverse_permutation_network: brings the decoder's delta-domain decisions back to the
// normal domain, the message bits, by register exchange.
//
// Each trellis state owns a survivor register of DEPTH message bits, the bits along the best
// path into that state. On every trellis step the registers are permuted: next state ns takes
// the register of its surviving predecessor {ns[0], decision[ns]}, shifted by one place, with
// the bit of the surviving branch appended. After DEPTH steps the paths into all states have
// almost surely merged, so the oldest bit of the register of the most reliable state is the
// decoded message bit.
// The delta-to-normal permutation network at the decoder output follows the design
// description; building it as a register-exchange survivor memory, and DEPTH, are this
// design's choice.
//
// Timing: on a cycle with step high the registers update and, one cycle later, out_bit holds
// the message bit entered DEPTH-1 steps before that step, taken from best_state's register
// (best_state belongs to the new column). rst_n (active low, synchronous) clears all registers.
module inverse_permutation_network
  import trellis_pkg::*;
#(
  parameter int unsigned DEPTH = 15    // survivor length in trellis steps
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   step,
  input  logic   decision [NUM_STATES],
  input  logic   surv_bit [NUM_STATES],
  input  state_t best_state,
  output logic   out_bit
);

  logic [DEPTH-1:0] surv      [NUM_STATES];
  logic [DEPTH-1:0] surv_next [NUM_STATES];

  always_comb begin
    for (int unsigned ns = 0; ns < NUM_STATES; ns++) begin
      state_t ps;
      ps = state_t'(ns);
      ps = {ps[0], decision[ns]};
      surv_next[ns] = {surv[ps][DEPTH-2:0], surv_bit[ns]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < NUM_STATES; s++) surv[s] <= '0;
      out_bit <= 1'b0;
    end else if (step) begin
      for (int unsigned s = 0; s < NUM_STATES; s++) surv[s] <= surv_next[s];
      out_bit <= surv_next[best_state][DEPTH-1];
    end
  end

endmodule
