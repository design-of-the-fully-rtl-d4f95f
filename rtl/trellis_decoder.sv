// trellis_decoder: hard-decision Viterbi decoder for the K = 3, rate 1/2 RSC code, taking the
// serial channel stream and returning the message bits.
//
// The decoder tracks the most likely sequence of states the encoder went through. Its chain
// follows the block order of the design description:
//   1. an input stage re-pairs the serial stream into coded symbols {systematic, parity};
//   2. permutation_network takes each received symbol as the reference value and gives every
//      branch label its delta-domain cost (Hamming distance to the received symbol);
//   3. extra_column_generator, built on min2_finder_tree, adds, compares and selects to form
//      the next trellis column and re-expresses it relative to its most reliable state;
//   4. inverse_permutation_network follows the decisions back to normal-domain message bits.
// The path metrics start with state 0 at 0 and the other states at PM_INIT, since the encoder
// starts in state 0. Which algorithm runs inside these blocks (Viterbi with register exchange,
// hard decisions) is this design's choice, as are DEPTH, PM_W and PM_INIT.
//
// Interface: ser_valid/ser_first/ser_bit as produced by output_mux (ser_first marks the
// systematic bit). out_valid/out_bit: one decoded bit per received symbol once DEPTH symbols
// have arrived; the bit that leaves after symbol k is message bit k-DEPTH+1, one cycle after
// the parity bit of symbol k. The last DEPTH-1 message bits leave only once further symbols
// follow them. A parity bit that arrives without its systematic bit is dropped.
// rst_n is active low and synchronous.
module trellis_decoder
  import trellis_pkg::*;
#(
  parameter logic [K-1:0] G1_FF   = G1_FF_DEFAULT,
  parameter logic [K-1:0] G2_FB   = G2_FB_DEFAULT,
  parameter int unsigned  DEPTH   = 15,    // survivor length (traceback depth)
  parameter int unsigned  PM_W    = 6,     // path-metric width
  parameter int unsigned  PM_INIT = 16     // start metric of states other than 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ser_valid,
  input  logic            ser_first,
  input  logic            ser_bit,
  output logic            out_valid,
  output logic            out_bit,
  output state_t          best_state,      // most reliable state after the last symbol
  output logic [PM_W-1:0] best_growth      // metric increase of the last step (0: no error seen)
);

  localparam int unsigned BM_W  = $clog2(SYM_W + 1);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  // Input stage: hold the systematic bit until its parity bit arrives.
  logic held_sys, have_sys, step;
  sym_t rx_sym;

  assign step   = ser_valid && !ser_first && have_sys;
  assign rx_sym = {held_sys, ser_bit};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_sys <= 1'b0;
      have_sys <= 1'b0;
    end else if (ser_valid) begin
      held_sys <= ser_bit;
      have_sys <= ser_first;
    end
  end

  // Normal to delta domain.
  logic [BM_W-1:0]  bm  [NUM_LABELS];

  permutation_network #(.SW(SYM_W), .BM_W(BM_W)) u_perm (
    .rx_sym (rx_sym),
    .eta    (),   // delta-domain indices, not needed by the metric path
    .bm     (bm)
  );

  // Trellis column update.
  logic [PM_W-1:0] pm       [NUM_STATES];
  logic [PM_W-1:0] pm_next  [NUM_STATES];
  logic            decision [NUM_STATES];
  logic            surv_bit [NUM_STATES];
  state_t          col_best;
  logic [PM_W-1:0] growth;     // best new candidate before normalisation

  extra_column_generator #(
    .G1_FF(G1_FF), .G2_FB(G2_FB), .PM_W(PM_W), .BM_W(BM_W)
  ) u_col (
    .pm_in      (pm),
    .bm         (bm),
    .pm_out     (pm_next),
    .decision   (decision),
    .surv_bit   (surv_bit),
    .best_state (col_best),
    .norm       (growth)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < NUM_STATES; s++) pm[s] <= (s == 0) ? '0 : PM_W'(PM_INIT);
      best_state  <= '0;
      best_growth <= '0;
    end else if (step) begin
      pm          <= pm_next;
      best_state  <= col_best;
      best_growth <= growth;
    end
  end

  // Delta to normal domain.
  inverse_permutation_network #(.DEPTH(DEPTH)) u_iperm (
    .clk        (clk),
    .rst_n      (rst_n),
    .step       (step),
    .decision   (decision),
    .surv_bit   (surv_bit),
    .best_state (col_best),
    .out_bit    (out_bit)
  );

  // Output valid once DEPTH symbols have been received.
  logic [CNT_W-1:0] seen;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seen      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= step && (seen >= CNT_W'(DEPTH - 1));
      if (step && seen < CNT_W'(DEPTH)) seen <= seen + 1'b1;
    end
  end

endmodule
