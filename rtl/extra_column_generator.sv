// extra_column_generator: builds the next column of the decoder's trellis from the current
// one, the add-compare-select step of a Viterbi decoder over the NUM_STATES = 4 states.
//
// For every next state ns the two predecessors {ns[0], x} (x = 0, 1) are extended by the
// branch metric of the label on their branch; a two-input min2_finder_tree keeps the smaller
// candidate (x = 0 on a tie). A four-input min2_finder_tree then finds the most reliable state
// of the new column, and every metric (norm is the amount subtracted) is expressed relative to it, so that state's metric is
// zero: the column leaves in the delta domain and the metrics stay bounded. Candidates
// saturate at the top of the PM_W-bit range.
// Outputs per next state: the normalised path metric, the decision x, and the message bit
// carried by the surviving branch. best_state is the most reliable state of the new column.
// The block's name and its place after the min finder follow the design description; its
// insides are this design's choice (the document gives no detail of them).
//
// Purely combinational.
module extra_column_generator
  import trellis_pkg::*;
#(
  parameter logic [K-1:0] G1_FF = G1_FF_DEFAULT,
  parameter logic [K-1:0] G2_FB = G2_FB_DEFAULT,
  parameter int unsigned  PM_W  = 6,               // path-metric width
  parameter int unsigned  BM_W  = 2                // branch-metric width
) (
  input  logic [PM_W-1:0] pm_in    [NUM_STATES],   // current column, delta domain
  input  logic [BM_W-1:0] bm       [NUM_LABELS],   // branch metric per label {u, p}
  output logic [PM_W-1:0] pm_out   [NUM_STATES],   // next column, delta domain
  output logic            decision [NUM_STATES],   // surviving predecessor {ns[0], decision}
  output logic            surv_bit [NUM_STATES],   // message bit on the surviving branch
  output state_t          best_state,
  output logic [PM_W-1:0] norm                     // amount subtracted: best new candidate
);

  localparam logic [PM_W:0] PM_MAX = {1'b0, {PM_W{1'b1}}};

  logic [PM_W-1:0] cand     [NUM_STATES][2];
  logic [PM_W-1:0] sel_val  [NUM_STATES];
  logic            sel_idx  [NUM_STATES];
  logic [PM_W-1:0] col_min;
  state_t          col_min_idx;

  always_comb begin
    for (int unsigned ns = 0; ns < NUM_STATES; ns++) begin
      for (int unsigned x = 0; x < 2; x++) begin
        logic [PM_W:0] sum;
        state_t        ps;
        ps  = state_t'(ns);
        ps  = {ps[0], 1'(x)};
        sum = {1'b0, pm_in[ps]} + (PM_W+1)'(bm[rsc_label(G1_FF, G2_FB, ps, state_t'(ns))]);
        cand[ns][x] = (sum > PM_MAX) ? PM_MAX[PM_W-1:0] : sum[PM_W-1:0];
      end
    end
  end

  for (genvar ns = 0; ns < NUM_STATES; ns++) begin : g_acs
    min2_finder_tree #(.N(2), .W(PM_W)) u_select (
      .vals    (cand[ns]),
      .min_val (sel_val[ns]),
      .min_idx (sel_idx[ns])
    );
  end

  min2_finder_tree #(.N(NUM_STATES), .W(PM_W)) u_best (
    .vals    (sel_val),
    .min_val (col_min),
    .min_idx (col_min_idx)
  );

  always_comb begin
    for (int unsigned ns = 0; ns < NUM_STATES; ns++) begin
      state_t ps;
      ps = state_t'(ns);
      ps = {ps[0], sel_idx[ns]};
      pm_out[ns]   = sel_val[ns] - col_min;
      decision[ns] = sel_idx[ns];
      surv_bit[ns] = rsc_input_for(G2_FB, ps, state_t'(ns));
    end
    best_state = col_min_idx;
    norm       = col_min;
  end

endmodule
