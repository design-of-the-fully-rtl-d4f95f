// min2_finder_tree: a balanced tree of two-input minimum finders over N values.
//
// Each node compares two candidates and passes on the smaller value with its index; on a tie
// the lower index wins, so the result is the first minimum. The tree has ceil(log2 N) levels.
// The decoder uses it with N = 2 as the compare-select of each trellis state and with N = 4 to
// find the state of maximum reliability (lowest path metric).
// The name and place of the block follow the design description; its insides (a binary
// tree of compare-selects, lowest index on ties) are this design's choice.
//
// Purely combinational. Inputs: vals[N]. Outputs: min_val, min_idx.
module min2_finder_tree #(
  parameter int unsigned N     = 4,             // number of candidates, at least 2
  parameter int unsigned W     = 6,             // value width
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]     vals [N],
  output logic [W-1:0]     min_val,
  output logic [IDX_W-1:0] min_idx
);

  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned SLOTS  = 1 << LEVELS;   // leaves, padded to a power of two

  // Node arrays per level; level 0 holds the leaves. Padding leaves are never valid.
  logic [W-1:0]     lvl_val [LEVELS+1][SLOTS];
  logic [IDX_W-1:0] lvl_idx [LEVELS+1][SLOTS];
  logic             lvl_ok  [LEVELS+1][SLOTS];

  always_comb begin
    for (int unsigned i = 0; i < SLOTS; i++) begin
      lvl_val[0][i] = (i < N) ? vals[i] : '0;
      lvl_idx[0][i] = IDX_W'(i);
      lvl_ok[0][i]  = (i < N);
    end
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned i = 0; i < SLOTS; i++) begin
        lvl_val[l][i] = '0;
        lvl_idx[l][i] = '0;
        lvl_ok[l][i]  = 1'b0;
      end
      for (int unsigned i = 0; i < (SLOTS >> l); i++) begin
        // Take the right child only if it is valid and strictly smaller (or left is padding).
        if (lvl_ok[l-1][2*i+1] &&
            (!lvl_ok[l-1][2*i] || (lvl_val[l-1][2*i+1] < lvl_val[l-1][2*i]))) begin
          lvl_val[l][i] = lvl_val[l-1][2*i+1];
          lvl_idx[l][i] = lvl_idx[l-1][2*i+1];
        end else begin
          lvl_val[l][i] = lvl_val[l-1][2*i];
          lvl_idx[l][i] = lvl_idx[l-1][2*i];
        end
        lvl_ok[l][i] = lvl_ok[l-1][2*i] || lvl_ok[l-1][2*i+1];
      end
    end
    min_val = lvl_val[LEVELS][0];
    min_idx = lvl_idx[LEVELS][0];
  end

endmodule
