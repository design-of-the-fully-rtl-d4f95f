// permutation_network: moves the received message from the normal domain into the delta
// domain, giving one branch metric per trellis branch label.
//
// In the normal domain a received coded symbol is a value r of SYM_W bits. In the delta domain
// every candidate branch label a is written as its offset eta = a XOR r from the received
// value, the value of maximum reliability, which serves as the reference and maps to
// eta = 0. The XOR by r permutes the label space; the cost of a label is then the number of
// coded bits it disagrees in, the Hamming weight of eta. Output bm[a] is that cost for label
// a, and eta[a] the delta-domain index itself.
// The normal-to-delta conversion with the most reliable value as reference follows the design
// description. Hard-decision input (one bit per coded bit) and the Hamming weight as the
// metric are this design's choice.
//
// Purely combinational.
module permutation_network
  import trellis_pkg::*;
#(
  parameter int unsigned SW   = SYM_W,          // coded bits per symbol
  parameter int unsigned BM_W = $clog2(SW + 1)  // branch-metric width
) (
  input  logic [SW-1:0]   rx_sym,               // received symbol, the reference value
  output logic [SW-1:0]   eta   [1 << SW],      // delta-domain index of each label
  output logic [BM_W-1:0] bm    [1 << SW]       // branch metric of each label
);

  always_comb begin
    for (int unsigned a = 0; a < (1 << SW); a++) begin
      eta[a] = SW'(a) ^ rx_sym;
      bm[a]  = '0;
      for (int unsigned b = 0; b < SW; b++) begin
        bm[a] = bm[a] + BM_W'(eta[a][b]);
      end
    end
  end

endmodule
