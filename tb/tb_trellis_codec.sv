// tb_trellis_codec: end-to-end test of the encoder-decoder at its default parameters.
// A random message (with random idle cycles on the input) is encoded, sent over the serial
// channel with isolated bit errors injected through chan_flip, and decoded; DEPTH-1 extra
// bits flush the decoder. Every decoded bit must equal the message bit. The channel stream is
// also checked against the reference encoder before the flips.
// Mechanisms counted, each must occur: input stalls (msg_ready low while msg_valid is high),
// every encoder state visited, systematic/parity multiplexing, channel errors injected and
// all corrected, metric growth reported by the decoder, and the decoder's warm-up window.
// The steady rate of one message bit per two cycles and the decoder latency are checked too.
module tb_trellis_codec;
  import tb_ref_pkg::*;
  localparam int DEPTH = 15;
  localparam int NMSG  = 3000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic msg_valid = 0, msg_bit = 0, chan_flip = 0;
  logic msg_ready, chan_valid, chan_first, chan_bit, dec_valid, dec_bit;
  logic [1:0] enc_state, dec_state;
  logic [5:0] dec_growth;

  trellis_codec dut (.*);

  bit msg[$];
  bit dec[$];
  logic [1:0] chan_exp[$];
  enc_model_t m = '{reg_a: 0};
  int n_stall = 0, n_pairs = 0, n_flips = 0, n_growth = 0, n_warm = 0;
  int state_seen [4] = '{0, 0, 0, 0};
  int bits_since_flip = 0;
  int cyc = 0, last_par_cyc = -10;
  logic [1:0] cur;
  bit pair_open = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    state_seen[enc_state]++;
    if (msg_valid && !msg_ready) n_stall++;
    if (msg_valid && msg_ready) begin
      msg.push_back(msg_bit);
      chan_exp.push_back(ref_encode(m, msg_bit));
    end
    if (chan_valid) begin
      logic sent;
      sent = chan_bit ^ chan_flip;          // the bit before the channel error
      bits_since_flip++;
      if (chan_flip) begin n_flips++; bits_since_flip = 0; end
      checks++;
      if (chan_first) begin
        cur = chan_exp.pop_front();
        pair_open = 1;
        if (sent !== cur[1]) begin failures++; $display("FAIL channel sys"); end
      end else begin
        if (!pair_open || sent !== cur[0]) begin failures++; $display("FAIL channel par"); end
        pair_open = 0;
        n_pairs++;
        if (n_pairs < DEPTH) n_warm++;
        last_par_cyc = cyc;
      end
    end
    if (dec_valid) begin
      dec.push_back(dec_bit);
      checks++;
      if (cyc != last_par_cyc + 1) begin failures++; $display("FAIL decoder latency"); end
    end
    if (dec_growth != 0) n_growth++;
  end

  // Channel errors: at most one flip per 24 channel bits (12 symbols).
  always @(negedge clk) begin
    chan_flip = rst_n && chan_valid && bits_since_flip >= 24 && ($urandom % 8) == 0;
  end

  initial begin
    int t0, a0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NMSG + DEPTH - 1; k++) begin
      msg_valid = (k < NMSG / 2) ? (($urandom % 3) != 0) : 1'b1;
      while (!msg_valid) begin
        @(negedge clk);
        msg_valid = ($urandom % 3) != 0;
      end
      msg_bit = 1'($urandom);
      begin
        bit acc;
        do begin
          #1 acc = msg_ready;                 // stable until the next rising edge
          @(negedge clk);
        end while (!acc);
      end
      if (k == NMSG / 2) begin t0 = cyc; a0 = msg.size(); end
    end
    msg_valid = 0;
    repeat (10) @(negedge clk);
    // Rate: in the steady second half, one bit per two cycles.
    checks++;
    if ((msg.size() - a0) * 2 < (cyc - t0) - 12 || (msg.size() - a0) * 2 > (cyc - t0) + 2) begin
      failures++;
      $display("FAIL rate: %0d bits in %0d cycles", msg.size() - a0, cyc - t0);
    end
    checks++;
    if (dec.size() != msg.size() - DEPTH + 1) begin
      failures++; $display("FAIL decoded count %0d", dec.size());
    end
    for (int i = 0; i < NMSG && i < dec.size(); i++) begin
      checks++;
      if (dec[i] !== msg[i]) begin failures++; $display("FAIL bit %0d", i); end
    end
    $display("stalls=%0d pairs=%0d flips=%0d growth_cycles=%0d warmup=%0d states=%p",
             n_stall, n_pairs, n_flips, n_growth, n_warm, state_seen);
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    checks++; if (n_pairs == 0)  begin failures++; $display("FAIL no pairs"); end
    checks++; if (n_flips == 0)  begin failures++; $display("FAIL no channel errors"); end
    checks++; if (n_growth == 0) begin failures++; $display("FAIL no metric growth"); end
    checks++; if (n_warm != DEPTH - 1) begin failures++; $display("FAIL warm-up"); end
    foreach (state_seen[i]) begin
      checks++; if (state_seen[i] == 0) begin failures++; $display("FAIL state %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NMSG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
