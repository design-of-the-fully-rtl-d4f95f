// tb_trellis_decoder: feeds the decoder serial streams made by the reference encoder, with
// random idle cycles between channel bits.
//   Phase 1: isolated channel errors (one flipped bit, then at least 12 clean symbols); every
//            decoded bit must equal the message bit DEPTH-1 symbols back.
//   Phase 2: random errors at about 6 % of the channel bits; every decoded bit must equal the
//            output of a reference Viterbi search (same start metrics and tie rules) that keeps
//            whole survivor paths, and the bit errors left are reported.
// Also checked: out_valid exactly one cycle after each parity bit once the window is full, the
// number of decoded bits, a zero metric growth ten or more clean symbols after an error and a
// non-zero one on some erroneous symbols.
module tb_trellis_decoder;
  import tb_ref_pkg::*;
  localparam int DEPTH = 15;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ser_valid = 0, ser_first = 0, ser_bit = 0;
  logic out_valid, out_bit;
  logic [1:0] best_state;
  logic [5:0] best_growth;

  trellis_decoder dut (.*);

  // Reference Viterbi.
  typedef bit path_t[$];
  path_t paths [4];
  int    pm [4];
  bit    ref_out[$];

  function automatic void ref_reset();
    for (int s = 0; s < 4; s++) begin
      paths[s] = {};
      repeat (DEPTH) paths[s].push_back(0);
      pm[s] = (s == 0) ? 0 : 16;
    end
  endfunction

  function automatic void ref_symbol(input logic [1:0] rx);
    int    nc [4];
    int    nx [4];
    path_t np [4];
    int    bi;
    foreach (nc[i]) begin nc[i] = 1 << 20; nx[i] = 0; end
    for (int s = 0; s < 4; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [3:0] tr;
        int ns, c;
        tr = ref_step(2'(s), 1'(u));
        ns = int'(tr[3:2]);
        c  = pm[s] + int'(tr[1] != rx[1]) + int'(tr[0] != rx[0]);
        if (c < nc[ns] || (c == nc[ns] && (s & 1) < nx[ns])) begin
          nc[ns] = c; nx[ns] = s & 1;
          np[ns] = paths[s];
          np[ns].push_back(1'(u));
        end
      end
    end
    bi = 0;
    for (int i = 1; i < 4; i++) if (nc[i] < nc[bi]) bi = i;
    for (int i = 0; i < 4; i++) pm[i] = nc[i] - nc[bi];
    paths = np;
    ref_out.push_back(paths[bi][paths[bi].size() - DEPTH]);
  endfunction

  // Capture.
  bit got[$];
  int syms = 0;
  bit pending_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) got.push_back(out_bit);
    if (pending_out) begin
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid missing after symbol"); end
    end else if (out_valid) begin
      checks++; failures++; $display("FAIL unexpected out_valid");
    end
    pending_out = 0;
    if (ser_valid && !ser_first) begin
      syms++;
      pending_out = (syms >= DEPTH);
    end
  end

  task automatic send_bit(input logic first, input logic b);
    while (($urandom % 4) == 0) begin
      ser_valid = 0; @(negedge clk);
    end
    ser_valid = 1; ser_first = first; ser_bit = b;
    @(negedge clk);
    ser_valid = 0;
  endtask

  int growth_zero_bad = 0, growth_seen = 0;

  task automatic run(input int n, input int mode, output int residual);
    enc_model_t m;
    bit msg[$];
    int quiet;
    m.reg_a = 0;
    ref_reset();
    got = {}; ref_out = {}; syms = 0;
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    quiet = 0;
    for (int k = 0; k < n; k++) begin
      logic u;
      logic [1:0] c, r;
      u = 1'($urandom);
      msg.push_back(u);
      c = ref_encode(m, u);
      r = c;
      if (mode == 1 && quiet >= 12 && ($urandom % 4) == 0) begin
        r[$urandom % 2] ^= 1'b1;
        quiet = 0;
      end else if (mode == 2) begin
        if (($urandom % 100) < 6) r[1] ^= 1'b1;
        if (($urandom % 100) < 6) r[0] ^= 1'b1;
      end
      if (r == c) quiet++;
      ref_symbol(r);
      send_bit(1, r[1]);
      send_bit(0, r[0]);
      // Growth of the symbol just taken (registered one cycle after its parity bit).
      if (mode == 1) begin
        if (r != c) growth_seen += (best_growth != 0);
        else if (quiet >= 10 && best_growth != 0) growth_zero_bad++;
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() != n - DEPTH + 1) begin
      failures++; $display("FAIL count %0d exp %0d", got.size(), n - DEPTH + 1);
    end
    residual = 0;
    for (int i = 0; i < got.size() && i < ref_out.size(); i++) begin
      checks++;
      if (mode == 1) begin
        if (got[i] !== msg[i]) begin
          failures++; $display("FAIL bit %0d: got %b msg %b", i, got[i], msg[i]);
        end
      end else begin
        if (got[i] !== ref_out[i + DEPTH - 1]) begin
          failures++; $display("FAIL bit %0d: got %b ref %b", i, got[i], ref_out[i + DEPTH - 1]);
        end
        residual += (got[i] != msg[i]);
      end
    end
  endtask

  initial begin
    int res;
    repeat (2) @(negedge clk);
    run(1500, 1, res);
    checks++;
    if (growth_zero_bad != 0 || growth_seen == 0) begin
      failures++;
      $display("FAIL growth: %0d non-zero on clean symbols, %0d seen on errors",
               growth_zero_bad, growth_seen);
    end
    run(1500, 2, res);
    $display("6%% channel errors: %0d decoded bit errors in %0d bits", res, 1500 - DEPTH + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
