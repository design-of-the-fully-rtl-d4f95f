// tb_rsc_encoder: random message bits with random stalls on both handshakes; every coded pair
// and the state are compared with the reference encoder. Also checks the one-cycle latency
// and the one-bit-per-cycle rate when the output side never stalls.
module tb_rsc_encoder;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0, out_ready = 0;
  logic in_ready, out_valid, out_sys, out_par;
  logic [1:0] state;
  int checks = 0, failures = 0;

  rsc_encoder dut (.*);

  always #5 clk = ~clk;

  enc_model_t m = '{reg_a: 0};
  logic [1:0] expq[$];
  int accepted = 0, produced = 0;
  bit stall_mode = 1;

  logic [1:0] last_state = 0;
  always @(posedge clk) if (rst_n) begin
    // State after the last accepted bit (compared before this edge's update).
    checks++;
    if (state !== last_state) begin
      failures++;
      $display("FAIL state: got %b exp %b", state, last_state);
    end
    if (out_valid && out_ready) begin
      logic [1:0] e;
      e = expq.pop_front();
      checks++;
      if ({out_sys, out_par} !== e) begin
        failures++;
        $display("FAIL pair %0d: got %b exp %b", produced, {out_sys, out_par}, e);
      end
      produced++;
    end
    if (in_valid && in_ready) begin
      expq.push_back(ref_encode(m, in_bit));
      last_state = ref_state(m);
      accepted++;
    end
  end

  initial begin
    int c0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Phase 1: random stalls.
    repeat (2000) begin
      @(negedge clk);
      in_valid  = ($urandom % 4) != 0;
      in_bit    = 1'($urandom);
      out_ready = ($urandom % 3) != 0;
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    // Phase 2: full rate, known sequence latency.
    c0 = accepted;
    for (int i = 0; i < 200; i++) begin
      in_valid = 1; in_bit = 1'($urandom); out_ready = 1;
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (accepted - c0 != 200) begin
      failures++;
      $display("FAIL rate: %0d bits in 200 cycles", accepted - c0);
    end
    @(negedge clk);
    checks++;
    if (produced != accepted || expq.size() != 0) begin
      failures++;
      $display("FAIL count: produced %0d accepted %0d", produced, accepted);
    end
    // Latency: a single bit appears exactly one cycle after acceptance.
    @(negedge clk); in_valid = 1; in_bit = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
