// tb_inverse_permutation_network: random decisions, branch bits and best states, with random
// idle cycles. The reference keeps the whole survivor path of every state as a queue
// (starting with DEPTH zeros) and reads the bit DEPTH places back on the best path.
// Run with the default DEPTH and with DEPTH = 4.
module tb_inverse_permutation_network;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic step = 0;
  logic decision [4];
  logic surv_bit [4];
  logic [1:0] best_state = 0;
  logic out_a, out_b;

  inverse_permutation_network            dut_a (.clk, .rst_n, .step, .decision, .surv_bit,
                                                .best_state, .out_bit(out_a));
  inverse_permutation_network #(.DEPTH(4)) dut_b (.clk, .rst_n, .step, .decision, .surv_bit,
                                                .best_state, .out_bit(out_b));

  typedef bit path_t[$];
  path_t pa [4];
  path_t pb [4];
  bit exp_a = 0, exp_b = 0;

  function automatic void advance(ref path_t p [4], input int depth, output bit o);
    path_t np [4];
    for (int ns = 0; ns < 4; ns++) begin
      np[ns] = p[((ns & 1) << 1) | int'(decision[ns])];
      np[ns].push_back(surv_bit[ns]);
    end
    p = np;
    o = p[best_state][p[best_state].size() - depth];
  endfunction

  initial begin
    for (int s = 0; s < 4; s++) begin
      pa[s] = {}; pb[s] = {};
      repeat (15) pa[s].push_back(0);
      repeat (4)  pb[s].push_back(0);
      decision[s] = 0; surv_bit[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (out_a !== exp_a || out_b !== exp_b) begin
        failures++;
        $display("FAIL t=%0d: out %b/%b exp %b/%b", t, out_a, out_b, exp_a, exp_b);
      end
      step = ($urandom % 5) != 0;
      for (int s = 0; s < 4; s++) begin
        decision[s] = 1'($urandom);
        surv_bit[s] = 1'($urandom);
      end
      best_state = 2'($urandom);
      if (step) begin
        advance(pa, 15, exp_a);
        advance(pb, 4, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
