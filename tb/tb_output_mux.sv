// tb_output_mux: random pairs with random gaps; checks that each pair leaves as two channel
// bits, systematic first with ser_first set, parity second, in order, and that a steady
// stream of pairs takes exactly two cycles per pair.
module tb_output_mux;
  logic clk = 0, rst_n = 0;
  logic pair_valid = 0, pair_sys = 0, pair_par = 0;
  logic pair_ready, ser_valid, ser_first, ser_bit;
  int checks = 0, failures = 0;

  output_mux dut (.*);
  always #5 clk = ~clk;

  logic [1:0] q[$];
  logic [1:0] cur;
  bit expect_par = 0;
  int pairs_out = 0, accepted = 0;

  always @(posedge clk) if (rst_n) begin
    if (ser_valid) begin
      checks++;
      if (!expect_par) begin
        cur = q.pop_front();
        if (!ser_first || ser_bit !== cur[1]) begin
          failures++;
          $display("FAIL sys: first=%b bit=%b exp %b", ser_first, ser_bit, cur[1]);
        end
        expect_par = 1;
      end else begin
        if (ser_first || ser_bit !== cur[0]) begin
          failures++;
          $display("FAIL par: first=%b bit=%b exp %b", ser_first, ser_bit, cur[0]);
        end
        expect_par = 0;
        pairs_out++;
      end
    end else if (expect_par) begin
      checks++; failures++;
      $display("FAIL gap between systematic and parity bit");
    end
    if (pair_valid && pair_ready) begin
      q.push_back({pair_sys, pair_par});
      accepted++;
    end
  end

  initial begin
    int c0, t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      if (!pair_valid || pair_ready) begin   // hold a pair until it is taken
        pair_valid = ($urandom % 3) != 0;
        pair_sys   = 1'($urandom);
        pair_par   = 1'($urandom);
      end
    end
    // Steady stream: 100 pairs must take 200 cycles.
    @(negedge clk);
    while (!pair_ready) @(negedge clk);
    c0 = accepted;
    for (t0 = 0; t0 < 200; t0++) begin
      pair_valid = 1; pair_sys = 1'($urandom); pair_par = 1'($urandom);
      @(negedge clk);
      if (!pair_ready) begin end
    end
    pair_valid = 0;
    checks++;
    if (accepted - c0 != 100) begin
      failures++;
      $display("FAIL rate: %0d pairs in 200 cycles", accepted - c0);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (pairs_out != accepted) begin
      failures++;
      $display("FAIL count: out %0d accepted %0d", pairs_out, accepted);
    end
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
