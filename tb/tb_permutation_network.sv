// tb_permutation_network: exhaustive over all received symbols; for every branch label the
// delta-domain index must be label XOR received symbol and the metric the number of coded
// bits in which label and received symbol differ, counted here bit by bit.
module tb_permutation_network;
  logic [1:0] rx_sym;
  logic [1:0] eta [4];
  logic [1:0] bm  [4];
  int checks = 0, failures = 0;

  permutation_network dut (.*);

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx_sym = 2'(r);
      #1;
      for (int a = 0; a < 4; a++) begin
        int d;
        d = ((a & 1) != (r & 1)) + (((a >> 1) & 1) != ((r >> 1) & 1));
        checks++;
        if (bm[a] !== 2'(d) || eta[a] !== 2'(a ^ r)) begin
          failures++;
          $display("FAIL r=%0d a=%0d: bm=%0d exp %0d eta=%0d", r, a, bm[a], d, eta[a]);
        end
      end
      checks++;
      if (bm[r] !== 0) begin failures++; $display("FAIL reference not at zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
