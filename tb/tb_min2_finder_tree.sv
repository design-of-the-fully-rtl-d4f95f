// tb_min2_finder_tree: random and tie-heavy vectors for a 4-input, a 2-input and a 5-input
// (padded) tree; the minimum and the first index holding it are found by a linear scan.
module tb_min2_finder_tree;
  int checks = 0, failures = 0;

  logic [5:0] v4 [4];  logic [5:0] m4;  logic [1:0] i4;
  logic [5:0] v2 [2];  logic [5:0] m2;  logic       i2;
  logic [3:0] v5 [5];  logic [3:0] m5;  logic [2:0] i5;

  min2_finder_tree #(.N(4), .W(6)) dut4 (.vals(v4), .min_val(m4), .min_idx(i4));
  min2_finder_tree #(.N(2), .W(6)) dut2 (.vals(v2), .min_val(m2), .min_idx(i2));
  min2_finder_tree #(.N(5), .W(4)) dut5 (.vals(v5), .min_val(m5), .min_idx(i5));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int mx, bi;
      mx = (t % 2) ? 64 : 3;   // small ranges force ties
      foreach (v4[i]) v4[i] = 6'($urandom % mx);
      foreach (v2[i]) v2[i] = 6'($urandom % mx);
      foreach (v5[i]) v5[i] = 4'($urandom % ((t % 2) ? 16 : 3));
      #1;
      bi = 0; foreach (v4[i]) if (v4[i] < v4[bi]) bi = i;
      checks++;
      if (m4 !== v4[bi] || i4 !== 2'(bi)) begin
        failures++; $display("FAIL N=4: %p -> %0d@%0d", v4, m4, i4);
      end
      bi = 0; foreach (v2[i]) if (v2[i] < v2[bi]) bi = i;
      checks++;
      if (m2 !== v2[bi] || i2 !== 1'(bi)) begin
        failures++; $display("FAIL N=2: %p -> %0d@%0d", v2, m2, i2);
      end
      bi = 0; foreach (v5[i]) if (v5[i] < v5[bi]) bi = i;
      checks++;
      if (m5 !== v5[bi] || i5 !== 3'(bi)) begin
        failures++; $display("FAIL N=5: %p -> %0d@%0d", v5, m5, i5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
