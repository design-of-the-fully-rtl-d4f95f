// tb_extra_column_generator: random path and branch metrics (many ties); the reference
// enumerates every (state, message bit) transition with the reference encoder, keeps the
// cheaper of the two candidates into each state (the predecessor with a(k-2) = 0 on a tie),
// and normalises by the smallest survivor, lowest state first on a tie.
module tb_extra_column_generator;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [5:0] pm_in  [4];
  logic [1:0] bm     [4];
  logic [5:0] pm_out [4];
  logic       decision [4];
  logic       surv_bit [4];
  logic [1:0] best_state;
  logic [5:0] norm;

  extra_column_generator dut (.*);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int best_c [4];
      int best_x [4];
      int best_u [4];
      int mn, mi;
      foreach (pm_in[i]) pm_in[i] = 6'($urandom % ((t % 3 == 0) ? 3 : 20));
      foreach (bm[i])    bm[i]    = 2'($urandom % 3);
      #1;
      foreach (best_c[i]) best_c[i] = 1 << 20;
      for (int s = 0; s < 4; s++) begin
        for (int u = 0; u < 2; u++) begin
          logic [3:0] tr;
          int c, ns, x;
          tr = ref_step(2'(s), 1'(u));
          ns = int'(tr[3:2]);
          x  = s & 1;
          c  = int'(pm_in[s]) + int'(bm[tr[1:0]]);
          if (c < best_c[ns] || (c == best_c[ns] && x < best_x[ns])) begin
            best_c[ns] = c; best_x[ns] = x; best_u[ns] = u;
          end
        end
      end
      mn = best_c[0]; mi = 0;
      for (int i = 1; i < 4; i++) if (best_c[i] < mn) begin mn = best_c[i]; mi = i; end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (pm_out[i] !== 6'(best_c[i] - mn) || decision[i] !== 1'(best_x[i]) ||
            surv_bit[i] !== 1'(best_u[i])) begin
          failures++;
          $display("FAIL t=%0d state %0d: pm %0d/%0d dec %b/%0d bit %b/%0d", t, i,
                   pm_out[i], best_c[i] - mn, decision[i], best_x[i], surv_bit[i], best_u[i]);
        end
      end
      checks++;
      if (best_state !== 2'(mi) || norm !== 6'(mn)) begin
        failures++;
        $display("FAIL t=%0d best %0d/%0d norm %0d/%0d", t, best_state, mi, norm, mn);
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
