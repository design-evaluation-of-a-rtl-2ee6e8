// tb_arb_counter: the three counting arbiters side by side, driven with the
// same random requests and update strobes and compared every cycle with a
// reference model of their counters.
module tb_arb_counter;
  import noc_pkg::*;
  localparam int CW = 4;   // small counters so that saturation is reached
  logic clk = 0, rst_n = 0, update = 0;
  logic [NSLOT-1:0] req = '0;
  logic [NSLOT-1:0] g [3];
  int checks = 0, failures = 0, saturated = 0;
  int cnt [3][NSLOT];

  arb_counter #(.MODE(CNT_MOST_PACKETS),   .CNT_W(CW)) u0 (.clk, .rst_n, .req, .update, .grant(g[0]));
  arb_counter #(.MODE(CNT_LONGEST_WAIT),   .CNT_W(CW)) u1 (.clk, .rst_n, .req, .update, .grant(g[1]));
  arb_counter #(.MODE(CNT_FEWEST_PACKETS), .CNT_W(CW)) u2 (.clk, .rst_n, .req, .update, .grant(g[2]));

  always #5 clk = ~clk;

  function automatic logic [NSLOT-1:0] ref_grant(int m, logic [NSLOT-1:0] r);
    int best = -1;
    for (int s = 0; s < NSLOT; s++)
      if (r[s]) begin
        if (best < 0) best = s;
        else if (m == 2 ? (cnt[m][s] < cnt[m][best]) : (cnt[m][s] > cnt[m][best])) best = s;
      end
    return (best < 0) ? '0 : NSLOT'(1) << best;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NSLOT-1:0] exp [3];
    foreach (cnt[m, s]) cnt[m][s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // skewed traffic: low slots request more often
      for (int s = 0; s < NSLOT; s++) req[s] = ($urandom % (s + 2)) == 0;
      update = ($urandom % 3) != 0;
      #1;
      for (int m = 0; m < 3; m++) begin
        exp[m] = ref_grant(m, req);
        checks++;
        if (g[m] !== exp[m]) begin
          failures++;
          $display("FAIL mode %0d n=%0d req=%b grant=%b exp=%b", m, n, req, g[m], exp[m]);
        end
      end
      @(posedge clk);
      for (int s = 0; s < NSLOT; s++) begin
        int mx = (1 << CW) - 1;
        for (int m = 0; m < 3; m += 2)
          if (update && exp[m][s] && cnt[m][s] < mx) cnt[m][s]++;
        if (update && exp[1][s]) cnt[1][s] = 0;
        else if (req[s] && cnt[1][s] < mx) cnt[1][s]++;
        if (cnt[0][s] == mx) saturated++;
      end
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL no counter saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
