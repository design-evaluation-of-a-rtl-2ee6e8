// tb_arb_coin: random requests with 'update' strobes, against a reference
// model of the coin: grant the first requester clockwise from the coin, move
// the coin one slot on when its holder is granted.
module tb_arb_coin;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, update = 0;
  logic [NSLOT-1:0] req = '0, grant;
  int checks = 0, failures = 0;
  int coin = 0, moved = 0;

  arb_coin dut (.*);
  always #5 clk = ~clk;

  function automatic logic [NSLOT-1:0] ref_grant(logic [NSLOT-1:0] r, int c);
    for (int k = 0; k < NSLOT; k++)
      if (r[(c + k) % NSLOT]) return NSLOT'(1) << ((c + k) % NSLOT);
    return '0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req    = ($urandom % 4 == 0) ? '1 : NSLOT'($urandom);
      update = ($urandom % 2) == 1;
      #1;
      checks++;
      if (grant !== ref_grant(req, coin)) begin
        failures++;
        $display("FAIL n=%0d coin=%0d req=%b grant=%b", n, coin, req, grant);
      end
      @(posedge clk);
      if (update && req[coin]) begin coin = (coin + 1) % NSLOT; moved++; end
    end
    checks++;
    if (moved < 100) begin failures++; $display("FAIL coin rarely moved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
