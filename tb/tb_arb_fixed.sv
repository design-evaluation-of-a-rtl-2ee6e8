// tb_arb_fixed: random request vectors against a reference priority search,
// for the default north-first clockwise order and for a custom order.
module tb_arb_fixed;
  import noc_pkg::*;
  localparam prio_t CUSTOM = {3'd0, 3'd2, 3'd4, 3'd6, 3'd7, 3'd5, 3'd3, 3'd1};
  logic clk = 0, rst_n = 1, update = 0;
  logic [NSLOT-1:0] req, g_def, g_cus;
  int checks = 0, failures = 0;

  arb_fixed                u_def (.clk, .rst_n, .req, .update, .grant(g_def));
  arb_fixed #(.PRIO(CUSTOM)) u_cus (.clk, .rst_n, .req, .update, .grant(g_cus));

  function automatic logic [NSLOT-1:0] ref_grant(logic [NSLOT-1:0] r, prio_t p);
    for (int k = 0; k < NSLOT; k++)
      if (r[p[k]]) return NSLOT'(1) << p[k];
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      req = (n < 256) ? NSLOT'(n) : NSLOT'($urandom);
      #1;
      checks += 2;
      if (g_def !== ref_grant(req, PRIO_CLOCKWISE)) begin
        failures++; $display("FAIL default req=%b grant=%b", req, g_def);
      end
      if (g_cus !== ref_grant(req, CUSTOM)) begin
        failures++; $display("FAIL custom req=%b grant=%b", req, g_cus);
      end
    end
    // north beats everything in the default order
    req = 8'b1111_1111; #1;
    checks++; if (g_def != 8'b0000_0001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
