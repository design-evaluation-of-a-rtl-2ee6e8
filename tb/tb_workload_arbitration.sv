// tb_workload_arbitration: the arbitration experiment. Seven five-port,
// 8-bit routers, one per arbitration unit, run the same 111-packet group
// traffic (groups of 1 to 10 packets, biased towards the local port). All packets
// must be delivered intact under every unit; the cycle count of each is
// printed.
//   custom fixed: every output prefers local, then south, north, west, east.
//   custom each port: every output prefers the port after itself clockwise.
module tb_workload_arbitration;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NG = 21;
  localparam int LP = 30;   // extra share of packets steered to the local port
  // 1..10, 1..10, 1: 111 packets
  localparam int GS [NG] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 1};
  localparam prio_t CUSTOM = {3'd7, 3'd5, 3'd3, 3'd2, 3'd6, 3'd0, 3'd4, 3'd1};
  localparam prio_t PR_CUS [NSLOT] = '{default: CUSTOM};
  function automatic prio_t rot(int o);
    prio_t p;
    for (int k = 0; k < NSLOT; k++) p[k] = 3'((o + 1 + k) % NSLOT);
    return p;
  endfunction
  localparam prio_t PR_EACH [NSLOT] = '{rot(0), rot(1), rot(2), rot(3), rot(4), rot(5), rot(6), rot(7)};

  localparam int NA = 7;
  int  cyc [NA], chk [NA], fl [NA], np [NA];
  bit  dn [NA];
  int checks = 0, failures = 0;
  string names [NA] = '{"fixed", "counter 1 (busiest)", "counter 2 (longest wait)",
                        "counter 3 (fewest)", "coin passing", "custom fixed", "custom each port"};

  router_bench #(.ARB(ARB_FIXED), .NGROUP(NG), .GSIZE(GS), .LOCAL_PCT(LP)) u0 (.clk, .rst_n, .cycles(cyc[0]), .done(dn[0]), .checks(chk[0]), .failures(fl[0]), .packets(np[0]));
  router_bench #(.ARB(ARB_BUSY),  .NGROUP(NG), .GSIZE(GS), .LOCAL_PCT(LP)) u1 (.clk, .rst_n, .cycles(cyc[1]), .done(dn[1]), .checks(chk[1]), .failures(fl[1]), .packets(np[1]));
  router_bench #(.ARB(ARB_WAIT),  .NGROUP(NG), .GSIZE(GS), .LOCAL_PCT(LP)) u2 (.clk, .rst_n, .cycles(cyc[2]), .done(dn[2]), .checks(chk[2]), .failures(fl[2]), .packets(np[2]));
  router_bench #(.ARB(ARB_LEAST), .NGROUP(NG), .GSIZE(GS), .LOCAL_PCT(LP)) u3 (.clk, .rst_n, .cycles(cyc[3]), .done(dn[3]), .checks(chk[3]), .failures(fl[3]), .packets(np[3]));
  router_bench #(.ARB(ARB_COIN),  .NGROUP(NG), .GSIZE(GS), .LOCAL_PCT(LP)) u4 (.clk, .rst_n, .cycles(cyc[4]), .done(dn[4]), .checks(chk[4]), .failures(fl[4]), .packets(np[4]));
  router_bench #(.ARB(ARB_FIXED), .PRIO(PR_CUS),  .NGROUP(NG), .GSIZE(GS), .LOCAL_PCT(LP)) u5 (.clk, .rst_n, .cycles(cyc[5]), .done(dn[5]), .checks(chk[5]), .failures(fl[5]), .packets(np[5]));
  router_bench #(.ARB(ARB_FIXED), .PRIO(PR_EACH), .NGROUP(NG), .GSIZE(GS), .LOCAL_PCT(LP)) u6 (.clk, .rst_n, .cycles(cyc[6]), .done(dn[6]), .checks(chk[6]), .failures(fl[6]), .packets(np[6]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5] && dn[6]);
    repeat (5) @(negedge clk);
    for (int a = 0; a < NA; a++) begin
      $display("%-26s %0d packets, %0d cycles", names[a], np[a], cyc[a]);
      checks += chk[a];
      failures += fl[a];
      checks++;
      if (np[a] != 111 || chk[a] < 111) begin failures++; $display("FAIL: packet count"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
