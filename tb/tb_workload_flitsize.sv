// tb_workload_flitsize: the flit-size experiment on five-port routers with
// 8, 16, 32 and 64-bit flits, using the group traffic of the arbitration
// test with larger groups.
//   Test 1: the same 544 packets (groups of 16 to 64) at every width, so the
//   data volume grows with the width. The cycle count must not depend on the
//   width, because a packet is always 8 flits.
//   Test 2: the same data volume at every width: 544 packets at 8 bits, half
//   as many at each doubling (272, 136, 68). The cycle count must fall with
//   every doubling.
// Every packet is checked on arrival; cycle counts are printed.
module tb_workload_flitsize;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NG = 13;
  function automatic int gs(int g, int div);
    return (g == 12) ? 64 / div : 16 * (g % 4 + 1) / div;
  endfunction
  localparam int G1 [NG] = '{gs(0,1), gs(1,1), gs(2,1), gs(3,1), gs(4,1), gs(5,1), gs(6,1), gs(7,1), gs(8,1), gs(9,1), gs(10,1), gs(11,1), gs(12,1)};
  localparam int G2 [NG] = '{gs(0,2), gs(1,2), gs(2,2), gs(3,2), gs(4,2), gs(5,2), gs(6,2), gs(7,2), gs(8,2), gs(9,2), gs(10,2), gs(11,2), gs(12,2)};
  localparam int G4 [NG] = '{gs(0,4), gs(1,4), gs(2,4), gs(3,4), gs(4,4), gs(5,4), gs(6,4), gs(7,4), gs(8,4), gs(9,4), gs(10,4), gs(11,4), gs(12,4)};
  localparam int G8 [NG] = '{gs(0,8), gs(1,8), gs(2,8), gs(3,8), gs(4,8), gs(5,8), gs(6,8), gs(7,8), gs(8,8), gs(9,8), gs(10,8), gs(11,8), gs(12,8)};

  localparam int NB = 7;
  int  cyc [NB], chk [NB], fl [NB], np [NB];
  bit  dn [NB];
  int checks = 0, failures = 0;

  // test 1: widths 8, 16, 32, 64 with 544 packets each
  router_bench #(.FLIT_W(8),  .NGROUP(NG), .GSIZE(G1)) t1_8  (.clk, .rst_n, .cycles(cyc[0]), .done(dn[0]), .checks(chk[0]), .failures(fl[0]), .packets(np[0]));
  router_bench #(.FLIT_W(16), .NGROUP(NG), .GSIZE(G1)) t1_16 (.clk, .rst_n, .cycles(cyc[1]), .done(dn[1]), .checks(chk[1]), .failures(fl[1]), .packets(np[1]));
  router_bench #(.FLIT_W(32), .NGROUP(NG), .GSIZE(G1)) t1_32 (.clk, .rst_n, .cycles(cyc[2]), .done(dn[2]), .checks(chk[2]), .failures(fl[2]), .packets(np[2]));
  router_bench #(.FLIT_W(64), .NGROUP(NG), .GSIZE(G1)) t1_64 (.clk, .rst_n, .cycles(cyc[3]), .done(dn[3]), .checks(chk[3]), .failures(fl[3]), .packets(np[3]));
  // test 2: 16, 32, 64 bits with 272, 136, 68 packets (8 bits is t1_8)
  router_bench #(.FLIT_W(16), .NGROUP(NG), .GSIZE(G2)) t2_16 (.clk, .rst_n, .cycles(cyc[4]), .done(dn[4]), .checks(chk[4]), .failures(fl[4]), .packets(np[4]));
  router_bench #(.FLIT_W(32), .NGROUP(NG), .GSIZE(G4)) t2_32 (.clk, .rst_n, .cycles(cyc[5]), .done(dn[5]), .checks(chk[5]), .failures(fl[5]), .packets(np[5]));
  router_bench #(.FLIT_W(64), .NGROUP(NG), .GSIZE(G8)) t2_64 (.clk, .rst_n, .cycles(cyc[6]), .done(dn[6]), .checks(chk[6]), .failures(fl[6]), .packets(np[6]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5] && dn[6]);
    repeat (5) @(negedge clk);
    $display("test 1:  8 bit %0d packets %0d cycles", np[0], cyc[0]);
    $display("test 1: 16 bit %0d packets %0d cycles", np[1], cyc[1]);
    $display("test 1: 32 bit %0d packets %0d cycles", np[2], cyc[2]);
    $display("test 1: 64 bit %0d packets %0d cycles", np[3], cyc[3]);
    $display("test 2: 16 bit %0d packets %0d cycles", np[4], cyc[4]);
    $display("test 2: 32 bit %0d packets %0d cycles", np[5], cyc[5]);
    $display("test 2: 64 bit %0d packets %0d cycles", np[6], cyc[6]);
    for (int b = 0; b < NB; b++) begin
      checks += chk[b];
      failures += fl[b];
    end
    check(np[0] == 544 && np[1] == 544 && np[2] == 544 && np[3] == 544, "test 1 packet counts");
    check(np[4] == 272 && np[5] == 136 && np[6] == 68, "test 2 packet counts");
    check(cyc[0] == cyc[1] && cyc[1] == cyc[2] && cyc[2] == cyc[3], "test 1 latency independent of width");
    check(cyc[4] < cyc[0] && cyc[5] < cyc[4] && cyc[6] < cyc[5], "test 2 latency falls with width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
