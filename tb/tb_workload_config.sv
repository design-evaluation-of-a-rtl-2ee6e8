// tb_workload_config: the configuration experiment. The same four-IP-core
// application (201 packets) runs on six network layouts side by side:
//   single router with four local ports,
//   1x2 mesh with two local ports per router, maps 1 and 2,
//   2x2 mesh with one local port per router, maps 1 and 2,
//   1x2 mesh where IP 1 is attached to both routers ("extended").
// Each run must deliver every packet intact; the cycle count of each is
// printed. The attached IP 1 on both routers must finish faster than the
// plain 1x2 layouts, since its packets to IPs 2 and 3 skip a router.
module tb_workload_config;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 6;
  int  cyc [NCFG], chk [NCFG], fl [NCFG];
  bit  dn [NCFG];
  int checks = 0, failures = 0;

  // IP k+1 on flattened local port PORT[k]; index = router*NL + local.
  app_4ip #(.MX(1), .MY(1), .NL(4), .PORT('{0, 2, 3, 1}), .IP1_TX(0)) u_single (
    .clk, .rst_n, .cycles(cyc[0]), .done(dn[0]), .checks(chk[0]), .failures(fl[0]));
  app_4ip #(.MX(2), .MY(1), .NL(2), .PORT('{0, 2, 3, 1}), .IP1_TX(0)) u_1x2_m1 (
    .clk, .rst_n, .cycles(cyc[1]), .done(dn[1]), .checks(chk[1]), .failures(fl[1]));
  app_4ip #(.MX(2), .MY(1), .NL(2), .PORT('{0, 2, 1, 3}), .IP1_TX(0)) u_1x2_m2 (
    .clk, .rst_n, .cycles(cyc[2]), .done(dn[2]), .checks(chk[2]), .failures(fl[2]));
  app_4ip #(.MX(2), .MY(2), .NL(1), .PORT('{2, 3, 1, 0}), .IP1_TX(2)) u_2x2_m1 (
    .clk, .rst_n, .cycles(cyc[3]), .done(dn[3]), .checks(chk[3]), .failures(fl[3]));
  app_4ip #(.MX(2), .MY(2), .NL(1), .PORT('{2, 3, 0, 1}), .IP1_TX(2)) u_2x2_m2 (
    .clk, .rst_n, .cycles(cyc[4]), .done(dn[4]), .checks(chk[4]), .failures(fl[4]));
  app_4ip #(.MX(2), .MY(1), .NL(4), .PORT('{0, 4, 5, 3}), .IP1_TX(6)) u_1x2_ext (
    .clk, .rst_n, .cycles(cyc[5]), .done(dn[5]), .checks(chk[5]), .failures(fl[5]));

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
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5]);
    repeat (5) @(negedge clk);
    $display("single router   %0d cycles", cyc[0]);
    $display("1x2 mesh map 1  %0d cycles", cyc[1]);
    $display("1x2 mesh map 2  %0d cycles", cyc[2]);
    $display("2x2 mesh map 1  %0d cycles", cyc[3]);
    $display("2x2 mesh map 2  %0d cycles", cyc[4]);
    $display("1x2 extended    %0d cycles", cyc[5]);
    for (int c = 0; c < NCFG; c++) begin
      checks += chk[c];
      failures += fl[c];
    end
    checks++;
    if (!(cyc[5] < cyc[1] && cyc[5] < cyc[2])) begin
      failures++;
      $display("FAIL: extended layout not faster than plain 1x2");
    end
    checks++;
    if (checks < 6 * 201) begin failures++; $display("FAIL: too few packets checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
