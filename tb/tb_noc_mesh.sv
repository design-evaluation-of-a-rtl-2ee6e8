// tb_noc_mesh: the network at its default size (2x2 mesh, one local port per
// router, 8-bit flits, fixed arbitration), with an IP-core model on every
// local port.
//
// First one packet crosses from router (0,0) to router (1,1): two router
// hops in the mesh plus delivery, 3 * (2*PKT_LEN + 4) = 60 cycles from the
// injection pulse to the delivery pulse. Then all four IP cores send random
// packets to random routers while randomly holding their empty_in low.
// Every delivered packet is matched against the packets addressed to that
// IP core; all must arrive, in order per source, none twice. Counted
// mechanisms, each of which must occur: contention for an output port,
// packets waiting in an output buffer for the next hop, IP back-pressure,
// packets that cross a mesh link, packets crossing two links, and NEP drops
// of packets sent to a local port that does not exist.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int NLP = 4;           // 2x2 routers x 1 local port
  localparam int NPKT = 60;         // packets per IP core

  logic clk = 0, rst_n = 0;
  logic [NLP-1:0] lp_sending_in = '0, lp_empty_out, lp_sending_out, lp_empty_in = '0;
  logic [7:0] lp_data_in [NLP], lp_data_out [NLP];
  logic nep;
  int checks = 0, failures = 0;
  int contention = 0, waiting = 0, backpressure = 0, link_pkts = 0;
  int two_hop = 0, nep_drops = 0, delivered = 0;
  bit traffic = 0;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  typedef logic [7:0] pkt_t [PKT_LEN];
  pkt_t expq [NLP][$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters per router.
  for (genvar r = 0; r < 4; r++) begin : g_mon
    for (genvar s = 0; s < 8; s += 2) begin : g_s
      always @(posedge clk) if (rst_n) begin
        if ($countones(dut.g_r[r].u_router.req_out[s]) > 1) contention++;
        if (dut.g_r[r].u_router.g_port[s].g_on.u_out.u_ctrl.state == 3'd2) waiting++;
        if (dut.g_r[r].u_router.sending_out[s]) link_pkts++;
      end
    end
    always @(posedge clk) if (rst_n) begin
      if ($countones(dut.g_r[r].u_router.req_out[1]) > 1) contention++;
      if (dut.g_r[r].u_router.g_port[1].g_on.u_out.u_ctrl.state == 3'd2) waiting++;
    end
  end

  // IP cores: receive side.
  for (genvar d = 0; d < NLP; d++) begin : g_rx
    always @(posedge clk) begin
      if (rst_n && lp_sending_out[d]) begin
        pkt_t p;
        int hit;
        for (int i = 0; i < PKT_LEN; i++) begin
          @(posedge clk);
          p[i] = lp_data_out[d];
        end
        // first pending packet from the same source must be this one
        hit = -1;
        foreach (expq[d][k]) if (hit < 0 && expq[d][k][1] == p[1]) hit = k;
        checks++;
        if (hit < 0 || expq[d][hit] != p) begin
          failures++;
          $display("FAIL: IP %0d got unexpected packet src=%0d no=%0d", d, p[1], p[2]);
        end else begin
          if (p[3] == 8'd2) two_hop++;
          expq[d].delete(hit);
          delivered++;
        end
      end
    end
    always @(negedge clk) begin
      if (!traffic) lp_empty_in[d] = 1'b1;
      else if ($urandom % 6 == 0) begin
        lp_empty_in[d] = ~lp_empty_in[d];
        if (!lp_empty_in[d]) backpressure++;
      end
    end
  end

  task automatic send(int s, pkt_t p);
    while (!lp_empty_out[s]) @(negedge clk);
    lp_sending_in[s] = 1;
    @(negedge clk);
    lp_sending_in[s] = 0;
    for (int i = 0; i < PKT_LEN; i++) begin
      lp_data_in[s] = p[i];
      @(negedge clk);
    end
    lp_data_in[s] = '0;
  endtask

  // Packet from IP s (router s) to router d, local port l.
  function automatic pkt_t make_pkt(int s, int d, int l, int n);
    pkt_t p;
    int hops;
    p[0] = {3'(d / 2), 3'(d % 2), 2'(l)};
    p[1] = 8'(s);
    p[2] = 8'(n);
    hops = ((s % 2) != (d % 2) ? 1 : 0) + ((s / 2) != (d / 2) ? 1 : 0);
    p[3] = 8'(hops);
    for (int i = 4; i < PKT_LEN; i++) p[i] = 8'($urandom);
    return p;
  endfunction

  int done_tx = 0;
  for (genvar s = 0; s < NLP; s++) begin : g_tx
    initial begin
      @(posedge rst_n);
      wait (traffic);
      for (int n = 0; n < NPKT; n++) begin
        pkt_t p;
        int d, l;
        d = $urandom % NLP;
        l = ($urandom % 12 == 0) ? 1 + $urandom % 3 : 0;
        p = make_pkt(s, d, l, n);
        if (l == 0) expq[d].push_back(p); else nep_drops++;
        send(s, p);
        repeat ($urandom % 10) @(negedge clk);
      end
      done_tx++;
    end
  end

  int nep_cycles = 0;
  always @(posedge clk) if (rst_n && nep) nep_cycles++;

  initial begin
    pkt_t p;
    int lat;
    for (int s = 0; s < NLP; s++) lp_data_in[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // isolated transfer (0,0) -> (1,1)
    p = make_pkt(0, 3, 0, 999);
    expq[3].push_back(p);
    fork send(0, p); join_none
    @(posedge lp_sending_in[0]);
    lat = 0;
    @(posedge clk);
    while (!lp_sending_out[3] && lat < 200) begin @(posedge clk); lat++; end
    check(lat == 3 * (2 * PKT_LEN + 4), $sformatf("two-hop latency %0d cycles", lat));
    repeat (20) @(negedge clk);
    check(delivered == 1, "isolated packet delivered");
    two_hop = 0;
    traffic = 1;
    wait (done_tx == NLP);
    traffic = 0;
    repeat (600) @(negedge clk);
    for (int d = 0; d < NLP; d++)
      check(expq[d].size() == 0, $sformatf("all packets for IP %0d delivered", d));
    check(delivered + nep_drops == NLP * NPKT + 1, "packet count");
    check(contention > 0,   "output contention occurred");
    check(waiting > 0,      "output buffer waited for next hop");
    check(backpressure > 0, "IP back-pressure occurred");
    check(link_pkts > 0,    "packets crossed mesh links");
    check(two_hop > 0,      "two-hop packets delivered");
    check(nep_drops > 0 && nep_cycles >= nep_drops * PKT_LEN, "NEP drops occurred");
    $display("delivered=%0d nep_drops=%0d contention=%0d waiting=%0d backpressure=%0d link_pkts=%0d two_hop=%0d",
             delivered, nep_drops, contention, waiting, backpressure, link_pkts, two_hop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
