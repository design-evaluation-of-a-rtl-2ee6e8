// tb_noc_router: a five-port router (one local port) at coordinate
// {y=1, x=1}, surrounded by testbench neighbours on all five ports.
//
// First a single north-to-south packet measures the latency from the
// sending_in pulse to the sending_out pulse (2*PKT_LEN + 4 cycles). Then
// every port injects random packets (row-consistent for east/west inputs, as
// row-first routing guarantees in a mesh) while the receivers randomly hold
// empty_in low. Every delivered packet is matched against the packets that
// the reference routing sends to that port; all must arrive, none twice.
// Contention at an output, a blocked next hop and a NEP drop must each occur.
module tb_noc_router;
  import noc_pkg::*;
  localparam int W = 8;
  localparam coord_t ME = 6'b001_001;
  localparam int NPKT = 40;         // packets per input port

  logic clk = 0, rst_n = 0;
  logic [NSLOT-1:0] sending_in = '0, empty_out, sending_out, empty_in = '0;
  logic [W-1:0] data_in [NSLOT], data_out [NSLOT];
  logic nep;
  int checks = 0, failures = 0;
  int contention = 0, blocked = 0, nep_cycles = 0, delivered = 0, dropped = 0;

  noc_router #(.FLIT_W(W), .NUM_LOCAL(1), .COORD(ME)) dut (.*);

  always #5 clk = ~clk;

  typedef logic [W-1:0] pkt_t [PKT_LEN];
  pkt_t expq [NSLOT][$];
  bit   random_backpressure = 0;

  function automatic int ref_route(logic [7:0] h);
    if (h[7:5] > ME[5:3]) return SLOT_N;
    if (h[7:5] < ME[5:3]) return SLOT_S;
    if (h[4:2] > ME[2:0]) return SLOT_E;
    if (h[4:2] < ME[2:0]) return SLOT_W;
    if (h[1:0] != 0) return -1;
    return SLOT_L0;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, read from the router's internals.
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NSLOT; s += 1)
      if (slot_exists(s, 1)) begin
        if ($countones(dut.req_out[s]) > 1) contention++;
      end
    if (nep) nep_cycles++;
  end

  // Receivers: capture a packet after each sending_out pulse.
  for (genvar s = 0; s < NSLOT; s++) begin : g_rx
    if (slot_exists(s, 1)) begin : g_on
      always @(posedge clk) begin
        if (rst_n && sending_out[s]) begin
          pkt_t p;
          int hit;
          for (int i = 0; i < PKT_LEN; i++) begin
            @(posedge clk);
            p[i] = data_out[s];
          end
          hit = -1;
          foreach (expq[s][k]) if (hit < 0 && expq[s][k] == p) hit = k;
          checks++;
          if (hit < 0) begin
            failures++;
            $display("FAIL: unexpected packet at slot %0d header %b", s, p[0]);
          end else begin
            expq[s].delete(hit);
            delivered++;
          end
        end
      end
      // a stored packet waiting for this neighbour to become empty
      always @(posedge clk)
        if (rst_n && dut.g_port[s].g_on.u_out.u_ctrl.state == 3'd2) blocked++;
      always @(negedge clk) begin
        if (!random_backpressure) empty_in[s] = 1'b1;
        else if ($urandom % 8 == 0) empty_in[s] = ~empty_in[s];
      end
    end
  end

  task automatic send(int s, pkt_t p);
    while (!empty_out[s]) @(negedge clk);
    sending_in[s] = 1;
    @(negedge clk);
    sending_in[s] = 0;
    for (int i = 0; i < PKT_LEN; i++) begin
      data_in[s] = p[i];
      @(negedge clk);
    end
    data_in[s] = '0;
  endtask

  function automatic pkt_t make_pkt(int s, int n);
    pkt_t p;
    logic [7:0] h;
    h = 8'($urandom);
    if (s == SLOT_E || s == SLOT_W) h[7:5] = ME[5:3];     // already in its row
    if (s == SLOT_L0 && $urandom % 10 == 0) begin
      h[7:2] = ME; h[1:0] = 2'd2;                          // missing local port
    end
    p[0] = h;
    p[1] = 8'(s);
    p[2] = 8'(n);
    for (int i = 3; i < PKT_LEN; i++) p[i] = 8'($urandom);
    return p;
  endfunction

  int done_tx = 0;
  for (genvar s = 0; s < NSLOT; s++) begin : g_tx
    if (slot_exists(s, 1)) begin : g_on
      initial begin
        @(posedge rst_n);
        wait (random_backpressure);
        for (int n = 0; n < NPKT; n++) begin
          pkt_t p;
          int r;
          p = make_pkt(s, n);
          r = ref_route(p[0]);
          if (r < 0) dropped++; else expq[r].push_back(p);
          send(s, p);
          repeat ($urandom % 6) @(negedge clk);
        end
        done_tx++;
      end
    end
  end

  initial begin
    pkt_t p;
    int lat;
    for (int s = 0; s < NSLOT; s++) data_in[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // isolated transfer north -> south, latency check
    p = make_pkt(SLOT_N, 999);
    p[0][7:5] = 3'd0;
    expq[SLOT_S].push_back(p);
    fork send(SLOT_N, p); join_none
    @(posedge sending_in[SLOT_N]);
    lat = 0;
    @(posedge clk);
    while (!sending_out[SLOT_S] && lat < 100) begin @(posedge clk); lat++; end
    check(lat == 2 * PKT_LEN + 4, $sformatf("hop latency %0d cycles", lat));
    repeat (20) @(negedge clk);
    check(delivered == 1, "isolated packet delivered");
    // random traffic on all ports
    random_backpressure = 1;
    wait (done_tx == 5);
    random_backpressure = 0;
    repeat (400) @(negedge clk);
    for (int s = 0; s < NSLOT; s++)
      check(expq[s].size() == 0, $sformatf("all packets for slot %0d delivered", s));
    check(contention > 0, "output contention occurred");
    check(blocked > 0, "blocked next hop occurred");
    check(dropped > 0 && nep_cycles >= dropped, "NEP drop occurred");
    check(delivered + dropped == 5 * NPKT + 1, "packet count");
    $display("delivered=%0d dropped=%0d contention=%0d blocked=%0d", delivered, dropped, contention, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
