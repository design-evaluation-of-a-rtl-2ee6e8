// app_4ip: the four-IP-core application run on one network configuration.
// Testbench use only.
//
// IP 1 is the processing node and sends 160 packets, alternating between
// IP 2 and IP 3. IPs 2 and 3 answer every 20 packets they receive with 5
// packets to IP 4. Once IP 4 has its 40 packets it sends one final packet to
// IP 1, which ends the run: 201 packets in all. 'cycles' counts clock cycles
// from the first injection to the arrival of the final packet.
//
// The network is noc_mesh at MX x MY with NL local ports per router. PORT[k]
// is the flattened local-port index IP k+1 receives on and sends from;
// IP 1 sends from IP1_TX; when that differs from PORT[0], IP 1 is attached
// to two ports (the extended layout) and uses both at once.
// Every received packet is checked: the right destination, the right
// sender, in order per sender, with its payload intact.
module app_4ip #(
  parameter int MX = 1,
  parameter int MY = 1,
  parameter int NL = 4,
  parameter int PORT [4] = '{0, 2, 3, 1},
  parameter int IP1_TX = 0
) (
  input logic clk,
  input logic rst_n,
  output int  cycles,
  output bit  done,
  output int  checks,
  output int  failures
);
  import noc_pkg::*;
  localparam int NLP = MX * MY * NL;
  typedef logic [PKT_LEN-1:0][7:0] pkt_t;

  logic [NLP-1:0] s_in, e_out, s_out, e_in;
  logic [7:0]     d_in [NLP], d_out [NLP];
  logic           nep;

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY), .NUM_LOCAL(NL)) u_net (
    .clk, .rst_n,
    .lp_sending_in(s_in), .lp_empty_out(e_out), .lp_data_in(d_in),
    .lp_sending_out(s_out), .lp_empty_in(e_in), .lp_data_out(d_out), .nep);

  for (genvar k = 0; k < NLP; k++) begin : g_ag
    link_agent #(.W(8)) u_ag (
      .clk, .rst_n,
      .tx_sending(s_in[k]), .tx_data(d_in[k]), .tx_empty(e_out[k]),
      .rx_sending(s_out[k]), .rx_data(d_out[k]), .rx_ready(e_in[k]));
  end

  function automatic logic [7:0] hdr_of(int lp);
    int r, l;
    r = lp / NL;
    l = lp % NL;
    return {3'(r / MX), 3'(r % MX), 2'(l)};
  endfunction

  function automatic pkt_t make(int src, int dst, int seq);
    pkt_t p;
    p[0] = hdr_of(PORT[dst]);
    p[1] = 8'(src);
    p[2] = 8'(seq);
    for (int i = 3; i < PKT_LEN; i++) p[i] = 8'(seq * 7 + i + src);
    return p;
  endfunction

  int next_seq [4][4];    // [src][dst] sequence numbers expected
  int rx_count [4];

  // Send packet p from IP src through flattened port lp.
  task automatic tx(int lp, pkt_t p);
    case (lp)
      0: g_ag[0].u_ag.send(p);
      1: if (NLP > 1) g_ag[1 % NLP].u_ag.send(p);
      2: if (NLP > 2) g_ag[2 % NLP].u_ag.send(p);
      3: if (NLP > 3) g_ag[3 % NLP].u_ag.send(p);
      4: if (NLP > 4) g_ag[4 % NLP].u_ag.send(p);
      5: if (NLP > 5) g_ag[5 % NLP].u_ag.send(p);
      6: if (NLP > 6) g_ag[6 % NLP].u_ag.send(p);
      7: if (NLP > 7) g_ag[7 % NLP].u_ag.send(p);
      default: ;
    endcase
  endtask

  // Pop and check one packet arrived at IP dst on port lp; returns its source.
  function automatic int check_pkt(int dst, pkt_t p);
    int src;
    src = int'(p[1]);
    checks++;
    if (p[0] != hdr_of(PORT[dst]) || src > 3 || p != make(src, dst, next_seq[src][dst])) begin
      failures++;
      $display("FAIL: IP %0d got bad packet %h", dst + 1, p);
      return -1;
    end
    next_seq[src][dst]++;
    rx_count[dst]++;
    return src;
  endfunction

  // Receive side of every IP: watch the agent of its port.
  for (genvar k = 0; k < NLP; k++) begin : g_rx
    always @(posedge clk) begin
      while (g_ag[k].u_ag.rxq.size() > 0) begin
        pkt_t p;
        int dst;
        p = g_ag[k].u_ag.rxq.pop_front();
        dst = -1;
        for (int d = 0; d < 4; d++) if (PORT[d] == k) dst = d;
        if (dst < 0) begin
          checks++; failures++;
          $display("FAIL: packet on a port without an IP core");
        end else void'(check_pkt(dst, p));
      end
    end
  end

  initial begin
    cycles = 0; done = 0; checks = 0; failures = 0;
    foreach (next_seq[a, b]) next_seq[a][b] = 0;
    foreach (rx_count[a]) rx_count[a] = 0;
  end

  always @(posedge clk) if (rst_n && !done) cycles++;

  // IP 1: 160 packets, alternating IP 2 / IP 3. With two ports of its own
  // it feeds IP 2 from IP1_TX and IP 3 from PORT[0] at the same time.
  initial begin
    @(posedge rst_n);
    if (IP1_TX == PORT[0]) begin
      for (int n = 0; n < 160; n++) tx(IP1_TX, make(0, 1 + n % 2, n / 2));
    end else begin
      fork
        for (int n = 0; n < 80; n++) tx(IP1_TX, make(0, 1, n));
        for (int n = 0; n < 80; n++) tx(PORT[0], make(0, 2, n));
      join
    end
  end

  // IP 2 and IP 3: 5 answers to IP 4 per 20 packets received.
  for (genvar ip = 1; ip <= 2; ip++) begin : g_mid
    initial begin
      int answered;
      answered = 0;
      @(posedge rst_n);
      for (int stage = 0; stage < 4; stage++) begin
        wait (rx_count[ip] >= 20 * (stage + 1));
        for (int j = 0; j < 5; j++) begin
          tx(PORT[ip], make(ip, 3, answered));
          answered++;
        end
      end
    end
  end

  // IP 4: after 40 packets, one final packet to IP 1; IP 1 ends the run.
  initial begin
    @(posedge rst_n);
    wait (rx_count[3] == 40);
    tx(PORT[3], make(3, 0, 0));
    wait (rx_count[0] == 1);
    done = 1;
    checks++;
    if (rx_count[1] != 80 || rx_count[2] != 80) begin
      failures++;
      $display("FAIL: IP 2/3 received %0d/%0d packets", rx_count[1], rx_count[2]);
    end
    checks++;
    if (nep) failures++;
  end

endmodule
