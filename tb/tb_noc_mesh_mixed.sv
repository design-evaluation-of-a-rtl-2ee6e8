// tb_noc_mesh_mixed: a 2x2 mesh whose routers have different numbers of
// local ports. NUM_LOCAL = 2 sets the width of the flattened port arrays;
// NL_ROUTER gives router (0,0) two local ports, router (1,0) none, and
// routers (0,1) and (1,1) one each.
//
// Every existing local port sends one packet to every other existing local
// port, and each arrival is checked against the expected packet. Two packets
// go to ports that do not exist (router (1,0) local 0 and router (0,1)
// local 1): they must not arrive anywhere, and nep must rise for each one.
// Entries of the flattened arrays whose port is missing must read as never
// empty and never sending.
module tb_noc_mesh_mixed;
  import noc_pkg::*;
  localparam int NL  = 2;
  localparam int NLP = 4 * NL;
  localparam int NLR [4] = '{2, 0, 1, 1};
  typedef logic [PKT_LEN-1:0][7:0] pkt_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NLP-1:0] s_in, e_out, s_out, e_in;
  logic [7:0]     d_in [NLP], d_out [NLP];
  logic           nep;

  noc_mesh #(.MESH_X(2), .MESH_Y(2), .NUM_LOCAL(NL), .NL_ROUTER(NLR)) dut (
    .clk, .rst_n,
    .lp_sending_in(s_in), .lp_empty_out(e_out), .lp_data_in(d_in),
    .lp_sending_out(s_out), .lp_empty_in(e_in), .lp_data_out(d_out), .nep);

  for (genvar k = 0; k < NLP; k++) begin : g_ag
    link_agent #(.W(8)) u_ag (
      .clk, .rst_n,
      .tx_sending(s_in[k]), .tx_data(d_in[k]), .tx_empty(e_out[k]),
      .rx_sending(s_out[k]), .rx_data(d_out[k]), .rx_ready(e_in[k]));
  end

  int checks = 0, failures = 0;
  int nep_pulses = 0, delivered = 0;
  pkt_t expq [NLP][$];

  function automatic bit exists(int k);
    return (k % NL) < NLR[k / NL];
  endfunction

  // header of flattened port k: router r = y*2 + x, local l
  function automatic logic [7:0] hdr(int k);
    int r, l;
    r = k / NL;
    l = k % NL;
    return {3'(r / 2), 3'(r % 2), 2'(l)};
  endfunction

  function automatic pkt_t make(int src, int dst);
    pkt_t p;
    p[0] = hdr(dst);
    for (int f = 1; f < PKT_LEN; f++) p[f] = 8'(src * 32 + dst * 4 + f);
    return p;
  endfunction

  task automatic tx(int k, pkt_t p);
    case (k)
      0: g_ag[0].u_ag.send(p);
      1: g_ag[1].u_ag.send(p);
      4: g_ag[4].u_ag.send(p);
      6: g_ag[6].u_ag.send(p);
      default: begin failures++; $display("FAIL: send from missing port %0d", k); end
    endcase
  endtask

  // nep is high while a dropped packet drains: count rising edges
  logic nep_q = 0;
  always @(posedge clk) begin
    nep_q <= nep;
    if (rst_n && nep && !nep_q) nep_pulses++;
  end

  // missing ports stay quiet
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NLP; k++) if (!exists(k)) begin
      checks++;
      if (e_out[k] || s_out[k]) begin
        failures++;
        $display("FAIL: missing port %0d is active", k);
      end
    end
  end

  for (genvar k = 0; k < NLP; k++) begin : g_chk
    always @(posedge clk) begin
      while (g_ag[k].u_ag.rxq.size() > 0) begin
        pkt_t p;
        int hit;
        p = g_ag[k].u_ag.rxq.pop_front();
        hit = -1;
        foreach (expq[k][j]) if (hit < 0 && expq[k][j] == p) hit = j;
        checks++;
        if (hit < 0) begin
          failures++;
          $display("FAIL: unexpected packet %h at port %0d", p, k);
        end else begin
          expq[k].delete(hit);
          delivered++;
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expected = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // all pairs of existing ports, each source sending its packets in turn
    for (int s = 0; s < NLP; s++) if (exists(s))
      for (int d = 0; d < NLP; d++) if (exists(d) && d != s) begin
        expq[d].push_back(make(s, d));
        expected++;
      end
    fork
      for (int s = 0; s < NLP; s++) if (exists(s)) begin
        automatic int ss = s;
        fork
          for (int d = 0; d < NLP; d++) if (exists(d) && d != ss) tx(ss, make(ss, d));
        join_none
      end
    join_none
    wait fork;
    repeat (300) @(negedge clk);
    checks++;
    if (delivered != expected) begin
      failures++;
      $display("FAIL: %0d of %0d packets delivered", delivered, expected);
    end
    // packets for missing ports: router (1,0) local 0 and router (0,1) local 1
    tx(0, make(0, 2));
    repeat (200) @(negedge clk);
    tx(1, make(1, 5));
    repeat (200) @(negedge clk);
    checks++;
    if (nep_pulses != 2) begin
      failures++;
      $display("FAIL: %0d nep pulses, expected 2", nep_pulses);
    end
    for (int k = 0; k < NLP; k++) begin
      checks++;
      if (expq[k].size() != 0) begin
        failures++;
        $display("FAIL: %0d packets never reached port %0d", expq[k].size(), k);
      end
    end
    $display("delivered %0d packets, %0d dropped with nep", delivered, nep_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
