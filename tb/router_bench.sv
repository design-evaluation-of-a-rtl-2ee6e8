// router_bench: a stand-alone five-port router (one local port, coordinate
// {y=1, x=1}) with a link agent on every port, driven by a group traffic
// script. Testbench use only.
//
// The script sends NGROUP groups; group g has GSIZE[g] packets, spread over
// the five ports in turn and injected concurrently. A packet from a mesh
// port goes to the local port with probability LOCAL_PCT percent, so that
// the local output has to arbitrate; otherwise it goes to a port picked
// from the hash, which may be the local port too (east/west inputs stay in
// their row, as in a mesh, and a pick of the source's own port is moved). The next group starts once the current one has been
// delivered. Destinations come from a fixed hash of (group, index), so
// every instance sees the same traffic. 'cycles' counts from the first
// injection to the last delivery; every packet is checked on arrival.
module router_bench #(
  parameter int             FLIT_W    = 8,
  parameter noc_pkg::arb_e  ARB       = noc_pkg::ARB_FIXED,
  parameter noc_pkg::prio_t PRIO [noc_pkg::NSLOT] = '{default: noc_pkg::PRIO_CLOCKWISE},
  parameter int             NGROUP    = 21,
  parameter int             GSIZE [NGROUP] = '{default: 1},
  parameter int             LOCAL_PCT = 70
) (
  input logic clk,
  input logic rst_n,
  output int  cycles,
  output bit  done,
  output int  checks,
  output int  failures,
  output int  packets
);
  import noc_pkg::*;
  localparam coord_t ME = 6'b001_001;
  localparam int NP = 5;
  localparam int SL [NP] = '{0, 1, 2, 4, 6};   // N, L0, E, S, W
  typedef logic [PKT_LEN-1:0][FLIT_W-1:0] pkt_t;

  logic [NSLOT-1:0]  s_in, e_out, s_out, e_in;
  logic [FLIT_W-1:0] d_in [NSLOT], d_out [NSLOT];
  logic              nep;

  noc_router #(.FLIT_W(FLIT_W), .NUM_LOCAL(1), .COORD(ME), .ARB(ARB), .PRIO(PRIO)) u_r (
    .clk, .rst_n, .sending_in(s_in), .empty_out(e_out), .data_in(d_in),
    .sending_out(s_out), .empty_in(e_in), .data_out(d_out), .nep);

  for (genvar s = 0; s < NSLOT; s++) begin : g_ag
    if (slot_exists(s, 1)) begin : g_on
      link_agent #(.W(FLIT_W)) u_ag (
        .clk, .rst_n,
        .tx_sending(s_in[s]), .tx_data(d_in[s]), .tx_empty(e_out[s]),
        .rx_sending(s_out[s]), .rx_data(d_out[s]), .rx_ready(e_in[s]));
    end else begin : g_off
      assign s_in[s] = 1'b0;
      assign d_in[s] = '0;
      assign e_in[s] = 1'b0;
    end
  end

  // header that sends a packet out of slot d of this router
  function automatic logic [7:0] hdr_to(int d);
    case (d)
      0: return {3'd2, 3'd1, 2'd0};
      4: return {3'd0, 3'd1, 2'd0};
      2: return {3'd1, 3'd2, 2'd0};
      6: return {3'd1, 3'd0, 2'd0};
      default: return {3'd1, 3'd1, 2'd0};
    endcase
  endfunction

  function automatic int hash(int g, int i);
    return ((g * 131 + i * 71 + 17) * 2654435) % 1000003;
  endfunction

  function automatic int dest_of(int src_slot, int g, int i);
    int h, d;
    h = hash(g, i);
    if (h % 100 < LOCAL_PCT && src_slot != 1) return 1;
    d = SL[(h / 100) % NP];
    if ((src_slot == 2 || src_slot == 6) && (d == 0 || d == 4)) d = 1;
    if (d == src_slot) d = (src_slot == 1) ? 2 : 1;
    return d;
  endfunction

  function automatic pkt_t make(int src, int dst, int g, int i);
    pkt_t p;
    p[0] = FLIT_W'(hdr_to(dst));
    for (int k = 1; k < PKT_LEN; k++) p[k] = FLIT_W'((g * 64 + i) * 8 + k + src * 4096);
    if (FLIT_W > 16) p[1][FLIT_W-1 -: 8] = 8'(g ^ i);
    return p;
  endfunction

  pkt_t expq [NSLOT][$];
  int   outstanding = 0;

  task automatic tx(int s, pkt_t p);
    case (s)
      0: g_ag[0].g_on.u_ag.send(p);
      1: g_ag[1].g_on.u_ag.send(p);
      2: g_ag[2].g_on.u_ag.send(p);
      4: g_ag[4].g_on.u_ag.send(p);
      6: g_ag[6].g_on.u_ag.send(p);
      default: ;
    endcase
  endtask

  for (genvar s = 0; s < NSLOT; s++) begin : g_chk
    if (slot_exists(s, 1)) begin : g_on
      always @(posedge clk) begin
        while (g_ag[s].g_on.u_ag.rxq.size() > 0) begin
          pkt_t p;
          int hit;
          p = g_ag[s].g_on.u_ag.rxq.pop_front();
          hit = -1;
          foreach (expq[s][k]) if (hit < 0 && expq[s][k] == p) hit = k;
          checks++;
          if (hit < 0) begin
            failures++;
            $display("FAIL: unexpected packet at slot %0d", s);
          end else begin
            expq[s].delete(hit);
            outstanding--;
          end
        end
      end
    end
  end

  initial begin
    cycles = 0; done = 0; checks = 0; failures = 0; packets = 0;
  end

  always @(posedge clk) if (rst_n && !done) cycles++;

  initial begin
    @(posedge rst_n);
    for (int g = 0; g < NGROUP; g++) begin
      // per source port, its share of the group
      for (int i = 0; i < GSIZE[g]; i++) begin
        int src, dst;
        src = SL[(g + i) % NP];
        dst = dest_of(src, g, i);
        expq[dst].push_back(make(src, dst, g, i));
        outstanding++;
        packets++;
      end
      fork
        for (int j = 0; j < NP; j++) begin
          automatic int jj = j;
          fork
            for (int i = 0; i < GSIZE[g]; i++)
              if ((g + i) % NP == jj) tx(SL[jj], make(SL[jj], dest_of(SL[jj], g, i), g, i));
          join_none
        end
      join_none
      wait fork;
      wait (outstanding == 0);
    end
    done = 1;
    checks++;
    if (nep) failures++;
  end

endmodule
