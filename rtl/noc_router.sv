// noc_router: store-and-forward mesh router with 4 mesh ports (north, east,
// south, west) and NUM_LOCAL (0 to 4) local ports for IP cores.
//
// Every port has an input channel (packet buffer + routing controller) and an
// output channel (packet buffer + arbitrating controller). Control is fully
// decentralised: each input routes its own packet and requests one output,
// each output arbitrates its own requests, so up to one transfer per output
// runs through the partial crossbar at the same time. A packet is always
// stored completely before it moves, first in the input buffer, then in the
// output buffer of the chosen port, then in the next router.
//
// Ports are indexed by slot (noc_pkg): 0 north, 1 local 0, 2 east, 3 local 1,
// 4 south, 5 local 2, 6 west, 7 local 3. Slots of local ports that are not
// built have no logic; their outputs are 0 and their inputs are ignored.
// Per slot the link is
//   sending_in/data_in/empty_out  input side: a one-cycle sending_in pulse,
//                                 then 8 flits on the next 8 cycles; accepted
//                                 only while empty_out is high.
//   sending_out/data_out/empty_in output side, the same protocol towards the
//                                 neighbour's input (empty_in is its
//                                 empty_out).
// nep is high while any input drops a packet addressed to a local port this
// router does not have.
//
// COORD is the router's {y, x} position. ARB picks the arbitration unit of
// every output, PRIO[o] the priority order of output o for the static
// schemes (all north-first clockwise by default).
//
// Timing with no contention: from the sending_in pulse at an input to the
// sending_out pulse at the chosen output takes 2*PKT_LEN + 4 = 20 cycles.
//
// The port structure, YX routing, partial switch, handshakes and NEP are the
// document's; the slot numbering and timing are this design's choices.
module noc_router #(
  parameter int              FLIT_W    = 8,
  parameter int              NUM_LOCAL = 1,
  parameter noc_pkg::coord_t COORD     = 6'b000000,
  parameter noc_pkg::arb_e   ARB       = noc_pkg::ARB_FIXED,
  parameter noc_pkg::prio_t  PRIO [noc_pkg::NSLOT] = '{default: noc_pkg::PRIO_CLOCKWISE}
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [noc_pkg::NSLOT-1:0] sending_in,
  output logic [noc_pkg::NSLOT-1:0] empty_out,
  input  logic [FLIT_W-1:0]         data_in  [noc_pkg::NSLOT],
  output logic [noc_pkg::NSLOT-1:0] sending_out,
  input  logic [noc_pkg::NSLOT-1:0] empty_in,
  output logic [FLIT_W-1:0]         data_out [noc_pkg::NSLOT],
  output logic                      nep
);
  import noc_pkg::*;

  // req_in[i][o]: input i requests output o; gnt_out[o][i]: output o grants i.
  logic [NSLOT-1:0]  req_in   [NSLOT];
  logic [NSLOT-1:0]  gnt_out  [NSLOT];
  logic [NSLOT-1:0]  req_out  [NSLOT];
  logic [NSLOT-1:0]  gnt_in   [NSLOT];
  logic [FLIT_W-1:0] sw_in    [NSLOT];
  logic [FLIT_W-1:0] sw_out   [NSLOT];
  logic [NSLOT-1:0]  nep_v;

  function automatic logic [NSLOT-1:0] src_mask(int o);
    logic [NSLOT-1:0] m;
    for (int i = 0; i < NSLOT; i++) m[i] = slot_exists(i, NUM_LOCAL) && path_exists(i, o);
    return m;
  endfunction

  // Transpose the request and grant matrices.
  always_comb begin
    for (int o = 0; o < NSLOT; o++)
      for (int i = 0; i < NSLOT; i++) begin
        req_out[o][i] = req_in[i][o];
        gnt_in[i][o]  = gnt_out[o][i];
      end
  end

  for (genvar s = 0; s < NSLOT; s++) begin : g_port
    if (slot_exists(s, NUM_LOCAL)) begin : g_on
      input_channel #(.FLIT_W(FLIT_W), .NUM_LOCAL(NUM_LOCAL), .COORD(COORD)) u_in (
        .clk, .rst_n,
        .sending_in(sending_in[s]), .empty_out(empty_out[s]), .data_in(data_in[s]),
        .sw_data(sw_in[s]), .req(req_in[s]), .grant(gnt_in[s]), .nep(nep_v[s]));

      output_channel #(.FLIT_W(FLIT_W), .ARB(ARB), .PRIO(PRIO[s]),
                       .SRC_MASK(src_mask(s))) u_out (
        .clk, .rst_n,
        .req(req_out[s]), .grant(gnt_out[s]), .sw_data(sw_out[s]),
        .empty_in(empty_in[s]), .sending_out(sending_out[s]), .data_out(data_out[s]));
    end else begin : g_off
      assign empty_out[s]   = 1'b0;
      assign sw_in[s]       = '0;
      assign req_in[s]      = '0;
      assign nep_v[s]       = 1'b0;
      assign gnt_out[s]     = '0;
      assign sending_out[s] = 1'b0;
      assign data_out[s]    = '0;
    end
  end

  crossbar_switch #(.FLIT_W(FLIT_W), .NUM_LOCAL(NUM_LOCAL)) u_switch (
    .in_data(sw_in), .sel(gnt_out), .out_data(sw_out));

  assign nep = |nep_v;

  // Row-first routing: nothing entering east or west may ask for north or south.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(req_in[SLOT_E][SLOT_N] || req_in[SLOT_E][SLOT_S] ||
                req_in[SLOT_W][SLOT_N] || req_in[SLOT_W][SLOT_S]))
        else $error("noc_router: east/west input requested north/south");
    end
  end

endmodule
