// noc_mesh: a MESH_X by MESH_Y mesh network built from noc_router.
//
// Router (x, y) sits in column x (0 = west) and row y (0 = south) and gets
// the coordinate {y[2:0], x[2:0]}, numbered from the lower-left corner. Each
// output port drives the facing input port of the neighbour: sending_out to
// sending_in, data_out to data_in, and the neighbour's empty_out comes back
// as empty_in. Mesh ports on the border are tied off: nothing ever arrives
// there and nothing is sent there (empty_in held low). Routing resolves the
// row first, so a packet never tries to leave the mesh.
//
// The local ports of all routers are the network's external interface, where
// IP cores attach. They are flattened: local port l of router (x, y) is index
// (y*MESH_X + x)*NUM_LOCAL + l. A packet for router (x, y), local port l,
// carries the header {y, x, l} in the low 8 bits of its first flit.
// nep is the OR of all routers' non-existent-port flags.
//
// As in the document, each router may have its own number of local ports,
// 0 to 4: NL_ROUTER[r] for router r = y*MESH_X + x, at most NUM_LOCAL. The
// flattened arrays keep NUM_LOCAL entries per router; an entry whose port
// the router lacks reads as never empty, never sending, data 0, and its
// inputs are ignored. A packet addressed to such a port is dropped by the
// router it reaches, with nep raised.
//
// Defaults are the 2x2 mesh with one local port per router, 8-bit flits and
// fixed-priority arbitration, the largest configuration evaluated. The
// document limits meshes to 8x8 (3-bit coordinates); so does this module.
module noc_mesh #(
  parameter int            MESH_X    = 2,
  parameter int            MESH_Y    = 2,
  parameter int            NUM_LOCAL = 1,
  parameter int            FLIT_W    = 8,
  parameter noc_pkg::arb_e ARB       = noc_pkg::ARB_FIXED,
  parameter int            NL_ROUTER [MESH_X*MESH_Y] = '{default: NUM_LOCAL},
  localparam int           NLP       = MESH_X * MESH_Y * ((NUM_LOCAL > 0) ? NUM_LOCAL : 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NLP-1:0]    lp_sending_in,
  output logic [NLP-1:0]    lp_empty_out,
  input  logic [FLIT_W-1:0] lp_data_in  [NLP],
  output logic [NLP-1:0]    lp_sending_out,
  input  logic [NLP-1:0]    lp_empty_in,
  output logic [FLIT_W-1:0] lp_data_out [NLP],
  output logic              nep
);
  import noc_pkg::*;

  localparam int NR = MESH_X * MESH_Y;

  // Per-router slot bundles.
  logic [NSLOT-1:0]  s_in  [NR];
  logic [NSLOT-1:0]  e_out [NR];
  logic [FLIT_W-1:0] d_in  [NR][NSLOT];
  logic [NSLOT-1:0]  s_out [NR];
  logic [NSLOT-1:0]  e_in  [NR];
  logic [FLIT_W-1:0] d_out [NR][NSLOT];
  logic [NR-1:0]     nep_r;

  // Neighbour in direction 'slot' of router r, or -1 at the border.
  function automatic int nbr(int r, int slot);
    int x, y;
    x = r % MESH_X;
    y = r / MESH_X;
    case (slot)
      int'(SLOT_N): return (y + 1 < MESH_Y) ? r + MESH_X : -1;
      int'(SLOT_S): return (y > 0)          ? r - MESH_X : -1;
      int'(SLOT_E): return (x + 1 < MESH_X) ? r + 1      : -1;
      int'(SLOT_W): return (x > 0)          ? r - 1      : -1;
      default:      return -1;
    endcase
  endfunction

  // The facing port: north <-> south, east <-> west.
  function automatic int opp(int slot);
    return (slot + 4) % 8;
  endfunction

  for (genvar r = 0; r < NR; r++) begin : g_r
    // mesh ports
    for (genvar d = 0; d < 8; d += 2) begin : g_dir
      if (nbr(r, d) >= 0) begin : g_link
        assign s_in[r][d] = s_out[nbr(r, d)][opp(d)];
        assign d_in[r][d] = d_out[nbr(r, d)][opp(d)];
        assign e_in[r][d] = e_out[nbr(r, d)][opp(d)];
      end else begin : g_edge
        assign s_in[r][d] = 1'b0;
        assign d_in[r][d] = '0;
        assign e_in[r][d] = 1'b0;
      end
    end
    // local ports
    for (genvar l = 0; l < 4; l++) begin : g_loc
      if (l < NL_ROUTER[r]) begin : g_on
        assign s_in[r][local_slot(l)]  = lp_sending_in[r*NUM_LOCAL + l];
        assign d_in[r][local_slot(l)]  = lp_data_in[r*NUM_LOCAL + l];
        assign e_in[r][local_slot(l)]  = lp_empty_in[r*NUM_LOCAL + l];
        assign lp_empty_out[r*NUM_LOCAL + l]   = e_out[r][local_slot(l)];
        assign lp_sending_out[r*NUM_LOCAL + l] = s_out[r][local_slot(l)];
        assign lp_data_out[r*NUM_LOCAL + l]    = d_out[r][local_slot(l)];
      end else begin : g_off
        assign s_in[r][local_slot(l)] = 1'b0;
        assign d_in[r][local_slot(l)] = '0;
        assign e_in[r][local_slot(l)] = 1'b0;
        if (l < NUM_LOCAL) begin : g_tie
          assign lp_empty_out[r*NUM_LOCAL + l]   = 1'b0;
          assign lp_sending_out[r*NUM_LOCAL + l] = 1'b0;
          assign lp_data_out[r*NUM_LOCAL + l]    = '0;
        end
      end
    end

    noc_router #(
      .FLIT_W(FLIT_W), .NUM_LOCAL(NL_ROUTER[r]), .ARB(ARB),
      .COORD({3'(r / MESH_X), 3'(r % MESH_X)})
    ) u_router (
      .clk, .rst_n,
      .sending_in(s_in[r]), .empty_out(e_out[r]), .data_in(d_in[r]),
      .sending_out(s_out[r]), .empty_in(e_in[r]), .data_out(d_out[r]),
      .nep(nep_r[r]));
  end

  if (NUM_LOCAL == 0) begin : g_nolocal
    assign lp_empty_out   = '0;
    assign lp_sending_out = '0;
    for (genvar k = 0; k < NLP; k++) begin : g_z
      assign lp_data_out[k] = '0;
    end
  end

  assign nep = |nep_r;

  initial begin
    assert (MESH_X >= 1 && MESH_X <= 8 && MESH_Y >= 1 && MESH_Y <= 8)
      else $error("noc_mesh: mesh must be between 1x1 and 8x8");
    assert (NUM_LOCAL >= 0 && NUM_LOCAL <= 4)
      else $error("noc_mesh: 0 to 4 local ports per router");
    for (int r = 0; r < MESH_X * MESH_Y; r++)
      assert (NL_ROUTER[r] >= 0 && NL_ROUTER[r] <= NUM_LOCAL)
        else $error("noc_mesh: router %0d has more local ports than NUM_LOCAL", r);
  end

endmodule
