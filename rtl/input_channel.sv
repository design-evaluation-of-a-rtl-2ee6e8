// input_channel: the input half of a router port, an 8-flit packet buffer
// and its input controller.
//
// A packet arrives from the link (sending_in pulse, then PKT_LEN flits on
// data_in), is stored, routed on its header and requested from one output
// port; once granted it is streamed flit by flit on sw_data into the switch.
// See input_controller for the cycle-level behaviour.
//
// The composition (buffer plus controller, data from the buffer to both the
// switch and the controller) follows the document's port drawing.
module input_channel #(
  parameter int              FLIT_W    = 8,
  parameter int              NUM_LOCAL = 1,
  parameter noc_pkg::coord_t COORD     = 6'b000000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sending_in,
  output logic                      empty_out,
  input  logic [FLIT_W-1:0]         data_in,
  output logic [FLIT_W-1:0]         sw_data,
  output logic [noc_pkg::NSLOT-1:0] req,
  input  logic [noc_pkg::NSLOT-1:0] grant,
  output logic                      nep
);
  import noc_pkg::*;

  logic take_in, spit_out, full, empty;

  packet_buffer #(.FLIT_W(FLIT_W), .DEPTH(PKT_LEN)) u_buf (
    .clk, .rst_n, .take_in, .spit_out, .data_in,
    .data_out(sw_data), .full, .empty);

  input_controller #(.NUM_LOCAL(NUM_LOCAL), .COORD(COORD)) u_ctrl (
    .clk, .rst_n, .sending_in, .empty_out,
    .buf_full(full), .buf_empty(empty), .header(sw_data[HDR_W-1:0]),
    .take_in, .spit_out, .req, .grant, .nep);

endmodule
