// output_channel: the output half of a router port, an 8-flit packet buffer
// and its output controller with the chosen arbitration unit.
//
// Requests from the input channels are arbitrated; the winner's packet comes
// in through the switch on sw_data, is stored, and is then sent to the next
// hop with a one-cycle sending_out pulse followed by PKT_LEN flits on
// data_out once empty_in shows the next hop can take it. See
// output_controller for the cycle-level behaviour.
//
// The composition follows the document's port drawing.
module output_channel #(
  parameter int             FLIT_W   = 8,
  parameter noc_pkg::arb_e  ARB      = noc_pkg::ARB_FIXED,
  parameter noc_pkg::prio_t PRIO     = noc_pkg::PRIO_CLOCKWISE,
  parameter logic [noc_pkg::NSLOT-1:0] SRC_MASK = '1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [noc_pkg::NSLOT-1:0] req,
  output logic [noc_pkg::NSLOT-1:0] grant,
  input  logic [FLIT_W-1:0]         sw_data,
  input  logic                      empty_in,
  output logic                      sending_out,
  output logic [FLIT_W-1:0]         data_out
);
  import noc_pkg::*;

  logic take_in, spit_out, full, empty;

  packet_buffer #(.FLIT_W(FLIT_W), .DEPTH(PKT_LEN)) u_buf (
    .clk, .rst_n, .take_in, .spit_out, .data_in(sw_data),
    .data_out, .full, .empty);

  output_controller #(.ARB(ARB), .PRIO(PRIO), .SRC_MASK(SRC_MASK)) u_ctrl (
    .clk, .rst_n, .req, .grant,
    .buf_full(full), .buf_empty(empty), .take_in, .spit_out,
    .empty_in, .sending_out);

endmodule
