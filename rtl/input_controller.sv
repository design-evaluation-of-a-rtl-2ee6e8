// input_controller: control of one router input port.
//
// It accepts a packet from the link, decides where the packet goes next and
// moves it through the switch to that output port.
//
//   IDLE  buffer empty, empty_out high. A one-cycle sending_in pulse from the
//         upstream output port means the PKT_LEN flits follow on the next
//         PKT_LEN cycles.
//   RECV  take_in every cycle until the buffer reports full. empty_out is low
//         from here until the packet has left the buffer again.
//   When the buffer is full the header (low 8 bits of the first flit) is
//   routed, y first: destination row above this router -> north, below ->
//   south; same row: column to the east -> east, to the west -> west; same
//   router -> local port dest_local. A packet for a local port this router
//   does not have raises nep and is dropped (DROP spits it out into nothing).
//   HOLD  req high towards the chosen output port until its grant arrives.
//   XFER  the request is low again; every cycle the grant is high one flit
//         is spat out into the switch. The output controller keeps the grant
//         for exactly PKT_LEN cycles. When the buffer is empty -> IDLE.
// spit_out is driven combinationally from the grant, so the first flit moves
// in the cycle the grant is first seen.
//
// The routing rule, the request/grant handshake, the sending/empty link
// signals and NEP follow the document. The state machine, the header layout,
// dropping a NEP packet and the exact cycle of each signal are this design's
// choices.
module input_controller #(
  parameter int            NUM_LOCAL = 1,
  parameter noc_pkg::coord_t COORD   = 6'b000000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // link from the upstream output port
  input  logic                      sending_in,
  output logic                      empty_out,
  // input buffer
  input  logic                      buf_full,
  input  logic                      buf_empty,
  input  logic [noc_pkg::HDR_W-1:0] header,
  output logic                      take_in,
  output logic                      spit_out,
  // requests to / grants from the output controllers, one per slot
  output logic [noc_pkg::NSLOT-1:0] req,
  input  logic [noc_pkg::NSLOT-1:0] grant,
  output logic                      nep
);
  import noc_pkg::*;

  typedef enum logic [2:0] {IDLE, RECV, HOLD, XFER, DROP} state_e;
  state_e state;
  logic [2:0] dest;

  // Routing decision on the stored header.
  logic [2:0] route;
  logic       route_nep;
  always_comb begin
    logic [2:0] dy, dx, my_y, my_x;
    logic [1:0] dl;
    dy   = header[7:5];
    dx   = header[4:2];
    dl   = header[1:0];
    my_y = COORD[5:3];
    my_x = COORD[2:0];
    route_nep = 1'b0;
    if (dy > my_y)      route = SLOT_N;
    else if (dy < my_y) route = SLOT_S;
    else if (dx > my_x) route = SLOT_E;
    else if (dx < my_x) route = SLOT_W;
    else begin
      route     = 3'(local_slot(int'(dl)));
      route_nep = (int'(dl) >= NUM_LOCAL);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      dest  <= '0;
    end else begin
      unique case (state)
        IDLE: if (sending_in) state <= RECV;
        RECV: if (buf_full) begin
                if (route_nep) state <= DROP;
                else begin
                  dest  <= route;
                  state <= HOLD;
                end
              end
        HOLD: if (grant[dest]) state <= XFER;
        XFER: if (buf_empty) state <= IDLE;
        DROP: if (buf_empty) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    req = '0;
    if (state == HOLD) req[dest] = 1'b1;
  end

  assign take_in   = (state == RECV) && !buf_full;
  assign spit_out  = (((state == HOLD) || (state == XFER)) && grant[dest] && !buf_empty) ||
                     ((state == DROP) && !buf_empty);
  assign empty_out = (state == IDLE) && buf_empty;
  assign nep       = (state == DROP);

  // A new packet may only be announced while this port reads empty.
  always_ff @(posedge clk) begin
    if (rst_n && sending_in)
      assert (state == IDLE) else $error("input_controller: sending_in while busy");
  end

endmodule
