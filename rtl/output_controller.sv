// output_controller: control of one router output port.
//
// It picks which input port may use this output next, takes that input's
// packet into the output buffer, and then sends it on to the next hop.
//
//   IDLE  output buffer empty. When any allowed input requests, the arbiter
//         chooses one; its grant is registered and held.
//   RECV  grant high. Every cycle one flit arrives through the switch and is
//         taken in; when the buffer is full (PKT_LEN flits) the grant drops.
//         Inputs that were not chosen keep requesting.
//   WAIT  packet stored, the next hop's input port is not empty yet
//         (empty_in low). This is where a blocked packet waits without
//         holding an input buffer: the reason the design has output buffers.
//   PULSE sending_out high for exactly one cycle.
//   XMIT  one flit per cycle on data_out for PKT_LEN cycles; then IDLE.
// From a grant to the start pulse takes PKT_LEN + 1 cycles if the next hop is
// empty; the pulse is followed directly by the PKT_LEN flits.
//
// ARB selects the arbitration unit (see noc_pkg::arb_e); PRIO is the order of
// the static schemes. SRC_MASK has a bit for every slot that can request this
// output; a north or south output has no east or west source.
//
// The grant-for-a-whole-packet handshake, arbitration in the output port and
// the sending/empty protocol follow the document. The state machine and the
// cycle-by-cycle timing are this design's own.
module output_controller #(
  parameter noc_pkg::arb_e  ARB      = noc_pkg::ARB_FIXED,
  parameter noc_pkg::prio_t PRIO     = noc_pkg::PRIO_CLOCKWISE,
  parameter logic [noc_pkg::NSLOT-1:0] SRC_MASK = '1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // requests from / grants to the input controllers, one per slot
  input  logic [noc_pkg::NSLOT-1:0] req,
  output logic [noc_pkg::NSLOT-1:0] grant,
  // output buffer
  input  logic                      buf_full,
  input  logic                      buf_empty,
  output logic                      take_in,
  output logic                      spit_out,
  // link to the downstream input port
  input  logic                      empty_in,
  output logic                      sending_out
);
  import noc_pkg::*;

  typedef enum logic [2:0] {IDLE, RECV, WAIT, PULSE, XMIT} state_e;
  state_e state;

  logic [NSLOT-1:0] req_m, arb_grant, grant_q;
  logic             start;

  assign req_m = req & SRC_MASK;
  assign start = (state == IDLE) && buf_empty && (|req_m);

  generate
    if (ARB == ARB_FIXED) begin : g_arb
      arb_fixed #(.PRIO(PRIO)) u_arb (
        .clk, .rst_n, .req(req_m), .update(start), .grant(arb_grant));
    end else if (ARB == ARB_COIN) begin : g_arb
      arb_coin u_arb (
        .clk, .rst_n, .req(req_m), .update(start), .grant(arb_grant));
    end else begin : g_arb
      localparam cnt_mode_e M = (ARB == ARB_BUSY) ? CNT_MOST_PACKETS :
                                (ARB == ARB_WAIT) ? CNT_LONGEST_WAIT :
                                                    CNT_FEWEST_PACKETS;
      arb_counter #(.MODE(M)) u_arb (
        .clk, .rst_n, .req(req_m), .update(start), .grant(arb_grant));
    end
  endgenerate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      grant_q <= '0;
    end else begin
      unique case (state)
        IDLE:  if (start) begin
                 grant_q <= arb_grant;
                 state   <= RECV;
               end
        RECV:  if (buf_full) begin
                 grant_q <= '0;
                 state   <= empty_in ? PULSE : WAIT;
               end
        WAIT:  if (empty_in) state <= PULSE;
        PULSE: state <= XMIT;
        XMIT:  if (buf_empty) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign grant       = (state == RECV && !buf_full) ? grant_q : '0;
  assign take_in     = (state == RECV) && !buf_full;
  assign spit_out    = (state == XMIT) && !buf_empty;
  assign sending_out = (state == PULSE);

  // The grant is one-hot while a packet is taken in.
  always_ff @(posedge clk) begin
    if (rst_n && state == RECV)
      assert ($onehot(grant_q)) else $error("output_controller: grant not one-hot");
  end

endmodule
