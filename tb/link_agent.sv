// link_agent: behavioural model of whatever sits on the far side of one
// router port: an IP core on a local port, or a neighbouring router in a
// stand-alone router test. Not synthesizable; testbench use only.
//
// Sending: task send() waits until the router's input reads empty, gives the
// one-cycle sending pulse and drives the PKT_LEN flits on the next cycles.
// Receiving: after every sending pulse from the router the next PKT_LEN flits
// are collected into rxq. rx_ready (the empty signal towards the router) is
// high unless 'hold' is set.
module link_agent #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // towards the router input
  output logic         tx_sending,
  output logic [W-1:0] tx_data,
  input  logic         tx_empty,
  // from the router output
  input  logic         rx_sending,
  input  logic [W-1:0] rx_data,
  output logic         rx_ready
);
  import noc_pkg::*;

  typedef logic [PKT_LEN-1:0][W-1:0] pkt_t;

  pkt_t rxq [$];
  int   sent = 0, received = 0;
  bit   hold = 0;

  initial begin
    tx_sending = 1'b0;
    tx_data    = '0;
  end

  assign rx_ready = !hold;

  task automatic send(pkt_t p);
    @(negedge clk);
    while (!tx_empty) @(negedge clk);
    tx_sending = 1'b1;
    @(negedge clk);
    tx_sending = 1'b0;
    for (int i = 0; i < PKT_LEN; i++) begin
      tx_data = p[i];
      @(negedge clk);
    end
    tx_data = '0;
    sent++;
  endtask

  always @(posedge clk) begin
    if (rst_n && rx_sending) begin
      pkt_t p;
      for (int i = 0; i < PKT_LEN; i++) begin
        @(posedge clk);
        p[i] = rx_data;
      end
      rxq.push_back(p);
      received++;
    end
  end

endmodule
