// arb_coin: coin-passing arbiter (dynamic, round-robin-like).
//
// One slot holds the coin and has the highest priority; the other slots
// follow in clockwise order from it (slot numbers increase clockwise). When
// the coin holder itself is granted, the coin moves to the next slot
// clockwise. If the holder is not requesting, the requester nearest to it
// clockwise is granted and the coin stays where it is. That rule is the
// document's; the coin starting at north after reset is this design's choice.
//
// Interface: grant is combinational and one-hot (zero without requests). The
// coin moves on the clock edge at which 'update' is high, which the output
// controller raises in the cycle it takes the grant.
module arb_coin (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [noc_pkg::NSLOT-1:0] req,
  input  logic                      update,
  output logic [noc_pkg::NSLOT-1:0] grant
);
  import noc_pkg::*;

  logic [2:0] coin;

  always_comb begin
    grant = '0;
    for (int k = NSLOT - 1; k >= 0; k--) begin
      logic [2:0] s;
      s = coin + 3'(k);
      if (req[s]) begin
        grant = '0;
        grant[s] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      coin <= 3'(SLOT_N);
    else if (update && grant[coin])  coin <= coin + 3'd1;
  end

endmodule
