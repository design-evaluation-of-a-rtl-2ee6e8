// arb_fixed: static fixed-priority arbiter.
//
// Of the requesting slots, the one that comes first in the priority list PRIO
// wins. The default list is north first, then clockwise (local 0, east,
// local 1, south, local 2, west, local 3), the document's generic fixed
// scheme. The application-tuned static schemes (one list for the whole
// router, or a different list for each output port) are the same logic with
// another PRIO, so this one module covers all the static arbiters.
//
// Purely combinational: grant is one-hot, or zero when nothing requests. The
// interface matches the other arbiters; 'update' is unused because a fixed
// scheme keeps no state.
module arb_fixed #(
  parameter noc_pkg::prio_t PRIO = noc_pkg::PRIO_CLOCKWISE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [noc_pkg::NSLOT-1:0] req,
  input  logic                      update,
  output logic [noc_pkg::NSLOT-1:0] grant
);
  import noc_pkg::*;

  always_comb begin
    grant = '0;
    for (int k = NSLOT - 1; k >= 0; k--) begin
      if (req[PRIO[k]]) begin
        grant = '0;
        grant[PRIO[k]] = 1'b1;
      end
    end
  end

  // clk, rst_n and update are part of the common arbiter interface only.
  logic unused;
  assign unused = clk ^ rst_n ^ update;

endmodule
