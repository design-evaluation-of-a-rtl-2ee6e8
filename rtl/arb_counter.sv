// arb_counter: the three counting arbiters (dynamic).
//
// Each slot has a saturating CNT_W-bit counter; the requesting slot with the
// winning count is granted, ties going to the slot that comes first clockwise
// from north.
//   CNT_MOST_PACKETS   counter = packets granted to the slot; the busiest
//                      slot wins.
//   CNT_LONGEST_WAIT   counter = cycles the slot has been requesting without a
//                      grant, cleared when it is granted; the longest waiting
//                      slot wins.
//   CNT_FEWEST_PACKETS counter = packets granted to the slot; the slot that
//                      has sent the fewest wins.
// The three policies are the document's; what exactly is counted, the
// counter width, saturation and the tie rule are this design's choices.
//
// Interface: grant is combinational and one-hot (zero without requests).
// Counters change on the clock edge at which 'update' is high (a grant is
// taken); the waiting counters also advance on every other cycle.
module arb_counter #(
  parameter noc_pkg::cnt_mode_e MODE = noc_pkg::CNT_MOST_PACKETS,
  parameter int                 CNT_W = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [noc_pkg::NSLOT-1:0] req,
  input  logic                      update,
  output logic [noc_pkg::NSLOT-1:0] grant
);
  import noc_pkg::*;

  logic [CNT_W-1:0] cnt [NSLOT];

  // Walk the slots from the last to north so that on a tie the earlier slot
  // replaces the later one.
  always_comb begin
    logic             found;
    logic [CNT_W-1:0] best;
    grant = '0;
    found = 1'b0;
    best  = '0;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      if (req[s]) begin
        if (!found ||
            ((MODE == CNT_FEWEST_PACKETS) ? (cnt[s] <= best) : (cnt[s] >= best))) begin
          grant = '0;
          grant[s] = 1'b1;
          best  = cnt[s];
          found = 1'b1;
        end
      end
    end
  end

  localparam logic [CNT_W-1:0] CMAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOT; s++) cnt[s] <= '0;
    end else begin
      for (int s = 0; s < NSLOT; s++) begin
        if (MODE == CNT_LONGEST_WAIT) begin
          if (update && grant[s])            cnt[s] <= '0;
          else if (req[s] && cnt[s] != CMAX) cnt[s] <= cnt[s] + 1'b1;
        end else begin
          if (update && grant[s] && cnt[s] != CMAX) cnt[s] <= cnt[s] + 1'b1;
        end
      end
    end
  end

endmodule
