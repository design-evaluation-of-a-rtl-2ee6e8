// crossbar_switch: partial crossbar between the input and output channels.
//
// Every output slot has its own multiplexer (one N-by-1 unit per output
// rather than one N-by-N matrix) and every input's data fans out to all of
// them, so no demultiplexers are needed: an output serves one input at a
// time, and that input is the one it has granted. The select of each
// multiplexer is the output controller's one-hot grant vector, so a
// multiplexer is an AND-OR of its allowed inputs.
//
// Because routes resolve the row first, a packet that entered from east or
// west never leaves north or south; the north and south multiplexers have no
// east or west inputs (3x1 instead of 5x1 in a five-port router). Slots of
// local ports that are not built are left out too.
//
// The partial scheme, the missing demultiplexers and the reduced north/south
// units are the document's; the one-hot AND-OR form is this design's.
// Combinational, no clock.
module crossbar_switch #(
  parameter int FLIT_W    = 8,
  parameter int NUM_LOCAL = 1
) (
  input  logic [FLIT_W-1:0]         in_data  [noc_pkg::NSLOT],
  // sel[o][i]: output o is connected to input i (one-hot or zero)
  input  logic [noc_pkg::NSLOT-1:0] sel      [noc_pkg::NSLOT],
  output logic [FLIT_W-1:0]         out_data [noc_pkg::NSLOT]
);
  import noc_pkg::*;

  for (genvar o = 0; o < NSLOT; o++) begin : g_out
    if (slot_exists(o, NUM_LOCAL)) begin : g_mux
      always_comb begin
        out_data[o] = '0;
        for (int i = 0; i < NSLOT; i++) begin
          if (slot_exists(i, NUM_LOCAL) && path_exists(i, o))
            out_data[o] = out_data[o] | ({FLIT_W{sel[o][i]}} & in_data[i]);
        end
      end
    end else begin : g_none
      assign out_data[o] = '0;
    end
  end

endmodule
