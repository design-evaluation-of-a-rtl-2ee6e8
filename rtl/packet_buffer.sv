// packet_buffer: store for exactly one packet, used both as the input buffer
// and as the output buffer of a router port.
//
// Store-and-forward needs a whole packet to be held before it moves on, so the
// buffer has room for DEPTH flits and is used in two phases: it is filled flit
// by flit with take_in until it is full, then emptied flit by flit with
// spit_out until it is empty again. Only then does it accept the next packet.
// The two status outputs tell the controller which phase it is in.
//
// Interface and timing:
//   take_in  - write data_in at the next free place on this clock edge.
//   spit_out - advance to the next stored flit on this clock edge.
//   data_out - the flit to be read next; combinational from the write-once
//              storage, so while the buffer is full and nothing has been read
//              it shows the first (header) flit.
//   full     - all DEPTH flits are stored (and none read yet or being read).
//   empty    - nothing stored; ready for a new packet.
// Once the last flit has been spat out both counters return to zero, so the
// buffer reads empty on the following cycle. take_in while full, and spit_out
// while nothing is stored, are ignored (and flagged by assertions).
//
// The document gives the depth (8), the two controls and the two status
// signals; the counter-and-array implementation is this design's own.
module packet_buffer #(
  parameter int FLIT_W = 8,
  parameter int DEPTH  = noc_pkg::PKT_LEN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              take_in,
  input  logic              spit_out,
  input  logic [FLIT_W-1:0] data_in,
  output logic [FLIT_W-1:0] data_out,
  output logic              full,
  output logic              empty
);

  localparam int CW = $clog2(DEPTH + 1);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [FLIT_W-1:0] mem [DEPTH];
  logic [CW-1:0]     wr_cnt;   // flits stored
  logic [CW-1:0]     rd_cnt;   // flits already read out

  wire do_write = take_in  && (wr_cnt != CW'(DEPTH));
  wire do_read  = spit_out && (rd_cnt != wr_cnt);
  wire last_read = do_read && (rd_cnt == CW'(DEPTH - 1));

  always_ff @(posedge clk) begin
    if (do_write) mem[AW'(wr_cnt)] <= data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt <= '0;
      rd_cnt <= '0;
    end else begin
      if (last_read) begin
        wr_cnt <= '0;
        rd_cnt <= '0;
      end else begin
        if (do_write) wr_cnt <= wr_cnt + 1'b1;
        if (do_read)  rd_cnt <= rd_cnt + 1'b1;
      end
    end
  end

  assign data_out = (rd_cnt < CW'(DEPTH)) ? mem[AW'(rd_cnt)] : '0;
  assign full     = (wr_cnt == CW'(DEPTH));
  assign empty    = (wr_cnt == '0);

  // A controller must never write a full buffer or read an empty one.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(take_in && full))
        else $error("packet_buffer: take_in while full");
      assert (!(spit_out && (rd_cnt == wr_cnt)))
        else $error("packet_buffer: spit_out with nothing stored");
    end
  end

endmodule
