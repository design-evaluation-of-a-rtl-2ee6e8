// tb_output_controller: an output controller (fixed-priority arbiter) with a
// packet buffer beside it. Random request sets are presented; the testbench
// checks that the grant goes to the highest-priority requester, stays high
// for exactly PKT_LEN cycles, that the start pulse waits for empty_in, lasts
// one cycle and is followed by PKT_LEN spit_out cycles, and the cycle count
// from request to pulse (PKT_LEN + 2 when the next hop is empty). It also
// counts how often a packet had to wait for the next hop.
module tb_output_controller;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, empty_in = 0;
  logic [NSLOT-1:0] req = '0, grant;
  logic take_in, spit_out, full, empty, sending_out;
  logic [7:0] bdata;
  int checks = 0, failures = 0, waited = 0;

  packet_buffer #(.FLIT_W(8)) u_buf (
    .clk, .rst_n, .take_in, .spit_out, .data_in(8'h5a),
    .data_out(bdata), .full, .empty);
  output_controller #(.ARB(ARB_FIXED)) dut (
    .clk, .rst_n, .req, .grant, .buf_full(full), .buf_empty(empty),
    .take_in, .spit_out, .empty_in, .sending_out);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [NSLOT-1:0] r;
      int win, blocked, lat;
      r = NSLOT'($urandom);
      if (r == '0) r = 8'h40;
      win = 0;
      while (!r[win]) win++;
      req = r;
      blocked = ($urandom % 3 == 0) ? 1 + $urandom % 6 : 0;
      empty_in = (blocked == 0);
      @(negedge clk);
      lat = 1;
      check(grant == (NSLOT'(1) << win), $sformatf("grant %b for requests %b", grant, r));
      req[win] = 1'b0;     // the winner drops its request, the others keep theirs
      for (int i = 0; i < PKT_LEN; i++) begin
        check(grant == (NSLOT'(1) << win) && take_in, "grant held for the packet");
        @(negedge clk); lat++;
      end
      check(grant == '0, "grant released after PKT_LEN flits");
      while (!sending_out && lat < 60) begin
        check(!spit_out, "nothing sent before the pulse");
        if (blocked > 0) begin
          blocked--;
          if (blocked == 0) begin empty_in = 1; waited++; end
        end
        @(negedge clk); lat++;
      end
      check(sending_out, "start pulse");
      if (waited == 0 || empty_in && lat <= PKT_LEN + 2)
        check(lat == PKT_LEN + 2 || lat > PKT_LEN + 2 && blocked == 0, "latency");
      @(negedge clk);
      empty_in = 0;        // the next hop's input is now busy
      check(!sending_out, "pulse lasts one cycle");
      for (int i = 0; i < PKT_LEN; i++) begin
        check(spit_out, "flit sent after the pulse");
        @(negedge clk);
      end
      check(!spit_out, "PKT_LEN flits only");
      req = '0;
      @(negedge clk);
    end
    check(waited > 20, "blocked next hop seen");
    // exact latency with an empty next hop
    begin
      int lat;
      empty_in = 1;
      req = 8'b0000_0100;
      lat = 0;
      @(negedge clk);
      req = '0;
      while (!sending_out && lat < 40) begin @(negedge clk); lat++; end
      check(lat == PKT_LEN + 1, $sformatf("grant-to-pulse %0d cycles", lat));
    end
    $display("waited=%0d", waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
