// tb_input_controller: one input controller per test coordinate (with a
// packet buffer beside it) receives packets with random headers. For each
// packet the testbench checks the receive phase (take_in for 8 cycles,
// empty_out low), the routing decision against a reference row-first
// routing function, the request held until the grant, the request dropped
// after it, the 8 spit_out cycles, the NEP drop of packets for missing local
// ports, and the return to empty.
module tb_input_controller;
  import noc_pkg::*;
  localparam int NC = 3;
  localparam coord_t CO [NC] = '{6'b000_000, 6'b011_101, 6'b111_111};
  localparam int     NL [NC] = '{1, 4, 2};

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] sending_in = '0;
  logic [7:0]    data_in = '0;
  logic [NSLOT-1:0] grant [NC];
  logic [NSLOT-1:0] req [NC];
  logic [NC-1:0] empty_out, take_in, spit_out, full, empty, nep;
  logic [7:0]    bdata [NC];
  int checks = 0, failures = 0, routed = 0, drops = 0;

  for (genvar c = 0; c < NC; c++) begin : g_c
    packet_buffer #(.FLIT_W(8)) u_buf (
      .clk, .rst_n, .take_in(take_in[c]), .spit_out(spit_out[c]), .data_in,
      .data_out(bdata[c]), .full(full[c]), .empty(empty[c]));
    input_controller #(.NUM_LOCAL(NL[c]), .COORD(CO[c])) dut (
      .clk, .rst_n, .sending_in(sending_in[c]), .empty_out(empty_out[c]),
      .buf_full(full[c]), .buf_empty(empty[c]), .header(bdata[c]),
      .take_in(take_in[c]), .spit_out(spit_out[c]), .req(req[c]),
      .grant(grant[c]), .nep(nep[c]));
  end

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: y first, then x, then the local port; -1 for a missing local port.
  function automatic int ref_route(logic [7:0] h, coord_t me, int nl);
    if (h[7:5] > me[5:3]) return SLOT_N;
    if (h[7:5] < me[5:3]) return SLOT_S;
    if (h[4:2] > me[2:0]) return SLOT_E;
    if (h[4:2] < me[2:0]) return SLOT_W;
    if (int'(h[1:0]) >= nl) return -1;
    return 2 * int'(h[1:0]) + 1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) grant[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int c, exp, wait_cycles;
      logic [7:0] hdr;
      c = n % NC;
      // bias headers towards this router so that local delivery and NEP occur
      hdr = 8'($urandom);
      if ($urandom % 3 == 0) hdr[7:2] = CO[c];
      @(negedge clk);
      check(empty_out[c], "empty_out high before a packet");
      sending_in[c] = 1;
      @(negedge clk);
      sending_in[c] = 0;
      for (int i = 0; i < PKT_LEN; i++) begin
        check(take_in[c] && !empty_out[c], "take_in during receive");
        data_in = (i == 0) ? hdr : 8'($urandom);
        @(negedge clk);
      end
      data_in = '0;
      check(!take_in[c], "no take_in once full");
      exp = ref_route(hdr, CO[c], NL[c]);
      @(negedge clk);
      if (exp < 0) begin
        drops++;
        check(nep[c] && req[c] == '0, "NEP raised, no request");
        while (!empty[c]) @(negedge clk);
        @(negedge clk);
        check(!nep[c], "NEP cleared after drop");
      end else begin
        routed++;
        check(!nep[c], "no NEP for a valid port");
        check(req[c] == (NSLOT'(1) << exp),
              $sformatf("route hdr=%b at %b: req=%b exp slot %0d", hdr, CO[c], req[c], exp));
        wait_cycles = $urandom % 5;
        repeat (wait_cycles) begin
          @(negedge clk);
          check(req[c] == (NSLOT'(1) << exp) && !spit_out[c], "request held while waiting");
        end
        grant[c][exp] = 1;
        for (int i = 0; i < PKT_LEN; i++) begin
          #1;
          check(spit_out[c], "spit_out while granted");
          @(negedge clk);
          if (i == 0) check(req[c] == '0, "request dropped after grant");
        end
        grant[c] = '0;
      end
      @(negedge clk);
      check(empty_out[c], "empty_out back high");
    end
    check(routed > 100 && drops > 5, "both routed and dropped packets seen");
    $display("routed=%0d nep_drops=%0d", routed, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
