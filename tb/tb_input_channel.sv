// tb_input_channel: packets of random flits enter one input channel of the
// router at coordinate {y=2, x=2}; the testbench plays the output side,
// granting the requested output after a random delay, and checks that all 8
// flits come out on sw_data in order and with the right request, and the
// cycle count from the sending_in pulse to the request (2 + PKT_LEN).
module tb_input_channel;
  import noc_pkg::*;
  localparam int W = 16;
  localparam coord_t ME = 6'b010_010;
  logic clk = 0, rst_n = 0, sending_in = 0;
  logic empty_out, nep;
  logic [W-1:0] data_in = '0, sw_data;
  logic [NSLOT-1:0] req, grant = '0;
  int checks = 0, failures = 0;

  input_channel #(.FLIT_W(W), .NUM_LOCAL(2), .COORD(ME)) dut (.*);

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
    logic [W-1:0] pkt [PKT_LEN];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int exp, lat;
      for (int i = 0; i < PKT_LEN; i++) pkt[i] = W'($urandom);
      pkt[0][1] = 1'b0;   // local ports 0 and 1 only: no NEP here
      case (n % 5)
        0: pkt[0][7:2] = 6'b011_010;  // north
        1: pkt[0][7:2] = 6'b001_111;  // south
        2: pkt[0][7:2] = 6'b010_011;  // east
        3: pkt[0][7:2] = 6'b010_000;  // west
        default: pkt[0][7:2] = ME;    // local
      endcase
      exp = (n % 5 == 0) ? 0 : (n % 5 == 1) ? 4 : (n % 5 == 2) ? 2 : (n % 5 == 3) ? 6 :
            2 * int'(pkt[0][1:0]) + 1;
      while (!empty_out) @(negedge clk);
      sending_in = 1;
      @(negedge clk);
      sending_in = 0;
      for (int i = 0; i < PKT_LEN; i++) begin
        data_in = pkt[i];
        @(negedge clk);
      end
      lat = PKT_LEN + 1;
      while (req == '0 && lat < 40) begin @(negedge clk); lat++; end
      check(lat == PKT_LEN + 2, $sformatf("pulse-to-request latency %0d", lat));
      check(req == (NSLOT'(1) << exp), $sformatf("request %b for slot %0d", req, exp));
      repeat ($urandom % 4) @(negedge clk);
      grant[exp] = 1;
      for (int i = 0; i < PKT_LEN; i++) begin
        #1;
        check(sw_data == pkt[i], $sformatf("flit %0d through the switch", i));
        @(negedge clk);
      end
      grant = '0;
      check(!nep, "no NEP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
