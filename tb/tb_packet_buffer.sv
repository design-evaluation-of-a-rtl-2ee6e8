// tb_packet_buffer: fills the packet buffer with random packets and reads
// them back, checking order, the full/empty status at every step and that
// the header (first flit) is visible while the buffer is full.
module tb_packet_buffer;
  localparam int W = 8, D = 8;
  logic clk = 0, rst_n = 0;
  logic take_in = 0, spit_out = 0;
  logic [W-1:0] data_in = '0, data_out;
  logic full, empty;
  int checks = 0, failures = 0;

  packet_buffer #(.FLIT_W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] pkt [D];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    for (int p = 0; p < 20; p++) begin
      for (int i = 0; i < D; i++) pkt[i] = W'($urandom);
      for (int i = 0; i < D; i++) begin
        take_in = 1; data_in = pkt[i];
        @(negedge clk);
        check(!empty, "not empty while filling");
        check(full == (i == D - 1), $sformatf("full flag after %0d flits", i + 1));
        // idle gaps must not disturb the contents
        if (p % 3 == 0) begin take_in = 0; @(negedge clk); end
      end
      take_in = 0;
      repeat (p % 4) @(negedge clk);
      check(data_out == pkt[0], "header visible while full");
      for (int i = 0; i < D; i++) begin
        check(data_out == pkt[i], $sformatf("flit %0d read back", i));
        spit_out = 1;
        @(negedge clk);
        if (p % 2 == 1 && i < D - 1) begin spit_out = 0; @(negedge clk); end
      end
      spit_out = 0;
      check(empty && !full, "empty after draining");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
