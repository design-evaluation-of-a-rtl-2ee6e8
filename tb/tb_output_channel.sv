// tb_output_channel: one output channel per arbitration unit, all fed the
// same requests. A switch model in the testbench puts the granted input's
// flits on sw_data; each channel must send exactly that packet after its
// start pulse. The fixed channel's winners are checked against the
// north-first order, the coin channel's against its coin rule, and all
// units must grant every requester eventually.
module tb_output_channel;
  import noc_pkg::*;
  localparam int NA = 5;
  localparam arb_e AT [NA] = '{ARB_FIXED, ARB_BUSY, ARB_WAIT, ARB_LEAST, ARB_COIN};
  logic clk = 0, rst_n = 0;
  logic [NSLOT-1:0] req [NA];
  logic [NSLOT-1:0] grant [NA];
  logic [15:0] sw_data [NA];
  logic [15:0] data_out [NA];
  logic [NA-1:0] sending_out;
  logic [NA-1:0] empty_in = '1;
  int checks = 0, failures = 0;
  int npk [NSLOT];
  initial for (int s = 0; s < NSLOT; s++) npk[s] = 1 + $urandom % 6;

  for (genvar a = 0; a < NA; a++) begin : g_a
    output_channel #(.FLIT_W(16), .ARB(AT[a])) dut (
      .clk, .rst_n, .req(req[a]), .grant(grant[a]), .sw_data(sw_data[a]),
      .empty_in(empty_in[a]), .sending_out(sending_out[a]), .data_out(data_out[a]));

    // Per-channel traffic: every slot has a number of packets to deliver.
    // Flit i of packet number k from slot s carries {s, a, k, i}.
    int pending [NSLOT];
    int flit_idx [NSLOT];
    int pkt_no [NSLOT];
    int coin = 0;
    logic [15:0] expq [$];
    always_comb begin
      for (int s = 0; s < NSLOT; s++) req[a][s] = pending[s] > 0;
      sw_data[a] = '0;
      for (int s = 0; s < NSLOT; s++)
        if (grant[a][s]) sw_data[a] = {4'(s), 4'(a), 5'(pkt_no[s]), 3'(flit_idx[s])};
    end
    initial begin
      for (int s = 0; s < NSLOT; s++) begin pending[s] = 0; flit_idx[s] = 0; pkt_no[s] = 0; end
      @(posedge rst_n);
      for (int s = 0; s < NSLOT; s++) pending[s] = npk[s];
    end
    always @(posedge clk) if (rst_n) begin
      for (int s = 0; s < NSLOT; s++)
        if (grant[a][s]) begin
          if (flit_idx[s] == 0) begin
            logic [NSLOT-1:0] r;
            int exp_w;
            r = req[a];
            if (AT[a] == ARB_FIXED) begin
              exp_w = 0; while (!r[exp_w]) exp_w++;
              checks++; if (exp_w != s) begin failures++; $display("FAIL fixed winner %0d exp %0d", s, exp_w); end
            end
            if (AT[a] == ARB_COIN) begin
              exp_w = coin; while (!r[exp_w]) exp_w = (exp_w + 1) % NSLOT;
              checks++; if (exp_w != s) begin failures++; $display("FAIL coin winner %0d exp %0d", s, exp_w); end
              if (s == coin) coin = (coin + 1) % NSLOT;
            end
          end
          expq.push_back(sw_data[a]);
          if (flit_idx[s] == PKT_LEN - 1) begin
            flit_idx[s] = 0; pending[s] = pending[s] - 1; pkt_no[s] = pkt_no[s] + 1;
          end else flit_idx[s] = flit_idx[s] + 1;
        end
    end
    // Check every transmitted packet flit by flit against what went in.
    int left = 0;
    always @(negedge clk) begin
      if (left > 0) begin
        checks++;
        if (expq.size() == 0 || data_out[a] !== expq[0]) begin
          failures++;
          $display("FAIL arb %0d got %h", a, data_out[a]);
        end
        if (expq.size() > 0) void'(expq.pop_front());
        left--;
      end
      if (sending_out[a]) left = PKT_LEN;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2000) @(negedge clk);
    for (int s = 0; s < NSLOT; s++) begin
      checks += NA;
      if (g_a[0].pending[s] != 0) begin failures++; $display("FAIL fixed slot %0d not served", s); end
      if (g_a[1].pending[s] != 0) begin failures++; $display("FAIL busy slot %0d not served", s); end
      if (g_a[2].pending[s] != 0) begin failures++; $display("FAIL wait slot %0d not served", s); end
      if (g_a[3].pending[s] != 0) begin failures++; $display("FAIL least slot %0d not served", s); end
      if (g_a[4].pending[s] != 0) begin failures++; $display("FAIL coin slot %0d not served", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
