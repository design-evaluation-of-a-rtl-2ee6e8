// tb_crossbar_switch: random flits on all inputs and random one-hot selects
// on every output, for one and for four local ports. An output must carry the
// selected input, or zero where that connection does not exist (east/west to
// north/south, missing local ports) or nothing is selected.
module tb_crossbar_switch;
  import noc_pkg::*;
  localparam int W = 16;
  logic [W-1:0]     in_data [NSLOT];
  logic [NSLOT-1:0] sel     [NSLOT];
  logic [W-1:0]     out1    [NSLOT];
  logic [W-1:0]     out4    [NSLOT];
  int checks = 0, failures = 0;

  crossbar_switch #(.FLIT_W(W), .NUM_LOCAL(1)) u1 (.in_data, .sel, .out_data(out1));
  crossbar_switch #(.FLIT_W(W), .NUM_LOCAL(4)) u4 (.in_data, .sel, .out_data(out4));

  function automatic logic [W-1:0] expect_out(int o, int nl);
    if (!slot_exists(o, nl)) return '0;
    for (int i = 0; i < NSLOT; i++)
      if (sel[o][i]) return (slot_exists(i, nl) && path_exists(i, o)) ? in_data[i] : '0;
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < NSLOT; i++) in_data[i] = W'($urandom);
      for (int o = 0; o < NSLOT; o++)
        sel[o] = ($urandom % 5 == 0) ? '0 : NSLOT'(1) << ($urandom % NSLOT);
      #1;
      for (int o = 0; o < NSLOT; o++) begin
        checks += 2;
        if (out1[o] !== expect_out(o, 1)) begin
          failures++; $display("FAIL nl=1 o=%0d sel=%b got %h", o, sel[o], out1[o]);
        end
        if (out4[o] !== expect_out(o, 4)) begin
          failures++; $display("FAIL nl=4 o=%0d sel=%b got %h", o, sel[o], out4[o]);
        end
      end
    end
    // explicit: east into north is not connected, south into north is
    for (int i = 0; i < NSLOT; i++) in_data[i] = W'(16'h1000 + i);
    sel[SLOT_N] = 8'b0000_0100; #1;
    checks++; if (out1[SLOT_N] !== '0) failures++;
    sel[SLOT_N] = 8'b0001_0000; #1;
    checks++; if (out1[SLOT_N] !== W'(16'h1004)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
