// tb_sa4_ultranet: the 4-bit convolution layers of the UltraNet object
// detector on a 16 x 8 array, the array size used for that network. Layer
// sizes (after the 8-bit first layer and each 2x2 max-pooling, which run
// outside the array): 80x160 16->32, 40x80 32->64, 20x40 64->64, four
// 10x20 64->64 layers and a final 1x1 64->36 layer, run with kernel height 1
// and only the centre tap of the kernel row. The two 10x20 layers not run here are identical
// to the ones that are. Every output is checked and the run time of each
// layer is compared with its ideal clock count.
module tb_sa4_ultranet;
  sa4_layer_harness #(.X(16), .Y(8), .RM(80), .CM(160), .NM(64), .MM(64)) h ();

  initial begin
    @(posedge h.rst_n);
    h.run_layer(80, 160, 16, 32, 1'b0, 1'b0, 1'b1);
    h.run_layer(40, 80, 32, 64, 1'b0, 1'b0, 1'b1);
    h.run_layer(20, 40, 64, 64, 1'b0, 1'b0, 1'b1);
    h.run_layer(10, 20, 64, 64, 1'b0, 1'b0, 1'b1);
    h.run_layer(10, 20, 64, 64, 1'b0, 1'b0, 1'b1);
    h.run_layer(10, 20, 64, 36, 1'b1, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge h.clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
