// tb_sa4_spatial_sweep: latency workloads on an 8 x 8 array (two by two SAUs), the
// array size of the design's latency comparison. Runs 3x3 "same" layers with
// M = N at spatial sizes 32 x 32 and 16 x 16 (64 channels) and 8 x 8 with 512
// channels, fed at full rate. Every output is checked, and each layer must
// finish within the ideal R * M/Y * 3 * N/X * C/2 clocks plus the time to
// load the first two IFM rows; the measured gap is printed.
module tb_sa4_spatial_sweep;
  sa4_layer_harness #(.X(8), .Y(8), .RM(32), .CM(32), .NM(512), .MM(512)) h ();

  initial begin
    @(posedge h.rst_n);
    h.run_layer(32, 32, 64, 64, 1'b0, 1'b0, 1'b1);
    h.run_layer(16, 16, 64, 64, 1'b0, 1'b0, 1'b1);
    h.run_layer(8, 8, 512, 512, 1'b0, 1'b0, 1'b1);
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
