// tb_sa4_12x12: the smaller 12 x 12 array configuration (three by three
// SAUs). Runs two 3x3 layers whose channel counts are multiples of 12 (a
// 14 x 14 layer with 36 -> 24 channels and a 28 x 28 layer with 24 -> 30
// channels, the last output tile half used), one of them with throttled
// input streams, and checks every output and the full-rate run time.
module tb_sa4_12x12;
  sa4_layer_harness #(.X(12), .Y(12), .RM(28), .CM(28), .NM(36), .MM(30)) h ();

  initial begin
    @(posedge h.rst_n);
    h.run_layer(14, 14, 36, 24, 1'b0, 1'b0, 1'b1);
    h.run_layer(28, 28, 24, 30, 1'b0, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge h.clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
