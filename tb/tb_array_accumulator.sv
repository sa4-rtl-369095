// tb_array_accumulator: drives random split results from four SAU rows for
// twenty output channels, with random idle clocks, and checks that each
// output is the sum over the four rows, one clock later, including the
// extreme values of the 12-bit inputs.
module tb_array_accumulator;
  import sa4_pkg::*;
  localparam int SR = 4, Y = 20, OW = SPLIT_W + 2;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic                      in_valid [SR];
  logic signed [SPLIT_W-1:0] in_even  [SR][Y];
  logic signed [SPLIT_W-1:0] in_odd   [SR][Y];
  logic                      out_valid;
  logic signed [OW-1:0]      out_even [Y];
  logic signed [OW-1:0]      out_odd  [Y];

  array_accumulator #(.SR(SR), .Y(Y)) dut (.*);

  int checks = 0, failures = 0;
  int se [Y], so [Y];

  initial begin
    #1 rst_n = 0;
    for (int r = 0; r < SR; r++) begin
      in_valid[r] = 0;
      for (int y = 0; y < Y; y++) begin in_even[r][y] = '0; in_odd[r][y] = '0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bit v;
      v = ($urandom % 4 != 0);
      for (int y = 0; y < Y; y++) begin se[y] = 0; so[y] = 0; end
      for (int r = 0; r < SR; r++) begin
        in_valid[r] = v;
        for (int y = 0; y < Y; y++) begin
          in_even[r][y] = (t % 10 == 0) ? -12'sd2048 : SPLIT_W'($urandom);
          in_odd[r][y]  = (t % 10 == 1) ?  12'sd2047 : SPLIT_W'($urandom);
          se[y] += int'(in_even[r][y]); so[y] += int'(in_odd[r][y]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid != v) begin failures++; $display("FAIL valid at %0d", t); end
      if (v) for (int y = 0; y < Y; y++) begin
        checks++;
        if (int'(out_even[y]) != se[y] || int'(out_odd[y]) != so[y]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y=%0d", t, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
