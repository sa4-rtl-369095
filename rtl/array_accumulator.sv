// array_accumulator: first level of the two-level accumulator of SA4
// (document Sec. IV-B3, Fig. 9(a)).
//
// The SAUs of one SAU column work on different groups of four input channels
// for the same output channels, so their split results must be added. This
// module adds, for every output channel y and both results of a pair, the
// X/4 SAU outputs of that column in one registered adder per value.
// All SAUs run in lock step: in_valid of the first SAU row qualifies the
// data (an assertion checks the others agree). Latency: one clock.
// Output width grows by clog2(X/4) bits so that no sum can overflow.
module array_accumulator
  import sa4_pkg::*;
#(
  parameter int unsigned SR    = 4,     // SAU rows = X/4
  parameter int unsigned Y     = 20,
  parameter int unsigned OUT_W = SPLIT_W + $clog2(SR)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid [SR],
  input  logic signed [SPLIT_W-1:0] in_even  [SR][Y],
  input  logic signed [SPLIT_W-1:0] in_odd   [SR][Y],
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   out_even [Y],
  output logic signed [OUT_W-1:0]   out_odd  [Y]
);

  logic signed [OUT_W-1:0] s_even [Y];
  logic signed [OUT_W-1:0] s_odd  [Y];

  always_comb begin
    for (int y = 0; y < Y; y++) begin
      s_even[y] = '0;
      s_odd[y]  = '0;
      for (int r = 0; r < SR; r++) begin
        s_even[y] = s_even[y] + OUT_W'(in_even[r][y]);
        s_odd[y]  = s_odd[y]  + OUT_W'(in_odd[r][y]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int y = 0; y < Y; y++) begin
        out_even[y] <= '0;
        out_odd[y]  <= '0;
      end
    end else begin
      out_valid <= in_valid[0];
      if (in_valid[0]) begin
        out_even <= s_even;
        out_odd  <= s_odd;
      end
    end
  end

  for (genvar r = 1; r < SR; r++) begin : g_chk
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[r] == in_valid[0]);
  end

endmodule
