// row_cached_accumulator: second level of the two-level accumulator of SA4
// (document Sec. IV-B3, Fig. 2 lines 16-18).
//
// For one output row and one tile of Y output channels the array delivers
// K * N/X row passes (kernel rows times input-channel tiles, K <= KR), each a run of
// C/2 result pairs for all Y channels. This module adds the passes in a row
// cache of C/2 x Y x 2 accumulators: the first pass writes, the following
// passes read, add and write back, and the last pass sends its sums out
// instead of storing them. The final OFM row therefore streams out while the
// array already works on the next tile, with no extra pass over the cache.
//
// Position inside the layer is kept by counters (pair c2, pass, output-channel
// tile mt, output row r) in the order the IFM constructor issues passes, so
// gaps between pairs are harmless. Interface: start with cfg_* loads the
// layer; in_valid marks one pair for all Y channels; out_valid marks OFM
// columns 2*c2 and 2*c2+1 of row out_row for channels out_mt*Y + y.
// done pulses with the last output. Latency: one clock. The accumulator
// width ACC_W is this design's choice.
module row_cached_accumulator
  import sa4_pkg::*;
#(
  parameter int unsigned Y      = 20,
  parameter int unsigned C_MAX  = 320,
  parameter int unsigned IN_W   = SPLIT_W + 2,
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned DIM_W  = 10,
  parameter int unsigned PASS_W = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [DIM_W-1:0]         cfg_half_cols,  // C/2
  input  logic [PASS_W-1:0]        cfg_passes,     // K * N/X (kernel height times channel tiles)
  input  logic [DIM_W-1:0]         cfg_m_tiles,
  input  logic [DIM_W-1:0]         cfg_rows,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_even [Y],
  input  logic signed [IN_W-1:0]   in_odd  [Y],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out_even [Y],
  output logic signed [ACC_W-1:0]  out_odd  [Y],
  output logic [DIM_W-1:0]         out_row,
  output logic [DIM_W-1:0]         out_mt,
  output logic [DIM_W-1:0]         out_c2,
  output logic                     done
);

  localparam int unsigned C2_MAX = C_MAX / 2;
  localparam int unsigned CAW    = $clog2(C2_MAX);

  typedef struct packed {
    logic signed [ACC_W-1:0] even;
    logic signed [ACC_W-1:0] odd;
  } acc_pair_t;

  acc_pair_t row_cache [C2_MAX][Y];

  logic [DIM_W-1:0]  half_cols, m_tiles, rows;
  logic [PASS_W-1:0] passes;
  logic [DIM_W-1:0]  c2, mt, r;
  logic [PASS_W-1:0] pass;
  logic              first_pass, last_pass;
  acc_pair_t         sum [Y];

  always_comb begin
    first_pass = (pass == '0);
    last_pass  = (pass == passes - 1'b1);
    for (int y = 0; y < Y; y++) begin
      sum[y].even = (first_pass ? ACC_W'(0) : row_cache[CAW'(c2)][y].even) + ACC_W'(in_even[y]);
      sum[y].odd  = (first_pass ? ACC_W'(0) : row_cache[CAW'(c2)][y].odd)  + ACC_W'(in_odd[y]);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !last_pass)
      for (int y = 0; y < Y; y++) row_cache[CAW'(c2)][y] <= sum[y];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_cols <= '0; m_tiles <= '0; rows <= '0; passes <= '0;
      c2 <= '0; mt <= '0; r <= '0; pass <= '0;
      out_valid <= 1'b0; done <= 1'b0;
      out_row <= '0; out_mt <= '0; out_c2 <= '0;
      for (int y = 0; y < Y; y++) begin
        out_even[y] <= '0;
        out_odd[y]  <= '0;
      end
    end else if (start) begin
      half_cols <= cfg_half_cols; m_tiles <= cfg_m_tiles;
      rows <= cfg_rows; passes <= cfg_passes;
      c2 <= '0; mt <= '0; r <= '0; pass <= '0;
      out_valid <= 1'b0; done <= 1'b0;
    end else begin
      out_valid <= in_valid && last_pass;
      done      <= 1'b0;
      if (in_valid) begin
        if (last_pass) begin
          for (int y = 0; y < Y; y++) begin
            out_even[y] <= sum[y].even;
            out_odd[y]  <= sum[y].odd;
          end
          out_row <= r; out_mt <= mt; out_c2 <= c2;
        end
        if (c2 != half_cols - 1'b1) c2 <= c2 + 1'b1;
        else begin
          c2 <= '0;
          if (!last_pass) pass <= pass + 1'b1;
          else begin
            pass <= '0;
            if (mt != m_tiles - 1'b1) mt <= mt + 1'b1;
            else begin
              mt <= '0;
              r  <= r + 1'b1;
              if (r == rows - 1'b1) done <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
