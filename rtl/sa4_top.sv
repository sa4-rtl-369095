// sa4_top: SA4, a two-level hierarchical systolic array for 4-bit
// convolutions (document Sec. IV-B, Fig. 9), in its X x Y = 16 x 20
// configuration (Table II).
//
// Level 1 is the SAU: a 4 x 4 grid of PEs, each doing six 4-bit multiplies
// per clock through 4-bit fully DSP packing, tied together by registers and
// run by one FSM. Level 2 puts (X/4) x (Y/4) SAUs side by side: SAU (sr, sc)
// handles input channels sr*4.. and output channels sc*4.. of the current
// tile. Around the array sit the IFM constructor (row cache and sliding-window
// stream), the IFM/weight distributor and the two-level accumulator (array
// accumulator across SAU rows, row-cached accumulator across passes).
//
// The layer computed is a stride-1, "same"-padded K x 3 convolution of an
// R x C x N 4-bit unsigned IFM with 4-bit signed weights into an R x C x M
// OFM, N a multiple of X and M rounded up to a multiple of Y (extra channels
// get zero weights). Order of work (row-temporal weight stationary):
//   for r; for mt < M/Y; for kr < K; for nt < N/X: one pass of C/2 steps.
// The kernel height K (cfg_kr: 1, 3, .. up to KR) is a per-layer setting.
// Interfaces (plain valid/ready streams, formats described in the modules):
//   start + cfg_*      : layer sizes, sampled with start; busy until done
//   dram_*             : IFM words from off-chip memory (ifm_constructor)
//   w_*                : weight beats, four per pass (ifm_weight_distributor)
//   ofm_*              : OFM results, columns 2*c2 and 2*c2+1 of row ofm_row
//                        for channels ofm_mt*Y + y, no back-pressure
//   stall_ifm/stall_w  : a clock lost waiting for an IFM row / for weights
// Throughput: one step (X*Y PEs, two OFM columns) per clock once the data
// streams keep up; latency from a pass step to its output is about
// X/4 + 2*4 + 8 clocks.
module sa4_top
  import sa4_pkg::*;
#(
  parameter int unsigned X        = 16,
  parameter int unsigned Y        = 20,
  parameter int unsigned KR       = 3,
  parameter int unsigned N_MAX    = 512,
  parameter int unsigned C_MAX    = 320,
  parameter int unsigned DRAM_W   = 256,
  parameter int unsigned DIM_W    = 10,
  parameter int unsigned ACC_W    = 32,
  parameter int unsigned WF_DEPTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [DIM_W-1:0]        cfg_rows,
  input  logic [DIM_W-1:0]        cfg_n_tiles,
  input  logic [DIM_W-1:0]        cfg_half_cols,
  input  logic [DIM_W-1:0]        cfg_m_tiles,
  input  logic [$clog2(KR+1)-1:0] cfg_kr,
  output logic                    busy,
  output logic                    done,
  input  logic                    dram_valid,
  output logic                    dram_ready,
  input  logic [DRAM_W-1:0]       dram_data,
  input  logic                    w_valid,
  output logic                    w_ready,
  input  wtrip_t                  w_data [Y/SAU_DIM][X],
  output logic                    ofm_valid,
  output logic signed [ACC_W-1:0] ofm_even [Y],
  output logic signed [ACC_W-1:0] ofm_odd  [Y],
  output logic [DIM_W-1:0]        ofm_row,
  output logic [DIM_W-1:0]        ofm_mt,
  output logic [DIM_W-1:0]        ofm_c2,
  output logic                    stall_ifm,
  output logic                    stall_w
);

  localparam int unsigned SR     = X / SAU_DIM;
  localparam int unsigned SC     = Y / SAU_DIM;
  localparam int unsigned AA_W   = SPLIT_W + $clog2(SR);
  localparam int unsigned PASS_W = DIM_W + 2;

  // ---------------- IFM constructor ----------------
  logic      c_valid, c_ready, c_first, c_last, c_busy;
  act_pair_t c_act [X];

  ifm_constructor #(
    .X(X), .KR(KR), .N_MAX(N_MAX), .C_MAX(C_MAX), .DRAM_W(DRAM_W), .DIM_W(DIM_W)
  ) u_cons (
    .clk, .rst_n, .start, .cfg_rows, .cfg_n_tiles, .cfg_half_cols, .cfg_m_tiles, .cfg_kr,
    .busy(c_busy), .dram_valid, .dram_ready, .dram_data,
    .out_valid(c_valid), .out_ready(c_ready), .out_act(c_act),
    .out_first(c_first), .out_last(c_last), .stall_ifm
  );

  // ---------------- IFM / weight distributor ----------------
  logic      d_valid;
  act_pair_t d_act [SR][SAU_DIM];
  wtrip_t    d_w   [SR][SC][SAU_DIM];

  ifm_weight_distributor #(.X(X), .Y(Y), .WF_DEPTH(WF_DEPTH)) u_dist (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_act(c_act), .in_first(c_first),
    .w_valid, .w_ready, .w_data,
    .sau_valid(d_valid), .sau_act(d_act), .sau_w(d_w), .stall_w
  );

  // ---------------- SAU array ----------------
  logic                      s_valid [SR][SC];
  logic signed [SPLIT_W-1:0] s_even  [SR][SC][SAU_DIM];
  logic signed [SPLIT_W-1:0] s_odd   [SR][SC][SAU_DIM];

  for (genvar sr = 0; sr < SR; sr++) begin : g_sr
    for (genvar sc = 0; sc < SC; sc++) begin : g_sc
      sau #(.STEP_W(DIM_W)) u_sau (
        .clk, .rst_n, .cfg_half_cols,
        .in_valid(d_valid), .in_act(d_act[sr]), .in_w(d_w[sr][sc]),
        .out_valid(s_valid[sr][sc]), .out_even(s_even[sr][sc]), .out_odd(s_odd[sr][sc])
      );
    end
  end

  // ---------------- two-level accumulator ----------------
  logic                      aa_in_valid [SR];
  logic signed [SPLIT_W-1:0] aa_in_even  [SR][Y];
  logic signed [SPLIT_W-1:0] aa_in_odd   [SR][Y];
  logic                      aa_valid;
  logic signed [AA_W-1:0]    aa_even [Y];
  logic signed [AA_W-1:0]    aa_odd  [Y];

  for (genvar sr = 0; sr < SR; sr++) begin : g_aa
    assign aa_in_valid[sr] = s_valid[sr][0];
    for (genvar y = 0; y < Y; y++) begin : g_y
      assign aa_in_even[sr][y] = s_even[sr][y / SAU_DIM][y % SAU_DIM];
      assign aa_in_odd[sr][y]  = s_odd[sr][y / SAU_DIM][y % SAU_DIM];
    end
  end

  array_accumulator #(.SR(SR), .Y(Y)) u_aacc (
    .clk, .rst_n, .in_valid(aa_in_valid), .in_even(aa_in_even), .in_odd(aa_in_odd),
    .out_valid(aa_valid), .out_even(aa_even), .out_odd(aa_odd)
  );

  logic [PASS_W-1:0] cfg_passes;
  assign cfg_passes = PASS_W'(cfg_kr) * PASS_W'(cfg_n_tiles);

  row_cached_accumulator #(
    .Y(Y), .C_MAX(C_MAX), .IN_W(AA_W), .ACC_W(ACC_W), .DIM_W(DIM_W), .PASS_W(PASS_W)
  ) u_racc (
    .clk, .rst_n, .start, .cfg_half_cols, .cfg_passes, .cfg_m_tiles, .cfg_rows,
    .in_valid(aa_valid), .in_even(aa_even), .in_odd(aa_odd),
    .out_valid(ofm_valid), .out_even(ofm_even), .out_odd(ofm_odd),
    .out_row(ofm_row), .out_mt(ofm_mt), .out_c2(ofm_c2), .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     busy <= 1'b0;
    else if (start) busy <= 1'b1;
    else if (done)  busy <= 1'b0;
  end

endmodule
