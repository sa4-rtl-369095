// sau: systolic array unit, the building block of SA4 (document Fig. 6).
//
// A ROWS x COLS grid of 4bF-packing PEs (4 x 4, fixed by Eqs. 1 and 2 of the
// document) computing, for every output channel column j, the 1x3 row
// convolution of ROWS input channels:
//   out_j[c] = sum_i ( w1_ij*a_i[c-1] + w2_ij*a_i[c] + w3_ij*a_i[c+1] )
// Row i of the grid is input channel i, column j is output channel j. Packed
// activation pairs enter through the shift-register IFM fetcher and move right
// one PE per clock; packed partial sums move down one PE per clock; the
// stationary weights are loaded by the shift-register weight fetcher during
// the first steps of every pass. All PEs are joined by registers, one FSM
// controls the unit, and each column ends in one shared data splitter.
//
// Interface: each clock with in_valid high is one step of a row pass (two
// IFM columns of ROWS channels in in_act). A pass is cfg_half_cols = C/2
// consecutive steps; in steps 0..COLS-1 of a pass, in_w must carry the weight
// triples of PE column "step" (one per row). A pass must have no gaps.
// Output: out_valid marks one pair of results (columns 2k, 2k+1) for all COLS
// output channels. The column outputs are re-aligned by a small output
// triangle (column j delayed COLS-1-j clocks) so that all columns of a pair
// leave together; that re-alignment is this design's choice.
// Latency: pair k is on the outputs ROWS + COLS + 3 clocks after step k was
// presented (11 for 4 x 4). Pair k needs step k+1, so the last pair of a
// pass leaves as if one more step had followed the last one.
module sau
  import sa4_pkg::*;
#(
  parameter int unsigned ROWS   = SAU_DIM,
  parameter int unsigned COLS   = SAU_DIM,
  parameter int unsigned STEP_W = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [STEP_W-1:0]          cfg_half_cols,
  input  logic                       in_valid,
  input  act_pair_t                  in_act [ROWS],
  input  wtrip_t                     in_w   [ROWS],
  output logic                       out_valid,
  output logic signed [SPLIT_W-1:0]  out_even [COLS],
  output logic signed [SPLIT_W-1:0]  out_odd  [COLS]
);

  // ---- global FSM -------------------------------------------------------
  step_tag_t               tag;
  logic                    w_valid;
  logic [$clog2(COLS)-1:0] w_col;

  sau_fsm #(.COLS(COLS), .STEP_W(STEP_W)) u_fsm (
    .clk, .rst_n, .cfg_half_cols, .in_valid,
    .tag, .w_valid, .w_col
  );

  // ---- fetchers ---------------------------------------------------------
  act_pair_t        f_act [ROWS];
  step_tag_t        f_tag [ROWS];
  wtrip_t           f_w   [ROWS];
  logic [COLS-1:0]  f_load [ROWS];

  ifm_fetcher #(.ROWS(ROWS)) u_ifm (
    .clk, .rst_n, .in_act, .in_tag(tag), .out_act(f_act), .out_tag(f_tag)
  );

  weight_fetcher #(.ROWS(ROWS), .COLS(COLS)) u_wf (
    .clk, .rst_n, .in_valid(w_valid), .in_col(w_col), .in_w,
    .w_row(f_w), .w_load(f_load)
  );

  // ---- PE grid, register interconnect -----------------------------------
  act_pair_t                a_h [ROWS][COLS+1];   // horizontal activation links
  step_tag_t                t_h [ROWS][COLS+1];
  logic signed [PSUM_W-1:0] p_v [ROWS+1][COLS];   // vertical partial-sum links
  step_tag_t                t_v [ROWS+1][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_r
    assign a_h[i][0] = f_act[i];
    assign t_h[i][0] = f_tag[i];
    for (genvar j = 0; j < COLS; j++) begin : g_c
      pe4bf u_pe (
        .clk, .rst_n,
        .a_in(a_h[i][j]), .tag_in(t_h[i][j]),
        .w_in(f_w[i]), .w_load(f_load[i][j]),
        .psum_in(p_v[i][j]),
        .a_out(a_h[i][j+1]), .tag_out(t_h[i][j+1]),
        .psum_out(p_v[i+1][j]), .ptag_out(t_v[i+1][j])
      );
    end
  end

  for (genvar j = 0; j < COLS; j++) begin : g_top
    assign p_v[0][j] = '0;
    assign t_v[0][j] = '0;
  end

  // ---- column splitters and output alignment ----------------------------
  for (genvar j = 0; j < COLS; j++) begin : g_col
    logic                      s_valid;
    logic signed [SPLIT_W-1:0] s_even, s_odd;

    data_splitter u_split (
      .clk, .rst_n,
      .psum(p_v[ROWS][j]), .tag(t_v[ROWS][j]),
      .out_valid(s_valid), .out_even(s_even), .out_odd(s_odd)
    );

    localparam int unsigned D = COLS - 1 - j;
    if (D == 0) begin : g_nodly
      assign out_even[j] = s_even;
      assign out_odd[j]  = s_odd;
      if (j == COLS - 1) begin : g_v
        assign out_valid = s_valid;
      end
    end else begin : g_dly
      logic signed [SPLIT_W-1:0] d_even [D];
      logic signed [SPLIT_W-1:0] d_odd  [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < int'(D); k++) begin
            d_even[k] <= '0;
            d_odd[k]  <= '0;
          end
        end else begin
          d_even[0] <= s_even;
          d_odd[0]  <= s_odd;
          for (int k = 1; k < int'(D); k++) begin
            d_even[k] <= d_even[k-1];
            d_odd[k]  <= d_odd[k-1];
          end
        end
      end
      assign out_even[j] = d_even[D-1];
      assign out_odd[j]  = d_odd[D-1];
    end
  end

endmodule
