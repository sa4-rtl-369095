// pe4bf: one processing element of the SA4 systolic array unit (SAU).
//
// The PE holds three stationary 4-bit signed weights (one kernel row) and
// receives two unsigned 4-bit activations of neighbouring IFM columns every
// cycle. It forms the 4bF-packed product of Fig. 1 (six 4-bit products in one
// 18x27 multiplication) and adds the packed partial sum arriving from the PE
// above, like a DSP48E2 using its PCIN cascade. There is no splitter and no
// controller inside the PE: splitting happens once per PE column and control
// comes from the SAU's single FSM, as the document proposes.
//
// Interface and timing (all outputs registered):
//   a_in/tag_in  -> a_out/tag_out    : activations move one PE right per cycle
//   psum_in      -> psum_out/ptag_out: psum_out = psum_in + A_pk*W_pk of the
//                                      activation held in the local register
//   w_load/w_in                      : the weight register loads in the same
//                                      cycle the first step of a pass enters
// Latency: an activation registered at edge t contributes to psum_out at t+1.
// The multiply-add is written as plain arithmetic; mapping it onto a DSP
// slice is left to synthesis (this design's choice).
module pe4bf
  import sa4_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  act_pair_t                  a_in,
  input  step_tag_t                  tag_in,
  input  wtrip_t                     w_in,
  input  logic                       w_load,
  input  logic signed [PSUM_W-1:0]   psum_in,
  output act_pair_t                  a_out,
  output step_tag_t                  tag_out,
  output logic signed [PSUM_W-1:0]   psum_out,
  output step_tag_t                  ptag_out
);

  act_pair_t a_reg;
  step_tag_t tag_reg;
  wtrip_t    w_reg;

  logic signed [APK_W-1:0]  a_pk;
  logic signed [WPK_W-1:0]  w_pk;
  logic signed [PSUM_W-1:0] prod;

  always_comb begin
    a_pk = pack_act(a_reg);
    w_pk = pack_wgt(w_reg);
    prod = PSUM_W'(a_pk) * PSUM_W'(w_pk);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg    <= '0;
      tag_reg  <= '0;
      w_reg    <= '0;
      psum_out <= '0;
      ptag_out <= '0;
    end else begin
      a_reg   <= a_in;
      tag_reg <= tag_in;
      if (w_load) w_reg <= w_in;
      psum_out <= psum_in + prod;
      ptag_out <= tag_reg;
    end
  end

  assign a_out   = a_reg;
  assign tag_out = tag_reg;

endmodule
