// ifm_weight_distributor: hands IFM packets and weights to the SAU array
// (document Sec. IV-B2, Fig. 9(b)).
//
// With an (X/4) x (Y/4) array of 4x4 SAUs, SAU (sr, sc) receives input
// channels sr*4..sr*4+3 of every packet (all SAUs of one SAU row see the same
// activations) and, for its four output-channel columns, only the weights of
// those four input channels. Weights arrive as a valid/ready stream of beats;
// a beat holds, for one PE-column slot k (0..3) of every SAU, the triples of
// all X input channels: w_data[sc][x] is the triple for input channel x and
// output channel sc*4+k. Four beats (k = 0..3, in order) form the weights of
// one row pass and are consumed in the first four steps of that pass.
//
// The weight beats wait in a FIFO of WF_DEPTH beats (this design's choice;
// the document joins its top-level modules with FIFOs). A pass is only
// started when all four of its beats are present; until then the IFM stream
// is held (stall_w flags such a clock), so a pass, once started, runs without
// gaps as the SAUs require. Outputs are registered: one clock of latency.
module ifm_weight_distributor
  import sa4_pkg::*;
#(
  parameter int unsigned X        = 16,
  parameter int unsigned Y        = 20,
  parameter int unsigned WF_DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // packet stream from the IFM constructor
  input  logic      in_valid,
  output logic      in_ready,
  input  act_pair_t in_act [X],
  input  logic      in_first,
  // weight beat stream
  input  logic      w_valid,
  output logic      w_ready,
  input  wtrip_t    w_data [Y/SAU_DIM][X],
  // to the SAU array
  output logic      sau_valid,
  output act_pair_t sau_act [X/SAU_DIM][SAU_DIM],
  output wtrip_t    sau_w   [X/SAU_DIM][Y/SAU_DIM][SAU_DIM],
  output logic      stall_w
);

  localparam int unsigned SR = X / SAU_DIM;
  localparam int unsigned SC = Y / SAU_DIM;
  localparam int unsigned PW = $clog2(WF_DEPTH);

  // ---------------- weight FIFO ----------------
  wtrip_t         fifo [WF_DEPTH][SC][X];
  logic [PW-1:0]  wp, rp;
  logic [PW:0]    count;
  logic           push, pop, take;
  logic [1:0]     k;          // step of the current pass (saturates at 3)
  logic           in_pass;    // steps 1..3 of a pass still need a beat

  always_comb begin
    w_ready  = (count < (PW+1)'(WF_DEPTH));
    push     = w_valid && w_ready;
    in_ready = !in_first || (count >= (PW+1)'(SAU_DIM));
    stall_w  = in_valid && !in_ready;
    take     = in_valid && in_ready;
    pop      = take && (in_first || in_pass);
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
      k <= '0; in_pass <= 1'b0;
    end else begin
      if (push) wp <= (wp == PW'(WF_DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(WF_DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
      if (take) begin
        if (in_first) begin
          k <= 2'd1; in_pass <= 1'b1;
        end else if (in_pass) begin
          k <= k + 1'b1;
          if (k == 2'(SAU_DIM - 1)) in_pass <= 1'b0;
        end
      end
    end
  end

  // ---------------- registered fan-out to the SAUs ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sau_valid <= 1'b0;
      for (int sr = 0; sr < SR; sr++)
        for (int i = 0; i < SAU_DIM; i++) begin
          sau_act[sr][i] <= '0;
          for (int sc = 0; sc < SC; sc++) sau_w[sr][sc][i] <= '0;
        end
    end else begin
      sau_valid <= take;
      for (int sr = 0; sr < SR; sr++)
        for (int i = 0; i < SAU_DIM; i++) begin
          sau_act[sr][i] <= take ? in_act[sr*SAU_DIM + i] : '0;
          for (int sc = 0; sc < SC; sc++)
            sau_w[sr][sc][i] <= pop ? fifo[rp][sc][sr*SAU_DIM + i] : '0;
        end
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> count != '0);

endmodule
