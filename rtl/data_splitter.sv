// data_splitter: the column-shared result splitter of an SAU.
//
// The PEs of one SAU column add their packed products into one 48-bit sum,
// so the splitter sees four 11-bit signed slots p1..p4, each already summed
// over the column's input channels (at most four PEs, which is what the three
// guard bits allow: document Eq. 2). It recovers the slots with borrow
// correction (a negative lower slot borrows one from the slot above) and then
// reorganises them into convolution outputs along the IFM column direction,
// as in the table of Fig. 1:
//   out[2k]   = p4(k-1) + p2(k)        (p4 of the previous step, 0 at pass start)
//   out[2k+1] = p3(k)   + p1(k+1)      (p1 of the next step, 0 after the last)
// which realises out[c] = w1*a[c-1] + w2*a[c] + w3*a[c+1] with one zero column
// of padding at each end of the row ("same" 1x3 row convolution).
//
// Because out[2k+1] needs the next step's p1, pair k is emitted when step k+1
// arrives, or in the clock after the pass's last step. A pass of C/2 steps
// therefore yields exactly C/2 pairs; the boundary handling is this design's
// choice. Outputs are registered: out_valid pulses once per pair.
module data_splitter
  import sa4_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [PSUM_W-1:0]   psum,
  input  step_tag_t                  tag,
  output logic                       out_valid,
  output logic signed [SPLIT_W-1:0]  out_even,   // out[2k]
  output logic signed [SPLIT_W-1:0]  out_odd     // out[2k+1]
);

  logic signed [SLOT-1:0]   p1, p2, p3, p4;
  logic signed [PSUM_W-1:0] r1, r2;

  // Slot extraction with borrow correction.
  always_comb begin
    p1 = psum[SLOT-1:0];
    r1 = (psum - PSUM_W'(p1)) >>> SLOT;
    p2 = r1[SLOT-1:0];
    r2 = (r1 - PSUM_W'(p2)) >>> SLOT;
    p3 = r2[SLOT-1:0];
    p4 = SLOT'((r2 - PSUM_W'(p3)) >>> SLOT);
  end

  logic                      pend_valid, pend_last;
  logic signed [SPLIT_W-1:0] hold_even;    // out[2k] of the pending pair
  logic signed [SLOT-1:0]    hold_p3, prev_p4;
  logic                      emit, use_p1;

  always_comb begin
    use_p1 = tag.valid && !tag.first;
    emit   = pend_valid && (use_p1 || pend_last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid <= 1'b0;
      pend_last  <= 1'b0;
      hold_even  <= '0;
      hold_p3    <= '0;
      prev_p4    <= '0;
      out_valid  <= 1'b0;
      out_even   <= '0;
      out_odd    <= '0;
    end else begin
      out_valid <= emit;
      if (emit) begin
        out_even <= hold_even;
        out_odd  <= SPLIT_W'(hold_p3) + (use_p1 ? SPLIT_W'(p1) : SPLIT_W'(0));
      end
      if (tag.valid) begin
        hold_even  <= (tag.first ? SPLIT_W'(0) : SPLIT_W'(prev_p4)) + SPLIT_W'(p2);
        hold_p3    <= p3;
        prev_p4    <= p4;
        pend_valid <= 1'b1;
        pend_last  <= tag.last;
      end else if (emit) begin
        pend_valid <= 1'b0;
      end
    end
  end

  // After the last step of a pass only a new pass (or idle) may follow.
  a_pass_order: assert property (@(posedge clk) disable iff (!rst_n)
    (pend_valid && pend_last && tag.valid) |-> tag.first);

endmodule
