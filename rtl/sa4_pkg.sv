// sa4_pkg: shared constants, types and helper functions of the SA4 4-bit
// systolic array.
//
// 4-bit fully DSP packing ("4bF packing") puts two unsigned 4-bit
// activations and three signed 4-bit weights into one wide multiplication.
// Each operand field sits in an 11-bit slot (4 + 4 data bits plus 3 guard
// bits), so the 44-bit product holds four 11-bit partial sums p1..p4:
//   A_pk = a0 + a1*2^11                  (18-bit multiplier port)
//   W_pk = w3 + w2*2^11 + w1*2^22        (27-bit multiplicand port)
//   A_pk*W_pk = p1 + p2*2^11 + p3*2^22 + p4*2^33
//   p1 = w3*a0, p2 = w3*a1 + w2*a0, p3 = w2*a1 + w1*a0, p4 = w1*a1
// The slot width, the 3 guard bits and the 18x27 operand sizes follow the
// document; the exact bit positions are this design's reading of Fig. 1.
package sa4_pkg;

  localparam int unsigned ABITS   = 4;   // activation / weight precision
  localparam int unsigned SLOT    = 11;  // packing slot: 4+4 data + 3 guard bits
  localparam int unsigned APK_W   = 18;  // packed activation (DSP B port)
  localparam int unsigned WPK_W   = 27;  // packed weights (DSP A port)
  localparam int unsigned PSUM_W  = 48;  // DSP accumulator width
  localparam int unsigned SAU_DIM = 4;   // SAU is 4x4 PEs (Eq. 1 and Eq. 2)
  localparam int unsigned SPLIT_W = 12;  // width of one reorganised partial sum

  // Two activations of neighbouring IFM columns (2c in [3:0], 2c+1 in [7:4])
  typedef logic [2*ABITS-1:0] act_pair_t;
  // Three kernel-column weights of one kernel row: w1 in [11:8], w2 in [7:4],
  // w3 in [3:0]; w1 multiplies IFM column c-1, w3 column c+1.
  typedef logic [3*ABITS-1:0] wtrip_t;

  // Step tag that travels with every packed activation through the array.
  typedef struct packed {
    logic valid;   // this cycle carries a real step
    logic first;   // first step of a row pass
    logic last;    // last step of a row pass
  } step_tag_t;

  function automatic logic signed [APK_W-1:0] pack_act(act_pair_t a);
    logic signed [APK_W-1:0] r;
    r = '0;
    r[ABITS-1:0]           = a[ABITS-1:0];
    r[SLOT+ABITS-1:SLOT]   = a[2*ABITS-1:ABITS];
    return r;
  endfunction

  function automatic logic signed [WPK_W-1:0] pack_wgt(wtrip_t w);
    logic signed [WPK_W-1:0] w1, w2, w3;
    w1 = WPK_W'($signed(w[3*ABITS-1:2*ABITS]));
    w2 = WPK_W'($signed(w[2*ABITS-1:ABITS]));
    w3 = WPK_W'($signed(w[ABITS-1:0]));
    return w3 + (w2 <<< SLOT) + (w1 <<< (2*SLOT));
  endfunction

endpackage
