// ifm_constructor: IFM row cache and sliding-window stream generator of SA4
// (document Sec. IV-B1, Fig. 9).
//
// The constructor reads wide words (DRAM_W bits) of the input feature map
// from off-chip memory, cuts every word into packets of X*2*4 bits (two
// neighbouring IFM columns of X input channels) and stores them in a cache of
// KR+1 IFM rows with up to N_MAX channels. From that cache it generates the
// continuous packet stream of the row-temporal weight-stationary dataflow:
//   for r < R; for mt < M/Y; for kr < K; for nt < N/X; for c2 < C/2
//     packet(IFM row r+kr-K/2, channels nt*X.., columns 2*c2, 2*c2+1)
// The kernel height K (cfg_kr, odd, at most KR) is set per layer, so a 1x1
// layer takes one pass per channel tile instead of KR.
// Rows outside the image read as zero (stride 1, "same" padding). One cache
// row more than the kernel height lets row r+KR/2+1 load while output row r
// is computed, so the IFM is read from off-chip exactly once.
//
// Interface: start (one clock, with the cfg_* inputs valid) begins a layer;
// dram_* is a valid/ready word stream in packet order (below); out_* is a
// valid/ready packet stream with first/last marks of each row pass.
// Off-chip layout (this design's assumption): the layer is one continuous
// sequence of packets, row by row, within a row column pair by column pair
// and, within a pair, channel tile by channel tile; packet p of a word sits in
// bits [p*X*8 +: X*8]. Inside a packet, byte x holds channel x with column 2c
// in its low nibble. The document states only that the words are packed along
// the input channels.
// Timing: one packet is written and one read per clock; reads have one clock
// of latency. A pass starts only when its source row is fully loaded
// (stall_ifm flags a clock lost to that).
module ifm_constructor
  import sa4_pkg::*;
#(
  parameter int unsigned X      = 16,
  parameter int unsigned KR     = 3,
  parameter int unsigned N_MAX  = 512,
  parameter int unsigned C_MAX  = 320,
  parameter int unsigned DRAM_W = 256,
  parameter int unsigned DIM_W  = 10,   // width of R, C/2, N/X and M/Y counts
  parameter int unsigned PKT_W  = X * 2 * ABITS,
  parameter int unsigned KRW    = $clog2(KR + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // layer configuration
  input  logic              start,
  input  logic [DIM_W-1:0]  cfg_rows,       // R
  input  logic [DIM_W-1:0]  cfg_n_tiles,    // N/X
  input  logic [DIM_W-1:0]  cfg_half_cols,  // C/2
  input  logic [DIM_W-1:0]  cfg_m_tiles,    // ceil(M/Y)
  input  logic [KRW-1:0]    cfg_kr,         // kernel height, odd, 1..KR
  output logic              busy,
  // off-chip read stream
  input  logic              dram_valid,
  output logic              dram_ready,
  input  logic [DRAM_W-1:0] dram_data,
  // packet stream to the distributor
  output logic              out_valid,
  input  logic              out_ready,
  output act_pair_t         out_act [X],
  output logic              out_first,
  output logic              out_last,
  output logic              stall_ifm
);

  localparam int unsigned PPW    = DRAM_W / PKT_W;      // packets per word
  localparam int unsigned NT_MAX = N_MAX / X;
  localparam int unsigned C2_MAX = C_MAX / 2;
  localparam int unsigned SLOTS  = KR + 1;
  localparam int unsigned DEPTH  = SLOTS * NT_MAX * C2_MAX;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic [PKT_W-1:0] mem [DEPTH];

  logic [DIM_W-1:0] rows, n_tiles, half_cols, m_tiles;
  logic [KRW-1:0]   kr_n;
  logic [KRW-1:0]   pad;                        // rows of zero padding, kr_n/2
  assign pad = kr_n >> 1;

  // ---------------- write side: unpack words into the row cache ----------
  logic [DRAM_W-1:0]        word;
  logic                     word_valid;
  logic [$clog2(PPW+1)-1:0] word_idx;
  logic [DIM_W-1:0]         wr_row, wr_nt, wr_c2;
  logic [$clog2(SLOTS)-1:0] wr_slot;
  logic [DIM_W-1:0]         rd_r;
  logic                     wr_active, wr_ok, wr_fire;
  logic [PKT_W-1:0]         wr_pkt;

  always_comb begin
    wr_active  = (wr_row < rows);
    // Row wr_row may overwrite the slot of row rd_r-pad-1, no longer needed.
    wr_ok      = wr_active && (32'(wr_row) <= 32'(rd_r) + KR - 32'(pad));
    wr_fire    = word_valid && wr_ok;
    wr_pkt     = word[word_idx*PKT_W +: PKT_W];
    dram_ready = !word_valid || (wr_fire && 32'(word_idx) == PPW - 1);
  end

  always_ff @(posedge clk) begin
    if (wr_fire)
      mem[AW'(wr_slot) * AW'(NT_MAX * C2_MAX) + AW'(wr_nt) * AW'(C2_MAX) + AW'(wr_c2)] <= wr_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word       <= '0;
      word_valid <= 1'b0;
      word_idx   <= '0;
      wr_row     <= '0;
      wr_nt      <= '0;
      wr_c2      <= '0;
      wr_slot    <= '0;
    end else if (start) begin
      word_valid <= 1'b0;
      word_idx   <= '0;
      wr_row     <= '0;
      wr_nt      <= '0;
      wr_c2      <= '0;
      wr_slot    <= '0;
    end else begin
      if (dram_valid && dram_ready) begin
        word       <= dram_data;
        word_valid <= 1'b1;
        word_idx   <= '0;
      end else if (wr_fire) begin
        if (32'(word_idx) == PPW - 1) word_valid <= 1'b0;
        else                     word_idx   <= word_idx + 1'b1;
      end
      if (wr_fire) begin
        if (wr_nt == n_tiles - 1'b1) begin
          wr_nt <= '0;
          if (wr_c2 == half_cols - 1'b1) begin
            wr_c2   <= '0;
            wr_row  <= wr_row + 1'b1;
            wr_slot <= (32'(wr_slot) == SLOTS - 1) ? '0 : wr_slot + 1'b1;
          end else begin
            wr_c2 <= wr_c2 + 1'b1;
          end
        end else begin
          wr_nt <= wr_nt + 1'b1;
        end
      end
    end
  end

  // ---------------- read side: sliding-window pass generator -------------
  logic                     rd_active;
  logic [DIM_W-1:0]         rd_mt, rd_nt, rd_c2;
  logic [$clog2(KR)-1:0]    rd_kr;
  logic signed [DIM_W+1:0]  src_row;
  logic                     src_zero, row_ok, adv, issue;
  logic [$clog2(SLOTS)-1:0] src_slot;
  logic [AW-1:0]            rd_addr;
  logic [PKT_W-1:0]         rd_data;
  logic                     out_zero;

  always_comb begin
    src_row  = $signed({2'b00, rd_r}) + $signed((DIM_W+2)'(rd_kr)) - $signed((DIM_W+2)'(pad));
    src_zero = (src_row < 0) || (src_row >= $signed({2'b00, rows}));
    row_ok   = src_zero || (src_row < $signed({2'b00, wr_row}));
    src_slot = $clog2(SLOTS)'(unsigned'(src_row) % SLOTS);
    rd_addr  = AW'(src_slot) * AW'(NT_MAX * C2_MAX) + AW'(rd_nt) * AW'(C2_MAX) + AW'(rd_c2);
    adv      = out_ready || !out_valid;
    issue    = rd_active && row_ok && adv;
    stall_ifm = rd_active && adv && !row_ok;
  end

  always_ff @(posedge clk) begin
    if (issue && !src_zero) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows <= '0; n_tiles <= '0; half_cols <= '0; m_tiles <= '0; kr_n <= '0;
      rd_active <= 1'b0;
      rd_r <= '0; rd_mt <= '0; rd_kr <= '0; rd_nt <= '0; rd_c2 <= '0;
      out_valid <= 1'b0; out_first <= 1'b0; out_last <= 1'b0; out_zero <= 1'b0;
    end else if (start) begin
      rows      <= cfg_rows;
      n_tiles   <= cfg_n_tiles;
      half_cols <= cfg_half_cols;
      m_tiles   <= cfg_m_tiles;
      kr_n      <= cfg_kr;
      rd_active <= 1'b1;
      rd_r <= '0; rd_mt <= '0; rd_kr <= '0; rd_nt <= '0; rd_c2 <= '0;
      out_valid <= 1'b0;
    end else begin
      if (adv) begin
        out_valid <= issue;
        out_first <= (rd_c2 == '0);
        out_last  <= (rd_c2 == half_cols - 1'b1);
        out_zero  <= src_zero;
      end
      if (issue) begin
        if (rd_c2 != half_cols - 1'b1) rd_c2 <= rd_c2 + 1'b1;
        else begin
          rd_c2 <= '0;
          if (rd_nt != n_tiles - 1'b1) rd_nt <= rd_nt + 1'b1;
          else begin
            rd_nt <= '0;
            if (32'(rd_kr) != 32'(kr_n) - 1) rd_kr <= rd_kr + 1'b1;
            else begin
              rd_kr <= '0;
              if (rd_mt != m_tiles - 1'b1) rd_mt <= rd_mt + 1'b1;
              else begin
                rd_mt <= '0;
                rd_r  <= rd_r + 1'b1;
                if (rd_r == rows - 1'b1) rd_active <= 1'b0;
              end
            end
          end
        end
      end
    end
  end

  for (genvar x = 0; x < X; x++) begin : g_out
    assign out_act[x] = out_zero ? '0 : rd_data[x*2*ABITS +: 2*ABITS];
  end

  assign busy = rd_active || wr_active || out_valid;

endmodule
