// tb_sa4_top: end-to-end test of the SA4 array at its default size
// (X x Y = 16 x 20).
//
// Runs several complete convolution layers through the design, feeding the
// IFM as off-chip words and the weights as beats, and compares every OFM
// value with a direct 3x3 "same" convolution computed here. The layers cover
// one and several input-channel tiles (multi-pass accumulation), several
// output-channel tiles with unused channels, throttled and full-rate input
// streams, and a 1x1 layer (kernel height 1). The last layer is
// 56 x 56 x 64 -> 64, the latency test layer of the design's evaluation, fed
// at full rate: its run time is checked against the ideal
// R * M/Y * K * N/X * C/2 clocks (K the kernel height).
// Mechanisms counted (each must occur): IFM-row stalls, weight stalls,
// zero-padded rows, multi-pass accumulation, multi-tile output channels,
// 1x1 layers.
module tb_sa4_top;
  import sa4_pkg::*;

  localparam int X = 16, Y = 20, KR = 3;
  localparam int RM = 56, CM = 56, NM = 64, MM = 64;
  localparam int PKT_W = X * 8, DRAM_W = 256, PPW = DRAM_W / PKT_W;
  localparam int SC = Y / 4;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic              start;
  logic [9:0]        cfg_rows, cfg_n_tiles, cfg_half_cols, cfg_m_tiles;
  logic [1:0]        cfg_kr;
  logic              busy, done;
  logic              dram_valid, dram_ready;
  logic [DRAM_W-1:0] dram_data;
  logic              w_valid, w_ready;
  wtrip_t            w_data [SC][X];
  logic              ofm_valid;
  logic signed [31:0] ofm_even [Y];
  logic signed [31:0] ofm_odd  [Y];
  logic [9:0]        ofm_row, ofm_mt, ofm_c2;
  logic              stall_ifm, stall_w;

  sa4_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall_ifm = 0, n_stall_w = 0, n_pad_rows = 0, n_multi_pass = 0, n_multi_mt = 0, n_1x1 = 0;

  logic [3:0]        ifm [RM][CM][NM];
  logic signed [3:0] wt  [MM][NM][3][3];

  int L_R, L_C, L_N, L_M, L_MT, L_NT, L_KH;
  bit throttle;
  int outputs_seen;

  always @(posedge clk) begin
    if (stall_ifm) n_stall_ifm++;
    if (stall_w)   n_stall_w++;
  end

  function automatic int ref_out(int r, int c, int m);
    int s = 0;
    for (int kr = 0; kr < 3; kr++)
      for (int kc = 0; kc < 3; kc++) begin
        int rr = r + kr - 1, cc = c + kc - 1;
        if (rr >= 0 && rr < L_R && cc >= 0 && cc < L_C)
          for (int n = 0; n < L_N; n++) s += int'(wt[m][n][kr][kc]) * int'(ifm[rr][cc][n]);
      end
    return s;
  endfunction

  task automatic feed_dram();
    logic [DRAM_W-1:0] word;
    int p = 0;
    word = '0;
    for (int r = 0; r < L_R; r++)
      for (int c2 = 0; c2 < L_C / 2; c2++)
        for (int nt = 0; nt < L_NT; nt++) begin
          for (int x = 0; x < X; x++)
            word[p*PKT_W + x*8 +: 8] = {ifm[r][2*c2+1][nt*X+x], ifm[r][2*c2][nt*X+x]};
          p++;
          if (p == PPW || (r == L_R-1 && c2 == L_C/2-1 && nt == L_NT-1)) begin
            while (throttle && ($urandom % 4 == 0)) @(negedge clk);
            dram_valid = 1'b1;
            dram_data  = word;
            while (!dram_ready) @(negedge clk);
            @(negedge clk);
            dram_valid = 1'b0;
            p = 0;
            word = '0;
          end
        end
  endtask

  task automatic feed_weights();
    for (int r = 0; r < L_R; r++)
      for (int mt = 0; mt < L_MT; mt++)
        for (int kr = 0; kr < L_KH; kr++)
          for (int nt = 0; nt < L_NT; nt++)
            for (int k = 0; k < 4; k++) begin
              int a;
              a = kr + (3 - L_KH) / 2;
              for (int sc = 0; sc < SC; sc++)
                for (int x = 0; x < X; x++) begin
                  int m = mt*Y + sc*4 + k, n = nt*X + x;
                  if (m < L_M) w_data[sc][x] = {wt[m][n][a][0], wt[m][n][a][1], wt[m][n][a][2]};
                  else         w_data[sc][x] = '0;
                end
              while (throttle && ($urandom % 8 == 0)) @(negedge clk);
              w_valid = 1'b1;
              while (!w_ready) @(negedge clk);
              @(negedge clk);
              w_valid = 1'b0;
            end
  endtask

  always @(posedge clk) begin
    if (ofm_valid) begin
      outputs_seen++;
      for (int y = 0; y < Y; y++) begin
        int m, e0, e1;
        m = int'(ofm_mt) * Y + y;
        if (m < L_M) begin
          e0 = ref_out(int'(ofm_row), 2*int'(ofm_c2), m);
          e1 = ref_out(int'(ofm_row), 2*int'(ofm_c2)+1, m);
          checks += 2;
          if (ofm_even[y] != e0 || ofm_odd[y] != e1) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH r=%0d c2=%0d m=%0d got %0d,%0d exp %0d,%0d",
                       ofm_row, ofm_c2, m, ofm_even[y], ofm_odd[y], e0, e1);
          end
        end
      end
    end
  end

  task automatic run_layer(int R, int C, int N, int M, int KH, bit thr, bit check_time);
    longint t0, cyc, ideal;
    L_R = R; L_C = C; L_N = N; L_M = M; throttle = thr;
    L_NT = N / X; L_MT = (M + Y - 1) / Y; L_KH = KH;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int n = 0; n < N; n++)
      ifm[r][c][n] = 4'($urandom);
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++)
      for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++)
        wt[m][n][a][b] = (KH == 1 && !(a == 1 && b == 1)) ? 4'd0 : 4'($urandom);
    outputs_seen = 0;
    n_pad_rows++;                       // rows 0 and R-1 read zero rows above/below
    if (L_NT > 1) n_multi_pass++;
    if (L_MT > 1) n_multi_mt++;
    if (KH == 1) n_1x1++;
    @(negedge clk);
    cfg_rows = 10'(R); cfg_half_cols = 10'(C/2); cfg_n_tiles = 10'(L_NT); cfg_m_tiles = 10'(L_MT);
    cfg_kr = 2'(KH);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = $time / 10;
    fork
      feed_dram();
      feed_weights();
      begin
        while (!done) @(negedge clk);
      end
    join
    cyc = $time / 10 - t0;
    repeat (4) @(negedge clk);
    ideal = longint'(R) * L_MT * KH * L_NT * (C/2);
    $display("layer R=%0d C=%0d N=%0d M=%0d K=%0d: %0d clocks, ideal %0d", R, C, N, M, KH, cyc, ideal);
    checks++;
    if (outputs_seen != R * L_MT * (C/2)) begin
      failures++;
      $display("FAIL: %0d output beats, expected %0d", outputs_seen, R * L_MT * (C/2));
    end
    if (check_time) begin
      checks++;
      // start-up: two IFM rows must be loaded before the first full pass
      if (cyc > ideal + 2 * L_NT * (C/2) + 64) begin
        failures++;
        $display("FAIL: layer took %0d clocks, ideal %0d", cyc, ideal);
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;
    start = 0; dram_valid = 0; w_valid = 0; dram_data = '0;
    cfg_rows = '0; cfg_half_cols = '0; cfg_n_tiles = '0; cfg_m_tiles = '0; cfg_kr = 2'd3;
    for (int sc = 0; sc < SC; sc++) for (int x = 0; x < X; x++) w_data[sc][x] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_layer(3, 8, 16, 20, 3, 1'b0, 1'b1);
    run_layer(4, 10, 32, 24, 3, 1'b1, 1'b0);
    run_layer(5, 16, 48, 45, 3, 1'b1, 1'b0);
    run_layer(6, 12, 32, 40, 1, 1'b0, 1'b1);
    run_layer(RM, CM, NM, MM, 3, 1'b0, 1'b1);
    checks += 6;
    if (n_stall_ifm == 0)  begin failures++; $display("FAIL: no IFM stall seen"); end
    if (n_stall_w == 0)    begin failures++; $display("FAIL: no weight stall seen"); end
    if (n_pad_rows == 0)   begin failures++; $display("FAIL: no padded row"); end
    if (n_multi_pass == 0) begin failures++; $display("FAIL: no multi-pass layer"); end
    if (n_multi_mt == 0)   begin failures++; $display("FAIL: no multi-tile layer"); end
    if (n_1x1 == 0)        begin failures++; $display("FAIL: no 1x1 layer"); end
    $display("mechanisms: ifm_stall=%0d weight_stall=%0d pad_layers=%0d multipass=%0d multitile=%0d 1x1=%0d",
             n_stall_ifm, n_stall_w, n_pad_rows, n_multi_pass, n_multi_mt, n_1x1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (outputs %0d, ifm stalls %0d, w stalls %0d)", outputs_seen, n_stall_ifm, n_stall_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
