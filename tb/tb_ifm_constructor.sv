// tb_ifm_constructor: loads small layers (X = 4 channels per packet, two
// packets per off-chip word) through the constructor and checks the packet
// stream it produces against the expected sliding-window order
//   for r; for mt; for kr < K; for nt; for c2: IFM row r+kr-K/2 (zero outside)
// for kernel heights K = 3 and K = 1,
// including the first/last marks of each pass. The off-chip stream and the
// consumer's ready are randomly throttled. It also checks that the row
// cache waits for rows that are not loaded yet (stall_ifm) and that a pass,
// once started, is delivered without gaps when the consumer is always ready.
module tb_ifm_constructor;
  import sa4_pkg::*;
  localparam int X = 4, NMAX = 16, CMAX = 16, DW = 64, PKT = X * 8, PPW = DW / PKT;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic          start;
  logic [9:0]    cfg_rows, cfg_n_tiles, cfg_half_cols, cfg_m_tiles;
  logic [1:0]    cfg_kr;
  logic          busy;
  logic          dram_valid, dram_ready;
  logic [DW-1:0] dram_data;
  logic          out_valid, out_ready;
  act_pair_t     out_act [X];
  logic          out_first, out_last, stall_ifm;

  ifm_constructor #(.X(X), .KR(3), .N_MAX(NMAX), .C_MAX(CMAX), .DRAM_W(DW), .DIM_W(10)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, gaps = 0;
  int R, C, NT, MT;
  logic [3:0] ifm [8][CMAX][NMAX];
  bit thr;

  typedef struct { act_pair_t act [X]; bit first, last; } pkt_t;
  pkt_t exp_q [$];

  always @(posedge clk) if (stall_ifm) stalls++;

  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      pkt_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra packet"); end
      else begin
        e = exp_q.pop_front();
        if (out_act != e.act || out_first != e.first || out_last != e.last) begin
          failures++;
          if (failures < 10) $display("FAIL packet mismatch (%0d left)", exp_q.size());
        end
      end
    end
  end

  task automatic feed();
    logic [DW-1:0] word;
    int p;
    p = 0; word = '0;
    for (int r = 0; r < R; r++)
      for (int c2 = 0; c2 < C/2; c2++)
        for (int nt = 0; nt < NT; nt++) begin
          for (int x = 0; x < X; x++)
            word[p*PKT + x*8 +: 8] = {ifm[r][2*c2+1][nt*X+x], ifm[r][2*c2][nt*X+x]};
          p++;
          if (p == PPW || (r == R-1 && c2 == C/2-1 && nt == NT-1)) begin
            while (thr && $urandom % 3 == 0) @(negedge clk);
            dram_valid = 1; dram_data = word;
            while (!dram_ready) @(negedge clk);
            @(negedge clk);
            dram_valid = 0; p = 0; word = '0;
          end
        end
  endtask

  task automatic run(int r_, int c_, int nt_, int mt_, bit thr_, int kh = 3);
    pkt_t e;
    int in_pass_gap;
    R = r_; C = c_; NT = nt_; MT = mt_; thr = thr_;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int n = 0; n < NT*X; n++)
      ifm[r][c][n] = 4'($urandom);
    for (int r = 0; r < R; r++) for (int mt = 0; mt < MT; mt++) for (int kr = 0; kr < kh; kr++)
      for (int nt = 0; nt < NT; nt++) for (int c2 = 0; c2 < C/2; c2++) begin
        int sr;
        sr = r + kr - kh / 2;
        for (int x = 0; x < X; x++)
          e.act[x] = (sr < 0 || sr >= R) ? 8'h00 : {ifm[sr][2*c2+1][nt*X+x], ifm[sr][2*c2][nt*X+x]};
        e.first = (c2 == 0); e.last = (c2 == C/2 - 1);
        exp_q.push_back(e);
      end
    @(negedge clk);
    cfg_rows = 10'(R); cfg_half_cols = 10'(C/2); cfg_n_tiles = 10'(NT); cfg_m_tiles = 10'(MT);
    cfg_kr = 2'(kh);
    start = 1;
    @(negedge clk);
    start = 0;
    fork
      feed();
      begin
        in_pass_gap = 0;
        while (exp_q.size() != 0) begin
          out_ready = thr ? ($urandom % 4 != 0) : 1'b1;
          @(negedge clk);
        end
      end
    join
    out_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  // no gaps inside a pass when the consumer is always ready
  logic in_pass = 0;
  always @(negedge clk) begin
    if (rst_n && out_ready && !thr) begin
      if (in_pass && !out_valid) gaps++;
      if (out_valid) in_pass = !out_last;
    end
  end

  initial begin
    #1 rst_n = 0;
    start = 0; dram_valid = 0; dram_data = '0; out_ready = 1; thr = 0;
    cfg_rows = '0; cfg_half_cols = '0; cfg_n_tiles = '0; cfg_m_tiles = '0; cfg_kr = 2'd3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(4, 8, 1, 1, 0);
    run(6, 10, 3, 2, 0);
    run(5, 16, 4, 1, 1);
    run(8, 12, 2, 3, 1);
    run(5, 8, 2, 2, 0, 1);
    run(6, 10, 1, 2, 1, 1);
    checks += 2;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    if (gaps != 0)   begin failures++; $display("FAIL %0d gaps inside passes", gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
