// tb_row_cached_accumulator: Y = 4 channels. For small layers (rows, tiles,
// passes and C/2 chosen per run) it sends random partial-result pairs in the
// array's order (row, tile, pass, pair) with random idle clocks and checks
// that every output equals the sum over all passes, carries the right
// row/tile/column tags, appears once per pair and tile, and that done
// pulses with the last one.
module tb_row_cached_accumulator;
  import sa4_pkg::*;
  localparam int Y = 4, CMAX = 32, IW = 14;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic              start;
  logic [9:0]        cfg_half_cols, cfg_m_tiles, cfg_rows;
  logic [11:0]       cfg_passes;
  logic              in_valid;
  logic signed [IW-1:0] in_even [Y];
  logic signed [IW-1:0] in_odd  [Y];
  logic              out_valid;
  logic signed [31:0] out_even [Y];
  logic signed [31:0] out_odd  [Y];
  logic [9:0]        out_row, out_mt, out_c2;
  logic              done;

  row_cached_accumulator #(.Y(Y), .C_MAX(CMAX), .IN_W(IW), .ACC_W(32), .DIM_W(10), .PASS_W(12)) dut (.*);

  int checks = 0, failures = 0, dones = 0;
  typedef struct { int r, mt, c2; int e [Y]; int o [Y]; } res_t;
  res_t exp_q [$];

  always @(negedge clk) begin
    if (rst_n && done) dones++;
    if (rst_n && out_valid) begin
      res_t x;
      checks += 1 + Y;
      x = exp_q.pop_front();
      if (int'(out_row) != x.r || int'(out_mt) != x.mt || int'(out_c2) != x.c2) failures++;
      for (int y = 0; y < Y; y++)
        if (out_even[y] != x.e[y] || out_odd[y] != x.o[y]) failures++;
    end
  end

  task automatic run(int R, int MT, int P, int H);
    res_t x;
    int se [CMAX/2][Y];
    int so [CMAX/2][Y];
    @(negedge clk);
    cfg_rows = 10'(R); cfg_m_tiles = 10'(MT); cfg_passes = 12'(P); cfg_half_cols = 10'(H);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int r = 0; r < R; r++)
      for (int mt = 0; mt < MT; mt++) begin
        for (int c2 = 0; c2 < H; c2++) for (int y = 0; y < Y; y++) begin se[c2][y] = 0; so[c2][y] = 0; end
        for (int p = 0; p < P; p++)
          for (int c2 = 0; c2 < H; c2++) begin
            for (int y = 0; y < Y; y++) begin
              in_even[y] = IW'($urandom); in_odd[y] = IW'($urandom);
              se[c2][y] += int'(in_even[y]); so[c2][y] += int'(in_odd[y]);
            end
            if (p == P - 1) begin
              x.r = r; x.mt = mt; x.c2 = c2;
              for (int y = 0; y < Y; y++) begin x.e[y] = se[c2][y]; x.o[y] = so[c2][y]; end
              exp_q.push_back(x);
            end
            in_valid = 1;
            @(negedge clk);
            in_valid = 0;
            repeat ($urandom_range(0, 1)) @(negedge clk);
          end
      end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #1 rst_n = 0;
    start = 0; in_valid = 0;
    cfg_rows = '0; cfg_m_tiles = '0; cfg_passes = '0; cfg_half_cols = '0;
    for (int y = 0; y < Y; y++) begin in_even[y] = '0; in_odd[y] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2, 1, 1, 4);
    run(3, 2, 3, 5);
    run(2, 3, 12, 16);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    if (dones != 3) begin failures++; $display("FAIL done pulsed %0d times", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
