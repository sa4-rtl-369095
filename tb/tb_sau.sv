// tb_sau: runs random row passes through one 4x4 SAU (back to back and with
// idle clocks between them) and compares every output pair of every output
// channel with a directly computed 1x3 zero-padded row convolution summed
// over the four input channels. It also checks the pipeline latency: pair k
// of a pass appears ROWS + COLS + 3 clocks after step k entered, when step
// k+1 follows directly.
module tb_sau;
  import sa4_pkg::*;
  localparam int ROWS = 4, COLS = 4, CMAX = 24;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [9:0]                cfg_half_cols;
  logic                      in_valid;
  act_pair_t                 in_act [ROWS];
  wtrip_t                    in_w   [ROWS];
  logic                      out_valid;
  logic signed [SPLIT_W-1:0] out_even [COLS];
  logic signed [SPLIT_W-1:0] out_odd  [COLS];

  sau #(.ROWS(ROWS), .COLS(COLS), .STEP_W(10)) dut (.*);

  int checks = 0, failures = 0;
  int a [ROWS][CMAX];
  int w [ROWS][COLS][3];
  int C;
  int exp_q [$];       // per pair: COLS*2 values
  longint issue_q [$]; // clock at which each step with a successor entered
  longint cyc = 0;

  always @(posedge clk) cyc++;

  function automatic int conv(int j, int c);
    int s = 0;
    for (int n = 0; n < ROWS; n++) begin
      if (c > 0) s += w[n][j][0] * a[n][c-1];
      s += w[n][j][1] * a[n][c];
      if (c + 1 < C) s += w[n][j][2] * a[n][c+1];
    end
    return s;
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint t_in;
      int e;
      t_in = issue_q.pop_front();
      if (t_in >= 0) begin
        checks++;
        if (cyc - t_in != ROWS + COLS + 3) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cyc - t_in);
        end
      end
      for (int j = 0; j < COLS; j++) begin
        checks += 2;
        e = exp_q.pop_front();
        if (int'(out_even[j]) != e) begin
          failures++; if (failures < 10) $display("FAIL even col %0d got %0d exp %0d", j, out_even[j], e);
        end
        e = exp_q.pop_front();
        if (int'(out_odd[j]) != e) begin
          failures++; if (failures < 10) $display("FAIL odd col %0d got %0d exp %0d", j, out_odd[j], e);
        end
      end
    end
  end

  initial begin
    #1 rst_n = 0;
    in_valid = 0; cfg_half_cols = 10'd4;
    for (int i = 0; i < ROWS; i++) begin in_act[i] = '0; in_w[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 50; pass++) begin
      C = 2 * $urandom_range(4, CMAX/2);
      cfg_half_cols = 10'(C/2);
      for (int n = 0; n < ROWS; n++) begin
        for (int c = 0; c < C; c++) a[n][c] = $urandom_range(0, 15);
        for (int j = 0; j < COLS; j++) for (int k = 0; k < 3; k++) w[n][j][k] = $urandom_range(0, 15) - 8;
      end
      for (int k = 0; k < C/2; k++)
        for (int j = 0; j < COLS; j++) begin
          exp_q.push_back(conv(j, 2*k));
          exp_q.push_back(conv(j, 2*k+1));
        end
      for (int k = 0; k < C/2; k++) begin
        in_valid = 1;
        for (int n = 0; n < ROWS; n++) begin
          in_act[n] = {4'(a[n][2*k+1]), 4'(a[n][2*k])};
          in_w[n] = (k < COLS) ? {4'(w[n][k][0]), 4'(w[n][k][1]), 4'(w[n][k][2])} : wtrip_t'($urandom);
        end
        issue_q.push_back((k < C/2 - 1) ? cyc : -1);
        @(negedge clk);
      end
      in_valid = 0;
      for (int n = 0; n < ROWS; n++) in_act[n] = act_pair_t'($urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
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
