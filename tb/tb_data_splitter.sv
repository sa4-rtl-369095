// tb_data_splitter: feeds the splitter with column sums of four PEs for
// random row passes (back-to-back passes and passes separated by idle
// clocks) and compares each emitted pair with a directly computed
// zero-padded 1x3 row convolution summed over four channels:
//   out[c] = sum_n w1*a[c-1] + w2*a[c] + w3*a[c+1]
// The packed column sum is formed here from its six products per PE.
module tb_data_splitter;
  import sa4_pkg::*;
  localparam int NCH = 4, CMAX = 16;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic signed [PSUM_W-1:0]  psum;
  step_tag_t                 tag;
  logic                      out_valid;
  logic signed [SPLIT_W-1:0] out_even, out_odd;

  data_splitter dut (.*);

  int checks = 0, failures = 0;
  int a [NCH][CMAX];
  int w [NCH][3];
  int exp_q [$];
  int C;

  function automatic int conv(int c);
    int s = 0;
    for (int n = 0; n < NCH; n++) begin
      if (c - 1 >= 0) s += w[n][0] * a[n][c-1];
      s += w[n][1] * a[n][c];
      if (c + 1 < C) s += w[n][2] * a[n][c+1];
    end
    return s;
  endfunction

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int e0, e1;
      checks++;
      if (exp_q.size() < 2) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e0 = exp_q.pop_front(); e1 = exp_q.pop_front();
        if (int'(out_even) != e0 || int'(out_odd) != e1) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d,%0d exp %0d,%0d", out_even, out_odd, e0, e1);
        end
      end
    end
  end

  initial begin
    #1 rst_n = 0;
    psum = '0; tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 60; pass++) begin
      C = 2 * $urandom_range(4, CMAX/2);
      for (int n = 0; n < NCH; n++) begin
        for (int c = 0; c < C; c++) a[n][c] = $urandom_range(0, 15);
        // extreme weights now and then to exercise the guard bits
        for (int k = 0; k < 3; k++) w[n][k] = (pass % 4 == 0) ? -8 : $urandom_range(0, 15) - 8;
        if (pass % 4 == 0) for (int c = 0; c < C; c++) a[n][c] = 15;
      end
      for (int c = 0; c < C; c++) exp_q.push_back(conv(c));
      for (int k = 0; k < C/2; k++) begin
        longint s, a0, a1;
        s = 0;
        for (int n = 0; n < NCH; n++) begin
          a0 = a[n][2*k]; a1 = a[n][2*k+1];
          s += (a0 + a1 * 2048) * (longint'(w[n][2]) + longint'(w[n][1]) * 2048
                                   + longint'(w[n][0]) * 2048 * 2048);
        end
        psum = PSUM_W'(s);
        tag  = '{valid: 1'b1, first: (k == 0), last: (k == C/2 - 1)};
        @(negedge clk);
      end
      tag = '0;
      psum = PSUM_W'($urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
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
