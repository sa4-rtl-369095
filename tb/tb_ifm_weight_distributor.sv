// tb_ifm_weight_distributor: X = 8, Y = 8 (2 x 2 SAUs, the document's
// example). Sends passes of random length with random weight beats (the
// weight stream is throttled so that passes must wait) and checks that
//  - SAU row sr receives input channels sr*4..sr*4+3 of each packet,
//  - in step k < 4 of a pass SAU (sr, sc) receives w_data[sc][sr*4+i] of the
//    pass's k-th beat, and zeros otherwise,
//  - a pass never starts before its four beats are present (stall_w seen),
//  - every packet and beat comes out exactly once, one clock after accept.
module tb_ifm_weight_distributor;
  import sa4_pkg::*;
  localparam int X = 8, Y = 8, SR = X/4, SC = Y/4;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic      in_valid, in_ready, in_first;
  act_pair_t in_act [X];
  logic      w_valid, w_ready;
  wtrip_t    w_data [SC][X];
  logic      sau_valid;
  act_pair_t sau_act [SR][4];
  wtrip_t    sau_w   [SR][SC][4];
  logic      stall_w;

  ifm_weight_distributor #(.X(X), .Y(Y), .WF_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0, stalls = 0;
  int NP = 30;
  int plen [30];

  typedef struct { act_pair_t act [X]; wtrip_t w [SC][X]; bit has_w; } exp_t;
  exp_t exp_q [$];
  wtrip_t beats [30][4][SC][X];

  always @(posedge clk) if (stall_w) stalls++;

  always @(negedge clk) begin
    if (rst_n && sau_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      for (int sr = 0; sr < SR; sr++) for (int i = 0; i < 4; i++) begin
        checks++;
        if (sau_act[sr][i] != e.act[sr*4+i]) failures++;
        for (int sc = 0; sc < SC; sc++) begin
          checks++;
          if (sau_w[sr][sc][i] != (e.has_w ? e.w[sc][sr*4+i] : '0)) failures++;
        end
      end
    end
  end

  initial begin
    #1 rst_n = 0;
    in_valid = 0; in_first = 0; w_valid = 0;
    for (int x = 0; x < X; x++) in_act[x] = '0;
    for (int sc = 0; sc < SC; sc++) for (int x = 0; x < X; x++) w_data[sc][x] = '0;
    for (int p = 0; p < NP; p++) begin
      plen[p] = $urandom_range(4, 9);
      for (int k = 0; k < 4; k++) for (int sc = 0; sc < SC; sc++) for (int x = 0; x < X; x++)
        beats[p][k][sc][x] = wtrip_t'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      // weight beats, slow: on average about one beat every three clocks
      for (int p = 0; p < NP; p++)
        for (int k = 0; k < 4; k++) begin
          while ($urandom % 3 != 0) @(negedge clk);
          w_valid = 1; w_data = beats[p][k];
          while (!w_ready) @(negedge clk);
          @(negedge clk);
          w_valid = 0;
        end
      // packets
      for (int p = 0; p < NP; p++)
        for (int k = 0; k < plen[p]; k++) begin
          exp_t e;
          for (int x = 0; x < X; x++) in_act[x] = act_pair_t'($urandom);
          in_first = (k == 0); in_valid = 1;
          #1;
          while (!in_ready) begin
            checks++;
            if (k != 0) begin failures++; $display("FAIL stall inside a pass"); end
            @(negedge clk); #1;
          end
          e.act = in_act; e.has_w = (k < 4);
          if (k < 4) e.w = beats[p][k];
          exp_q.push_back(e);
          @(negedge clk);
          in_valid = 0;
        end
    join
    repeat (3) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    if (stalls == 0) begin failures++; $display("FAIL no weight stall"); end
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
