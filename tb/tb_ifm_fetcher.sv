// tb_ifm_fetcher: drives a new random packet vector and tag every clock and
// checks that row i of the fetcher output shows the vector of row i that was
// applied exactly i+1 clocks earlier (the systolic skew).
module tb_ifm_fetcher;
  import sa4_pkg::*;
  localparam int ROWS = 4;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  act_pair_t in_act [ROWS];
  step_tag_t in_tag;
  act_pair_t out_act [ROWS];
  step_tag_t out_tag [ROWS];

  ifm_fetcher #(.ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0;
  act_pair_t h_act [0:399][ROWS];
  step_tag_t h_tag [0:399];

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < ROWS; i++) in_act[i] = '0;
    in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < ROWS; i++) begin
        in_act[i] = act_pair_t'($urandom);
        h_act[t][i] = in_act[i];
      end
      in_tag = step_tag_t'($urandom);
      h_tag[t] = in_tag;
      @(negedge clk);
      for (int i = 0; i < ROWS; i++)
        if (t - i >= 0) begin
          checks++;
          if (out_act[i] != h_act[t-i][i] || out_tag[i] != h_tag[t-i]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d row=%0d", t, i);
          end
        end
    end
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
