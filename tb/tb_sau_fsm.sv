// tb_sau_fsm: drives row passes of random length C/2 (>= 4), back to back
// and with idle clocks in between, and checks the controller's first/last
// marks and its weight-slot outputs (valid with column index 0..3 in the
// first four steps of each pass, quiet otherwise).
module tb_sau_fsm;
  import sa4_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic [9:0] cfg_half_cols;
  logic       in_valid;
  step_tag_t  tag;
  logic       w_valid;
  logic [1:0] w_col;

  sau_fsm #(.COLS(4), .STEP_W(10)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1 rst_n = 0;
    in_valid = 0; cfg_half_cols = 10'd4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 40; pass++) begin
      int h;
      h = $urandom_range(4, 20);
      cfg_half_cols = 10'(h);
      for (int k = 0; k < h; k++) begin
        in_valid = 1;
        #1;
        checks++;
        if (tag.valid != 1 || tag.first != (k == 0) || tag.last != (k == h-1) ||
            w_valid != (k < 4) || (k < 4 && w_col != 2'(k))) begin
          failures++;
          if (failures < 10) $display("FAIL pass %0d step %0d: f=%b l=%b wv=%b wc=%0d", pass, k,
                                      tag.first, tag.last, w_valid, w_col);
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat ($urandom_range(0, 2)) begin
        #1;
        checks++;
        if (tag.valid || w_valid) begin failures++; $display("FAIL activity while idle"); end
        @(negedge clk);
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
