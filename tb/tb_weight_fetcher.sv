// tb_weight_fetcher: issues weight columns 0..3 on consecutive clocks (as in
// the first four steps of a pass), with idle gaps between passes, and checks
// that PE (i, j) receives the triple of row i of column j through w_row[i]
// with exactly one load pulse, i+1+j clocks after column 0 was issued, which
// is when the pass's first activation reaches that PE.
module tb_weight_fetcher;
  import sa4_pkg::*;
  localparam int ROWS = 4, COLS = 4;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic            in_valid;
  logic [1:0]      in_col;
  wtrip_t          in_w [ROWS];
  wtrip_t          w_row [ROWS];
  logic [COLS-1:0] w_load [ROWS];

  weight_fetcher #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  wtrip_t exp_w [ROWS][COLS];
  int     loads [ROWS][COLS];

  initial begin
    #1 rst_n = 0;
    in_valid = 0; in_col = 0;
    for (int i = 0; i < ROWS; i++) in_w[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 20; pass++) begin
      for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) begin
        exp_w[i][j] = wtrip_t'($urandom);
        loads[i][j] = 0;
      end
      // cycle s of the pass (s = 0 issues column 0)
      for (int s = 0; s < ROWS + COLS + 2; s++) begin
        in_valid = (s < COLS);
        in_col   = 2'(s);
        for (int i = 0; i < ROWS; i++) in_w[i] = (s < COLS) ? exp_w[i][s] : wtrip_t'($urandom);
        @(negedge clk);
        // after the edge ending cycle s, outputs show what PE (i,j) loads at
        // the next edge: expected when s == i + j
        for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) begin
          if (w_load[i][j]) begin
            loads[i][j]++;
            checks++;
            if (s != i + j || w_row[i] != exp_w[i][j]) begin
              failures++;
              if (failures < 10) $display("FAIL pass %0d PE(%0d,%0d) at s=%0d", pass, i, j, s);
            end
          end
        end
      end
      for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) begin
        checks++;
        if (loads[i][j] != 1) begin failures++; $display("FAIL PE(%0d,%0d) loaded %0d times", i, j, loads[i][j]); end
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
