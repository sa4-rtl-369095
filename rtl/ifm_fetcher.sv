// ifm_fetcher: shift-register IFM supplier of one SAU (document Fig. 7(a)).
//
// Every cycle the fetcher accepts ROWS packed activation pairs, one per PE
// row (input channel), and feeds them to the leftmost PE column in the skewed
// ("systolic") order the array needs: row i leaves the fetcher i cycles after
// row 0. It is a triangle of plain registers, row i being a chain of i+1
// registers (10 registers for ROWS = 4, as in the document), so there are no
// buffers, no reuse assumptions and no per-loader controllers.
//
// Interface and timing: in_act/in_tag are sampled every clock. Row i of
// out_act/out_tag shows the value sampled i+1 clocks earlier. The step tag
// travels with the data so that first/last marks stay aligned with the skew.
module ifm_fetcher
  import sa4_pkg::*;
#(
  parameter int unsigned ROWS = SAU_DIM
) (
  input  logic      clk,
  input  logic      rst_n,
  input  act_pair_t in_act [ROWS],
  input  step_tag_t in_tag,
  output act_pair_t out_act [ROWS],
  output step_tag_t out_tag [ROWS]
);

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    act_pair_t sr_act [i+1];
    step_tag_t sr_tag [i+1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k <= i; k++) begin
          sr_act[k] <= '0;
          sr_tag[k] <= '0;
        end
      end else begin
        sr_act[0] <= in_act[i];
        sr_tag[0] <= in_tag;
        for (int k = 1; k <= i; k++) begin
          sr_act[k] <= sr_act[k-1];
          sr_tag[k] <= sr_tag[k-1];
        end
      end
    end

    assign out_act[i] = sr_act[i];
    assign out_tag[i] = sr_tag[i];
  end

endmodule
