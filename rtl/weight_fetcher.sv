// weight_fetcher: shift-register weight supplier of one SAU (document
// Fig. 7(b) and Fig. 8(b)).
//
// During the first COLS steps of a row pass the fetcher receives, once per
// step, the weight triples of one PE column (column index in_col, one triple
// per PE row). Like the IFM fetcher it skews them through a triangle of
// registers, row i delayed by i+1 clocks, so that each triple reaches PE row i
// in the very clock the pass's first activation pair reaches the PE that owns
// it. One selector per PE row (ROWS selectors) decodes the travelling column
// index into the load enable of that PE's local weight register. Loading is
// therefore hidden entirely in the first ROWS+COLS-1 cycles of a pass, which
// requires COLS <= C/2 (document Eq. 1).
//
// Interface and timing: in_valid/in_col/in_w are sampled every clock;
// w_row[i] and w_load[i][j] are valid i+1 clocks later and are meant for PE
// (i, j), whose activation input lags row i of the fetcher by j clocks, just
// as column j's weights were issued j steps after column 0's.
module weight_fetcher
  import sa4_pkg::*;
#(
  parameter int unsigned ROWS = SAU_DIM,
  parameter int unsigned COLS = SAU_DIM
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(COLS)-1:0]   in_col,
  input  wtrip_t                    in_w [ROWS],
  output wtrip_t                    w_row [ROWS],
  output logic [COLS-1:0]           w_load [ROWS]
);

  typedef struct packed {
    logic                    valid;
    logic [$clog2(COLS)-1:0] col;
    wtrip_t                  w;
  } wslot_t;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    wslot_t sr [i+1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k <= i; k++) sr[k] <= '0;
      end else begin
        sr[0] <= '{valid: in_valid, col: in_col, w: in_w[i]};
        for (int k = 1; k <= i; k++) sr[k] <= sr[k-1];
      end
    end

    // Row selector: steer the triple leaving the triangle to one PE.
    always_comb begin
      w_load[i] = '0;
      if (sr[i].valid) w_load[i][sr[i].col] = 1'b1;
    end
    assign w_row[i] = sr[i].w;
  end

endmodule
