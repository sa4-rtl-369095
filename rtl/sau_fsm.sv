// sau_fsm: the single controller of one SAU.
//
// The document replaces the per-PE state machines of a conventional systolic
// array with one global FSM per SAU. This controller follows the row-temporal
// weight-stationary schedule: a row pass is C/2 consecutive steps that share
// one set of stationary weights. It counts the steps of the current pass,
// marks its first and last step (the marks travel with the data to the
// column splitters) and, during the first COLS steps, tells the weight
// fetcher which PE column the incoming weight triples belong to.
//
// States: IDLE (between passes), WLOAD (steps 0..COLS-1, weights streaming
// in), STREAM (remaining steps). A pass must be issued without gaps: once
// started, in_valid stays high until its last step (checked by an assertion).
// How the FSM is built is this design's choice; the document gives only its
// role. Outputs are combinational from the state and in_valid.
module sau_fsm
  import sa4_pkg::*;
#(
  parameter int unsigned COLS   = SAU_DIM,
  parameter int unsigned STEP_W = 10       // width of C/2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [STEP_W-1:0]       cfg_half_cols,  // C/2 steps per pass, >= COLS
  input  logic                    in_valid,
  output step_tag_t               tag,
  output logic                    w_valid,
  output logic [$clog2(COLS)-1:0] w_col
);

  typedef enum logic [1:0] {S_IDLE, S_WLOAD, S_STREAM} state_t;

  state_t            state;
  logic [STEP_W-1:0] step;

  always_comb begin
    tag.valid = in_valid;
    tag.first = in_valid && (state == S_IDLE);
    tag.last  = in_valid && (step == cfg_half_cols - 1'b1);
    w_valid   = in_valid && (state != S_STREAM);
    w_col     = step[$clog2(COLS)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
    end else if (in_valid) begin
      if (tag.last) begin
        state <= S_IDLE;
        step  <= '0;
      end else begin
        step  <= step + 1'b1;
        state <= (step + 1'b1 < STEP_W'(COLS)) ? S_WLOAD : S_STREAM;
      end
    end
  end

  // A pass, once started, must not contain idle cycles: the weight skew
  // relies on the systolic start-up timing.
  a_no_gap: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |-> in_valid);
  a_pass_len: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> cfg_half_cols >= STEP_W'(COLS));

endmodule
