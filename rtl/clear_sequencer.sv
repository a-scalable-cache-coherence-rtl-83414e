// clear_sequencer: turns a clear of a range of cells into row and column
// selections of the valid-bit array.
//
// Cell c of a ROWS x COLS array sits in row c / COLS, column c % COLS. A clear
// of cells first..last (first <= last) is issued as
//   - one cycle  when both ends lie in one row: that row, columns cs..ce;
//   - two cycles when they lie in adjacent rows: row rs columns cs..COLS-1,
//                then row re columns 0..ce;
//   - three cycles otherwise: the first partial row, then all rows strictly
//                between (every column, one cycle), then the last partial row.
// clr_all selects every row and column in one cycle. These are the cycle
// counts of the selectively clearable memory; the order of the steps is this
// design's choice.
//
// Timing: the first selection is driven combinationally in the cycle start is
// high; busy is high during the cycles of the second and third selections.
// start is ignored while busy.
module clear_sequencer #(
  parameter int ROWS = 32,
  parameter int COLS = 64,
  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int CW = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int AW = RW + CW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          clr_all,
  input  logic [AW-1:0] first,
  input  logic [AW-1:0] last,
  output logic          busy,
  output logic          sel_v,
  output logic          row_all,
  output logic [RW-1:0] row_lo,
  output logic [RW-1:0] row_hi,
  output logic          col_all,
  output logic [CW-1:0] col_lo,
  output logic [CW-1:0] col_hi
);

  typedef enum logic [1:0] {SQ_IDLE, SQ_MIDDLE, SQ_LAST} sq_state_e;

  sq_state_e     state_q;
  logic [RW-1:0] rs_q, re_q;
  logic [CW-1:0] ce_q;

  logic [RW-1:0] rs, re;
  logic [CW-1:0] cs, ce;

  assign rs = first[AW-1:CW];
  assign cs = first[CW-1:0];
  assign re = last[AW-1:CW];
  assign ce = last[CW-1:0];

  assign busy = (state_q != SQ_IDLE);

  always_comb begin
    sel_v   = 1'b0;
    row_all = 1'b0;
    col_all = 1'b0;
    row_lo  = '0;
    row_hi  = '0;
    col_lo  = '0;
    col_hi  = '0;
    unique case (state_q)
      SQ_IDLE: if (start) begin
        sel_v = 1'b1;
        if (clr_all) begin
          row_all = 1'b1;
          col_all = 1'b1;
        end else begin
          row_lo = rs;
          row_hi = rs;
          col_lo = cs;
          col_hi = (rs == re) ? ce : CW'(COLS - 1);
        end
      end
      SQ_MIDDLE: begin
        sel_v  = 1'b1;
        row_lo = rs_q + 1'b1;
        row_hi = re_q - 1'b1;
        col_all = 1'b1;
      end
      SQ_LAST: begin
        sel_v  = 1'b1;
        row_lo = re_q;
        row_hi = re_q;
        col_lo = '0;
        col_hi = ce_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= SQ_IDLE;
      rs_q    <= '0;
      re_q    <= '0;
      ce_q    <= '0;
    end else begin
      unique case (state_q)
        SQ_IDLE: if (start && !clr_all && rs != re) begin
          rs_q    <= rs;
          re_q    <= re;
          ce_q    <= ce;
          state_q <= (re == rs + 1'b1) ? SQ_LAST : SQ_MIDDLE;
        end
        SQ_MIDDLE: state_q <= SQ_LAST;
        SQ_LAST:   state_q <= SQ_IDLE;
        default:   state_q <= SQ_IDLE;
      endcase
    end
  end

  // A range clear must not run backwards.
  a_ordered: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy && !clr_all) |-> (first <= last));

endmodule
