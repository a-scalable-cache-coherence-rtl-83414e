// sel_clear_mem: selectively clearable valid-bit memory, holding the
// line-dirty bits in the same device.
//
// The cache's valid bits are kept apart from the tag and data memories in a
// cell array of ROWS x COLS cells (ROWS = WAYS*NSETS/COLS). Cell {e, s} holds
// the valid bit of element (way) e of set s, so each element owns a block of
// NSETS consecutive cells. Its row and column decoders are range decoders, so
// one cycle can reset a run of cells in a row, a block of whole rows, or every
// cell (see clear_sequencer): a clear of cells first..last takes 1, 2 or 3
// cycles, a clear-all one cycle.
//
// The clear is conditional: a cell whose dirty bit is set keeps its valid bit,
// so write-back (private) lines survive a clear. Lines that are only ever
// written through are never dirty and are always cleared.
//
// Ports:
//   rd_set -> rd_valid/rd_dirty : valid and dirty bit of every element of the
//                                 set, combinational.
//   wr_*                        : single-cell write of both bits (a normal
//                                 write, one row and one column selected).
//   clr_*                       : range clear request, see clear_sequencer;
//                                 clr_busy while its later cycles run.
// A single-cell write in a cycle that also clears that cell wins. Reset
// clears every valid and dirty bit.
module sel_clear_mem #(
  parameter int WAYS  = 4,
  parameter int NSETS = 512,
  parameter int COLS  = 64,
  localparam int NCELLS = WAYS * NSETS,
  localparam int ROWS   = NCELLS / COLS,
  localparam int CELL_W = $clog2(NCELLS),
  localparam int SET_W  = $clog2(NSETS),
  localparam int CW     = $clog2(COLS),
  localparam int RW     = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // read port
  input  logic [SET_W-1:0]  rd_set,
  output logic [WAYS-1:0]   rd_valid,
  output logic [WAYS-1:0]   rd_dirty,
  // single-cell write
  input  logic              wr_en,
  input  logic [CELL_W-1:0] wr_cell,
  input  logic              wr_valid,
  input  logic              wr_dirty,
  // selective clear
  input  logic              clr_start,
  input  logic              clr_all,
  input  logic [CELL_W-1:0] clr_first,
  input  logic [CELL_W-1:0] clr_last,
  output logic              clr_busy
);

  logic [COLS-1:0] valid_q [ROWS];
  logic [COLS-1:0] dirty_q [ROWS];

  logic            sel_v, row_all, col_all;
  logic [RW-1:0]   row_lo, row_hi;
  logic [CW-1:0]   col_lo, col_hi;
  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;

  clear_sequencer #(.ROWS(ROWS), .COLS(COLS)) u_seq (
    .clk, .rst_n,
    .start (clr_start),
    .clr_all,
    .first (clr_first),
    .last  (clr_last),
    .busy  (clr_busy),
    .sel_v, .row_all, .row_lo, .row_hi, .col_all, .col_lo, .col_hi
  );

  range_decoder #(.N(ROWS)) u_row_dec (
    .en (sel_v), .all_sel (row_all), .lo (row_lo), .hi (row_hi), .sel (row_sel)
  );

  range_decoder #(.N(COLS)) u_col_dec (
    .en (sel_v), .all_sel (col_all), .lo (col_lo), .hi (col_hi), .sel (col_sel)
  );

  // Read all elements of one set: element e, set s is cell e*NSETS + s.
  always_comb begin
    for (int e = 0; e < WAYS; e++) begin
      logic [CELL_W-1:0] c;
      c = CELL_W'(e * NSETS) + CELL_W'(rd_set);
      rd_valid[e] = valid_q[c[CELL_W-1:CW]][c[CW-1:0]];
      rd_dirty[e] = dirty_q[c[CELL_W-1:CW]][c[CW-1:0]];
    end
  end

  logic [RW-1:0] wr_row;
  logic [CW-1:0] wr_col;
  assign wr_row = wr_cell[CELL_W-1:CW];
  assign wr_col = wr_cell[CW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        valid_q[r] <= '0;
        dirty_q[r] <= '0;
      end
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        if (row_sel[r])
          valid_q[r] <= valid_q[r] & ~(col_sel & ~dirty_q[r]);
      end
      if (wr_en) begin
        valid_q[wr_row][wr_col] <= wr_valid;
        dirty_q[wr_row][wr_col] <= wr_dirty;
      end
    end
  end

endmodule
