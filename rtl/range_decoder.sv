// range_decoder: the row or column decoder of the selectively clearable
// valid-bit memory.
//
// A normal decoder raises one select line. This one raises every line whose
// index lies between lo and hi (inclusive), so that a whole run of rows or
// columns of the cell array is enabled at once; with lo == hi it is the
// ordinary one-hot decoder used for reads and writes, and all_sel raises every
// line (the "all selected" input of a clearable memory). It is built, as the
// clearable-memory scheme suggests, from two priority (thermometer) codes and
// an AND: line i is on when i >= lo and i <= hi. lo > hi selects nothing.
//
// Purely combinational.
module range_decoder #(
  parameter int N  = 64,
  localparam int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          en,
  input  logic          all_sel,
  input  logic [AW-1:0] lo,
  input  logic [AW-1:0] hi,
  output logic [N-1:0]  sel
);

  logic [N-1:0] ge_lo;   // thermometer: ones from lo upward
  logic [N-1:0] le_hi;   // thermometer: ones from hi downward

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ge_lo[i] = (AW'(i) >= lo);
      le_hi[i] = (AW'(i) <= hi);
    end
    sel = en ? (all_sel ? '1 : (ge_lo & le_hi)) : '0;
  end

endmodule
