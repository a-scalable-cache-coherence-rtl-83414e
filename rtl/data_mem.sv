// data_mem: data memory of the set-associative cache.
//
// One line of LINE_BYTES bytes per element (way) of each of NSETS sets. One
// line is read combinationally (set and way chosen by the controller); one
// line is written per clock, byte by byte under wr_strb, so the same port
// serves line fills (all strobes) and word stores (the word's strobes).
// It is built as LINE_BYTES byte-wide RAMs side by side. No reset: validity
// lives in the valid-bit memory.
module data_mem #(
  parameter int WAYS       = 4,
  parameter int NSETS      = 512,
  parameter int LINE_BYTES = 8,
  localparam int SET_W  = $clog2(NSETS),
  localparam int WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int LINE_W = 8 * LINE_BYTES
) (
  input  logic                  clk,
  input  logic [SET_W-1:0]      rd_set,
  input  logic [WAY_W-1:0]      rd_way,
  output logic [LINE_W-1:0]     rd_line,
  input  logic                  wr_en,
  input  logic [SET_W-1:0]      wr_set,
  input  logic [WAY_W-1:0]      wr_way,
  input  logic [LINE_BYTES-1:0] wr_strb,
  input  logic [LINE_W-1:0]     wr_line
);

  // One RAM per byte lane, each addressed by {way, set}; a lane is written
  // when its strobe is set.
  for (genvar b = 0; b < LINE_BYTES; b++) begin : g_lane
    logic [7:0] lane [WAYS * NSETS];

    assign rd_line[8*b +: 8] = lane[{rd_way, rd_set}];

    always_ff @(posedge clk) begin
      if (wr_en && wr_strb[b])
        lane[{wr_way, wr_set}] <= wr_line[8*b +: 8];
    end
  end

endmodule
