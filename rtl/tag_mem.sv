// tag_mem: tag memory of the set-associative cache.
//
// Holds one TAG_W-bit tag per element (way) of each of NSETS sets. The tags of
// all elements of a set are read at once, combinationally, so the tag match
// logic can compare them in parallel; one tag is written per clock. Whether a
// tag means anything is decided by the separate valid-bit memory, so this
// array has no reset.
module tag_mem #(
  parameter int WAYS  = 4,
  parameter int NSETS = 512,
  parameter int TAG_W = 20,
  localparam int SET_W = $clog2(NSETS),
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                        clk,
  input  logic [SET_W-1:0]            rd_set,
  output logic [WAYS-1:0][TAG_W-1:0]  rd_tag,
  input  logic                        wr_en,
  input  logic [SET_W-1:0]            wr_set,
  input  logic [WAY_W-1:0]            wr_way,
  input  logic [TAG_W-1:0]            wr_tag
);

  logic [TAG_W-1:0] mem [WAYS][NSETS];

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      rd_tag[w] = mem[w][rd_set];
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_way][wr_set] <= wr_tag;
  end

endmodule
