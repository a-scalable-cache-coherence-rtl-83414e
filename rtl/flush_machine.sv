// flush_machine: overlaps the write-back of dirty lines with the start of the
// next process after a process migration.
//
// It is a counter and a small state machine. On start the counter sweeps
// every cell (every element of every set) of the cache; for each it raises
// req with the cell number and waits for ack from the cache controller, which
// writes the line back to memory if it is valid and dirty, resets its dirty
// bit and leaves it valid. busy stays high until the last cell is handled, so
// the operating system can hold the migrated process until then.
//
// Timing: req follows start by one clock; one cell per ack. A start while
// busy restarts the sweep.
module flush_machine #(
  parameter int NCELLS = 2048,
  localparam int CELL_W = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              req,
  output logic [CELL_W-1:0] req_cell,
  input  logic              ack,
  output logic              busy
);

  logic              busy_q;
  logic [CELL_W-1:0] cnt_q;

  assign busy     = busy_q;
  assign req      = busy_q;
  assign req_cell = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
    end else if (start) begin
      busy_q <= 1'b1;
      cnt_q  <= '0;
    end else if (busy_q && ack) begin
      if (cnt_q == CELL_W'(NCELLS - 1)) busy_q <= 1'b0;
      else                              cnt_q  <= cnt_q + 1'b1;
    end
  end

  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> req);

endmodule
