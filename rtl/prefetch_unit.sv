// prefetch_unit: background prefetch of a shared structure.
//
// After start it walks the cache lines from the line holding first_addr to
// the line holding last_addr and, one line at a time, raises req with the
// line's address until the cache controller answers ack (the line is then in
// the cache). The controller serves these requests only when the processor
// has nothing for it, so a processor that cleared the structure first and
// then started the prefetch keeps running while the structure is loaded.
// A start while busy replaces the running range (this design's choice).
//
// Timing: req follows start by one clock; one request is outstanding at a
// time; busy stays high until the ack of the last line.
module prefetch_unit
  import sc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] first_addr,
  input  logic [ADDR_W-1:0] last_addr,
  output logic              req,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              ack,
  output logic              busy
);

  localparam int LA_W = ADDR_W - OFF_W;

  logic            busy_q;
  logic [LA_W-1:0] line_q, last_q;

  assign busy     = busy_q;
  assign req      = busy_q;
  assign req_addr = {line_q, {OFF_W{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      line_q <= '0;
      last_q <= '0;
    end else if (start) begin
      busy_q <= (first_addr[ADDR_W-1:OFF_W] <= last_addr[ADDR_W-1:OFF_W]);
      line_q <= first_addr[ADDR_W-1:OFF_W];
      last_q <= last_addr[ADDR_W-1:OFF_W];
    end else if (busy_q && ack) begin
      if (line_q == last_q) busy_q <= 1'b0;
      else                  line_q <= line_q + 1'b1;
    end
  end

  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> req);

endmodule
