// tb_mem: behavioural model of the interconnection network and the shared
// main memory, for simulation only.
//
// NPORT cache memory ports are served one request at a time, round robin
// (the network), each after LAT cycles; the ack comes with the read data for
// one cycle. MEM_READ returns the line, MEM_WRITE writes the strobed bytes,
// MEM_SWAP returns the old line and then writes the strobed bytes, with no
// other request in between. Untouched memory reads as tb_pkg::init_line.
// Testbenches may read and overwrite 'mem' directly to stand in for other
// processors.
module tb_mem
  import sc_pkg::*;
#(
  parameter int NPORT = 1,
  parameter int LAT   = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req [NPORT],
  output mem_rsp_t rsp [NPORT]
);
  localparam int LA_W = ADDR_W - OFF_W;

  logic [LINE_W-1:0] mem [logic [LA_W-1:0]];
  int unsigned n_read, n_write, n_swap;
  int unsigned port_ops [NPORT];

  int  cur, rr, cnt;
  logic busy;

  function automatic logic [LINE_W-1:0] get_line(logic [LA_W-1:0] la);
    return mem.exists(la) ? mem[la] : tb_pkg::init_line(la);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur <= 0; rr <= 0; cnt <= 0;
      n_read <= 0; n_write <= 0; n_swap <= 0;
      for (int p = 0; p < NPORT; p++) begin
        rsp[p] <= '0;
        port_ops[p] <= 0;
      end
    end else begin
      for (int p = 0; p < NPORT; p++) rsp[p].ack <= 1'b0;
      if (!busy) begin
        for (int k = 0; k < NPORT; k++) begin
          int p;
          p = (rr + k) % NPORT;
          if (!busy && req[p].valid && !rsp[p].ack) begin
            busy <= 1'b1;
            cur  <= p;
            cnt  <= LAT;
            rr   <= (p + 1) % NPORT;
            break;
          end
        end
      end else if (cnt > 1) begin
        cnt <= cnt - 1;
      end else begin
        logic [LA_W-1:0]   la;
        logic [LINE_W-1:0] old, nw;
        la  = req[cur].addr[ADDR_W-1:OFF_W];
        old = get_line(la);
        nw  = old;
        for (int b = 0; b < LINE_BYTES; b++)
          if (req[cur].wstrb[b]) nw[8*b +: 8] = req[cur].wdata[8*b +: 8];
        unique case (req[cur].op)
          MEM_READ:  n_read  <= n_read + 1;
          MEM_WRITE: begin n_write <= n_write + 1; mem[la] = nw; end
          MEM_SWAP:  begin n_swap  <= n_swap + 1;  mem[la] = nw; end
          default: ;
        endcase
        rsp[cur].ack   <= 1'b1;
        rsp[cur].rdata <= old;
        port_ops[cur]  <= port_ops[cur] + 1;
        busy <= 1'b0;
      end
    end
  end
endmodule
