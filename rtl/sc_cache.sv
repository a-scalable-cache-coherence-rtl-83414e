// sc_cache: one processor's selectively clearable cache.
//
// Wires the cache controller to its three memories (tag memory, data memory
// and the selectively clearable valid/dirty memory), the prefetch unit and the
// flush machine. The default is a 16 kbyte cache of 512 sets of four
// elements with eight-byte lines, shared data placed direct-mapped within the
// set, write-back for private data (WRITE_BACK = 1) or write-through for all
// data (WRITE_BACK = 0). DCL = 0 replaces the direct-mapped placement of
// shared data and its selective clear by the plain set clear. SHARED_WB = 1
// writes shared data back too, with OP_RELEASE flushing it before unlock.
//
// Ports: the processor port (sc_pkg::cpu_req_t / cpu_rsp_t) and one line-wide
// memory port toward the interconnection network (mem_req_t / mem_rsp_t); see
// sc_pkg for the handshakes and cache_ctrl for the timing.
module sc_cache
  import sc_pkg::*;
#(
  parameter int WAYS       = 4,
  parameter int NSETS      = 512,
  parameter bit WRITE_BACK = 1'b1,
  parameter bit DCL        = 1'b1,
  parameter bit SHARED_WB  = 1'b0,
  parameter int VCOLS      = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cpu_req_t cpu_req,
  output cpu_rsp_t cpu_rsp,
  output mem_req_t mem_req,
  input  mem_rsp_t mem_rsp
);

  localparam int SET_W  = $clog2(NSETS);
  localparam int WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int NCELLS = WAYS * NSETS;
  localparam int CELL_W = $clog2(NCELLS);
  localparam int TAG_W  = ADDR_W - OFF_W - SET_W;

  logic [SET_W-1:0]           tm_rd_set, tm_wr_set;
  logic [WAYS-1:0][TAG_W-1:0] tm_rd_tag;
  logic                       tm_wr_en;
  logic [WAY_W-1:0]           tm_wr_way;
  logic [TAG_W-1:0]           tm_wr_tag;

  logic [SET_W-1:0]      dm_rd_set, dm_wr_set;
  logic [WAY_W-1:0]      dm_rd_way, dm_wr_way;
  logic [LINE_W-1:0]     dm_rd_line, dm_wr_line;
  logic                  dm_wr_en;
  logic [LINE_BYTES-1:0] dm_wr_strb;

  logic [SET_W-1:0]  vm_rd_set;
  logic [WAYS-1:0]   vm_rd_valid, vm_rd_dirty;
  logic              vm_wr_en, vm_wr_valid, vm_wr_dirty;
  logic [CELL_W-1:0] vm_wr_cell, vm_clr_first, vm_clr_last;
  logic              vm_clr_start, vm_clr_all, vm_clr_busy;

  logic              pf_start, pf_req, pf_ack, pf_busy;
  logic [ADDR_W-1:0] pf_first, pf_last, pf_addr;

  logic              fl_start, fl_req, fl_ack, fl_busy;
  logic [CELL_W-1:0] fl_cell;

  cache_ctrl #(.WAYS(WAYS), .NSETS(NSETS), .WRITE_BACK(WRITE_BACK), .DCL(DCL), .SHARED_WB(SHARED_WB)) u_ctrl (
    .clk, .rst_n, .cpu_req, .cpu_rsp, .mem_req, .mem_rsp,
    .tm_rd_set, .tm_rd_tag, .tm_wr_en, .tm_wr_set, .tm_wr_way, .tm_wr_tag,
    .dm_rd_set, .dm_rd_way, .dm_rd_line, .dm_wr_en, .dm_wr_set, .dm_wr_way,
    .dm_wr_strb, .dm_wr_line,
    .vm_rd_set, .vm_rd_valid, .vm_rd_dirty, .vm_wr_en, .vm_wr_cell,
    .vm_wr_valid, .vm_wr_dirty, .vm_clr_start, .vm_clr_all, .vm_clr_first,
    .vm_clr_last, .vm_clr_busy,
    .pf_start, .pf_first, .pf_last, .pf_req, .pf_addr, .pf_ack, .pf_busy,
    .fl_start, .fl_req, .fl_cell, .fl_ack, .fl_busy
  );

  tag_mem #(.WAYS(WAYS), .NSETS(NSETS), .TAG_W(TAG_W)) u_tag (
    .clk, .rd_set (tm_rd_set), .rd_tag (tm_rd_tag), .wr_en (tm_wr_en),
    .wr_set (tm_wr_set), .wr_way (tm_wr_way), .wr_tag (tm_wr_tag)
  );

  data_mem #(.WAYS(WAYS), .NSETS(NSETS), .LINE_BYTES(LINE_BYTES)) u_data (
    .clk, .rd_set (dm_rd_set), .rd_way (dm_rd_way), .rd_line (dm_rd_line),
    .wr_en (dm_wr_en), .wr_set (dm_wr_set), .wr_way (dm_wr_way),
    .wr_strb (dm_wr_strb), .wr_line (dm_wr_line)
  );

  sel_clear_mem #(.WAYS(WAYS), .NSETS(NSETS), .COLS(VCOLS)) u_valid (
    .clk, .rst_n, .rd_set (vm_rd_set), .rd_valid (vm_rd_valid),
    .rd_dirty (vm_rd_dirty), .wr_en (vm_wr_en), .wr_cell (vm_wr_cell),
    .wr_valid (vm_wr_valid), .wr_dirty (vm_wr_dirty),
    .clr_start (vm_clr_start), .clr_all (vm_clr_all),
    .clr_first (vm_clr_first), .clr_last (vm_clr_last), .clr_busy (vm_clr_busy)
  );

  prefetch_unit u_pf (
    .clk, .rst_n, .start (pf_start), .first_addr (pf_first),
    .last_addr (pf_last), .req (pf_req), .req_addr (pf_addr), .ack (pf_ack),
    .busy (pf_busy)
  );

  flush_machine #(.NCELLS(NCELLS)) u_flush (
    .clk, .rst_n, .start (fl_start), .req (fl_req), .req_cell (fl_cell),
    .ack (fl_ack), .busy (fl_busy)
  );

endmodule
