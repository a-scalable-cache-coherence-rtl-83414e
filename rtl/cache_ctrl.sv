// cache_ctrl: controller of the selectively clearable cache.
//
// Serves one processor's requests (sc_pkg::cpu_req_t) from a WAYS-way,
// NSETS-set cache whose valid bits live in a selectively clearable memory
// (sel_clear_mem), and reaches main memory through one line-wide port.
//
// Placement. A line address splits into tag | set | byte offset. Private
// (non-shared) data is placed as in any set-associative cache: an invalid
// element if there is one, else a pseudo-random one (16-bit LFSR). Shared data
// is placed direct-mapped: its element is fixed by the WAY_W address bits just
// above the set index, and shared lookups only look there. The valid-bit cell
// of element e, set s is e*NSETS + s, so the lines of a contiguous shared
// address range occupy a contiguous run of cells.
//
// With DCL = 0 shared data is placed like private data instead, and a clear
// removes the whole of every set the range covers, in every element (the
// plain set clear): one range clear per element, so WAYS to 2*WAYS clears.
//
// Coherence. OP_COHERE (Make_coherent, issued by software after it has taken
// the lock on a structure) clears the valid bits of every cell the byte range
// addr..addr_end maps to, in 1-3 cycles; later shared loads miss and fetch the
// current data from memory. A range that covers the whole cache becomes a
// one-cycle clear-all; a range that wraps past the last cell is cleared in two
// pieces. By default shared stores are written through, so a shared line is
// never dirty and is always removed by a clear.
//
// Write policy. With WRITE_BACK = 1 private stores allocate and mark the line
// dirty; the clear is inhibited on dirty cells, and dirty victims are written
// back before a fill. With WRITE_BACK = 0 every store writes through without
// allocating.
//
// With SHARED_WB = 1 (and WRITE_BACK = 1) shared stores are written back
// like private ones. Software must then issue OP_RELEASE on the structure
// before it unlocks: the controller walks the range line by line, writes back
// each dirty shared line and marks it clean (still valid), so the next lock
// holder reads current memory and the next clear is not inhibited.
//
// Migration. OP_MIGRATE clears every clean line in one cycle and starts the
// flush machine, which then has each dirty line written back and marked clean
// (still valid) while the next process already runs.
//
// Prefetch. OP_PREFETCH hands a range to the prefetch unit and is acknowledged
// at once; its line fills (as shared data) are served when the processor has
// no request pending. Flush steps are served before prefetch fills. A prefetch
// refetches lines that are already present (dirty ones excepted), so it makes
// the range coherent by itself: without a clear before it, the processor must
// wait for pf_busy to fall before using the range; after a clear it need not.
//
// Semaphores. Uncached loads and stores bypass the cache; OP_SWAP is an
// indivisible exchange performed at memory.
//
// Timing: a request is taken in the cycle after it appears, looked up in the
// next, and acknowledged one cycle later at the earliest (a hit). A miss adds
// a line read, and a write-back of a dirty victim before it. Stores that
// write through are acknowledged when memory acknowledges the write. Block
// structure, cycle counts, encodings and the choice of address bits are this
// design's own; the policies above follow the selectively clearable cache
// scheme.
module cache_ctrl
  import sc_pkg::*;
#(
  parameter int WAYS       = 4,
  parameter int NSETS      = 512,
  parameter bit WRITE_BACK = 1'b1,
  parameter bit DCL        = 1'b1,
  parameter bit SHARED_WB  = 1'b0,
  localparam int SET_W  = $clog2(NSETS),
  localparam int WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int NCELLS = WAYS * NSETS,
  localparam int CELL_W = $clog2(NCELLS),
  localparam int TAG_W  = ADDR_W - OFF_W - SET_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processor and memory sides
  input  cpu_req_t                   cpu_req,
  output cpu_rsp_t                   cpu_rsp,
  output mem_req_t                   mem_req,
  input  mem_rsp_t                   mem_rsp,
  // tag memory
  output logic [SET_W-1:0]           tm_rd_set,
  input  logic [WAYS-1:0][TAG_W-1:0] tm_rd_tag,
  output logic                       tm_wr_en,
  output logic [SET_W-1:0]           tm_wr_set,
  output logic [WAY_W-1:0]           tm_wr_way,
  output logic [TAG_W-1:0]           tm_wr_tag,
  // data memory
  output logic [SET_W-1:0]           dm_rd_set,
  output logic [WAY_W-1:0]           dm_rd_way,
  input  logic [LINE_W-1:0]          dm_rd_line,
  output logic                       dm_wr_en,
  output logic [SET_W-1:0]           dm_wr_set,
  output logic [WAY_W-1:0]           dm_wr_way,
  output logic [LINE_BYTES-1:0]      dm_wr_strb,
  output logic [LINE_W-1:0]          dm_wr_line,
  // selectively clearable valid/dirty memory
  output logic [SET_W-1:0]           vm_rd_set,
  input  logic [WAYS-1:0]            vm_rd_valid,
  input  logic [WAYS-1:0]            vm_rd_dirty,
  output logic                       vm_wr_en,
  output logic [CELL_W-1:0]          vm_wr_cell,
  output logic                       vm_wr_valid,
  output logic                       vm_wr_dirty,
  output logic                       vm_clr_start,
  output logic                       vm_clr_all,
  output logic [CELL_W-1:0]          vm_clr_first,
  output logic [CELL_W-1:0]          vm_clr_last,
  input  logic                       vm_clr_busy,
  // prefetch unit
  output logic                       pf_start,
  output logic [ADDR_W-1:0]          pf_first,
  output logic [ADDR_W-1:0]          pf_last,
  input  logic                       pf_req,
  input  logic [ADDR_W-1:0]          pf_addr,
  output logic                       pf_ack,
  input  logic                       pf_busy,
  // flush machine
  output logic                       fl_start,
  input  logic                       fl_req,
  input  logic [CELL_W-1:0]          fl_cell,
  output logic                       fl_ack,
  input  logic                       fl_busy
);

  localparam int LA_W = ADDR_W - OFF_W;   // line address width
  localparam int NWORDS = LINE_BYTES / (WORD_W / 8);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_WB, S_FILL, S_MEM, S_CLR, S_CLR_WAIT,
    S_FLUSH, S_FLUSH_WB, S_RWB, S_ACK
  } state_e;

  typedef enum logic [1:0] {SRC_CPU, SRC_PF, SRC_FL} src_e;

  state_e              state_q;
  src_e                src_q;
  cpu_op_e             op_q;
  logic                shared_q, uncached_q;
  logic [ADDR_W-1:0]   addr_q, addr_end_q;
  logic [WORD_W-1:0]   wdata_q;
  logic [WORD_W/8-1:0] wstrb_q;
  logic [CELL_W-1:0]   cell_q;
  logic [WAY_W-1:0]    way_q;
  logic                missed_q, hit_q;
  logic [WORD_W-1:0]   rdata_q;
  logic                piece_q;         // second piece of a wrapped clear
  logic [WAY_W-1:0]    celem_q;         // element being cleared (set clear)
  mem_req_t            mem_q;
  logic [15:0]         lfsr_q;

  // ---------------------------------------------------------------- decode
  logic [SET_W-1:0]  set_a;      // set of the current address
  logic [TAG_W-1:0]  tag_a;
  logic [WAY_W-1:0]  elem_a;     // direct-mapped element for shared data
  logic [SET_W-1:0]  set_idx;    // set looked up this cycle
  logic [WSEL_W-1:0] wsel;       // word within the line

  assign set_a  = addr_q[OFF_W +: SET_W];
  assign tag_a  = addr_q[ADDR_W-1 -: TAG_W];
  assign elem_a = (WAYS > 1) ? WAY_W'(addr_q[OFF_W+SET_W +: WAY_W]) : '0;
  assign wsel   = addr_q[OFF_W-1 -: WSEL_W];
  assign set_idx = (src_q == SRC_FL) ? cell_q[SET_W-1:0] : set_a;

  assign tm_rd_set = set_idx;
  assign vm_rd_set = set_idx;
  assign dm_rd_set = set_idx;

  logic             direct_q;   // placed direct-mapped: shared data under DCL
  assign direct_q = shared_q && DCL;

  logic [WAYS-1:0]  hit_vec;
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  logic [WAY_W-1:0] victim;

  always_comb begin
    hit_vec = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = vm_rd_valid[w] && (tm_rd_tag[w] == tag_a) &&
                   (!direct_q || WAY_W'(w) == elem_a);
      if (hit_vec[w]) hit_way = WAY_W'(w);
    end
    hit = |hit_vec;

    victim    = WAY_W'(lfsr_q[WAY_W-1:0] % WAYS);
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!vm_rd_valid[w]) begin
        victim = WAY_W'(w);
      end
    end
    if (direct_q) victim = elem_a;
  end

  // In the lookup cycle the data port reads the hit element, or on a miss the
  // victim, whose line a write-back needs.
  assign dm_rd_way = (state_q != S_LOOKUP) ? way_q : (hit ? hit_way : victim);

  // Kind of the current request.
  logic is_cached_store, store_through;
  assign is_cached_store = (op_q == OP_STORE) && !uncached_q;
  assign store_through   = (shared_q && !SHARED_WB) || !WRITE_BACK;

  // A prefetch fetches even a line that is present (unless it is dirty), so
  // that a prefetch with no clear before it still brings current data.
  logic pf_refresh;
  assign pf_refresh = (src_q == SRC_PF) && !missed_q && !vm_rd_dirty[hit_way];

  // Range of a COHERE request, in cells.
  logic [LA_W-1:0]   first_line, last_line, span;
  logic [CELL_W-1:0] c_first, c_last;
  logic [SET_W-1:0]  s_first, s_last;
  logic              clr_empty, clr_whole, clr_wraps, clr_more;
  logic [CELL_W-1:0] piece_first, piece_last;
  assign first_line = addr_q[ADDR_W-1:OFF_W];
  assign last_line  = addr_end_q[ADDR_W-1:OFF_W];
  assign span       = last_line - first_line;
  assign c_first    = first_line[CELL_W-1:0];
  assign c_last     = last_line[CELL_W-1:0];
  assign s_first    = first_line[SET_W-1:0];
  assign s_last     = last_line[SET_W-1:0];
  assign clr_empty  = last_line < first_line;

  // Direct-map clear (DCL = 1): the range is one run of cells, split in two
  // if it wraps past the last cell. Set clear (DCL = 0): the same run of sets
  // is cleared in every element, one element after another, each split in
  // two if the set range wraps.
  always_comb begin
    if (DCL) begin
      clr_whole   = span >= LA_W'(NCELLS - 1);
      clr_wraps   = c_first > c_last;
      piece_first = piece_q ? '0 : c_first;
      piece_last  = (clr_wraps && !piece_q) ? CELL_W'(NCELLS - 1) : c_last;
      clr_more    = clr_wraps && !piece_q;
    end else begin
      clr_whole   = span >= LA_W'(NSETS - 1);
      clr_wraps   = s_first > s_last;
      piece_first = {celem_q, piece_q ? SET_W'(0) : s_first};
      piece_last  = {celem_q, (clr_wraps && !piece_q) ? SET_W'(NSETS - 1) : s_last};
      clr_more    = (clr_wraps && !piece_q) || (celem_q != WAY_W'(WAYS - 1));
    end
  end

  // Word stores: the word replicated over the line, strobes moved into place.
  logic [LINE_W-1:0]     st_line;
  logic [LINE_BYTES-1:0] st_strb;
  assign st_line = {NWORDS{wdata_q}};
  assign st_strb = LINE_BYTES'(wstrb_q) << (wsel * (WORD_W / 8));

  // ------------------------------------------------- memory array controls
  always_comb begin
    tm_wr_en   = 1'b0;
    tm_wr_set  = set_a;
    tm_wr_way  = way_q;
    tm_wr_tag  = tag_a;
    dm_wr_en   = 1'b0;
    dm_wr_set  = set_a;
    dm_wr_way  = way_q;
    dm_wr_strb = '1;
    dm_wr_line = mem_rsp.rdata;
    vm_wr_en    = 1'b0;
    vm_wr_cell  = {way_q, set_a};
    vm_wr_valid = 1'b1;
    vm_wr_dirty = 1'b0;
    vm_clr_start = 1'b0;
    vm_clr_all   = 1'b0;
    vm_clr_first = piece_first;
    vm_clr_last  = piece_last;
    pf_start = 1'b0;
    fl_start = 1'b0;

    unique case (state_q)
      S_LOOKUP: begin
        if (is_cached_store && hit) begin
          dm_wr_en   = 1'b1;
          dm_wr_way  = hit_way;
          dm_wr_strb = st_strb;
          dm_wr_line = st_line;
          if (!store_through) begin
            vm_wr_en    = 1'b1;
            vm_wr_cell  = {hit_way, set_a};
            vm_wr_dirty = 1'b1;
          end
        end
        if (op_q == OP_PREFETCH) pf_start = 1'b1;
        if (op_q == OP_MIGRATE) begin
          vm_clr_start = 1'b1;
          vm_clr_all   = 1'b1;
          fl_start     = 1'b1;
        end
      end
      S_FILL: if (mem_rsp.ack) begin
        tm_wr_en = 1'b1;
        dm_wr_en = 1'b1;
        vm_wr_en = 1'b1;
      end
      S_CLR: begin
        vm_clr_start = 1'b1;
        vm_clr_all   = clr_whole;
      end
      S_FLUSH_WB: if (mem_rsp.ack) begin
        vm_wr_en   = 1'b1;
        vm_wr_cell = cell_q;
      end
      S_RWB: if (mem_rsp.ack) vm_wr_en = 1'b1;   // line now clean
      default: ;
    endcase
  end

  assign pf_first = addr_q;
  assign pf_last  = addr_end_q;

  // ------------------------------------------------------------ responses
  assign cpu_rsp.ack        = (state_q == S_ACK) && (src_q == SRC_CPU);
  assign cpu_rsp.hit        = hit_q;
  assign cpu_rsp.rdata      = rdata_q;
  assign cpu_rsp.flush_busy = fl_busy;
  assign cpu_rsp.pf_busy    = pf_busy;
  assign pf_ack = (state_q == S_ACK) && (src_q == SRC_PF);
  assign fl_ack = (state_q == S_ACK) && (src_q == SRC_FL);
  assign mem_req = mem_q;

  // ---------------------------------------------------------------- FSM
  function automatic mem_req_t mreq(mem_op_e op, logic [ADDR_W-1:0] a,
                                    logic [LINE_W-1:0] d,
                                    logic [LINE_BYTES-1:0] s);
    mem_req_t r;
    r.valid = 1'b1;
    r.op    = op;
    r.addr  = {a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
    r.wdata = d;
    r.wstrb = s;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      src_q       <= SRC_CPU;
      op_q        <= OP_LOAD;
      shared_q    <= 1'b0;
      uncached_q  <= 1'b0;
      addr_q      <= '0;
      addr_end_q  <= '0;
      wdata_q     <= '0;
      wstrb_q     <= '0;
      cell_q      <= '0;
      way_q       <= '0;
      missed_q    <= 1'b0;
      hit_q       <= 1'b0;
      rdata_q     <= '0;
      piece_q     <= 1'b0;
      celem_q     <= '0;
      mem_q       <= '0;
      lfsr_q      <= 16'hACE1;
    end else begin
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      if (mem_rsp.ack) mem_q.valid <= 1'b0;

      unique case (state_q)
        S_IDLE: begin
          missed_q <= 1'b0;
          hit_q    <= 1'b0;
          if (cpu_req.valid) begin
            src_q      <= SRC_CPU;
            op_q       <= cpu_req.op;
            shared_q   <= cpu_req.shared;
            uncached_q <= cpu_req.uncached || (cpu_req.op == OP_SWAP);
            addr_q     <= cpu_req.addr;
            addr_end_q <= cpu_req.addr_end;
            wdata_q    <= cpu_req.wdata;
            wstrb_q    <= cpu_req.wstrb;
            state_q    <= S_LOOKUP;
          end else if (fl_req) begin
            src_q   <= SRC_FL;
            cell_q  <= fl_cell;
            way_q   <= fl_cell[CELL_W-1 -: WAY_W];
            state_q <= S_FLUSH;
          end else if (pf_req) begin
            src_q      <= SRC_PF;
            op_q       <= OP_LOAD;
            shared_q   <= 1'b1;
            uncached_q <= 1'b0;
            addr_q     <= pf_addr;
            state_q    <= S_LOOKUP;
          end
        end

        S_LOOKUP: begin
          unique case (op_q)
            OP_LOAD, OP_STORE: begin
              if (!missed_q) hit_q <= hit && !uncached_q;
              if (uncached_q) begin
                mem_q   <= (op_q == OP_LOAD)
                           ? mreq(MEM_READ, addr_q, '0, '0)
                           : mreq(MEM_WRITE, addr_q, st_line, st_strb);
                state_q <= S_MEM;
              end else if (op_q == OP_LOAD && hit && !pf_refresh) begin
                rdata_q <= dm_rd_line[wsel*WORD_W +: WORD_W];
                state_q <= S_ACK;
              end else if (op_q == OP_STORE && store_through) begin
                // write through; the line (if present) was updated above
                mem_q   <= mreq(MEM_WRITE, addr_q, st_line, st_strb);
                state_q <= S_MEM;
              end else if (op_q == OP_STORE && hit) begin
                state_q <= S_ACK;          // write-back hit, marked dirty
              end else begin
                // miss: evict the victim (writing it back if dirty), refill;
                // a prefetch refreshes a clean line where it already is
                missed_q <= 1'b1;
                way_q    <= hit ? hit_way : victim;
                if (!hit && WRITE_BACK && vm_rd_valid[victim] && vm_rd_dirty[victim]) begin
                  mem_q   <= mreq(MEM_WRITE, {tm_rd_tag[victim], set_a, {OFF_W{1'b0}}},
                                  dm_rd_line, '1);
                  state_q <= S_WB;
                end else begin
                  mem_q   <= mreq(MEM_READ, addr_q, '0, '0);
                  state_q <= S_FILL;
                end
              end
            end
            OP_SWAP: begin
              mem_q   <= mreq(MEM_SWAP, addr_q, st_line, st_strb);
              state_q <= S_MEM;
            end
            OP_COHERE: begin
              piece_q <= 1'b0;
              celem_q <= '0;
              state_q <= clr_empty ? S_ACK : S_CLR;
            end
            OP_PREFETCH, OP_MIGRATE: begin
              state_q <= S_ACK;
            end
            OP_RELEASE: begin
              // one line per lookup; a dirty one is written back first
              if (clr_empty || !(WRITE_BACK && SHARED_WB)) begin
                state_q <= S_ACK;
              end else if (hit && vm_rd_dirty[hit_way]) begin
                way_q   <= hit_way;
                mem_q   <= mreq(MEM_WRITE, addr_q, dm_rd_line, '1);
                state_q <= S_RWB;
              end else if (span == '0) begin
                state_q <= S_ACK;
              end else begin
                addr_q <= addr_q + ADDR_W'(LINE_BYTES);
              end
            end
            default: state_q <= S_ACK;
          endcase
        end

        S_WB: begin
          if (mem_rsp.ack) begin
            mem_q   <= mreq(MEM_READ, addr_q, '0, '0);
            state_q <= S_FILL;
          end
        end

        S_FILL: if (mem_rsp.ack) state_q <= S_LOOKUP;

        S_MEM: if (mem_rsp.ack) begin
          rdata_q <= mem_rsp.rdata[wsel*WORD_W +: WORD_W];
          state_q <= S_ACK;
        end

        S_CLR: state_q <= S_CLR_WAIT;

        S_CLR_WAIT: if (!vm_clr_busy) begin
          if (clr_whole || !clr_more) begin
            state_q <= S_ACK;
          end else begin
            if (clr_wraps && !piece_q) begin
              piece_q <= 1'b1;
            end else begin
              piece_q <= 1'b0;
              celem_q <= celem_q + 1'b1;
            end
            state_q <= S_CLR;
          end
        end

        S_FLUSH: begin
          if (vm_rd_valid[way_q] && vm_rd_dirty[way_q]) begin
            mem_q   <= mreq(MEM_WRITE, {tm_rd_tag[way_q], cell_q[SET_W-1:0], {OFF_W{1'b0}}},
                            dm_rd_line, '1);
            state_q <= S_FLUSH_WB;
          end else begin
            state_q <= S_ACK;
          end
        end

        S_FLUSH_WB: if (mem_rsp.ack) state_q <= S_ACK;

        S_RWB: if (mem_rsp.ack) begin
          if (span == '0) begin
            state_q <= S_ACK;
          end else begin
            addr_q  <= addr_q + ADDR_W'(LINE_BYTES);
            state_q <= S_LOOKUP;
          end
        end

        S_ACK: state_q <= S_IDLE;

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------- handshakes
  a_mem_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req.valid && !mem_rsp.ack) |=> (mem_req.valid && $stable(mem_req.addr) &&
                                         $stable(mem_req.op)));
  a_mem_ack_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp.ack |-> mem_req.valid);

endmodule
