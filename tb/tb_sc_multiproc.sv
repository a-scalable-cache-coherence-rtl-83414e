// tb_sc_multiproc: end-to-end test of the multiprocessor's caches at their
// default size (four processors, each with a 16 kbyte 4 x 512 x 8-byte cache,
// write-back for private data), joined to one behavioural memory through a
// round-robin network model.
//
// Each processor runs the critical-region pattern the coherence scheme is
// built for: take the lock with an indivisible swap on an uncached semaphore,
// make the shared structure coherent in its own cache (OP_COHERE), sometimes
// prefetch it, read it with shared loads, increment every word with shared
// (written-through) stores, and release the lock with an uncached store. The
// three shared structures are an 80-byte one inside one row of the valid-bit
// array, an 80-byte one across two rows and a 1 kbyte one across many rows.
// Between critical regions each processor works on private data, enough to
// evict dirty lines. At the end every processor migrates its process
// (OP_MIGRATE) and waits for its flush machine.
//
// Checks: every shared load in a critical region returns the value the last
// holder of the lock wrote (no stale data), every private load returns what
// the processor last stored, and after the flushes memory holds every store.
// The testbench counts how often each mechanism happened and fails any that
// never did.
module tb_sc_multiproc;
  import sc_pkg::*;
  import tb_pkg::*;

  localparam int NPROC = 4;
  localparam int ITER  = 12;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cpu_req_t cpu_req [NPROC];
  cpu_rsp_t cpu_rsp [NPROC];
  mem_req_t mem_req [NPROC];
  mem_rsp_t mem_rsp [NPROC];

  sc_multiproc dut (.clk, .rst_n, .cpu_req, .cpu_rsp, .mem_req, .mem_rsp);

  tb_mem #(.NPORT(NPROC), .LAT(4)) u_mem (.clk, .rst_n, .req (mem_req), .rsp (mem_rsp));

  function automatic logic [31:0] A(int tag, int set, int word = 0);
    return {20'(tag), 9'(set), 1'(word), 2'b00};
  endfunction

  function automatic logic [31:0] mem_word(logic [31:0] a);
    logic [63:0] l;
    l = u_mem.get_line(a[31:3]);
    return a[2] ? l[63:32] : l[31:0];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------ processor model
  logic [31:0] r_data [NPROC];
  bit          r_hit  [NPROC];

  task automatic op(int p, cpu_op_e o, logic [31:0] a, bit sh = 0, bit unc = 0,
                    logic [31:0] wd = 0, logic [31:0] ae = 0);
    @(posedge clk) #1;
    cpu_req[p] = '0;
    cpu_req[p].valid = 1; cpu_req[p].op = o; cpu_req[p].shared = sh;
    cpu_req[p].uncached = unc; cpu_req[p].addr = a; cpu_req[p].addr_end = ae;
    cpu_req[p].wdata = wd; cpu_req[p].wstrb = 4'hF;
    do @(posedge clk); while (!cpu_rsp[p].ack);
    r_data[p] = cpu_rsp[p].rdata;
    r_hit[p]  = cpu_rsp[p].hit;
    #1 cpu_req[p] = '0;
  endtask

  // shared structures: base, bytes, words touched per critical region
  localparam logic [31:0] LOCK = 32'h00F0_0000;
  logic [31:0] st_base [3];
  int          st_bytes [3];
  int          st_words [3];
  int          st_value [3];     // value every touched word holds now

  logic [31:0] priv_ref [NPROC][logic [31:0]];
  int n_swap_retry = 0, n_sections = 0, n_stale_avoided = 0;

  task automatic critical_region(int p, int it);
    int k;
    k = (p + it) % 3;
    // lock
    forever begin
      op(p, OP_SWAP, LOCK, 0, 0, 32'h1);
      if (r_data[p] == 0) break;
      n_swap_retry++;
      repeat ($urandom_range(8)) @(posedge clk);
    end
    // Make_coherent, and sometimes prefetch the structure
    op(p, OP_COHERE, st_base[k], 0, 0, 0, st_base[k] + st_bytes[k] - 1);
    if (it % 2 == 1) op(p, OP_PREFETCH, st_base[k], 0, 0, 0, st_base[k] + st_bytes[k] - 1);
    for (int w = 0; w < st_words[k]; w++) begin
      op(p, OP_LOAD, st_base[k] + 4 * w, 1);
      check(r_data[p] == st_value[k],
            $sformatf("P%0d structure %0d word %0d: got %h exp %h", p, k, w, r_data[p], st_value[k]));
      if (!r_hit[p]) n_stale_avoided++;
    end
    for (int w = 0; w < st_words[k]; w++)
      op(p, OP_STORE, st_base[k] + 4 * w, 1, 0, st_value[k] + 1);
    st_value[k]++;
    n_sections++;
    // unlock
    op(p, OP_STORE, LOCK, 0, 1, 32'h0);
  endtask

  task automatic private_work(int p, int n);
    for (int t = 0; t < n; t++) begin
      logic [31:0] a, v;
      a = A(4000 + 16 * p + $urandom_range(11), 300 + $urandom_range(7), $urandom_range(1));
      if ($urandom_range(1)) begin
        v = $urandom;
        op(p, OP_STORE, a, 0, 0, v);
        priv_ref[p][a] = v;
      end else begin
        op(p, OP_LOAD, a);
        check(r_data[p] == (priv_ref[p].exists(a) ? priv_ref[p][a] : init_word(a)),
              $sformatf("P%0d private load %h", p, a));
      end
    end
  endtask

  task automatic processor(int p);
    repeat (p * 7) @(posedge clk);
    for (int it = 0; it < ITER; it++) begin
      private_work(p, 20);
      critical_region(p, it);
    end
    op(p, OP_MIGRATE, 0);
    while (cpu_rsp[p].flush_busy) @(posedge clk);
  endtask

  // ------------------------------------------------- mechanism counters
  int n_hit, n_fill, n_wb_evict, n_wt_store, n_clr1, n_clr2, n_clr3, n_clr_all;
  int n_inhibit, n_flush_wb, n_pf_fill, n_uncached;

  for (genvar p = 0; p < NPROC; p++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_node[p].u_cache.u_ctrl.state_q == dut.g_node[p].u_cache.u_ctrl.S_LOOKUP &&
          dut.g_node[p].u_cache.u_ctrl.hit && !dut.g_node[p].u_cache.u_ctrl.uncached_q &&
          (dut.g_node[p].u_cache.u_ctrl.op_q == OP_LOAD || dut.g_node[p].u_cache.u_ctrl.op_q == OP_STORE))
        n_hit++;
      if (mem_req[p].valid && mem_rsp[p].ack) begin
        if (dut.g_node[p].u_cache.u_ctrl.state_q == dut.g_node[p].u_cache.u_ctrl.S_FILL) begin
          n_fill++;
          if (dut.g_node[p].u_cache.u_ctrl.src_q == dut.g_node[p].u_cache.u_ctrl.SRC_PF) n_pf_fill++;
        end
        if (dut.g_node[p].u_cache.u_ctrl.state_q == dut.g_node[p].u_cache.u_ctrl.S_WB) n_wb_evict++;
        if (dut.g_node[p].u_cache.u_ctrl.state_q == dut.g_node[p].u_cache.u_ctrl.S_FLUSH_WB) n_flush_wb++;
        if (dut.g_node[p].u_cache.u_ctrl.state_q == dut.g_node[p].u_cache.u_ctrl.S_MEM) begin
          if (dut.g_node[p].u_cache.u_ctrl.uncached_q) n_uncached++;
          else n_wt_store++;
        end
      end
      if (dut.g_node[p].u_cache.u_valid.clr_start && !dut.g_node[p].u_cache.u_valid.clr_busy) begin
        int rs, re;
        rs = int'(dut.g_node[p].u_cache.u_valid.clr_first) / 64;
        re = int'(dut.g_node[p].u_cache.u_valid.clr_last) / 64;
        if (dut.g_node[p].u_cache.u_valid.clr_all) n_clr_all++;
        else if (rs == re) n_clr1++;
        else if (re == rs + 1) n_clr2++;
        else n_clr3++;
      end
      for (int r = 0; r < 32; r++)
        if (dut.g_node[p].u_cache.u_valid.row_sel[r])
          n_inhibit += $countones(dut.g_node[p].u_cache.u_valid.col_sel &
                                  dut.g_node[p].u_cache.u_valid.dirty_q[r] &
                                  dut.g_node[p].u_cache.u_valid.valid_q[r]);
    end
  end

  task automatic need(int n, string what);
    $display("  %-34s %0d", what, n);
    check(n > 0, $sformatf("mechanism never exercised: %s", what));
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_base[0] = A(3000, 100); st_bytes[0] = 80;   st_words[0] = 20;  // one row
    st_base[1] = A(3001, 60);  st_bytes[1] = 80;   st_words[1] = 20;  // two rows
    st_base[2] = A(3002, 400); st_bytes[2] = 1024; st_words[2] = 48;  // many rows
    for (int k = 0; k < 3; k++) begin
      st_value[k] = 0;
      for (int w = 0; w < st_bytes[k] / 4; w++) u_mem.mem[(st_base[k] + 4 * w) >> 3] = '0;
    end
    u_mem.mem[LOCK >> 3] = '0;
    for (int p = 0; p < NPROC; p++) cpu_req[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      processor(0);
      processor(1);
      processor(2);
      processor(3);
    join
    // memory must now hold every private store and the final shared values
    for (int p = 0; p < NPROC; p++) begin
      int bad = 0;
      foreach (priv_ref[p][a]) if (mem_word(a) != priv_ref[p][a]) bad++;
      check(bad == 0, $sformatf("P%0d: %0d private words not in memory after the flush", p, bad));
    end
    for (int k = 0; k < 3; k++)
      check(mem_word(st_base[k]) == st_value[k] && st_value[k] > 0,
            $sformatf("structure %0d final value %0d, memory %0d", k, st_value[k], mem_word(st_base[k])));
    check(n_sections == NPROC * ITER, "every critical region ran");
    $display("mechanisms:");
    need(n_hit, "cache hits");
    need(n_fill, "line fills");
    need(n_wb_evict, "dirty victim write-backs");
    need(n_wt_store, "write-through stores");
    need(n_clr1, "clears within one row");
    need(n_clr2, "clears across two rows");
    need(n_clr3, "clears across many rows");
    need(n_clr_all, "clear-alls (migration)");
    need(n_inhibit, "clears inhibited by a dirty bit");
    need(n_flush_wb, "flush-machine write-backs");
    need(n_pf_fill, "prefetch fills");
    need(n_uncached, "uncached accesses and swaps");
    need(n_swap_retry, "lock contention (swap retries)");
    need(n_stale_avoided, "shared loads refetched after a clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
