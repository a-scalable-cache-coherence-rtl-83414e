// tb_sc_cache: end-to-end test of one selectively clearable cache against a
// behavioural memory, at the default 16 kbyte, 4 x 512 x 8-byte size.
//
// Three caches are tested one after another with the same stimulus: index 0
// with write-back for private data (the default), index 1 write-through only,
// index 2 write-back with the plain set clear instead of direct-mapped shared
// placement (DCL = 0), where a clear must also remove the synonyms.
// Directed sequences check: miss then hit; write-back versus write-through of
// private stores; that a shared line is served stale from the cache until
// Make_coherent (OP_COHERE) is issued and fresh afterwards; that the clear
// spares the other elements of the set (direct-mapped shared placement) and
// dirty lines; the 1/2/3-cycle clear cost seen in the COHERE latency; clear-all
// and wrapping ranges; eviction of dirty lines; migration with the flush
// machine; background prefetch, and a prefetch without a clear refreshing
// lines already present; uncached accesses and the indivisible swap.
// A random phase then mixes all operations and checks every load against a
// word-level model of what the processor last wrote.
module tb_sc_cache;
  import sc_pkg::*;
  import tb_pkg::*;

  localparam int NSETS = 512, WAYS = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cpu_req_t cpu_req [3];
  cpu_rsp_t cpu_rsp [3];
  mem_req_t mem_req0 [1], mem_req1 [1], mem_req2 [1];
  mem_rsp_t mem_rsp0 [1], mem_rsp1 [1], mem_rsp2 [1];

  sc_cache dut0 (.clk, .rst_n, .cpu_req (cpu_req[0]), .cpu_rsp (cpu_rsp[0]),
                 .mem_req (mem_req0[0]), .mem_rsp (mem_rsp0[0]));
  sc_cache #(.WRITE_BACK(1'b0)) dut1 (.clk, .rst_n, .cpu_req (cpu_req[1]),
                 .cpu_rsp (cpu_rsp[1]), .mem_req (mem_req1[0]), .mem_rsp (mem_rsp1[0]));

  tb_mem #(.NPORT(1), .LAT(3)) u_mem0 (.clk, .rst_n, .req (mem_req0), .rsp (mem_rsp0));
  tb_mem #(.NPORT(1), .LAT(3)) u_mem1 (.clk, .rst_n, .req (mem_req1), .rsp (mem_rsp1));
  sc_cache #(.DCL(1'b0)) dut2 (.clk, .rst_n, .cpu_req (cpu_req[2]),
                 .cpu_rsp (cpu_rsp[2]), .mem_req (mem_req2[0]), .mem_rsp (mem_rsp2[0]));
  tb_mem #(.NPORT(1), .LAT(3)) u_mem2 (.clk, .rst_n, .req (mem_req2), .rsp (mem_rsp2));

  // word-level model of what each processor last wrote
  logic [31:0] ref_mem [3][logic [31:0]];

  function automatic logic [31:0] ref_word(int i, logic [31:0] a);
    a = {a[31:2], 2'b00};
    return ref_mem[i].exists(a) ? ref_mem[i][a] : init_word(a);
  endfunction

  function automatic logic [31:0] mem_word(int i, logic [31:0] a);
    logic [63:0] l;
    l = (i == 0) ? u_mem0.get_line(a[31:3]) :
        (i == 1) ? u_mem1.get_line(a[31:3]) : u_mem2.get_line(a[31:3]);
    return a[2] ? l[63:32] : l[31:0];
  endfunction

  // another processor writing memory behind the cache's back
  task automatic poke(int i, logic [31:0] a, logic [31:0] v);
    logic [63:0] l;
    l = (i == 0) ? u_mem0.get_line(a[31:3]) :
        (i == 1) ? u_mem1.get_line(a[31:3]) : u_mem2.get_line(a[31:3]);
    if (a[2]) l[63:32] = v; else l[31:0] = v;
    if (i == 0) u_mem0.mem[a[31:3]] = l;
    else if (i == 1) u_mem1.mem[a[31:3]] = l;
    else u_mem2.mem[a[31:3]] = l;
    ref_mem[i][{a[31:2], 2'b00}] = v;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [31:0] r_data;
  bit          r_hit;
  int          r_cyc;

  task automatic op(int i, cpu_op_e o, logic [31:0] a, bit sh = 0, bit unc = 0,
                    logic [31:0] wd = 0, logic [31:0] ae = 0);
    @(posedge clk) #1;
    cpu_req[i] = '0;
    cpu_req[i].valid = 1; cpu_req[i].op = o; cpu_req[i].shared = sh;
    cpu_req[i].uncached = unc; cpu_req[i].addr = a; cpu_req[i].addr_end = ae;
    cpu_req[i].wdata = wd; cpu_req[i].wstrb = 4'hF;
    r_cyc = 0;
    do begin @(posedge clk); r_cyc++; end while (!cpu_rsp[i].ack);
    r_data = cpu_rsp[i].rdata;
    r_hit  = cpu_rsp[i].hit;
    #1 cpu_req[i] = '0;
    if (o == OP_STORE) ref_mem[i][{a[31:2], 2'b00}] = wd;
  endtask

  task automatic load_check(int i, logic [31:0] a, bit sh, string what, int exp_hit = -1);
    op(i, OP_LOAD, a, sh);
    check(r_data == ref_word(i, a),
          $sformatf("[%0d] %s: load %h got %h exp %h", i, what, a, r_data, ref_word(i, a)));
    if (exp_hit >= 0)
      check(r_hit == exp_hit, $sformatf("[%0d] %s: load %h hit=%0d exp %0d", i, what, a, r_hit, exp_hit));
  endtask

  // address with a given tag / set / word; for shared data the element is tag[1:0]
  function automatic logic [31:0] A(int tag, int set, int word = 0);
    return {20'(tag), 9'(set), 1'(word), 2'b00};
  endfunction

  int hit_cyc, c1, c2, c3;

  task automatic directed(int i);
    logic [31:0] a, s;
    // miss, then hit
    a = A(100, 5);
    load_check(i, a, 0, "first load", 0);
    load_check(i, a, 0, "second load", 1);
    hit_cyc = r_cyc;
    // private store
    op(i, OP_STORE, a, 0, 0, 32'hDEAD_0001);
    check(r_hit == 1, $sformatf("[%0d] store hit", i));
    if (i != 1) check(mem_word(i, a) == init_word(a), "write-back store must not reach memory");
    else        check(mem_word(i, a) == 32'hDEAD_0001, "[1] write-through store must reach memory");
    load_check(i, a, 0, "load after store", 1);

    // shared line: stale until made coherent
    s = A(201, 5, 1);                     // element 201 % 4 = 1 of set 5
    load_check(i, s, 1, "shared first load", 0);
    poke(i, s, 32'h5EED_0001);            // another processor updates it
    op(i, OP_LOAD, s, 1);
    check(r_hit && r_data == init_word(s), $sformatf("[%0d] shared line should still be cached (stale)", i));
    // private lines in the other elements of set 5
    load_check(i, A(301, 5), 0, "private fill");
    load_check(i, A(302, 5), 0, "private fill");
    op(i, OP_COHERE, s, 0, 0, 0, s + 79);   // Make_coherent on an 80-byte structure
    load_check(i, s, 1, "shared load after coherence", 0);
    if (i < 2) begin
      load_check(i, A(301, 5), 0, "other element kept by the direct-map clear", 1);
      load_check(i, A(302, 5), 0, "other element kept by the direct-map clear", 1);
      load_check(i, a, 0, "private line in another element kept", 1);
    end else begin
      load_check(i, A(301, 5), 0, "set clear removes the synonyms", 0);
      load_check(i, A(302, 5), 0, "set clear removes the synonyms", 0);
    end

    // clear cost: one row (1 cycle), two rows (2), many rows (3)
    op(i, OP_COHERE, A(0, 64), 0, 0, 0, A(0, 64) + 8 * 10 - 1);      c1 = r_cyc;
    op(i, OP_COHERE, A(0, 120), 0, 0, 0, A(0, 120) + 8 * 10 - 1);    c2 = r_cyc;
    op(i, OP_COHERE, A(0, 10), 0, 0, 0, A(0, 10) + 8 * 1000 - 1);    c3 = r_cyc;
    if (i < 2) check(c2 == c1 + 1 && c3 == c1 + 2,
          $sformatf("[%0d] clear cycles one/two/many rows: %0d %0d %0d", i, c1, c2, c3));

    // whole-cache range and a range wrapping past the last cell
    load_check(i, A(404, 7), 1, "shared fill", 0);
    load_check(i, A(407, 500), 1, "shared fill", 0);      // element 3, set 500
    load_check(i, A(404, 3), 1, "shared fill", 0);        // element 0, set 3
    op(i, OP_COHERE, A(407, 500), 0, 0, 0, A(407, 500) + 8 * 20 - 1);  // wraps to element 0 set 8
    load_check(i, A(407, 500), 1, "wrapped clear, first piece", 0);
    load_check(i, A(404, 3), 1, "wrapped clear, second piece", 0);
    load_check(i, A(404, 7), 1, "wrapped clear, second piece", 0);
    load_check(i, A(404, 9), 1, "shared fill", 0);
    op(i, OP_STORE, A(100, 5), 0, 0, 32'hDEAD_0002);
    op(i, OP_COHERE, A(0, 0), 0, 0, 0, A(0, 0) + 32'h10000);
    if (i < 2) check(r_cyc == c1, $sformatf("[%0d] clear-all takes one cycle", i));
    else       check(r_cyc < c1, $sformatf("[%0d] clear-all is faster than a clear per element", i));
    load_check(i, A(404, 9), 1, "after clear-all", 0);
    if (i != 1) load_check(i, A(100, 5), 0, "dirty line kept by the conditional clear", 1);
    else        load_check(i, A(100, 5), 0, "clean written-through line is cleared", 0);

    // dirty evictions: five private stores to one set of four elements
    for (int k = 0; k < 5; k++) op(i, OP_STORE, A(600 + k, 33), 0, 0, 32'hE000_0000 + k);
    for (int k = 0; k < 5; k++) load_check(i, A(600 + k, 33), 0, "after eviction");

    // uncached accesses and the indivisible swap (semaphore)
    op(i, OP_STORE, A(900, 40), 0, 1, 32'h0000_0000);
    check(mem_word(i, A(900, 40)) == 0, $sformatf("[%0d] uncached store", i));
    op(i, OP_SWAP, A(900, 40), 0, 0, 32'h1);
    check(r_data == 0 && mem_word(i, A(900, 40)) == 1, $sformatf("[%0d] swap gets the lock", i));
    ref_mem[i][A(900, 40)] = 1;
    op(i, OP_SWAP, A(900, 40), 0, 0, 32'h1);
    check(r_data == 1, $sformatf("[%0d] swap sees the lock taken", i));
    load_check(i, A(900, 40), 0, "uncached load");   // cached=0 but uncached flag below
    op(i, OP_LOAD, A(900, 40), 0, 1);
    check(r_data == 1, $sformatf("[%0d] uncached load", i));

    // prefetch after a clear: acknowledged at once, fills in the background
    op(i, OP_COHERE, A(700, 200), 0, 0, 0, A(700, 200) + 79);
    op(i, OP_PREFETCH, A(700, 200), 0, 0, 0, A(700, 200) + 79);
    check(r_cyc <= hit_cyc, $sformatf("[%0d] prefetch acknowledged at once (%0d cycles)", i, r_cyc));
    load_check(i, A(910, 300), 0, "processor runs during the prefetch");
    while (cpu_rsp[i].pf_busy) @(posedge clk);
    for (int k = 0; k < 10; k++)
      load_check(i, A(700, 200) + 8 * k, 1, "prefetched line", 1);
    // prefetch with no clear before it: present lines are fetched again
    poke(i, A(700, 200) + 16, 32'h7E57_0001);
    op(i, OP_PREFETCH, A(700, 200), 0, 0, 0, A(700, 200) + 79);
    while (cpu_rsp[i].pf_busy) @(posedge clk);
    load_check(i, A(700, 200) + 16, 1, "prefetch alone refreshes a present line", 1);

    // migration: clean lines go at once, dirty ones are flushed and stay
    op(i, OP_STORE, A(800, 50), 0, 0, 32'hF1F1_0001);
    load_check(i, A(801, 51), 0, "clean line");
    op(i, OP_MIGRATE, 0);
    if (i != 1) check(cpu_rsp[i].flush_busy, "flush machine running");
    load_check(i, A(801, 51), 0, "clean line gone after migration", 0);
    load_check(i, A(800, 50), 0, "dirty line kept after migration", i != 1 ? 1 : 0);
    while (cpu_rsp[i].flush_busy) @(posedge clk);
    check(mem_word(i, A(800, 50)) == 32'hF1F1_0001, $sformatf("[%0d] flushed to memory", i));
    load_check(i, A(800, 50), 0, "flushed line still valid", 1);
  endtask

  task automatic random_phase(int i, int n);
    for (int t = 0; t < n; t++) begin
      int kind;
      logic [31:0] a;
      kind = $urandom_range(99);
      if (kind < 50) begin   // private region: 8 tags x 16 sets
        a = A(1000 + $urandom_range(7), 64 + $urandom_range(15), $urandom_range(1));
        if (kind < 25) load_check(i, a, 0, "random private");
        else op(i, OP_STORE, a, 0, 0, $urandom);
      end else if (kind < 85) begin  // shared region
        a = A(2000 + $urandom_range(7), 64 + $urandom_range(15), $urandom_range(1));
        if (kind < 70) load_check(i, a, 1, "random shared");
        else op(i, OP_STORE, a, 1, 0, $urandom);
      end else if (kind < 93) begin
        a = A(2000 + $urandom_range(7), 64 + $urandom_range(15));
        op(i, OP_COHERE, a, 0, 0, 0, a + $urandom_range(200));
      end else if (kind < 97) begin
        a = A(2000 + $urandom_range(7), 64 + $urandom_range(15));
        op(i, OP_PREFETCH, a, 0, 0, 0, a + $urandom_range(80));
      end else begin
        op(i, OP_MIGRATE, 0);
      end
    end
    op(i, OP_MIGRATE, 0);
    while (cpu_rsp[i].flush_busy) @(posedge clk);
    begin
      int bad = 0;
      foreach (ref_mem[i][k]) if (mem_word(i, k) != ref_mem[i][k]) bad++;
      check(bad == 0, $sformatf("[%0d] memory holds every store after the final flush (%0d wrong)", i, bad));
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpu_req[0] = '0; cpu_req[1] = '0; cpu_req[2] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      directed(i);
      random_phase(i, 3000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
