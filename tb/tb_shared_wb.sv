// tb_shared_wb: test of the write-back policy for shared data (SHARED_WB = 1)
// on two default-size caches (16 kbyte, 4 x 512 x 8-byte lines) that share
// one behavioural memory through a two-port round-robin model.
//
// With shared data written back, a shared store stays in the cache as a dirty
// line, and software must issue OP_RELEASE on the structure before it
// unlocks; the release writes back every dirty line of the range and leaves
// it clean and valid. Directed checks on cache 0: a shared store does not
// reach memory; the release puts every stored word in memory and costs one
// write-back per dirty line; a later clear then removes the line (it is no
// longer dirty), so a value written to memory by someone else is read after
// Make_coherent; without a release the clear is inhibited on the dirty line.
// A random phase then passes a 128-byte shared structure between the two
// caches under the lock discipline (Make_coherent, shared loads and stores,
// release), with every load checked against a word-level model, and checks
// memory against the model at the end.
module tb_shared_wb;
  import sc_pkg::*;
  import tb_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cpu_req_t cpu_req [2];
  cpu_rsp_t cpu_rsp [2];
  mem_req_t mem_req [2];
  mem_rsp_t mem_rsp [2];

  for (genvar p = 0; p < 2; p++) begin : g_c
    sc_cache #(.SHARED_WB(1'b1)) u_cache (
      .clk, .rst_n, .cpu_req (cpu_req[p]), .cpu_rsp (cpu_rsp[p]),
      .mem_req (mem_req[p]), .mem_rsp (mem_rsp[p]));
  end
  tb_mem #(.NPORT(2), .LAT(2)) u_mem (.clk, .rst_n, .req (mem_req), .rsp (mem_rsp));

  initial begin
    #20_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] r_data;
  bit          r_hit;
  int          r_cyc;

  task automatic op(int i, cpu_op_e o, logic [31:0] a, bit sh = 1,
                    logic [31:0] wd = 0, logic [31:0] ae = 0);
    @(posedge clk) #1;
    cpu_req[i] = '0;
    cpu_req[i].valid = 1; cpu_req[i].op = o; cpu_req[i].shared = sh;
    cpu_req[i].addr = a; cpu_req[i].addr_end = ae;
    cpu_req[i].wdata = wd; cpu_req[i].wstrb = 4'hF;
    r_cyc = 0;
    do begin @(posedge clk); r_cyc++; end while (!cpu_rsp[i].ack);
    r_data = cpu_rsp[i].rdata;
    r_hit  = cpu_rsp[i].hit;
    #1 cpu_req[i] = '0;
  endtask

  function automatic logic [31:0] mem_word(logic [31:0] a);
    logic [LINE_W-1:0] l;
    l = u_mem.get_line(a[31:OFF_W]);
    return l[a[OFF_W-1:2]*32 +: 32];
  endfunction

  task automatic poke(logic [31:0] a, logic [31:0] v);
    logic [LINE_W-1:0] l;
    l = u_mem.get_line(a[31:OFF_W]);
    l[a[OFF_W-1:2]*32 +: 32] = v;
    u_mem.mem[a[31:OFF_W]] = l;
  endtask

  localparam logic [31:0] S  = 32'h0004_0100;   // directed structure
  localparam logic [31:0] R  = 32'h0008_0800;   // random-phase structure
  localparam int          RW = 32;              // its size in words

  logic [31:0] model [RW];
  int          cyc_clean, cyc_dirty;

  initial begin
    cpu_req[0] = '0; cpu_req[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- directed, cache 0
    op(0, OP_COHERE, S, 1, 0, S + 79);
    op(0, OP_RELEASE, S, 1, 0, S + 79);
    cyc_clean = r_cyc;
    for (int k = 0; k < 20; k += 4) op(0, OP_STORE, S + 4*k, 1, 32'hC0DE_0000 + k);
    check(mem_word(S) == init_word(S), "shared store stays in the cache");
    op(0, OP_LOAD, S, 1);
    check(r_hit && r_data == 32'hC0DE_0000, "shared store allocates the line");
    op(0, OP_RELEASE, S, 1, 0, S + 79);
    cyc_dirty = r_cyc;
    for (int k = 0; k < 20; k += 4)
      check(mem_word(S + 4*k) == 32'hC0DE_0000 + k, $sformatf("release wrote word %0d", k));
    check(cyc_dirty > cyc_clean + 5 * 2, $sformatf("release of 5 dirty lines costs %0d vs %0d cycles",
                                                cyc_dirty, cyc_clean));
    // another processor changes memory; after the clear the new value is read
    poke(S, 32'h1111_2222);
    op(0, OP_LOAD, S, 1);
    check(r_data == 32'hC0DE_0000, "clean copy kept until the clear");
    op(0, OP_COHERE, S, 1, 0, S + 79);
    op(0, OP_LOAD, S, 1);
    check(!r_hit && r_data == 32'h1111_2222, "released line removed by the clear");
    // without a release the dirty line survives the clear
    op(0, OP_STORE, S + 8, 1, 32'h3333_4444);
    poke(S + 8, 32'h5555_6666);
    op(0, OP_COHERE, S, 1, 0, S + 79);
    op(0, OP_LOAD, S + 8, 1);
    check(r_hit && r_data == 32'h3333_4444, "dirty shared line inhibits the clear");
    op(0, OP_RELEASE, S, 1, 0, S + 79);
    check(mem_word(S + 8) == 32'h3333_4444, "release writes it back");

    // ---- random: the structure passes between the two caches
    for (int w = 0; w < RW; w++) model[w] = mem_word(R + 4*w);
    for (int t = 0; t < 300; t++) begin
      int p, n;
      p = $urandom_range(1);
      op(p, OP_COHERE, R, 1, 0, R + 4*RW - 1);
      n = $urandom_range(1, 12);
      for (int j = 0; j < n; j++) begin
        int w;
        w = $urandom_range(RW - 1);
        if ($urandom_range(1)) begin
          op(p, OP_LOAD, R + 4*w, 1);
          check(r_data == model[w], $sformatf("t%0d cache %0d word %0d: %h, expected %h",
                                              t, p, w, r_data, model[w]));
        end else begin
          model[w] = $urandom;
          op(p, OP_STORE, R + 4*w, 1, model[w]);
        end
      end
      // private traffic that may evict the structure's lines
      if ($urandom_range(3) == 0)
        op(p, OP_STORE, R + 32'h1000 * $urandom_range(1, 8) + 4*$urandom_range(RW - 1), 0, $urandom);
      op(p, OP_RELEASE, R, 1, 0, R + 4*RW - 1);
    end
    for (int w = 0; w < RW; w++)
      check(mem_word(R + 4*w) == model[w], $sformatf("memory word %0d at the end", w));

    $display("release: %0d cycles clean, %0d cycles with 5 dirty lines", cyc_clean, cyc_dirty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
