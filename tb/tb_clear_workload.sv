// tb_clear_workload: miss-rate experiment in the style of the clearing
// studies, on default-size caches (16 kbyte, 4 x 512 x 8-byte lines): one
// with direct-mapped shared placement, one with the plain set clear.
//
// A synthetic reference stream (sequential runs with random jumps, mostly
// inside a 12 kbyte hot region, otherwise over 512 kbyte) is replayed,
// identically, under several clearing regimes:
//   std       no clearing;
//   dcl80 @N  every N references, Make_coherent on the 80 bytes starting at
//             the current reference address (the trace-dependent block);
//   tcl @N    every N references, a clear of the whole cache;
//   dcl+pf80  as dcl80, followed by a prefetch of the same 80 bytes;
//   scl80 @N  as dcl80 on a second cache built with the plain set clear.
// A few runs are repeated at other sizes: 8 elements x 256 sets with each
// clear, and a 32 kbyte cache of 4 elements x 1024 sets.
// Each run is 20000 references from a freshly reset cache. Checks: the miss
// rate never falls as clearing gets more frequent, total clearing costs more
// than the selective clear at the same interval, the set clear costs at least
// as much as the direct-map clear, and the prefetch does not
// raise the miss rate, each within a tolerance of 0.003 for the random
// replacement.
module tb_clear_workload;
  import sc_pkg::*;

  localparam int  NREF = 20000;
  localparam real TOL  = 0.003;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cpu_req_t cpu_req [5];
  cpu_rsp_t cpu_rsp [5];
  mem_req_t mem_req0 [1], mem_req1 [1];
  mem_rsp_t mem_rsp0 [1], mem_rsp1 [1];
  int       d;      // cache under test, numbered as below

  sc_cache dut (.clk, .rst_n, .cpu_req (cpu_req[0]), .cpu_rsp (cpu_rsp[0]),
                .mem_req (mem_req0[0]), .mem_rsp (mem_rsp0[0]));
  tb_mem #(.NPORT(1), .LAT(1)) u_mem (.clk, .rst_n, .req (mem_req0), .rsp (mem_rsp0));
  sc_cache #(.DCL(1'b0)) dut_scl (.clk, .rst_n, .cpu_req (cpu_req[1]), .cpu_rsp (cpu_rsp[1]),
                .mem_req (mem_req1[0]), .mem_rsp (mem_rsp1[0]));
  tb_mem #(.NPORT(1), .LAT(1)) u_mem_scl (.clk, .rst_n, .req (mem_req1), .rsp (mem_rsp1));

  // other sizes: 2 and 3 are 16 kbyte with 8 elements x 256 sets (direct-map
  // clear, set clear); 4 is 32 kbyte with 4 elements x 1024 sets
  localparam int XW [2:4] = '{8, 8, 4};
  localparam int XS [2:4] = '{256, 256, 1024};
  localparam bit XD [2:4] = '{1'b1, 1'b0, 1'b1};
  for (genvar x = 2; x <= 4; x++) begin : g_x
    mem_req_t mq [1];
    mem_rsp_t mr [1];
    sc_cache #(.WAYS(XW[x]), .NSETS(XS[x]), .DCL(XD[x])) u_cache (
      .clk, .rst_n, .cpu_req (cpu_req[x]), .cpu_rsp (cpu_rsp[x]),
      .mem_req (mq[0]), .mem_rsp (mr[0]));
    tb_mem #(.NPORT(1), .LAT(1)) u_mem (.clk, .rst_n, .req (mq), .rsp (mr));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  bit shared_ops;

  task automatic op(cpu_op_e o, logic [31:0] a, logic [31:0] ae = 0);
    @(posedge clk) #1;
    cpu_req[d] = '0;
    cpu_req[d].valid = 1; cpu_req[d].op = o; cpu_req[d].shared = shared_ops;
    cpu_req[d].addr = a; cpu_req[d].addr_end = ae; cpu_req[d].wstrb = 4'hF;
    do @(posedge clk); while (!cpu_rsp[d].ack);
    #1 cpu_req[d] = '0;
  endtask

  // xorshift32, reseeded for every run so all runs see the same stream
  logic [31:0] rng;
  function automatic logic [31:0] next_rand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  typedef enum int {STD, DCL, TCL, DCLPF} regime_e;

  task automatic run(regime_e reg_kind, int interval, output real miss_rate);
    logic [31:0] pos;
    int misses = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rng = 32'h1234_5678;
    pos = 32'h0010_0000;
    for (int t = 0; t < NREF; t++) begin
      logic [31:0] r;
      r = next_rand();
      if (r[3:0] == 0) begin
        if (r[7:4] < 14) pos = 32'h0010_0000 + (r[31:8] % 12288);
        else             pos = 32'h0100_0000 + (r[31:8] % 524288);
      end else begin
        pos += 4;
      end
      pos[1:0] = 2'b00;
      op(OP_LOAD, pos);
      if (!cpu_rsp[d].hit) misses++;
      if (reg_kind != STD && t % interval == interval - 1) begin
        if (reg_kind == TCL) op(OP_COHERE, 32'h0, 32'hFFFF_FFFF);
        else begin
          op(OP_COHERE, pos, pos + 79);
          if (reg_kind == DCLPF) op(OP_PREFETCH, pos, pos + 79);
        end
      end
    end
    while (cpu_rsp[d].pf_busy) @(posedge clk);
    miss_rate = real'(misses) / real'(NREF);
  endtask

  real m_std, m_d100, m_d1k, m_d10k, m_t100, m_t1k, m_pf100, m_s100, m_s1k;
  real m8_d100, m8_s100, m32_std, m32_d100;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cpu_req[k]) cpu_req[k] = '0;
    d = 0; shared_ops = 1'b0;
    run(STD, 1, m_std);
    run(DCL, 100, m_d100);
    run(DCL, 1000, m_d1k);
    run(DCL, 10000, m_d10k);
    run(TCL, 100, m_t100);
    run(TCL, 1000, m_t1k);
    run(DCLPF, 100, m_pf100);
    // the same stream through the set-clear cache: every clear removes the
    // whole of each set it covers
    d = 1;
    run(DCL, 100, m_s100);
    run(DCL, 1000, m_s1k);
    d = 2; run(DCL, 100, m8_d100);
    d = 3; run(DCL, 100, m8_s100);
    d = 4; run(STD, 1, m32_std);
    run(DCL, 100, m32_d100);
    $display("miss rates over %0d references:", NREF);
    $display("  std            %0.4f", m_std);
    $display("  dcl80   @100   %0.4f", m_d100);
    $display("  dcl80   @1000  %0.4f", m_d1k);
    $display("  dcl80   @10000 %0.4f", m_d10k);
    $display("  tcl     @100   %0.4f", m_t100);
    $display("  tcl     @1000  %0.4f", m_t1k);
    $display("  dcl+pf80 @100  %0.4f", m_pf100);
    $display("  scl80   @100   %0.4f", m_s100);
    $display("  scl80   @1000  %0.4f", m_s1k);
    $display("  ss8 ns256 dcl80 @100 %0.4f", m8_d100);
    $display("  ss8 ns256 scl80 @100 %0.4f", m8_s100);
    $display("  32 kbyte std         %0.4f", m32_std);
    $display("  32 kbyte dcl80 @100  %0.4f", m32_d100);
    // TOL allows for the random replacement, whose choices shift with timing
    check(m_std <= m_d10k + TOL && m_d10k <= m_d1k + TOL && m_d1k <= m_d100 + TOL,
          "selective clearing: miss rate must not fall as clearing gets more frequent");
    check(m_t1k <= m_t100 + TOL, "total clearing: miss rate must not fall as clearing gets more frequent");
    check(m_t100 > m_d100, "total clear must cost more than the selective clear at interval 100");
    check(m_t1k > m_d1k, "total clear must cost more than the selective clear at interval 1000");
    check(m_pf100 <= m_d100 + TOL, "prefetch after the clear must not raise the miss rate");
    check(m_s100 > m_d100, "set clear must cost more than the direct-map clear at interval 100");
    check(m_s1k + TOL >= m_d1k, "set clear must not beat the direct-map clear at interval 1000");
    check(m8_s100 > m8_d100, "8 elements: set clear must cost more than the direct-map clear");
    check(m8_s100 - m8_d100 > m_s100 - m_d100 - TOL,
          "the set clear's extra cost must not shrink as associativity grows");
    check(m32_std <= m_std + TOL && m32_d100 <= m_d100 + TOL, "a 32 kbyte cache must not miss more");
    check(m_d100 > m_std, "clearing every 100 references must cost some misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
