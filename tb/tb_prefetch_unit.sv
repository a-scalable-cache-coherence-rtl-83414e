// tb_prefetch_unit: starts prefetches of byte ranges (one line, several
// lines, an unaligned range, an empty range, a restart mid-way) and answers
// the requests after random delays; checks that exactly the lines of the
// range are requested, in order, one per ack, and that busy drops after the
// last one.
module tb_prefetch_unit;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, req, ack, busy;
  logic [31:0] first_addr, last_addr, req_addr;

  prefetch_unit dut (.*);

  task automatic run(logic [31:0] f, logic [31:0] l, int restart_after);
    logic [31:0] exp;
    int n = 0, nexp;
    @(posedge clk) #1;
    start = 1; first_addr = f; last_addr = l;
    @(posedge clk) #1;
    start = 0;
    exp  = {f[31:3], 3'b000};
    nexp = (l[31:3] >= f[31:3]) ? int'(l[31:3] - f[31:3]) + 1 : 0;
    while (busy) begin
      checks++;
      if (!req || req_addr !== exp) begin
        failures++;
        $display("FAIL request %0d: req=%0d addr %h expected %h", n, req, req_addr, exp);
      end
      repeat ($urandom_range(3)) @(posedge clk) #1;
      if (restart_after == n) return;
      ack = 1;
      @(posedge clk) #1;
      ack = 0;
      exp += 8; n++;
    end
    checks++;
    if (n != nexp) begin
      failures++;
      $display("FAIL range %h..%h: %0d lines requested, expected %0d", f, l, n, nexp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ack = 0; first_addr = 0; last_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(32'h1000, 32'h1007, -1);
    run(32'h2003, 32'h2051, -1);     // 80 bytes, unaligned: 11 lines
    run(32'h3000, 32'h2FF0, -1);     // empty
    run(32'h4000, 32'h40FF, 5);      // abandoned after 5 lines ...
    run(32'h5000, 32'h501F, -1);     // ... and replaced by a new range
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
