// tb_flush_machine: runs the default 2048-cell flush machine with random ack
// delays and checks that it requests every cell once, in order, then drops
// busy; a second start mid-way restarts the sweep from cell 0.
module tb_flush_machine;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, req, ack, busy;
  logic [10:0] req_cell;

  flush_machine dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, bad;
    start = 0; ack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(posedge clk) #1;
      start = 1;
      @(posedge clk) #1;
      start = 0;
      n = 0; bad = 0;
      while (busy) begin
        if (!req || req_cell != 11'(n)) bad++;
        if ($urandom_range(3) == 0) @(posedge clk) #1;
        if (pass == 0 && n == 100) break;     // abandon the first sweep
        ack = 1;
        @(posedge clk) #1;
        ack = 0;
        n++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL pass %0d: %0d wrong requests", pass, bad); end
    end
    checks++;
    if (n != 2048) begin failures++; $display("FAIL %0d cells flushed, expected 2048", n); end
    checks++;
    if (busy || req) begin failures++; $display("FAIL busy after the sweep"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
