// tb_clear_sequencer: drives random cell ranges (within one row, across two
// rows, across many rows, and clear-all) through the sequencer at its default
// 32 x 64 shape, collects the cells its row/column selections cover, and
// checks that exactly the requested cells are covered and that the clear takes
// 1, 2 or 3 cycles (1 for clear-all) as the range spans one, two or more rows.
module tb_clear_sequencer;
  localparam int ROWS = 32, COLS = 64, NC = ROWS * COLS;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, clr_all, busy, sel_v, row_all, col_all;
  logic [10:0] first, last;
  logic [4:0] row_lo, row_hi;
  logic [5:0] col_lo, col_hi;

  clear_sequencer dut (.*);

  bit covered [NC];
  int cycles;

  // sample the selection every cycle it is valid
  always @(negedge clk) if (sel_v) begin
    cycles++;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if ((row_all || (r >= row_lo && r <= row_hi)) &&
            (col_all || (c >= col_lo && c <= col_hi)))
          covered[r * COLS + c] = 1;
  end

  task automatic run(int f, int l, bit all);
    int exp_cycles, bad;
    foreach (covered[i]) covered[i] = 0;
    cycles = 0;
    @(posedge clk) #1;
    start = 1; clr_all = all; first = 11'(f); last = 11'(l);
    @(posedge clk) #1;
    start = 0;
    while (busy) @(posedge clk) #1;
    @(posedge clk) #1;
    if (all || f / COLS == l / COLS) exp_cycles = 1;
    else if (l / COLS == f / COLS + 1) exp_cycles = 2;
    else exp_cycles = 3;
    bad = 0;
    for (int i = 0; i < NC; i++)
      if (covered[i] != (all || (i >= f && i <= l))) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL range %0d..%0d all=%0d: %0d cells wrong", f, l, all, bad);
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL range %0d..%0d: %0d cycles, expected %0d", f, l, cycles, exp_cycles);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; clr_all = 0; first = 0; last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 5, 0);                  // one cell
    run(70, 100, 0);               // within a row
    run(100, 140, 0);              // two rows
    run(63, 64, 0);                // two rows, one cell each
    run(10, 2000, 0);              // many rows
    run(0, NC - 1, 0);             // everything, as a range
    run(0, 0, 1);                  // clear-all
    for (int t = 0; t < 40; t++) begin
      int a, b, x;
      a = $urandom_range(NC - 1); b = $urandom_range(NC - 1);
      if (a > b) begin x = a; a = b; b = x; end
      run(a, b, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
