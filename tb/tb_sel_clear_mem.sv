// tb_sel_clear_mem: checks the selectively clearable valid/dirty memory at
// its default size (4 x 512 cells in a 32 x 64 array) against a bit-level
// model: random single-cell writes, then random range clears and clear-alls,
// after each of which every cell is read back through the per-set read port.
// A clear must reset exactly the valid bits of the range whose dirty bit is
// clear, keep dirty cells valid, and finish in 1, 2 or 3 cycles.
module tb_sel_clear_mem;
  localparam int WAYS = 4, NSETS = 512, COLS = 64, NC = WAYS * NSETS;
  int checks = 0, failures = 0;
  int n_inhibited = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [8:0]  rd_set;
  logic [3:0]  rd_valid, rd_dirty;
  logic        wr_en, wr_valid, wr_dirty;
  logic [10:0] wr_cell, clr_first, clr_last;
  logic        clr_start, clr_all, clr_busy;

  sel_clear_mem dut (.*);

  bit mv [NC];
  bit md [NC];

  task automatic compare_all(string what);
    int bad = 0;
    for (int s = 0; s < NSETS; s++) begin
      rd_set = 9'(s);
      #1;
      for (int e = 0; e < WAYS; e++)
        if (rd_valid[e] != mv[e * NSETS + s] || rd_dirty[e] != md[e * NSETS + s]) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d cells differ", what, bad);
    end
  endtask

  task automatic write_cell(int c, bit v, bit d);
    @(posedge clk) #1;
    wr_en = 1; wr_cell = 11'(c); wr_valid = v; wr_dirty = d;
    @(posedge clk) #1;
    wr_en = 0;
    mv[c] = v; md[c] = d;
  endtask

  task automatic clear(int f, int l, bit all);
    int cyc = 1, exp;
    @(posedge clk) #1;
    clr_start = 1; clr_all = all; clr_first = 11'(f); clr_last = 11'(l);
    @(posedge clk) #1;
    clr_start = 0;
    while (clr_busy) begin cyc++; @(posedge clk) #1; end
    for (int i = 0; i < NC; i++)
      if (all || (i >= f && i <= l)) begin
        if (md[i] && mv[i]) n_inhibited++;
        if (!md[i]) mv[i] = 0;
      end
    if (all || f / COLS == l / COLS) exp = 1;
    else if (l / COLS == f / COLS + 1) exp = 2;
    else exp = 3;
    checks++;
    if (cyc != exp) begin
      failures++;
      $display("FAIL clear %0d..%0d took %0d cycles, expected %0d", f, l, cyc, exp);
    end
    compare_all($sformatf("clear %0d..%0d all=%0d", f, l, all));
  endtask

  task automatic fill_random();
    for (int k = 0; k < 600; k++)
      write_cell($urandom_range(NC - 1), 1'b1, ($urandom_range(3) == 0));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; clr_start = 0; clr_all = 0; rd_set = 0;
    wr_cell = 0; wr_valid = 0; wr_dirty = 0; clr_first = 0; clr_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    compare_all("after reset");
    fill_random();
    compare_all("after writes");
    clear(77, 77, 0);         // case 1
    clear(130, 180, 0);       // case 2
    fill_random();
    clear(200, 300, 0);       // two rows
    clear(513, 1800, 0);      // many rows
    fill_random();
    clear(0, 0, 1);           // clear-all, dirty cells stay
    for (int t = 0; t < 12; t++) begin
      int a, b, x;
      fill_random();
      a = $urandom_range(NC - 1); b = $urandom_range(NC - 1);
      if (a > b) begin x = a; a = b; b = x; end
      clear(a, b, 0);
    end
    checks++;
    if (n_inhibited == 0) begin
      failures++;
      $display("FAIL no clear was ever inhibited by a dirty bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
