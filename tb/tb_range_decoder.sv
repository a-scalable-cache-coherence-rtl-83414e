// tb_range_decoder: checks the range decoder against a direct model: every
// (lo, hi) pair for N = 16, random pairs for the default N = 64, the
// all-selected input and the enable.
module tb_range_decoder;
  int checks = 0, failures = 0;

  logic        en16, all16, en64, all64;
  logic [3:0]  lo16, hi16;
  logic [5:0]  lo64, hi64;
  logic [15:0] sel16;
  logic [63:0] sel64;

  range_decoder #(.N(16)) dut16 (.en(en16), .all_sel(all16), .lo(lo16), .hi(hi16), .sel(sel16));
  range_decoder dut64 (.en(en64), .all_sel(all64), .lo(lo64), .hi(hi64), .sel(sel64));

  function automatic logic [63:0] model(int n, logic en, logic all, int lo, int hi);
    logic [63:0] m = '0;
    for (int i = 0; i < n; i++) m[i] = en && (all || (i >= lo && i <= hi));
    return m;
  endfunction

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 16; l++)
      for (int h = 0; h < 16; h++) begin
        en16 = 1; all16 = 0; lo16 = 4'(l); hi16 = 4'(h);
        #1 check(64'(sel16), model(16, 1, 0, l, h), $sformatf("N16 %0d..%0d", l, h));
      end
    en16 = 1; all16 = 1; lo16 = 5; hi16 = 3;
    #1 check(64'(sel16), 64'hFFFF, "N16 all");
    en16 = 0; all16 = 1;
    #1 check(64'(sel16), 64'h0, "N16 disabled");
    for (int t = 0; t < 500; t++) begin
      int l, h;
      l = $urandom_range(63); h = $urandom_range(63);
      en64 = 1; all64 = ($urandom_range(15) == 0); lo64 = 6'(l); hi64 = 6'(h);
      #1 check(sel64, model(64, 1, all64, l, h), $sformatf("N64 %0d..%0d", l, h));
    end
    lo64 = 9; hi64 = 9; all64 = 0; en64 = 1;
    #1 check(sel64, 64'h200, "N64 one-hot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
