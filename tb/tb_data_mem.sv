// tb_data_mem: random byte-strobed writes (full lines and single words) into
// the default 4 x 512 x 8-byte data memory, each read back and compared with a
// byte-level model, including bytes the strobes must have left alone.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0]  rd_set, wr_set;
  logic [1:0]  rd_way, wr_way;
  logic [63:0] rd_line, wr_line;
  logic        wr_en;
  logic [7:0]  wr_strb;

  data_mem dut (.*);

  logic [63:0] m [4][512];
  bit          known [4][512];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_set = 0; rd_way = 0; wr_set = 0; wr_way = 0; wr_strb = 0; wr_line = 0;
    for (int t = 0; t < 4000; t++) begin
      int s, w;
      s = $urandom_range(511); w = $urandom_range(3);
      if (!known[w][s] || $urandom_range(1)) wr_strb = 8'hFF;
      else wr_strb = ($urandom_range(1) ? 8'hF0 : 8'h0F) & 8'($urandom);
      @(posedge clk) #1;
      wr_en = 1; wr_set = 9'(s); wr_way = 2'(w); wr_line = {$urandom, $urandom};
      for (int b = 0; b < 8; b++) if (wr_strb[b]) m[w][s][8*b +: 8] = wr_line[8*b +: 8];
      known[w][s] = 1;
      @(posedge clk) #1;
      wr_en = 0;
      rd_set = 9'(s); rd_way = 2'(w);
      #1;
      checks++;
      if (rd_line !== m[w][s]) begin
        failures++;
        $display("FAIL set %0d way %0d got %h exp %h", s, w, rd_line, m[w][s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
