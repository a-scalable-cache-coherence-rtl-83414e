// tb_tag_mem: writes random tags into random elements of random sets of the
// default 4 x 512 tag memory and checks every read of all elements of a set
// against a model.
module tb_tag_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0]       rd_set, wr_set;
  logic [3:0][19:0] rd_tag;
  logic             wr_en;
  logic [1:0]       wr_way;
  logic [19:0]      wr_tag;

  tag_mem dut (.*);

  logic [19:0] m [4][512];
  bit          known [4][512];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_set = 0; wr_set = 0; wr_way = 0; wr_tag = 0;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk) #1;
      wr_en = 1; wr_set = 9'($urandom_range(511)); wr_way = 2'($urandom_range(3));
      wr_tag = 20'($urandom);
      m[wr_way][wr_set] = wr_tag; known[wr_way][wr_set] = 1;
      @(posedge clk) #1;
      wr_en = 0;
      rd_set = 9'($urandom_range(511));
      #1;
      for (int w = 0; w < 4; w++) if (known[w][rd_set]) begin
        checks++;
        if (rd_tag[w] !== m[w][rd_set]) begin
          failures++;
          $display("FAIL set %0d way %0d got %h exp %h", rd_set, w, rd_tag[w], m[w][rd_set]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
