// tb_depuncturer: punctures numbered soft pairs with each DVB-T pattern
// (X and Y keep-masks written as strings) and checks that the depuncturer
// returns every pair with the kept values in place and 0 for erased ones.
module tb_depuncturer;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  code_rate_e rate;
  logic restart, in_valid, out_valid;
  logic signed [5:0] in_soft, out_x, out_y;
  int checks = 0, failures = 0;

  depuncturer dut (.*);

  string px [5] = '{"1", "10", "101", "10101", "1000101"};
  string py [5] = '{"1", "11", "110", "11010", "1111010"};
  code_rate_e rl [5] = '{R1_2, R2_3, R3_4, R5_6, R7_8};
  logic signed [5:0] ex [$], ey [$];

  always @(negedge clk) if (out_valid) begin
    checks++;
    if (ex.size() == 0 || out_x !== ex[0] || out_y !== ey[0]) begin
      failures++;
      if (failures < 5) $display("got %0d/%0d want %0d/%0d", out_x, out_y, ex[0], ey[0]);
    end
    if (ex.size() != 0) begin void'(ex.pop_front()); void'(ey.pop_front()); end
  end

  initial begin
    in_valid = 0; in_soft = 0; restart = 0; rate = R1_2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      int len;
      len = px[r].len();
      @(negedge clk);
      rate = rl[r]; restart = 1;
      @(negedge clk);
      restart = 0;
      for (int t = 0; t < len * 6; t++) begin
        logic signed [5:0] vx, vy;
        int p;
        p = t % len;
        vx = 6'($urandom_range(31, 1)); vy = -6'($urandom_range(31, 1));
        ex.push_back(px[r][p] == "1" ? vx : 6'sd0);
        ey.push_back(py[r][p] == "1" ? vy : 6'sd0);
        if (px[r][p] == "1") begin @(negedge clk); in_valid = 1; in_soft = vx; end
        if (py[r][p] == "1") begin @(negedge clk); in_valid = 1; in_soft = vy; end
      end
      @(negedge clk);
      in_valid = 0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (ex.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
