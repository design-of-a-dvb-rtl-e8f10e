// tb_channel_equalizer: random transmitted cells X are passed through random
// channel gains H (|H| between 0.5 and 2, unity = 512); the equalizer must
// return X within 5 LSB (Y is rounded to integers before the
// division, which a gain below 1 amplifies), carry the tag, keep its two-clock latency and hold
// its pipeline while ce is low.
module tb_channel_equalizer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ce, in_valid, out_valid;
  logic signed [11:0] y_i, y_q, h_i, h_q, x_i, x_q;
  logic [3:0] in_tag, out_tag;
  int checks = 0, failures = 0;

  channel_equalizer dut (.*);

  int exi [$], exq [$], ext [$];
  int lat [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (out_valid && ce) begin
    checks++;
    if (exi.size() == 0 || x_i > exi[0] + 5 || x_i < exi[0] - 5 || x_q > exq[0] + 5 || x_q < exq[0] - 5 ||
        int'(out_tag) != ext[0]) begin
      failures++;
      if (failures < 5) $display("got %0d,%0d want %0d,%0d", x_i, x_q, exi[0], exq[0]);
    end
    if (exi.size() != 0) begin void'(exi.pop_front()); void'(exq.pop_front()); void'(ext.pop_front()); end
  end

  initial begin
    ce = 1; in_valid = 0; y_i = 0; y_q = 0; h_i = 0; h_q = 0; in_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      real mag, ang, xr, xq, hr, hq;
      int xi, xqq;
      xi  = int'($urandom_range(1000, 0)) - 500;
      xqq = int'($urandom_range(1000, 0)) - 500;
      mag = 0.5 + 1.5 * real'($urandom_range(1000, 0)) / 1000.0;
      ang = 6.2831853 * real'($urandom_range(1000, 0)) / 1000.0;
      hr = mag * $cos(ang) * 512.0;
      hq = mag * $sin(ang) * 512.0;
      @(negedge clk);
      ce = (n % 5 != 4);
      in_valid = 1;
      h_i = 12'($rtoi(hr)); h_q = 12'($rtoi(hq));
      xr = (real'(xi) * real'(h_i) - real'(xqq) * real'(h_q)) / 512.0;
      xq = (real'(xi) * real'(h_q) + real'(xqq) * real'(h_i)) / 512.0;
      y_i = 12'($rtoi(xr)); y_q = 12'($rtoi(xq));
      in_tag = 4'(n);
      if (ce) begin exi.push_back(xi); exq.push_back(xqq); ext.push_back(n % 16); end
    end
    @(negedge clk); in_valid = 0; ce = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (exi.size() != 0) begin failures++; $display("%0d cells missing", exi.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
