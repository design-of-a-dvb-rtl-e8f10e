// tb_post_fft_afc: builds FFT output symbols whose used band (K bins of
// random 16-QAM cells) is shifted by s bins from its nominal place, with
// weak noise in the guard bands, and streams them in natural bin order with
// random idle clocks. Each symbol's estimate must equal s; `stable` must be
// low for the first two symbols after a change of s and high from the third.
// Runs 2K with shifts 0, 5, -11, 16, -16 and 4K and 8K with one shift each.
module tb_post_fft_afc;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fft_mode_e mode;
  logic in_valid, in_sop, est_valid, stable;
  logic signed [11:0] in_i, in_q;
  logic signed [7:0] est;
  int checks = 0, failures = 0;

  post_fft_afc dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lev();
    return (2 * int'($urandom_range(3, 0)) - 3) * 96;
  endfunction

  int want_s [$];
  bit want_st [$];
  always @(negedge clk) if (est_valid) begin
    int s;
    bit st;
    s = want_s.pop_front(); st = want_st.pop_front();
    checks++;
    if (int'(est) != s || stable != st) begin
      failures++;
      $display("est %0d stable %0d, want %0d %0d", est, stable, s, st);
    end
  end

  task automatic send_symbol(int n, int k, int s, bit st);
    int lo;
    lo = (n - k) / 2 + s;
    want_s.push_back(s); want_st.push_back(st);
    for (int b = 0; b < n; b++) begin
      int a, c;
      if (b >= lo && b < lo + k) begin a = lev(); c = lev(); end
      else begin a = int'($urandom_range(8, 0)) - 4; c = int'($urandom_range(8, 0)) - 4; end
      @(negedge clk);
      in_valid = 1; in_sop = (b == 0); in_i = 12'(a); in_q = 12'(c);
      @(negedge clk);
      in_valid = 0; in_sop = 0;
      if ($urandom_range(5, 0) == 0) @(negedge clk);
    end
  endtask

  initial begin
    int shifts [5] = '{0, 5, -11, 16, -16};
    mode = MODE_2K; in_valid = 0; in_sop = 0; in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (shifts[m])
      for (int r = 0; r < 3; r++) send_symbol(2048, 1705, shifts[m], r == 2);
    mode = MODE_4K;
    for (int r = 0; r < 3; r++) send_symbol(4096, 3409, -7, r == 2);
    mode = MODE_8K;
    for (int r = 0; r < 3; r++) send_symbol(8192, 6817, 9, r == 2);
    repeat (10) @(negedge clk);
    checks++;
    if (want_s.size() != 0) begin failures++; $display("%0d estimates missing", want_s.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
