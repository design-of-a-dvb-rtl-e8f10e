// tb_pre_fft_afc: builds OFDM-like time-domain symbols (random complex
// useful part of N samples preceded by a copy of its last G samples),
// applies a carrier frequency offset of eps sub-carrier spacings as a
// continuous phase ramp exp(j*2*pi*eps*n/N), adds noise, quantises to 8 bits
// and feeds them with random idle clocks. For each symbol the estimate must
// be within 0.01 of eps (656 in units of 2^-16). Runs 2K with all four guard
// intervals, 4K with GI 1/8 and 8K with GI 1/32, with positive, negative and
// near +-0.5 offsets, and checks that exactly one estimate comes per symbol.
module tb_pre_fft_afc;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fft_mode_e mode;
  guard_e gi;
  logic in_valid, sym_start, eps_valid;
  logic signed [7:0] in_i, in_q;
  logic signed [15:0] eps;
  int checks = 0, failures = 0;

  pre_fft_afc dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real want_q [$];
  int  n_est = 0;
  always @(negedge clk) if (eps_valid) begin
    real w, e;
    n_est++;
    checks++;
    if (want_q.size() == 0) begin
      failures++; $display("estimate without a symbol");
    end else begin
      w = want_q.pop_front();
      e = real'(eps) / 65536.0 - w;
      if (e > 0.5) e -= 1.0;
      if (e < -0.5) e += 1.0;
      if (e > 0.01 || e < -0.01) begin
        failures++;
        $display("eps %f want %f", real'(eps) / 65536.0, w);
      end
    end
  end

  real ph = 0.0;   // running phase of the offset, in turns
  task automatic send_symbol(int n, int g, real e);
    real ui [], uq [];
    ui = new[n]; uq = new[n];
    foreach (ui[k]) begin
      ui[k] = real'($urandom_range(120, 0)) - 60.0;
      uq[k] = real'($urandom_range(120, 0)) - 60.0;
    end
    for (int k = 0; k < n + g; k++) begin
      real si, sq, c, s, ri, rq;
      int j;
      j = (k < g) ? n - g + k : k - g;
      si = ui[j]; sq = uq[j];
      c = $cos(2.0 * 3.14159265358979 * ph);
      s = $sin(2.0 * 3.14159265358979 * ph);
      ri = si * c - sq * s + real'($urandom_range(6, 0)) - 3.0;
      rq = si * s + sq * c + real'($urandom_range(6, 0)) - 3.0;
      ph = ph + e / real'(n);
      @(negedge clk);
      in_valid = 1; sym_start = (k == 0);
      in_i = 8'($rtoi(ri)); in_q = 8'($rtoi(rq));
      @(negedge clk);
      in_valid = 0; sym_start = 0;
      if ($urandom_range(7, 0) == 0) @(negedge clk);
    end
    want_q.push_back(e);
  endtask

  int n_sym = 0;
  initial begin
    real offs [6] = '{0.0, 0.1, -0.23, 0.37, -0.45, 0.48};
    mode = MODE_2K; gi = GI_1_4;
    in_valid = 0; sym_start = 0; in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 4; g++) begin
      gi = guard_e'(g);
      foreach (offs[m]) begin send_symbol(2048, 2048 >> (5 - g), offs[m]); n_sym++; end
    end
    mode = MODE_4K; gi = GI_1_8;
    for (int m = 0; m < 3; m++) begin send_symbol(4096, 512, offs[m + 1]); n_sym++; end
    mode = MODE_8K; gi = GI_1_32;
    for (int m = 0; m < 3; m++) begin send_symbol(8192, 256, offs[m + 3]); n_sym++; end
    repeat (40) @(negedge clk);
    checks++;
    if (n_est != n_sym) begin failures++; $display("%0d estimates for %0d symbols", n_est, n_sym); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
