// tb_channel_estimator: builds 2K and 8K symbols (K = 1705 and 6817 used
// carriers) through a channel that is linear in frequency, H(k) = a + b*k,
// with random 16-QAM data cells and scattered pilots of +-4/3 on
// k mod 12 = 3*(l mod 4), signed by the reference PRBS (x^11 + x^2 + 1,
// all ones at carrier 0, kept here as an 11-entry bit list). Checks: each
// output cell equals the input cell; between the first and last pilot the
// estimate is within 3 LSB of H(k) (the interpolation is exact for a linear
// channel); outside that range it equals the nearest pilot's H within 3 LSB;
// sop/last framing and K outputs per symbol; the input is held (in_ready
// low) during every read-out. All four pilot phases are used.
module tb_channel_estimator;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] sp_l;
  logic in_valid, in_sop, in_last, in_ready, out_valid, out_sop, out_last;
  logic signed [11:0] in_i, in_q, out_y_i, out_y_q, out_h_i, out_h_q;
  int checks = 0, failures = 0;

  channel_estimator dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output per carrier
  int ey_i [$], ey_q [$], eh_i [$], eh_q [$], elast [$];
  int n_hold = 0;
  always @(negedge clk) if (in_valid && !in_ready) n_hold++;

  int kout = 0;
  always @(negedge clk) if (out_valid) begin
    int yi, yq, hi, hq, last;
    yi = ey_i.pop_front(); yq = ey_q.pop_front();
    hi = eh_i.pop_front(); hq = eh_q.pop_front(); last = elast.pop_front();
    checks++;
    if (out_y_i != 12'(yi) || out_y_q != 12'(yq) || out_last != last[0] || out_sop != (kout == 0)) begin
      failures++;
      if (failures < 6) $display("cell %0d: y %0d %0d want %0d %0d, last %0d", kout, out_y_i, out_y_q, yi, yq, out_last);
    end
    checks++;
    if (int'(out_h_i) - hi > 3 || hi - int'(out_h_i) > 3 || int'(out_h_q) - hq > 3 || hq - int'(out_h_q) > 3) begin
      failures++;
      if (failures < 6) $display("cell %0d: h %0d %0d want %0d %0d", kout, out_h_i, out_h_q, hi, hq);
    end
    kout = (last != 0) ? 0 : kout + 1;
  end

  task automatic send_symbol(int k_used, int l);
    real ai, aq, bi, bq;
    bit w [11];
    int pfirst, plast;
    ai = real'($urandom_range(400, 0)) - 200.0;
    aq = real'($urandom_range(400, 0)) - 200.0;
    bi = (real'($urandom_range(400, 0)) - 200.0) / real'(k_used);
    bq = (real'($urandom_range(400, 0)) - 200.0) / real'(k_used);
    foreach (w[j]) w[j] = 1;
    pfirst = 3 * l;
    plast = pfirst + 12 * ((k_used - 1 - pfirst) / 12);
    for (int k = 0; k < k_used; k++) begin
      real hr, hq_, xr, xq, yr, yq;
      int kk;
      bit wk, fb;
      wk = w[10];
      fb = w[10] ^ w[8];
      for (int j = 10; j > 0; j--) w[j] = w[j-1];
      w[0] = fb;
      hr = ai + bi * k; hq_ = aq + bq * k;
      if (k % 12 == 3 * l) begin
        xr = wk ? -4.0 / 3.0 : 4.0 / 3.0; xq = 0.0;
      end else begin
        xr = real'(2 * int'($urandom_range(3, 0)) - 3) / 3.0;
        xq = real'(2 * int'($urandom_range(3, 0)) - 3) / 3.0;
      end
      yr = hr * xr - hq_ * xq;
      yq = hr * xq + hq_ * xr;
      ey_i.push_back($rtoi(yr)); ey_q.push_back($rtoi(yq));
      kk = (k < pfirst) ? pfirst : (k > plast) ? plast : k;
      eh_i.push_back($rtoi(ai + bi * kk)); eh_q.push_back($rtoi(aq + bq * kk));
      elast.push_back(int'(k == k_used - 1));
      @(negedge clk);
      in_valid = 1; in_sop = (k == 0); in_last = (k == k_used - 1); sp_l = 2'(l);
      in_i = 12'($rtoi(yr)); in_q = 12'($rtoi(yq));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      in_valid = 0; in_sop = 0; in_last = 0;
      if ($urandom_range(3, 0) == 0) @(negedge clk);
    end
  endtask

  initial begin
    sp_l = 0; in_valid = 0; in_sop = 0; in_last = 0; in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) send_symbol(1705, l);
    for (int l = 1; l < 3; l++) send_symbol(6817, l);
    send_symbol(1705, 3);
    repeat (7000) @(negedge clk);
    checks++;
    if (ey_i.size() != 0) begin failures++; $display("%0d outputs missing", ey_i.size()); end
    checks++;
    if (n_hold == 0) begin failures++; $display("input never held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
