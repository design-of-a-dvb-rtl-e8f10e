// tb_symbol_deinterleaver: builds the DVB-T permutation H(q) with its own
// model (LFSR and bit-permutation tables written as arrays), checks that it is
// a permutation of 0..Nmax-1 in each mode, then interleaves random cells with
// it (even and odd symbols alternating) and checks that the de-interleaver
// returns them in the original order, under random output back-pressure.
// Also checks the one-cell-per-clock rate on the write side apart from
// generator skips: a 2K symbol must be accepted within 2048+8 clocks.
module tb_symbol_deinterleaver;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fft_mode_e mode;
  logic in_valid, in_odd, in_ready, out_valid, out_ready;
  logic [23:0] in_data, out_data;
  int checks = 0, failures = 0;

  symbol_deinterleaver dut (.*);

  int hperm [6048];
  function automatic int nr_of(fft_mode_e m);
    return (m == MODE_2K) ? 11 : (m == MODE_4K) ? 12 : 13;
  endfunction

  task automatic make_h(fft_mode_e m);
    int nr, nmax, q;
    int rp [12];
    int map2k [10] = '{4, 3, 9, 6, 2, 8, 1, 5, 7, 0};      // R' bit j -> R bit
    int map4k [11] = '{6, 3, 0, 9, 4, 2, 1, 8, 5, 10, 7};
    int map8k [12] = '{7, 1, 4, 2, 9, 6, 8, 10, 0, 3, 11, 5};
    nr = nr_of(m); nmax = int'(data_cells(m));
    q = 0;
    for (int j = 0; j < 12; j++) rp[j] = 0;
    for (int i = 0; i < (1 << nr); i++) begin
      int h, fb;
      if (i == 2) rp[0] = 1;
      else if (i > 2) begin
        if (nr == 11) fb = rp[0] ^ rp[3];
        else if (nr == 12) fb = rp[0] ^ rp[2];
        else fb = rp[0] ^ rp[1] ^ rp[4] ^ rp[6];
        for (int j = 0; j < nr - 2; j++) rp[j] = rp[j+1];
        rp[nr-2] = fb;
      end
      h = (i % 2) << (nr - 1);
      for (int j = 0; j < nr - 1; j++) begin
        int t;
        t = (nr == 11) ? map2k[j] : (nr == 12) ? map4k[j] : map8k[j];
        h += rp[j] << t;
      end
      if (h < nmax) begin hperm[q] = h; q++; end
    end
    checks++;
    if (q != nmax) begin failures++; $display("mode %0d: %0d addresses", m, q); end
    begin
      bit seen [6048];
      int bad;
      bad = 0;
      for (int k = 0; k < nmax; k++) seen[k] = 0;
      for (int k = 0; k < nmax; k++) begin if (seen[hperm[k]]) bad++; seen[hperm[k]] = 1; end
      checks++;
      if (bad != 0) begin failures++; $display("mode %0d: H not a permutation", m); end
    end
  endtask

  logic [23:0] orig [$];
  logic [23:0] y  [6048];
  logic [23:0] yp [6048];
  int got = 0;

  task automatic run_mode(fft_mode_e m, int nsym);
    int n;
    mode = m;
    make_h(m);
    n = int'(data_cells(m));
    for (int s = 0; s < nsym; s++) begin
      int t0;
      for (int q = 0; q < n; q++) begin yp[q] = 24'($urandom); orig.push_back(yp[q]); end
      for (int q = 0; q < n; q++)
        if (s % 2 == 0) y[hperm[q]] = yp[q]; else y[q] = yp[hperm[q]];
      t0 = 0;
      for (int q = 0; q < n; q++) begin
        in_valid <= 1; in_odd <= (s % 2 == 1); in_data <= y[q];
        forever begin
          @(negedge clk); t0++;
          if (in_ready) break;
        end
        @(posedge clk);
      end
      if (m == MODE_2K && s == 2) begin
        checks++;
        if (t0 > 2048 + 8) begin failures++; $display("2K symbol took %0d clocks", t0); end
      end
    end
    in_valid <= 0;
    while (orig.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  // at each falling edge choose out_ready for the next rising edge and
  // record the transfer that rising edge will make
  always @(negedge clk) begin
    out_ready = ($urandom_range(4, 0) != 0);
    if (out_valid && out_ready) begin
      checks++;
      got++;
      if (orig.size() == 0 || out_data !== orig[0]) begin
        failures++;
        if (failures < 6) $display("cell %0d: got %h want %h", got, out_data, orig.size() ? orig[0] : 24'h0);
      end
      if (orig.size() != 0) void'(orig.pop_front());
    end
  end

  initial begin
    in_valid = 0; in_odd = 0; in_data = 0; out_ready = 1; mode = MODE_2K;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run_mode(MODE_2K, 4);
    run_mode(MODE_4K, 2);
    run_mode(MODE_8K, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
