// tb_dvb_rx_top: end-to-end test of the receiver back end, with every
// parameter of the top at its default. A transmitter model in the testbench
// builds a 2K-mode, 16-QAM, rate-2/3, non-hierarchical DVB-T signal at the
// cell level:
//   188-byte packets (sync, 16-bit packet number, random payload)
//   -> energy dispersal (groups of 8, inverted first sync byte)
//   -> RS(204,188) encoder -> convolutional interleaver (I=12, M=17)
//   -> a few deliberate byte errors (what the Viterbi decoder would leave)
//   -> K=7 convolutional encoder and puncturing -> bit interleaver
//   -> Gray 16-QAM mapping -> symbol interleaver (even/odd symbols)
// and TPS frames (sync word, parameters, BCH parity, DBPSK on 17 carriers).
// Each cell is multiplied by a random channel gain H that is also given to
// the receiver, plus a little noise. Coded data start with OFDM frame 2; the
// first 40 symbols arrive before sync_done, so frame 0 is incomplete and the
// TPS decoder locks on frame 1.
// Checks: every error-free output packet after the first descrambler group
// start equals the source packet with its number, packet numbers are
// consecutive, and enough packets arrive. Every mechanism must be seen:
// the three power phases, TPS lock, input stall, bit-interleaver hold, TS
// lock, RS corrections, RS failures (start-up), group starts and a DVB-H
// suspend. The two front-half pieces are exercised on their own ports: a
// tone at a known frequency offset must leave the frequency compensator as a
// constant, and six FFT-output symbols with moving scattered pilots must make
// the pilot-order detector lock and report the right pattern; the same tone,
// cut as one 2K symbol, must give the guard-interval CFO estimator an
// offset of half a sub-carrier spacing; three 2K FFT outputs with the used
// band moved by 3 bins must give an integer CFO of 3, stable at the third.
module tb_dvb_rx_top;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic suspend, sync_done, cell_valid, cell_ready;
  logic signed [11:0] cell_y_i, cell_y_q, cell_h_i, cell_h_q;
  logic cell_is_data, cell_is_tps, cell_sym_end;
  logic ts_valid, ts_sop, ts_err, tps_ok, ts_locked, en_mod1, en_mod2, en_mod3;
  logic [7:0] ts_data;
  tps_params_t tps_params;
  logic [6:0] tps_sym_idx;
  logic [1:0] pm_phase;
  int checks = 0, failures = 0;
  logic fe_phase_clr, fe_valid, fft_in_valid, fft_valid, fft_sop, fft_last;
  logic sp_valid, sp_locked;
  logic [1:0] sp_order;
  logic signed [15:0] fe_freq;
  logic signed [7:0] fe_i, fe_q;
  logic signed [8:0] fft_in_i, fft_in_q;
  logic signed [11:0] fft_i, fft_q;
  fft_mode_e fe_mode;
  guard_e fe_gi;
  logic fe_sym_start, afc_valid;
  logic signed [15:0] afc_eps;
  logic fbin_valid, fbin_sop, icfo_valid, icfo_stable;
  logic signed [11:0] fbin_i, fbin_q;
  logic signed [7:0] icfo_est;

  logic [1:0] ce_sp_l;
  logic ce_valid, ce_sop, ce_last, ce_ready, ce_out_valid, ce_out_sop, ce_out_last;
  logic signed [11:0] ce_i, ce_q, ce_y_i, ce_y_q, ce_h_i, ce_h_q;

  dvb_rx_top dut (.*);

  localparam int NPKT   = 64;
  localparam int NDATA  = 1512;            // 2K data cells
  localparam int NBITS  = 4;               // 16-QAM
  localparam int SYM0   = 136;             // first coded symbol (frame 2, symbol 0)
  localparam int NSYM   = SYM0 + 26;

  // ---------------- GF(256) by tables ----------------
  int unsigned gexp [0:509];
  int unsigned glog [0:255];
  function automatic int unsigned gmul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  logic [7:0] pkt  [NPKT][188];
  logic [7:0] chan [$];       // interleaved byte stream
  bit         cbits [$];      // punctured code bits
  int         cell_lab [$];   // 4-bit labels of data cells, in interleaved order
  int         hperm [NDATA];

  task automatic build_tx();
    int unsigned g [0:16];
    int unsigned v;
    bit st [15];
    logic [7:0] fifo [12][$];
    int n;
    v = 1;
    for (int i = 0; i < 510; i++) begin
      gexp[i] = v; if (i < 255) glog[v] = i;
      v = v << 1; if (v & 256) v ^= 'h11D;
    end
    for (int i = 0; i <= 16; i++) g[i] = 0;
    g[0] = 1;
    for (int r = 0; r < 16; r++) begin
      for (int i = 16; i >= 1; i--) g[i] = g[i-1] ^ gmul(g[i], gexp[r]);
      g[0] = gmul(g[0], gexp[r]);
    end
    for (int j = 0; j < 12; j++) repeat (j * 17) fifo[j].push_back(8'h00);
    n = 0;
    for (int p = 0; p < NPKT; p++) begin
      logic [7:0] sc [188];
      int unsigned par [0:15];
      logic [7:0] cw [204];
      pkt[p][0] = 8'h47; pkt[p][1] = 8'(p >> 8); pkt[p][2] = 8'(p);
      for (int i = 3; i < 188; i++) pkt[p][i] = 8'($urandom);
      // energy dispersal
      if (p % 8 == 0) begin
        st = '{1,0,0,1,0,1,0,1,0,0,0,0,0,0,0};
        sc[0] = 8'hB8;
      end else sc[0] = 8'h47;
      for (int i = 1; i < 188; i++) begin
        logic [7:0] pb;
        for (int b = 7; b >= 0; b--) begin
          bit fb;
          fb = st[13] ^ st[14];
          pb[b] = fb;
          for (int s = 14; s > 0; s--) st[s] = st[s-1];
          st[0] = fb;
        end
        sc[i] = pkt[p][i] ^ pb;
      end
      if (p % 8 != 7) begin   // PRBS runs during the next sync byte
        for (int b = 0; b < 8; b++) begin
          bit fb;
          fb = st[13] ^ st[14];
          for (int s = 14; s > 0; s--) st[s] = st[s-1];
          st[0] = fb;
        end
      end
      // RS encoder
      for (int i = 0; i < 16; i++) par[i] = 0;
      for (int i = 0; i < 188; i++) begin
        int unsigned fb;
        cw[i] = sc[i];
        fb = sc[i] ^ par[15];
        for (int j = 15; j >= 1; j--) par[j] = par[j-1] ^ gmul(fb, g[j]);
        par[0] = gmul(fb, g[0]);
      end
      for (int i = 0; i < 16; i++) cw[188 + i] = 8'(par[15 - i]);
      // outer interleaver
      for (int i = 0; i < 204; i++) begin
        fifo[n % 12].push_back(cw[i]);
        chan.push_back(fifo[n % 12].pop_front());
        n++;
      end
    end
    // byte errors left by the inner decoder: a few bytes in some packets
    for (int k = 0; k < 12; k++) begin
      int pos;
      pos = 204 * (20 + 2 * k) + 7 + 13 * k;
      for (int e = 0; e < 1 + k % 4; e++) chan[pos + 24 * e] ^= 8'h5A;
    end
  endtask

  task automatic encode_bits();
    bit sr [7];
    string px = "10", py = "11";   // rate 2/3
    int t;
    for (int j = 0; j < 7; j++) sr[j] = 0;
    t = 0;
    foreach (chan[i]) for (int b = 7; b >= 0; b--) begin
      bit x, y;
      for (int j = 6; j > 0; j--) sr[j] = sr[j-1];
      sr[0] = chan[i][b];
      x = sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
      y = sr[0] ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
      if (px[t % 2] == "1") cbits.push_back(x);
      if (py[t % 2] == "1") cbits.push_back(y);
      t++;
    end
  endtask

  // bit interleaver (16-QAM): sections of 126 cells
  task automatic bit_interleave();
    int shifts [4] = '{0, 63, 105, 42};
    int dm [4] = '{0, 2, 1, 3};
    int nsec;
    nsec = cbits.size() / (126 * NBITS);
    for (int s = 0; s < nsec; s++) begin
      bit b [4][126];
      for (int w = 0; w < 126; w++)
        for (int k = 0; k < NBITS; k++) b[dm[k]][w] = cbits[s * 126 * NBITS + NBITS * w + k];
      for (int w = 0; w < 126; w++) begin
        int lab;
        lab = 0;
        for (int e = 0; e < NBITS; e++) lab |= int'(b[e][(w + shifts[e]) % 126]) << e;
        cell_lab.push_back(lab);
      end
    end
  endtask

  task automatic make_h();
    int rp [10];
    int map2k [10] = '{4, 3, 9, 6, 2, 8, 1, 5, 7, 0};
    int q;
    q = 0;
    for (int j = 0; j < 10; j++) rp[j] = 0;
    for (int i = 0; i < 2048; i++) begin
      int h, fb;
      if (i == 2) rp[0] = 1;
      else if (i > 2) begin
        fb = rp[0] ^ rp[3];
        for (int j = 0; j < 9; j++) rp[j] = rp[j+1];
        rp[9] = fb;
      end
      h = (i % 2) << 10;
      for (int j = 0; j < 10; j++) h += rp[j] << map2k[j];
      if (h < NDATA) begin hperm[q] = h; q++; end
    end
  endtask

  // TPS frame bits s0..s67
  bit tps_bits [68];
  task automatic build_tps(int fnum);
    bit w [67];
    bit g [15] = '{1,0,0,0,0,1,1,0,1,1,1,0,1,1,1};
    bit sync [16] = '{0,0,1,1,0,1,0,1,1,1,1,0,1,1,1,0};
    bit f [23] = '{0,1,0,1,1,1, 0,0, 0,1, 0,0,0, 0,0,1, 0,0,0, 1,0, 0,0};
    f[6] = fnum[1]; f[7] = fnum[0];
    for (int i = 0; i < 16; i++) w[i] = (fnum % 2 == 0) ? sync[i] : !sync[i];
    for (int i = 0; i < 23; i++) w[16 + i] = f[i];
    for (int i = 39; i < 67; i++) w[i] = 0;
    for (int i = 0; i < 53; i++) tps_bits[1 + i] = w[i];
    for (int i = 0; i < 53; i++)
      if (w[i]) for (int j = 0; j < 15; j++) w[i + j] ^= g[j];
    for (int i = 0; i < 14; i++) tps_bits[54 + i] = w[53 + i];
    tps_bits[0] = 0;
  endtask

  // lattice level of a Gray pair for 16-QAM: sign bit, inner bit
  function automatic int lev16(bit sgn, bit inner);
    int a;
    a = inner ? 1 : 3;
    return sgn ? -a : a;
  endfunction

  bit tps_phase [17];
  int sent_cells = 0;

  task automatic send_cell(int xi, int xq, bit is_data, bit is_tps, bit last);
    real mag, ang, hr, hq, yr, yq;
    mag = 0.7 + 0.7 * real'($urandom_range(1000, 0)) / 1000.0;
    ang = 6.2831853 * real'($urandom_range(1000, 0)) / 1000.0;
    hr = mag * $cos(ang) * 512.0;
    hq = mag * $sin(ang) * 512.0;
    yr = (real'(xi) * hr - real'(xq) * hq) / 512.0 + real'(int'($urandom_range(20, 0)) - 10);
    yq = (real'(xi) * hq + real'(xq) * hr) / 512.0 + real'(int'($urandom_range(20, 0)) - 10);
    cell_valid   = 1;
    cell_y_i     = 12'($rtoi(yr)); cell_y_q = 12'($rtoi(yq));
    cell_h_i     = 12'($rtoi(hr)); cell_h_q = 12'($rtoi(hq));
    cell_is_data = is_data; cell_is_tps = is_tps; cell_sym_end = last;
    @(posedge clk);
    while (!cell_ready) @(posedge clk);
    #1;
    sent_cells++;
  endtask

  // per-symbol layout: pilot, then 17 groups of (88 data cells, 1 TPS cell),
  // remaining data cells, pilot (last)
  task automatic send_symbol(int s);
    int dcell [NDATA];
    int d, tcount;
    if (s % 68 == 0) build_tps(s / 68 % 4);
    for (int c = 0; c < 17; c++) if (tps_bits[s % 68]) tps_phase[c] = !tps_phase[c];
    if (s >= SYM0 && cell_lab.size() >= NDATA) begin
      int y [NDATA];
      for (int q = 0; q < NDATA; q++) y[q] = cell_lab.pop_front();
      // symbol interleaver: even y[H(q)] = y'[q]; odd y[q] = y'[H(q)]
      for (int q = 0; q < NDATA; q++)
        if ((s - SYM0) % 2 == 0) dcell[hperm[q]] = y[q]; else dcell[q] = y[hperm[q]];
    end else begin
      for (int q = 0; q < NDATA; q++) dcell[q] = int'($urandom_range(15, 0));
    end
    send_cell(7 * 128 / 2, 0, 0, 0, 0);
    d = 0; tcount = 0;
    for (int c = 0; c < 17; c++) begin
      for (int k = 0; k < 88; k++) begin
        int lab;
        lab = dcell[d++];
        send_cell(lev16(lab[0], lab[2]) * 128, lev16(lab[1], lab[3]) * 128, 1, 0, 0);
      end
      send_cell(tps_phase[c] ? -4 * 128 / 3 : 4 * 128 / 3, 0, 0, 1, 0);
    end
    while (d < NDATA) begin
      int lab;
      lab = dcell[d++];
      send_cell(lev16(lab[0], lab[2]) * 128, lev16(lab[1], lab[3]) * 128, 1, 0, 0);
    end
    send_cell(7 * 128 / 2, 0, 0, 0, 1);
  endtask

  // ---------------- receive side ----------------
  int good = 0, bad_pkts = 0, last_num = -1, nerr_pkts = 0;
  bit group_seen = 0;
  logic [7:0] rxp [188];
  int rx_i = 0;
  bit rx_err;
  int n_stall = 0, n_hold = 0, n_corr = 0, n_fail = 0, n_grp = 0;
  bit seen_eq = 0, seen_dec = 0, seen_lock = 0, seen_sleep = 0;

  always @(negedge clk) begin
    if (!cell_ready && cell_valid) n_stall++;
    if (dut.sd_out_valid && !dut.sd_out_ready) n_hold++;
    if (pm_phase == 2'd1) seen_eq = 1;
    if (pm_phase == 2'd2) seen_dec = 1;
    if (pm_phase == 2'd3 && !en_mod1 && !en_mod2 && !en_mod3) seen_sleep = 1;
    if (ts_locked) seen_lock = 1;
    if (dut.rs_valid && dut.rs_sop) begin
      if (dut.rs_err) n_fail++;
      else if (dut.rs_nerr != 0) n_corr++;
      if (dut.rs_data == 8'hB8 && !dut.rs_err) begin n_grp++; group_seen = 1; end
    end
    if (ts_valid) begin
      if (ts_sop) rx_i = 0;
      rxp[rx_i] = ts_data;
      rx_err = ts_err;
      rx_i++;
      if (rx_i == 188) begin
        int num;
        num = {rxp[1], rxp[2]};
        if (rx_err) nerr_pkts++;
        else if (group_seen) begin
          bit ok;
          ok = (num < NPKT) && (last_num < 0 || num == last_num + 1);
          if (ok) for (int i = 0; i < 188; i++) if (rxp[i] !== pkt[num][i]) ok = 0;
          checks++;
          if (ok) good++;
          else begin
            failures++;
            if (failures < 5) $display("packet %0d wrong (after %0d)", num, last_num);
          end
          last_num = num;
        end
      end
    end
  end

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    suspend = 0; sync_done = 0; cell_valid = 0;
    cell_y_i = 0; cell_y_q = 0; cell_h_i = 0; cell_h_q = 0;
    cell_is_data = 0; cell_is_tps = 0; cell_sym_end = 0;
    foreach (tps_phase[c]) tps_phase[c] = c[0];
    build_tx();
    encode_bits();
    bit_interleave();
    make_h();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      if (s == 40) sync_done = 1;
      send_symbol(s);
    end
    cell_valid = 0;
    repeat (60000) @(posedge clk);
    need(seen_eq, "equalization phase");
    need(seen_dec, "decoding phase");
    need(tps_ok && tps_params.qam == QAM16 && tps_params.rate_hp == R2_3 && tps_params.mode == MODE_2K,
         "TPS lock with the sent parameters");
    need(n_stall > 0, "input stall");
    need(n_hold > 0, "bit-interleaver hold");
    need(seen_lock, "transport-stream lock");
    need(n_corr > 0, "RS correction");
    need(n_fail > 0, "RS failure");
    need(n_grp > 0, "descrambler group start");
    need(n_cfo > 100 && n_cfo_bad == 0, "frequency offset removed from a tone");
    need(n_sp_ok >= 3 && n_sp_bad == 0, "scattered-pilot order lock");
    need(n_afc == 1 && afc_good, "guard-interval CFO estimate");
    need(n_icfo == 3 && icfo_ok, "integer CFO from the guard bands");
    need(n_ce == 1705 && ce_ok && n_ce_hold > 0, "channel estimate over the scattered pilots");
    checks++;
    if (good < 24) begin failures++; $display("only %0d good packets", good); end
    suspend = 1;
    repeat (4) @(posedge clk);
    need(seen_sleep, "time-slicing suspend");
    $display("cells %0d, good packets %0d, flagged %0d, RS corrected %0d, failed %0d, stalls %0d, holds %0d",
             sent_cells, good, nerr_pkts, n_corr, n_fail, n_stall, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- front-half pieces (module 1) ----------------
  // A tone at +freq/2^16 cycles per sample must come out of the frequency
  // compensator as a constant (after its 16-clock latency).
  int n_cfo = 0, n_cfo_bad = 0;
  always @(negedge clk) if (fft_in_valid) begin
    n_cfo++;
    if (fft_in_i < 96 || fft_in_i > 104 || fft_in_q < -4 || fft_in_q > 4) begin
      n_cfo_bad++;
      if (n_cfo_bad < 4) $display("compensated tone %0d %0d", fft_in_i, fft_in_q);
    end
  end
  // FFT-output symbols with pilots on class (3 + l) mod 4 go to the
  // scattered-pilot order detector; once locked it must report that class.
  int n_sp_ok = 0, n_sp_bad = 0;
  int sp_cls [$];
  always @(negedge clk) if (sp_valid) begin
    int c;
    c = sp_cls.pop_front();
    if (sp_locked) begin
      if (sp_order == 2'(c)) n_sp_ok++; else n_sp_bad++;
    end
  end
  // The second part of the tone is one 2K symbol with guard 1/32 whose guard
  // is a copy of its end: the guard-interval estimator must report the
  // tone's offset in sub-carrier spacings, frac(2048 * 2000 / 65536) = 0.5.
  int n_afc = 0;
  bit afc_good = 0;
  always @(negedge clk) if (afc_valid) begin
    n_afc++;
    afc_good = (afc_eps > 16'sh7E00 || afc_eps < -16'sh7E00);
    if (!afc_good) $display("CFO estimate %0d", afc_eps);
  end
  initial begin
    fe_mode = MODE_2K; fe_gi = GI_1_32; fe_sym_start = 0;
    fe_phase_clr = 0; fe_valid = 0; fe_freq = 16'sd2000; fe_i = 0; fe_q = 0;
    fft_valid = 0; fft_sop = 0; fft_last = 0; fft_i = 0; fft_q = 0;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      real th;
      th = 2.0 * 3.14159265358979 * 2000.0 * real'(n) / 65536.0;
      fe_phase_clr = (n == 0); fe_valid = 1;
      fe_i = 8'($rtoi(100.0 * $cos(th) + (($cos(th) >= 0) ? 0.5 : -0.5)));
      fe_q = 8'($rtoi(100.0 * $sin(th) + (($sin(th) >= 0) ? 0.5 : -0.5)));
      @(negedge clk);
    end
    // a tone is periodic, so any 2112 consecutive samples form a valid
    // symbol with its guard interval
    for (int n = 400; n < 400 + 2112; n++) begin
      real th;
      th = 2.0 * 3.14159265358979 * 2000.0 * real'(n) / 65536.0;
      fe_phase_clr = 0; fe_valid = 1; fe_sym_start = (n == 400);
      fe_i = 8'($rtoi(100.0 * $cos(th) + (($cos(th) >= 0) ? 0.5 : -0.5)));
      fe_q = 8'($rtoi(100.0 * $sin(th) + (($sin(th) >= 0) ? 0.5 : -0.5)));
      @(negedge clk);
    end
    fe_valid = 0; fe_phase_clr = 0; fe_sym_start = 0;
    for (int l = 0; l < 6; l++) begin
      for (int k = 0; k < 1705; k++) begin
        fft_valid = 1; fft_sop = (k == 0); fft_last = (k == 1704);
        if (k == 1704) sp_cls.push_back((3 + l) % 4);
        if (k % 12 == 3 * ((3 + l) % 4)) begin
          fft_i = $urandom_range(1, 0) ? 12'sd405 : -12'sd405; fft_q = 0;
        end else begin
          fft_i = 12'((2 * int'($urandom_range(3, 0)) - 3) * 96);
          fft_q = 12'((2 * int'($urandom_range(3, 0)) - 3) * 96);
        end
        @(negedge clk);
      end
    end
    fft_valid = 0; fft_sop = 0; fft_last = 0;
  end

  // Three 2K FFT outputs with the used band moved up by 3 bins: the integer
  // CFO estimator must report 3 each time and be stable after the third.
  int n_icfo = 0;
  bit icfo_ok = 1;
  always @(negedge clk) if (icfo_valid) begin
    n_icfo++;
    if (icfo_est != 8'sd3 || icfo_stable != (n_icfo == 3)) begin
      icfo_ok = 0;
      $display("integer CFO %0d stable %0d", icfo_est, icfo_stable);
    end
  end
  initial begin
    fbin_valid = 0; fbin_sop = 0; fbin_i = 0; fbin_q = 0;
    repeat (7) @(negedge clk);
    for (int l = 0; l < 3; l++)
      for (int b = 0; b < 2048; b++) begin
        fbin_valid = 1; fbin_sop = (b == 0);
        if (b >= 171 + 3 && b < 171 + 3 + 1705) begin
          fbin_i = 12'((2 * int'($urandom_range(3, 0)) - 3) * 96);
          fbin_q = 12'((2 * int'($urandom_range(3, 0)) - 3) * 96);
        end else begin
          fbin_i = 12'(int'($urandom_range(6, 0)) - 3); fbin_q = 0;
        end
        @(negedge clk);
      end
    fbin_valid = 0; fbin_sop = 0;
  end

  // One 2K symbol (pattern l = 1) through the flat channel H = 200 - 100j:
  // data cells +-1/3, +-1 times H, pilots +-4/3 times H with the reference
  // PRBS sign. Every estimate must be H within 3, every cell unchanged.
  int n_ce = 0, n_ce_hold = 0;
  bit ce_ok = 1;
  int ce_exp_i [$], ce_exp_q [$];
  always @(negedge clk) if (ce_valid && !ce_ready) n_ce_hold++;
  always @(negedge clk) if (ce_out_valid) begin
    int ei, eq;
    ei = ce_exp_i.pop_front(); eq = ce_exp_q.pop_front();
    if (ce_y_i != 12'(ei) || ce_y_q != 12'(eq) || ce_h_i > 12'sd203 || ce_h_i < 12'sd197 ||
        ce_h_q > -12'sd97 || ce_h_q < -12'sd103 || ce_out_sop != (n_ce == 0) || ce_out_last != (n_ce == 1704)) begin
      if (ce_ok) $display("channel estimate at %0d: h %0d %0d", n_ce, ce_h_i, ce_h_q);
      ce_ok = 0;
    end
    n_ce++;
  end
  initial begin
    bit w [11];
    ce_sp_l = 2'd1; ce_valid = 0; ce_sop = 0; ce_last = 0; ce_i = 0; ce_q = 0;
    foreach (w[j]) w[j] = 1;
    repeat (9) @(negedge clk);
    for (int k = 0; k < 1705; k++) begin
      int xi, xq;
      bit wk;
      wk = w[10];
      for (int j = 10; j > 0; j--) w[j] = w[j-1];
      w[0] = wk ^ w[9];
      if (k % 12 == 3) begin xi = wk ? -4 : 4; xq = 0; end
      else begin
        xi = 2 * int'($urandom_range(3, 0)) - 3;
        xq = 2 * int'($urandom_range(3, 0)) - 3;
      end
      // y = H * x / 3 with H = 200 - 100j
      ce_exp_i.push_back((200 * xi + 100 * xq) / 3);
      ce_exp_q.push_back((200 * xq - 100 * xi) / 3);
      ce_valid = 1; ce_sop = (k == 0); ce_last = (k == 1704);
      ce_i = 12'((200 * xi + 100 * xq) / 3); ce_q = 12'((200 * xq - 100 * xi) / 3);
      @(posedge clk);
      while (!ce_ready) @(posedge clk);
      @(negedge clk);
    end
    ce_valid = 0; ce_sop = 0; ce_last = 0;
    // a second symbol is offered at once to see the input held
    ce_valid = 1; ce_sop = 1; ce_i = 0; ce_q = 0;
    repeat (20) @(negedge clk);
    ce_valid = 0; ce_sop = 0;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
