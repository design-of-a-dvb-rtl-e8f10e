// pre_fft_afc: estimates the fractional part of the carrier frequency offset
// from the cyclic prefix, ahead of the FFT.
//
// The guard interval of an OFDM symbol is a copy of the last G samples of
// its useful part, N samples later. A frequency offset of eps sub-carrier
// spacings turns every pair (r[n], r[n+N]) by the same angle 2*pi*eps, so the
// sum c = sum r[n+N] * conj(r[n]) over the guard interval has
// angle(c) = 2*pi*eps. The block keeps the last N samples in a circular
// memory (read first, then written, one access per sample), accumulates c
// over the G samples that follow the useful part, and then finds angle(c)
// with a serial CORDIC in vectoring mode (one iteration per clock).
//
// Interface: samples come with in_valid; sym_start marks the first guard
// sample of a symbol (from the timing synchroniser). mode and gi select
// N = 2048/4096/8192 and G = N/32..N/4. eps_valid pulses about 20 clocks
// after the last sample of the symbol; eps is the offset in sub-carrier
// spacings times 2^16 (range -0.5..0.5). The estimate of a symbol is only
// meaningful if sym_start came at least N samples after the previous one.
//
// Follows the document: the fractional CFO is taken from the phase rotation
// between guard-interval data and the part of the symbol it copies. Own
// choices: one-symbol estimate without averaging, the 16-bit result and the
// CORDIC.
module pre_fft_afc
  import dvb_pkg::*;
#(
  parameter int unsigned MAX_N = 8192,
  parameter int unsigned IN_W  = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  fft_mode_e              mode,
  input  guard_e                 gi,
  input  logic                   in_valid,
  input  logic                   sym_start,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic                   eps_valid,
  output logic signed [15:0]     eps
);
  localparam int AW  = $clog2(MAX_N);
  localparam int CW  = 32;               // correlator / CORDIC width
  localparam int NIT = 15;

  function automatic logic [15:0] atan_tab(int i);
    int t [16] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1, 1, 0};
    return 16'(t[i]);
  endfunction

  logic [AW:0] n_len, g_len;
  always_comb begin
    unique case (mode)
      MODE_2K: n_len = (AW+1)'(2048);
      MODE_4K: n_len = (AW+1)'(4096);
      default: n_len = (AW+1)'(8192);
    endcase
    unique case (gi)
      GI_1_32: g_len = n_len >> 5;
      GI_1_16: g_len = n_len >> 4;
      GI_1_8:  g_len = n_len >> 3;
      default: g_len = n_len >> 2;
    endcase
  end

  // ---- delay line of N samples ----
  logic [2*IN_W-1:0] mem [MAX_N];
  logic [AW-1:0]     wp;
  logic [2*IN_W-1:0] old_q;
  logic signed [IN_W-1:0] cur_i, cur_q;
  logic [AW+1:0]     n_cnt;      // sample index in the symbol
  logic              acc_en, last_q;

  always_ff @(posedge clk) if (in_valid) begin
    old_q   <= mem[wp];
    mem[wp] <= {in_i, in_q};
  end

  logic [AW+1:0] n_now;
  assign n_now = sym_start ? '0 : n_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp     <= '0;
      n_cnt  <= '0;
      acc_en <= 1'b0;
      last_q <= 1'b0;
      cur_i  <= '0;
      cur_q  <= '0;
    end else begin
      acc_en <= 1'b0;
      last_q <= 1'b0;
      if (in_valid) begin
        wp     <= (32'(wp) == 32'(n_len) - 1) ? '0 : wp + 1'b1;
        n_cnt  <= (n_now == '1) ? n_now : n_now + 1'b1;
        cur_i  <= in_i;
        cur_q  <= in_q;
        // samples N .. N+G-1 of the symbol repeat samples 0 .. G-1
        acc_en <= (32'(n_now) >= 32'(n_len)) && (32'(n_now) < 32'(n_len) + 32'(g_len));
        last_q <= (32'(n_now) == 32'(n_len) + 32'(g_len) - 1);
      end
    end
  end

  // ---- correlator: c += cur * conj(old) ----
  logic signed [IN_W-1:0] o_i, o_q;
  assign o_i = old_q[2*IN_W-1:IN_W];
  assign o_q = old_q[IN_W-1:0];

  logic signed [CW-1:0] c_re, c_im;
  logic signed [2*IN_W:0] p_re, p_im;
  assign p_re = (2*IN_W+1)'(cur_i * o_i) + (2*IN_W+1)'(cur_q * o_q);
  assign p_im = (2*IN_W+1)'(cur_q * o_i) - (2*IN_W+1)'(cur_i * o_q);

  // ---- serial CORDIC, vectoring mode ----
  logic                  busy, fin;
  logic [4:0]            it;
  logic signed [CW-1:0]  vx, vy;
  logic signed [15:0]    vz;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_re <= '0; c_im <= '0;
      busy <= 1'b0; fin <= 1'b0; it <= '0;
      vx <= '0; vy <= '0; vz <= '0;
      eps_valid <= 1'b0; eps <= '0;
    end else begin
      eps_valid <= 1'b0;
      if (in_valid && sym_start) begin
        c_re <= '0; c_im <= '0;
      end else if (acc_en) begin
        c_re <= c_re + CW'(p_re);
        c_im <= c_im + CW'(p_im);
      end
      if (last_q) begin
        // the final product is added here; start from the left half-plane
        // mirrored onto the right one
        busy <= 1'b1;
        it   <= '0;
        if (c_re + CW'(p_re) < 0) begin
          vx <= -(c_re + CW'(p_re)) >>> 2;
          vy <= -(c_im + CW'(p_im)) >>> 2;
          vz <= 16'sh8000;
        end else begin
          vx <= (c_re + CW'(p_re)) >>> 2;
          vy <= (c_im + CW'(p_im)) >>> 2;
          vz <= '0;
        end
      end else if (busy) begin
        if (vy >= 0) begin
          vx <= vx + (vy >>> it);
          vy <= vy - (vx >>> it);
          vz <= vz + $signed(atan_tab(int'(it)));
        end else begin
          vx <= vx - (vy >>> it);
          vy <= vy + (vx >>> it);
          vz <= vz - $signed(atan_tab(int'(it)));
        end
        if (it == 5'(NIT - 1)) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end else it <= it + 1'b1;
      end
      if (fin) begin
        fin       <= 1'b0;
        eps       <= vz;
        eps_valid <= 1'b1;
      end
    end
  end
endmodule
