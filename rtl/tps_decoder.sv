// tps_decoder: recovers the transmission parameters from the TPS carriers.
// Each equalized TPS cell is DBPSK: its bit is 1 when the sign of the real
// part differs from that of the same TPS carrier in the previous symbol. The
// signs of up to MAX_TPS carriers are kept in a small memory; within one
// symbol every TPS carrier casts a vote and the majority decides the symbol's
// TPS bit (voting scheme). At sym_end the bit enters a 67-bit history. A
// frame is recognised when the oldest 16 bits are one of the two
// synchronisation words, the length indicator is 23 or 31, and the
// shortened BCH(67,53) code word s1..s67 has a zero remainder with
// g(x) = x^14+x^9+x^8+x^6+x^5+x^4+x^2+x+1. The fields are then latched and
// tps_ok is set; sym_idx counts the symbol within the 68-symbol frame
// (0 = first symbol after a recognised frame end).
// Interface: one cell per clock with flags; sym_end follows the last cell of
// a symbol. Outputs update one clock after sym_end.
// The document gives the voting scheme and the need for one whole frame; the
// bit positions, sync words and BCH code are those of the DVB-T standard.
module tps_decoder
  import dvb_pkg::*;
#(
  parameter int unsigned MAX_TPS = 68    // TPS carriers in 8K mode
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_tps,
  input  logic signed [IQ_W-1:0] in_re,
  input  logic                   sym_end,
  output tps_params_t            params,
  output logic                   tps_ok,
  output logic                   frame_end,   // pulse: the symbol just ended was s67
  output logic [6:0]             sym_idx
);
  localparam logic [15:0] SYNC_A = 16'b0011010111101110;
  localparam logic [14:0] BCH_G  = 15'b100001101110111;
  localparam int KW = $clog2(MAX_TPS + 1);

  logic          sign_mem [MAX_TPS];
  logic [KW-1:0] kidx;
  logic [KW-1:0] votes_flip, votes_keep;
  logic [66:0]   hist;     // hist[66] = oldest = s1 of a candidate frame

  logic cur_sign, flip;
  assign cur_sign = in_re[IQ_W-1];
  assign flip     = cur_sign ^ sign_mem[kidx];

  always_ff @(posedge clk) begin
    if (in_valid && in_tps && kidx < KW'(MAX_TPS)) sign_mem[kidx] <= cur_sign;
  end

  logic new_bit;
  assign new_bit = (votes_flip > votes_keep);

  logic [66:0] hist_n;
  assign hist_n = {hist[65:0], new_bit};

  // remainder of s1..s67 (s1 highest degree) modulo g(x)
  function automatic logic [13:0] bch_rem(logic [66:0] w);
    logic [13:0] r;
    logic        fb;
    r = '0;
    for (int i = 66; i >= 0; i--) begin
      fb = r[13] ^ w[i];
      r  = {r[12:0], 1'b0};
      if (fb) r ^= BCH_G[13:0];
    end
    return r;
  endfunction

  // s_n sits at hist_n[67 - n]
  logic [15:0] sync_f;
  logic [5:0]  len_f;
  logic        frame_hit;
  assign sync_f = hist_n[66:51];
  assign len_f  = hist_n[50:45];
  assign frame_hit = ((sync_f == SYNC_A) || (sync_f == ~SYNC_A)) &&
                     ((len_f == 6'b010111) || (len_f == 6'b011111)) &&
                     (bch_rem(hist_n) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kidx       <= '0;
      votes_flip <= '0;
      votes_keep <= '0;
      hist       <= '0;
      params     <= '0;
      tps_ok     <= 1'b0;
      frame_end  <= 1'b0;
      sym_idx    <= '0;
    end else begin
      frame_end <= 1'b0;
      if (in_valid && in_tps && kidx < KW'(MAX_TPS)) begin
        kidx <= kidx + 1'b1;
        if (flip) votes_flip <= votes_flip + 1'b1;
        else      votes_keep <= votes_keep + 1'b1;
      end
      if (sym_end) begin
        kidx       <= '0;
        votes_flip <= '0;
        votes_keep <= '0;
        hist       <= hist_n;
        sym_idx    <= (sym_idx == 7'd67) ? 7'd0 : sym_idx + 7'd1;
        if (frame_hit) begin
          tps_ok    <= 1'b1;
          frame_end <= 1'b1;
          sym_idx   <= 7'd0;
          // s23..s39 at hist_n[44..28]
          params.frame_num <= hist_n[44:43];
          params.qam       <= qam_e'(hist_n[42:41]);
          params.hierarchy <= hist_n[40:38];
          params.rate_hp   <= code_rate_e'(hist_n[37:35]);
          params.rate_lp   <= code_rate_e'(hist_n[34:32]);
          params.guard     <= guard_e'(hist_n[31:30]);
          params.mode      <= fft_mode_e'(hist_n[29:28]);
        end
      end
    end
  end
endmodule
