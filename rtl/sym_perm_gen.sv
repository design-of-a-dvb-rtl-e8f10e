// sym_perm_gen: address generator of the DVB-T symbol interleaver
// permutation H(q) for 2K, 4K and 8K modes. A (Nr-1)-bit LFSR R' (taps
// R'[9]=R'0^R'3 for 2K, R'[10]=R'0^R'2 for 4K, R'[11]=R'0^R'1^R'4^R'6 for
// 8K; R'_0 = R'_1 = 0, R'_2 = 1) is permuted bit-wise into R, and the toggle
// bit (i mod 2) is placed on top: H = (i mod 2)*2^(Nr-1) + R. Candidates with
// H >= Nmax are skipped internally, so h_valid is low for those clocks.
// restart loads i = 0; advance moves past the current valid H.
// Used twice by the symbol de-interleaver (write and read side).
module sym_perm_gen
  import dvb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  fft_mode_e mode,
  input  logic      restart,
  input  logic      advance,
  output logic [12:0] h,
  output logic      h_valid
);
  logic [11:0] rp;      // R'_i, Nr-1 bits used
  logic [1:0]  icnt;    // counts i up to 2 for the start values
  logic        tog;     // i mod 2

  logic [11:0] r;
  always_comb begin
    r = '0;
    case (mode)
      MODE_2K: begin
        r[0] = rp[9]; r[7] = rp[8]; r[5] = rp[7]; r[1] = rp[6]; r[8] = rp[5];
        r[2] = rp[4]; r[6] = rp[3]; r[9] = rp[2]; r[3] = rp[1]; r[4] = rp[0];
        h = {2'b00, tog, r[9:0]};
      end
      MODE_4K: begin
        r[7] = rp[10]; r[10] = rp[9]; r[5] = rp[8]; r[8] = rp[7]; r[1] = rp[6];
        r[2] = rp[5];  r[4] = rp[4];  r[9] = rp[3]; r[0] = rp[2]; r[3] = rp[1]; r[6] = rp[0];
        h = {1'b0, tog, r[10:0]};
      end
      default: begin
        r[5] = rp[11]; r[11] = rp[10]; r[3] = rp[9]; r[0] = rp[8]; r[10] = rp[7]; r[8] = rp[6];
        r[6] = rp[5];  r[9] = rp[4];   r[2] = rp[3]; r[4] = rp[2]; r[1] = rp[1];  r[7] = rp[0];
        h = {tog, r[11:0]};
      end
    endcase
  end
  assign h_valid = !restart && (int'(h) < int'(data_cells(mode)));

  logic [11:0] rp_next;
  always_comb begin
    rp_next = '0;
    if (icnt == 2'd1) rp_next = 12'd1;
    else if (icnt == 2'd2) begin
      case (mode)
        MODE_2K: rp_next = {2'b00, rp[0] ^ rp[3], rp[9:1]};
        MODE_4K: rp_next = {1'b0, rp[0] ^ rp[2], rp[10:1]};
        default: rp_next = {rp[0] ^ rp[1] ^ rp[4] ^ rp[6], rp[11:1]};
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp   <= '0;
      icnt <= '0;
      tog  <= 1'b0;
    end else if (restart) begin
      rp   <= '0;
      icnt <= '0;
      tog  <= 1'b0;
    end else if (advance || !h_valid) begin
      rp   <= rp_next;
      icnt <= (icnt == 2'd2) ? 2'd2 : icnt + 2'd1;
      tog  <= !tog;
    end
  end
endmodule
