// dvb_pkg: types, constants and GF(2^8) arithmetic shared by the DVB-T/H
// receiver back end. The transmission parameters follow the TPS encoding of
// the DVB-T standard (mode, constellation, code rate, guard interval). The
// Galois-field helpers implement GF(256) with field polynomial
// x^8+x^4+x^3+x^2+1 (0x11D), the field of the RS(204,188) code; they are
// pure combinational functions usable both in logic and at elaboration.
package dvb_pkg;

  // FFT mode, encoded as in the TPS transmission-mode field
  typedef enum logic [1:0] {MODE_2K = 2'b00, MODE_8K = 2'b01, MODE_4K = 2'b10} fft_mode_e;
  // Constellation, encoded as in the TPS constellation field
  typedef enum logic [1:0] {QPSK = 2'b00, QAM16 = 2'b01, QAM64 = 2'b10} qam_e;
  // Inner code rate, encoded as in the TPS code-rate field
  typedef enum logic [2:0] {R1_2 = 3'd0, R2_3 = 3'd1, R3_4 = 3'd2, R5_6 = 3'd3, R7_8 = 3'd4} code_rate_e;
  // Guard interval ratio, encoded as in the TPS guard-interval field
  typedef enum logic [1:0] {GI_1_32 = 2'b00, GI_1_16 = 2'b01, GI_1_8 = 2'b10, GI_1_4 = 2'b11} guard_e;

  // Decoded transmission parameters
  typedef struct packed {
    logic [1:0]  frame_num;
    qam_e        qam;
    logic [2:0]  hierarchy;
    code_rate_e  rate_hp;
    code_rate_e  rate_lp;
    guard_e      guard;
    fft_mode_e   mode;
  } tps_params_t;

  localparam int SOFT_W   = 6;   // 64-level soft decision
  localparam int IQ_W     = 12;  // 24-bit equalized cell = 12-bit I + 12-bit Q
  localparam int SECTION  = 126; // bit-interleaver block length in cells
  localparam int RS_N     = 204;
  localparam int RS_K     = 188;
  localparam int RS_2T    = 16;

  // number of data cells per OFDM symbol
  function automatic int unsigned data_cells(fft_mode_e m);
    case (m)
      MODE_2K: return 1512;
      MODE_4K: return 3024;
      default: return 6048;
    endcase
  endfunction

  // bits per cell
  function automatic int unsigned bits_per_cell(qam_e q);
    case (q)
      QPSK:    return 2;
      QAM16:   return 4;
      default: return 6;
    endcase
  endfunction

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1D : 8'h00);
    end
    return p;
  endfunction

  // alpha^e, alpha = 0x02
  function automatic logic [7:0] gf_alpha_pow(int unsigned e);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 0; i < e % 255; i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // multiplicative inverse as a^254 by square-and-multiply
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r, s;
    r = 8'h01;
    s = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, s);   // 254 = 0b11111110
      s = gf_mul(s, s);
    end
    return r;
  endfunction

endpackage
