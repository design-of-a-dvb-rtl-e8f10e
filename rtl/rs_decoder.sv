// rs_decoder: RS(204,188) decoder, t = 8, over GF(256) (see dvb_pkg).
// Five steps as in the receiver: syndrome calculator, key equation solver,
// Chien search, error value evaluator and error corrector.
//  - Syndromes S_k = r(alpha^k), k = 0..15, are accumulated by Horner's rule
//    while the 204 bytes of a codeword are written into one of two codeword
//    buffers (ping-pong), so a new codeword can be received while the previous
//    one is being corrected.
//  - Key equation: Berlekamp-Massey, one iteration per clock (16 clocks),
//    followed by the error evaluator Omega(x) = S(x)Lambda(x) mod x^16,
//    one coefficient per clock (16 clocks).
//  - Chien search with Forney's formula, one byte position per clock (204
//    clocks): for the byte at power p, X^-1 = alpha^-p is a root when
//    Lambda_even + Lambda_odd = 0 and the error value is
//    Omega(X^-1) / Lambda_odd(X^-1) (first root alpha^0 of the generator).
//    Corrections are written back into the buffer.
//  - The 188 information bytes are then read out, one per clock.
// out_err is set on every byte of a packet whose errors could not be
// corrected (more than 8 errors detected by degree or by root count).
// Interface: byte stream with valid/ready; in_sop marks the first byte of a
// codeword. Latency from the last input byte to the first output byte is
// about 240 clocks; a codeword occupies the engine for about 430 clocks.
// The document names the five steps and a decomposed key equation solver for
// area; the serial Berlekamp-Massey used here is this design's own choice.
module rs_decoder
  import dvb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sop,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic       out_sop,
  output logic [7:0] out_data,
  output logic       out_err,
  output logic [3:0] out_nerr     // number of corrected bytes (valid if !out_err)
);
  typedef enum logic [2:0] {E_IDLE, E_BM, E_OMEGA, E_CHIEN, E_OUT} eng_e;

  logic [7:0] buf_q [2][RS_N];
  logic [7:0] synd_acc [RS_2T];
  logic [7:0] synd_q   [RS_2T];
  logic [7:0] wcnt;          // bytes written in current fill
  logic       wsel;          // buffer being filled
  logic       full_pend;     // a filled buffer waits for the engine
  eng_e       st;
  logic       esel;          // buffer owned by the engine
  logic [7:0] ecnt;
  logic [7:0] lam [RS_2T+1];
  logic [7:0] bb  [RS_2T+1];
  logic [7:0] omg [RS_2T];
  logic [7:0] dlast;
  logic [4:0] L;
  logic [4:0] mm;
  logic [4:0] nroots;
  logic [7:0] lam_t [RS_2T+1];
  logic [7:0] om_t  [RS_2T];

  // ---------------- fill side ----------------
  assign in_ready = !full_pend;
  logic accept;
  assign accept = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt      <= '0;
      wsel      <= 1'b0;
      full_pend <= 1'b0;
      for (int k = 0; k < RS_2T; k++) synd_acc[k] <= '0;
    end else begin
      if (accept) begin
        for (int k = 0; k < RS_2T; k++)
          synd_acc[k] <= gf_mul(in_sop ? 8'h00 : synd_acc[k], gf_alpha_pow(k)) ^ in_data;
        if (in_sop ? (RS_N == 1) : (wcnt == RS_N - 1)) begin
          wcnt      <= '0;
          full_pend <= 1'b1;
        end else begin
          wcnt <= in_sop ? 8'd1 : wcnt + 8'd1;
        end
      end
      if (full_pend && st == E_IDLE) begin
        full_pend <= 1'b0;
        wsel      <= !wsel;
      end
    end
  end

  // ---------------- engine ----------------
  // Berlekamp-Massey discrepancy
  logic [7:0] disc;
  always_comb begin
    disc = synd_q[ecnt[3:0]];
    for (int i = 1; i <= RS_2T; i++)
      if (i <= int'(ecnt) && i <= int'(L)) disc ^= gf_mul(lam[i], synd_q[int'(ecnt) - i]);
  end
  logic [7:0] dratio;
  assign dratio = gf_mul(disc, gf_inv(dlast));

  // omega coefficient ecnt
  logic [7:0] om_k;
  always_comb begin
    om_k = '0;
    for (int j = 0; j <= RS_2T; j++)
      if (j <= int'(ecnt[3:0])) om_k ^= gf_mul(lam[j], synd_q[int'(ecnt[3:0]) - j]);
  end

  // Chien / Forney evaluation at the current position
  logic [7:0] l_even, l_odd, om_v, err_val;
  always_comb begin
    l_even = '0;
    l_odd  = '0;
    om_v   = '0;
    for (int k = 0; k <= RS_2T; k++)
      if (k % 2 == 0) l_even ^= lam_t[k]; else l_odd ^= lam_t[k];
    for (int k = 0; k < RS_2T; k++) om_v ^= om_t[k];
    err_val = gf_mul(om_v, gf_inv(l_odd));
  end
  logic is_root;
  assign is_root = ((l_even ^ l_odd) == 8'h00);

  // codeword buffers: fill port and correction port work on different banks
  logic chien_wr;
  assign chien_wr = (st == E_CHIEN) && is_root && (L != 0);
  always_ff @(posedge clk) begin
    if (accept) buf_q[wsel][(in_sop ? 8'd0 : wcnt)] <= in_data;
    if (chien_wr) buf_q[esel][ecnt] <= buf_q[esel][ecnt] ^ err_val;
  end

  logic fail_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= E_IDLE;
      esel      <= 1'b0;
      ecnt      <= '0;
      L         <= '0;
      mm        <= '0;
      dlast     <= 8'h01;
      nroots    <= '0;
      fail_q    <= 1'b0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '0;
      out_err   <= 1'b0;
      out_nerr  <= '0;
      for (int k = 0; k <= RS_2T; k++) begin
        lam[k] <= '0; bb[k] <= '0; lam_t[k] <= '0;
      end
      for (int k = 0; k < RS_2T; k++) begin
        omg[k] <= '0; om_t[k] <= '0; synd_q[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      case (st)
        E_IDLE: if (full_pend) begin
          esel <= wsel;
          for (int k = 0; k < RS_2T; k++) synd_q[k] <= synd_acc[k];
          for (int k = 0; k <= RS_2T; k++) begin
            lam[k] <= (k == 0) ? 8'h01 : 8'h00;
            bb[k]  <= (k == 0) ? 8'h01 : 8'h00;
          end
          L     <= '0;
          mm    <= 5'd1;
          dlast <= 8'h01;
          ecnt  <= '0;
          st    <= E_BM;
        end
        E_BM: begin
          if (disc == 8'h00) begin
            mm <= mm + 5'd1;
          end else begin
            for (int k = 0; k <= RS_2T; k++)
              if (k >= int'(mm)) lam[k] <= lam[k] ^ gf_mul(dratio, bb[k - int'(mm)]);
            if (2 * int'(L) <= int'(ecnt)) begin
              for (int k = 0; k <= RS_2T; k++) bb[k] <= lam[k];
              L     <= 5'(int'(ecnt) + 1 - int'(L));
              dlast <= disc;
              mm    <= 5'd1;
            end else begin
              mm <= mm + 5'd1;
            end
          end
          if (ecnt == RS_2T - 1) begin
            ecnt <= '0;
            st   <= E_OMEGA;
          end else ecnt <= ecnt + 8'd1;
        end
        E_OMEGA: begin
          omg[ecnt[3:0]] <= om_k;
          if (ecnt == RS_2T - 1) begin
            ecnt <= '0;
            st   <= E_CHIEN;
            // start values for position power 203: coef * alpha^(-203k)
            for (int k = 0; k <= RS_2T; k++)
              lam_t[k] <= gf_mul(lam[k], gf_alpha_pow((255 - (RS_N - 1)) * k));
            for (int k = 0; k < RS_2T; k++)
              om_t[k] <= gf_mul((k == RS_2T - 1) ? om_k : omg[k], gf_alpha_pow((255 - (RS_N - 1)) * k));
            nroots <= '0;
          end else ecnt <= ecnt + 8'd1;
        end
        E_CHIEN: begin
          for (int k = 0; k <= RS_2T; k++) lam_t[k] <= gf_mul(lam_t[k], gf_alpha_pow(k));
          for (int k = 0; k < RS_2T; k++)  om_t[k]  <= gf_mul(om_t[k], gf_alpha_pow(k));
          if (is_root && L != 0) begin
            nroots <= nroots + 5'd1;
          end
          if (ecnt == RS_N - 1) begin
            ecnt   <= '0;
            st     <= E_OUT;
            fail_q <= (L > 5'd8) || (5'(nroots + ((is_root && L != 0) ? 5'd1 : 5'd0)) != L);
          end else ecnt <= ecnt + 8'd1;
        end
        E_OUT: begin
          out_valid <= 1'b1;
          out_sop   <= (ecnt == 0);
          out_data  <= buf_q[esel][ecnt];
          out_err   <= fail_q;
          out_nerr  <= fail_q ? 4'd0 : L[3:0];
          if (ecnt == RS_K - 1) begin
            ecnt <= '0;
            st   <= E_IDLE;
          end else ecnt <= ecnt + 8'd1;
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
