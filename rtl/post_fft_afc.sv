// post_fft_afc: estimates the integer part of the carrier frequency offset
// (a shift of the spectrum by whole sub-carrier spacings) from the FFT
// output, by locating the guard bands.
//
// Only K of the N FFT bins carry energy (K = 1705/3409/6817 for 2K/4K/8K);
// the empty bins at both ends are the guard bands. With no offset the used
// band starts at bin LO = (N - K) / 2. For every candidate shift s in
// -R..R the block adds the power |I|^2 + |Q|^2 of the bins LO+s .. LO+s+K-1
// into its own accumulator, while the bins stream past in natural order; at
// the last bin the shift with the largest in-band energy is the estimate.
// The estimate is reported after each symbol; `stable` is set when three
// consecutive symbols give the same shift, and cleared on any change.
//
// Interface: one bin per in_valid, bin 0 with in_sop, bins in natural
// (shifted, negative frequencies first) order, N bins per symbol. The
// estimate comes one clock after bin N-1 with est_valid. Idle clocks
// between bins are allowed. No memory is needed.
//
// Follows the document: the integer CFO is found after the FFT by guard-band
// detection and the result is confirmed over three OFDM symbols. Own choices:
// the parallel shifted-window energy search, its range R and the agreement
// rule.
module post_fft_afc
  import dvb_pkg::*;
#(
  parameter int unsigned R     = 16,
  parameter int unsigned ACC_W = 40
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  fft_mode_e              mode,
  input  logic                   in_valid,
  input  logic                   in_sop,
  input  logic signed [IQ_W-1:0] in_i,
  input  logic signed [IQ_W-1:0] in_q,
  output logic                   est_valid,
  output logic signed [7:0]      est,
  output logic                   stable
);
  localparam int NS = 2 * R + 1;

  logic [13:0] n_len, k_len, lo;
  always_comb begin
    unique case (mode)
      MODE_2K: begin n_len = 14'd2048; k_len = 14'd1705; end
      MODE_4K: begin n_len = 14'd4096; k_len = 14'd3409; end
      default: begin n_len = 14'd8192; k_len = 14'd6817; end
    endcase
    lo = (n_len - k_len) >> 1;
  end

  logic [13:0] bin;
  logic [13:0] b_now;
  assign b_now = in_sop ? '0 : bin;

  logic [2*IQ_W-1:0] pw;
  assign pw = (2 * IQ_W)'(in_i * in_i) + (2 * IQ_W)'(in_q * in_q);

  logic [ACC_W-1:0] acc   [NS];
  logic [ACC_W-1:0] acc_n [NS];
  always_comb begin
    for (int j = 0; j < NS; j++) begin
      int first;
      first = int'(lo) + j - int'(R);
      acc_n[j] = in_sop ? '0 : acc[j];
      if (int'(b_now) >= first && int'(b_now) < first + int'(k_len))
        acc_n[j] = acc_n[j] + ACC_W'(pw);
    end
  end

  logic [$clog2(NS)-1:0] best;
  always_comb begin
    best = '0;
    for (int j = 1; j < NS; j++) if (acc_n[j] > acc_n[best]) best = ($clog2(NS))'(j);
  end

  logic signed [7:0] best_s;
  assign best_s = 8'(int'(best) - int'(R));

  logic [1:0] agree;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin       <= '0;
      for (int j = 0; j < NS; j++) acc[j] <= '0;
      est_valid <= 1'b0;
      est       <= '0;
      stable    <= 1'b0;
      agree     <= '0;
    end else begin
      est_valid <= 1'b0;
      if (in_valid) begin
        bin <= b_now + 1'b1;
        for (int j = 0; j < NS; j++) acc[j] <= acc_n[j];
        if (b_now == n_len - 1) begin
          est_valid <= 1'b1;
          est       <= best_s;
          if (best_s == est && agree != 2'd0) begin
            if (agree == 2'd2) stable <= 1'b1;
            else agree <= agree + 1'b1;
          end else begin
            agree  <= 2'd1;
            stable <= 1'b0;
          end
        end
      end
    end
  end
endmodule
