// channel_equalizer: zero-forcing equalizer, X = Y / H = Y * conj(H) / |H|^2,
// for one cell per clock. H is the channel frequency response delivered by
// the channel estimator, in 12-bit I/Q with unity gain at 2^H_SHIFT; Y and X
// are 12-bit I/Q. Stage 1 forms the products and |H|^2, stage 2 divides and
// saturates to 12 bits (|H| = 0 gives X = 0). A tag travels with each cell.
// Both stages advance only when ce is high, so a downstream hold stalls the
// whole pipeline. Latency: two enabled clocks.
// Zero forcing is the document's method; the number formats and the direct
// divider are this design's own choice.
module channel_equalizer
  import dvb_pkg::*;
#(
  parameter int unsigned H_SHIFT = 9,
  parameter int unsigned TAG_W   = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic                   in_valid,
  input  logic signed [IQ_W-1:0] y_i, y_q, h_i, h_q,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic signed [IQ_W-1:0] x_i, x_q,
  output logic [TAG_W-1:0]       out_tag
);
  localparam int PW = 2 * IQ_W + 1;

  logic                 s1_valid;
  logic signed [PW-1:0] s1_ni, s1_nq;
  logic [PW-1:0]        s1_den;
  logic [TAG_W-1:0]     s1_tag;

  function automatic logic signed [IQ_W-1:0] sat(longint v);
    if (v > longint'(2 ** (IQ_W - 1) - 1)) return IQ_W'(2 ** (IQ_W - 1) - 1);
    if (v < -longint'(2 ** (IQ_W - 1)))    return IQ_W'(-(2 ** (IQ_W - 1)));
    return IQ_W'(v);
  endfunction

  logic signed [IQ_W-1:0] qi, qq;
  always_comb begin
    longint ni, nq, dn;
    ni = longint'(s1_ni) <<< H_SHIFT;
    nq = longint'(s1_nq) <<< H_SHIFT;
    dn = longint'(s1_den);
    if (dn == 0) begin
      qi = '0;
      qq = '0;
    end else begin
      qi = sat(ni / dn);
      qq = sat(nq / dn);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_ni     <= '0;
      s1_nq     <= '0;
      s1_den    <= '0;
      s1_tag    <= '0;
      out_valid <= 1'b0;
      x_i       <= '0;
      x_q       <= '0;
      out_tag   <= '0;
    end else if (ce) begin
      s1_valid  <= in_valid;
      s1_ni     <= PW'(y_i * h_i + y_q * h_q);
      s1_nq     <= PW'(y_q * h_i - y_i * h_q);
      s1_den    <= PW'(h_i * h_i + h_q * h_q);
      s1_tag    <= in_tag;
      out_valid <= s1_valid;
      x_i       <= qi;
      x_q       <= qq;
      out_tag   <= s1_tag;
    end
  end
endmodule
