// qam_demapper: 64-level (6-bit) soft-decision demapper for QPSK, 16-QAM and
// 64-QAM cells. The equalized cell arrives as 12-bit I and Q on the
// unnormalized square lattice, odd multiples of UNIT (1, 3, 5, 7 * UNIT).
// Gray labels y0..y5: y0/y1 are the signs of I/Q (0 = positive); for 16-QAM
// y2/y3 are 1 on the inner amplitude; for 64-QAM (y2,y4) over |I| = 7,5,3,1
// are 00,01,11,10 (likewise y3,y5 for Q). The soft value of each bit is the
// piecewise-linear distance measure (-I, 4U-|I|, 2U-||I|-4U| and so on),
// scaled so that one UNIT is 16 soft steps and clipped to -32..31; a positive
// value means "bit is 1". Output sv[k] is y_k, bits beyond the constellation
// are zero. One register stage, or none with OUT_REG = 0 (used when the
// demapper sits between two blocks joined by valid/ready).
// The soft-decision demapper with 64 levels and its place after the symbol
// de-interleaver follow the document; the metric and scaling are this
// design's own choice.
module qam_demapper
  import dvb_pkg::*;
#(
  parameter int unsigned UNIT_SHIFT = 7,  // lattice point 1 at 2^7
  parameter bit          OUT_REG    = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  qam_e                    qam,
  input  logic                    in_valid,
  input  logic signed [IQ_W-1:0]  in_i,
  input  logic signed [IQ_W-1:0]  in_q,
  output logic                    out_valid,
  output logic signed [SOFT_W-1:0] out_soft [6]
);
  localparam int SH = UNIT_SHIFT - 4;
  localparam int U  = 1 << UNIT_SHIFT;

  function automatic logic signed [SOFT_W-1:0] clip(int v);
    int s;
    s = v >>> SH;
    if (s > 31) s = 31;
    if (s < -32) s = -32;
    return SOFT_W'(s);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  logic signed [SOFT_W-1:0] sv [6];
  always_comb begin
    int ii, qq;
    ii = int'(in_i);
    qq = int'(in_q);
    sv[0] = clip(-ii);
    sv[1] = clip(-qq);
    sv[2] = '0; sv[3] = '0; sv[4] = '0; sv[5] = '0;
    case (qam)
      QAM16: begin
        sv[2] = clip(2 * U - iabs(ii));
        sv[3] = clip(2 * U - iabs(qq));
      end
      QAM64: begin
        sv[2] = clip(4 * U - iabs(ii));
        sv[3] = clip(4 * U - iabs(qq));
        sv[4] = clip(2 * U - iabs(iabs(ii) - 4 * U));
        sv[5] = clip(2 * U - iabs(iabs(qq) - 4 * U));
      end
      default: ;
    endcase
  end

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        for (int k = 0; k < 6; k++) out_soft[k] <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) out_soft <= sv;
      end
    end
  end else begin : g_comb
    assign out_valid = in_valid;
    assign out_soft  = sv;
  end
endmodule
