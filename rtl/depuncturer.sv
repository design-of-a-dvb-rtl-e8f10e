// depuncturer: rebuilds the (X, Y) pairs of the rate-1/2 mother code from the
// punctured soft-bit stream. Transmitted order per puncturing period (DVB-T):
//   1/2: X1 Y1            2/3: X1 Y1 Y2         3/4: X1 Y1 Y2 X3
//   5/6: X1 Y1 Y2 X3 Y4 X5                      7/8: X1 Y1 Y2 Y3 Y4 X5 Y6 X7
// X1 is held until Y1 arrives; every later symbol of a period is emitted at
// once with its partner marked erased (soft value 0, which adds the same
// metric to both hypotheses in the Viterbi decoder). restart re-aligns the
// period with the current input. Output follows input by one clock.
// The punctured inner code follows the document; the erasure encoding is this
// design's own choice.
module depuncturer
  import dvb_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  code_rate_e               rate,
  input  logic                     restart,
  input  logic                     in_valid,
  input  logic signed [SOFT_W-1:0] in_soft,
  output logic                     out_valid,
  output logic signed [SOFT_W-1:0] out_x,
  output logic signed [SOFT_W-1:0] out_y
);
  logic [2:0] pos;
  logic signed [SOFT_W-1:0] x1;

  logic [2:0] plen;
  always_comb begin
    case (rate)
      R1_2:    plen = 3'd1;
      R2_3:    plen = 3'd2;
      R3_4:    plen = 3'd3;
      R5_6:    plen = 3'd5;
      default: plen = 3'd7;   // last position index of the period
    endcase
  end

  // kind of transmitted symbol at position p >= 2: 1 = X, 0 = Y
  function automatic logic is_x(code_rate_e r, logic [2:0] p);
    case (r)
      R3_4:    return (p == 3'd3);
      R5_6:    return (p == 3'd3) || (p == 3'd5);
      R7_8:    return (p == 3'd5) || (p == 3'd7);
      default: return 1'b0;
    endcase
  endfunction

  logic [2:0] p_now;
  assign p_now = restart ? 3'd0 : pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      x1        <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (restart && !in_valid) pos <= '0;
      if (in_valid) begin
        pos <= (p_now == plen) ? 3'd0 : p_now + 3'd1;
        if (p_now == 3'd0) begin
          x1 <= in_soft;
        end else if (p_now == 3'd1) begin
          out_valid <= 1'b1;
          out_x     <= x1;
          out_y     <= in_soft;
        end else begin
          out_valid <= 1'b1;
          out_x     <= is_x(rate, p_now) ? in_soft : '0;
          out_y     <= is_x(rate, p_now) ? '0 : in_soft;
        end
      end
    end
  end
endmodule
