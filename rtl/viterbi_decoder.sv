// viterbi_decoder: soft-decision Viterbi decoder for the DVB-T inner code,
// constraint length 7, generators G1 = 171 (X) and G2 = 133 (Y) octal.
// Per (X, Y) pair, one trellis step per clock:
//  - branch metric unit: correlation of the 6-bit soft inputs with the four
//    possible code pairs (soft > 0 means "1"; an erased bit is 0);
//  - 64 add-compare-select units update the 64 path metrics, kept in
//    modulo arithmetic (PM_W bits) so no normalisation is needed;
//  - the survivor memory keeps, per state, the last DEPTH decided bits
//    (register exchange).
// The decoded bit is read from the survivor of the state with the best path
// metric at a traceback length chosen from the code rate delivered by the
// TPS decoder (36, 48, 60, 72, 96 for rates 1/2 .. 7/8), so weaker codes use
// a longer survivor. Output bit n appears (length + 1) steps after its pair;
// the first (length) steps produce no output.
// The branch metric, 64 ACS, 64 path metrics, survivor memory and a survivor
// length adjusted by inner-receiver results follow the document; the path
// merging and path prediction access reductions of the document are not
// built (register exchange is used instead of a traced-back memory).
module viterbi_decoder
  import dvb_pkg::*;
#(
  parameter int unsigned DEPTH = 96,
  parameter int unsigned PM_W  = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  code_rate_e               rate,
  input  logic                     in_valid,
  input  logic signed [SOFT_W-1:0] in_x,
  input  logic signed [SOFT_W-1:0] in_y,
  output logic                     out_valid,
  output logic                     out_bit
);
  localparam logic [6:0] G1 = 7'o171;
  localparam logic [6:0] G2 = 7'o133;

  logic [PM_W-1:0]  pm   [64];
  logic [DEPTH-1:0] surv [64];
  logic [PM_W-1:0]  pm_n   [64];
  logic [DEPTH-1:0] surv_n [64];

  // branch metrics for code pair {x,y}, index {x,y}
  logic [PM_W-1:0] bm [4];
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      int vx, vy;
      vx = c[1] ? int'(in_x) : -int'(in_x);
      vy = c[0] ? int'(in_y) : -int'(in_y);
      bm[c] = PM_W'(vx + vy + 64);
    end
  end

  function automatic logic [1:0] code_of(logic [6:0] w);
    return {^(w & G1), ^(w & G2)};
  endfunction

  // add-compare-select; state = {u(t-1) .. u(t-6)}, next = {u, state[5:1]}
  always_comb begin
    for (int ns = 0; ns < 64; ns++) begin
      logic [5:0] n6, p0, p1;
      logic [PM_W-1:0] m0, m1, diff;
      n6 = 6'(ns);
      p0 = {n6[4:0], 1'b0};
      p1 = {n6[4:0], 1'b1};
      m0 = pm[p0] + bm[code_of({n6[5], p0})];
      m1 = pm[p1] + bm[code_of({n6[5], p1})];
      diff = m1 - m0;
      if (diff[PM_W-1] == 1'b0 && diff != 0) begin
        pm_n[ns]   = m1;
        surv_n[ns] = {surv[p1][DEPTH-2:0], n6[5]};
      end else begin
        pm_n[ns]   = m0;
        surv_n[ns] = {surv[p0][DEPTH-2:0], n6[5]};
      end
    end
  end

  // best state (modulo compare)
  logic [5:0] best;
  always_comb begin
    logic [PM_W-1:0] bv, d;
    best = '0;
    bv   = pm[0];
    for (int s = 1; s < 64; s++) begin
      d = pm[s] - bv;
      if (d[PM_W-1] == 1'b0 && d != 0) begin
        best = 6'(s);
        bv   = pm[s];
      end
    end
  end

  logic [6:0] tb_len;
  always_comb begin
    case (rate)
      R1_2:    tb_len = 7'd36;
      R2_3:    tb_len = 7'd48;
      R3_4:    tb_len = 7'd60;
      R5_6:    tb_len = 7'd72;
      default: tb_len = 7'(DEPTH);
    endcase
    if (tb_len > 7'(DEPTH)) tb_len = 7'(DEPTH);
  end

  logic [7:0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 64; s++) begin
        pm[s]   <= (s == 0) ? PM_W'(1 << (PM_W - 3)) : '0;
        surv[s] <= '0;
      end
      fill      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pm   <= pm_n;
        surv <= surv_n;
        if (fill < 8'(tb_len)) fill <= fill + 8'd1;
        else begin
          out_valid <= 1'b1;
          out_bit   <= surv[best][tb_len - 7'd1];
        end
      end
    end
  end
endmodule
