// channel_estimator: channel frequency response H(k) for every used carrier
// of an OFDM symbol, by linear interpolation over the scattered pilots in the
// frequency direction.
//
// While a symbol's carriers arrive (k = 0 .. K-1, in order) they are written
// into the cell memory, and every scattered pilot (k mod 12 = 3*(l mod 4),
// l = symbol index from the pilot-order detector) is divided by its known
// value: the pilot is sent as +-4/3 with the sign given by the reference
// sequence w_k (PRBS x^11 + x^2 + 1, all ones at carrier 0; w_k = 1 means
// -4/3), so H = Y * (+-3/4). After the last carrier the block reads the
// symbol out in carrier order, with in_ready low, and gives each cell
// together with H(k) = P_m + (P_(m+1) - P_m) * d / 12, where P_m and P_(m+1)
// are the pilots left and right of k and d its distance from P_m. Carriers
// before the first pilot or after the last one take the nearest pilot's value.
//
// Interface: in_valid/in_ready carriers with in_sop (carrier 0) and in_last
// (carrier K-1) and the pattern index sp_l (sampled with in_sop). The output
// is one cell per clock (out_valid, no back-pressure) with y, h and out_sop /
// out_last, starting two clocks after in_last; the read-out takes K clocks.
//
// Follows the document: the channel estimate is a linear interpolation over
// the scattered pilots. This block does only the frequency-direction pass of
// the document's two one-dimensional interpolators: the time-direction pass
// over four symbols, with its three queuing memories, is not built. Own
// choices: one cell memory with a hold during read-out, and the 1/12 weights
// as a multiply by 683/8192.
module channel_estimator
  import dvb_pkg::*;
#(
  parameter int unsigned MAX_K = 6817
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [1:0]             sp_l,
  input  logic                   in_valid,
  input  logic                   in_sop,
  input  logic                   in_last,
  input  logic signed [IQ_W-1:0] in_i,
  input  logic signed [IQ_W-1:0] in_q,
  output logic                   in_ready,
  output logic                   out_valid,
  output logic                   out_sop,
  output logic                   out_last,
  output logic signed [IQ_W-1:0] out_y_i,
  output logic signed [IQ_W-1:0] out_y_q,
  output logic signed [IQ_W-1:0] out_h_i,
  output logic signed [IQ_W-1:0] out_h_q
);
  localparam int KW = $clog2(MAX_K + 1);
  localparam int NP = MAX_K / 12 + 1;
  localparam int PW = $clog2(NP + 1);

  logic [2*IQ_W-1:0] cells [MAX_K];
  logic [2*IQ_W-1:0] pil   [NP];

  // ---------------- write side ----------------
  logic [KW-1:0] wk;
  logic [3:0]    wm12;          // k mod 12
  logic [10:0]   prbs;
  logic [1:0]    l_q;
  logic [PW-1:0] np;            // pilots stored
  logic          reading;
  logic [KW-1:0] kcount;        // carriers in the symbol
  logic [3:0]    p0;            // first pilot position

  assign in_ready = !reading;

  logic [KW-1:0] k_now;
  logic [3:0]    m_now;
  logic [10:0]   prbs_now;
  logic [1:0]    l_now;
  assign k_now    = in_sop ? '0 : wk;
  assign m_now    = in_sop ? 4'd0 : wm12;
  assign prbs_now = in_sop ? 11'h7FF : prbs;
  assign l_now    = in_sop ? sp_l : l_q;

  logic is_pilot;
  assign is_pilot = (m_now == 4'(3 * l_now));

  // pilot value: H = Y * 3/4, negated when w_k = 1 (w_k = last LFSR stage)
  logic signed [IQ_W+1:0] hp_i, hp_q;
  always_comb begin
    hp_i = ((IQ_W+2)'(in_i) * 3) >>> 2;
    hp_q = ((IQ_W+2)'(in_q) * 3) >>> 2;
    if (prbs_now[10]) begin hp_i = -hp_i; hp_q = -hp_q; end
  end

  logic w_go;
  assign w_go = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (w_go) cells[k_now] <= {in_i, in_q};
    if (w_go && is_pilot) pil[in_sop ? '0 : np] <= {IQ_W'(hp_i), IQ_W'(hp_q)};
  end

  // ---------------- read side ----------------
  logic [KW-1:0] rk;
  logic [3:0]    rd;            // distance from the left pilot
  logic [PW-1:0] rm;            // index of the left pilot
  logic          r_pre;         // still before the first pilot

  logic signed [IQ_W-1:0] pl_i, pl_q, pr_i, pr_q;
  assign {pl_i, pl_q} = pil[rm];
  assign {pr_i, pr_q} = (32'(rm) + 1 < 32'(np)) ? pil[rm + 1'b1] : pil[rm];

  function automatic logic signed [IQ_W-1:0] interp(logic signed [IQ_W-1:0] a,
                                                    logic signed [IQ_W-1:0] b,
                                                    logic [3:0] d);
    logic signed [IQ_W+16:0] t;
    t = (IQ_W+17)'(b - a) * (IQ_W+17)'(d) * (IQ_W+17)'(683);
    t = (t + (IQ_W+17)'(4096)) >>> 13;
    return IQ_W'((IQ_W+17)'(a) + t);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wk <= '0; wm12 <= '0; prbs <= '1; l_q <= '0; np <= '0;
      reading <= 1'b0; kcount <= '0; p0 <= '0;
      rk <= '0; rd <= '0; rm <= '0; r_pre <= 1'b0;
      out_valid <= 1'b0; out_sop <= 1'b0; out_last <= 1'b0;
      out_y_i <= '0; out_y_q <= '0; out_h_i <= '0; out_h_q <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_last  <= 1'b0;
      if (w_go) begin
        wk   <= k_now + 1'b1;
        wm12 <= (m_now == 4'd11) ? 4'd0 : m_now + 4'd1;
        prbs <= {prbs_now[9:0], prbs_now[10] ^ prbs_now[8]};
        l_q  <= l_now;
        if (is_pilot) np <= (in_sop ? '0 : np) + 1'b1;
        else if (in_sop) np <= '0;
        if (in_last) begin
          reading <= 1'b1;
          kcount  <= k_now + 1'b1;
          p0      <= 4'(3 * l_now);
          rk      <= '0;
          rm      <= '0;
          rd      <= '0;
          r_pre   <= (l_now != 2'd0);
        end
      end
      if (reading) begin
        out_valid <= 1'b1;
        out_sop   <= (rk == 0);
        out_last  <= (rk == kcount - 1'b1);
        {out_y_i, out_y_q} <= cells[rk];
        if (r_pre || 32'(rm) + 1 >= 32'(np)) begin
          out_h_i <= pl_i;
          out_h_q <= pl_q;
        end else begin
          out_h_i <= interp(pl_i, pr_i, rd);
          out_h_q <= interp(pl_q, pr_q, rd);
        end
        // advance: before the first pilot stay on pilot 0 until k = p0
        if (r_pre) begin
          if (rk + 1'b1 == KW'(p0)) r_pre <= 1'b0;
        end else if (rd == 4'd11) begin
          rd <= '0;
          rm <= rm + 1'b1;
        end else rd <= rd + 1'b1;
        if (rk == kcount - 1'b1) reading <= 1'b0;
        rk <= rk + 1'b1;
      end
    end
  end
endmodule
