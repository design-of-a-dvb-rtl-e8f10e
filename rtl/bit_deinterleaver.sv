// bit_deinterleaver: bit-wise de-interleaver of the DVB-T inner interleaver
// (non-hierarchical), working on sections of 126 cells. Demapped cells (up
// to six 6-bit soft values, a 36-bit word) are written into the bit-wise
// memory; when 126 cells are in, in_ready drops (holding the symbol
// de-interleaver and demapper) and the section is read out as a stream of
// 126*v soft bits, one per clock, in the transmitter's original bit order:
// bit k of output group w' comes from bit e of cell (w' - s_e) mod 126, where
// e is the demultiplexer's sub-stream for k and s_e = 0, 63, 105, 42, 21, 84
// are the cyclic shifts of the six bit interleavers. The demultiplexer maps
// k -> e as 0,1 (QPSK), 0,2,1,3 (16-QAM), 0,2,4,1,3,5 (64-QAM).
// The 126-cell section, the 36-bit memory word, the 6-bit output and the hold
// of the upstream blocks follow the document; shifts and demultiplexer order
// are those of the DVB-T standard.
module bit_deinterleaver
  import dvb_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  qam_e                     qam,
  input  logic                     in_valid,
  input  logic signed [SOFT_W-1:0] in_soft [6],
  output logic                     in_ready,
  output logic                     out_valid,
  output logic signed [SOFT_W-1:0] out_soft
);
  logic [6*SOFT_W-1:0] mem [SECTION];
  logic [6:0] wcnt;       // cells written
  logic [6:0] grp;        // output group w'
  logic [2:0] kk;         // bit within group
  logic       reading;

  logic [2:0] nbits;
  assign nbits = 3'(bits_per_cell(qam));

  function automatic logic [2:0] demux(qam_e q, logic [2:0] k);
    case (q)
      QPSK:  return k;
      QAM16: case (k) 3'd1: return 3'd2; 3'd2: return 3'd1; default: return k; endcase
      default: case (k)
        3'd1: return 3'd2; 3'd2: return 3'd4; 3'd3: return 3'd1; 3'd4: return 3'd3;
        default: return k;
      endcase
    endcase
  endfunction

  function automatic logic [6:0] shift(logic [2:0] e);
    case (e)
      3'd0: return 7'd0;   3'd1: return 7'd63;  3'd2: return 7'd105;
      3'd3: return 7'd42;  3'd4: return 7'd21;  default: return 7'd84;
    endcase
  endfunction

  logic [2:0] e_now;
  logic [7:0] raddr_t;
  logic [6:0] raddr;
  assign e_now   = demux(qam, kk);
  assign raddr_t = {1'b0, grp} + 8'(SECTION) - {1'b0, shift(e_now)};
  assign raddr   = (raddr_t >= 8'(SECTION)) ? 7'(raddr_t - 8'(SECTION)) : raddr_t[6:0];

  assign in_ready = !reading;

  logic [6*SOFT_W-1:0] wword;
  always_comb for (int k = 0; k < 6; k++) wword[k*SOFT_W +: SOFT_W] = in_soft[k];

  always_ff @(posedge clk) if (in_valid && !reading) mem[wcnt] <= wword;

  logic [6*SOFT_W-1:0] rword;
  assign rword = mem[raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt      <= '0;
      grp       <= '0;
      kk        <= '0;
      reading   <= 1'b0;
      out_valid <= 1'b0;
      out_soft  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!reading) begin
        if (in_valid) begin
          if (wcnt == 7'(SECTION - 1)) begin
            wcnt    <= '0;
            reading <= 1'b1;
          end else wcnt <= wcnt + 7'd1;
        end
      end else begin
        out_valid <= 1'b1;
        out_soft  <= rword[e_now*SOFT_W +: SOFT_W];
        if (kk == nbits - 3'd1) begin
          kk <= '0;
          if (grp == 7'(SECTION - 1)) begin
            grp     <= '0;
            reading <= 1'b0;
          end else grp <= grp + 7'd1;
        end else kk <= kk + 3'd1;
      end
    end
  end
endmodule
