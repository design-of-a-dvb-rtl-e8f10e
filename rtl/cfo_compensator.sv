// cfo_compensator: removes a carrier frequency offset from the complex
// baseband samples ahead of the FFT by rotating each sample by the negative
// of an accumulated phase, y[n] = x[n] * exp(-j*2*pi*phi[n]).
//
// A numerically controlled oscillator adds the signed frequency word `freq`
// (offset in cycles per sample, scaled by 2^PH_W) to a PH_W-bit phase for
// every accepted sample; the first sample after phase_clr is rotated by 0.
// The rotation is a pipelined CORDIC: the two top phase bits select a
// quarter-turn pre-rotation, then 13 shift-and-add micro-rotations remove the
// rest of the angle, and a constant multiply takes out the CORDIC gain
// (1.6468). Samples move one per clock; the result appears 16 clocks
// after its input, in order, with out_valid. There is no back-pressure.
//
// Follows the document: the compensator sits at the FFT input, takes 8-bit
// samples and gives 9-bit samples (the widths printed at the multiplier in
// the receiver block diagram), and its frequency word comes from the
// frequency synchronisers. Own choices: CORDIC rotation, PH_W = 16 and the
// pipeline depth.
module cfo_compensator #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 9,
  parameter int unsigned PH_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    phase_clr,
  input  logic signed [PH_W-1:0]  freq,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);
  localparam int NIT  = 13;            // micro-rotations
  localparam int FR   = 4;             // fraction bits inside the CORDIC
  localparam int DW   = IN_W + 2 + FR; // datapath width
  localparam int GAIN = 19898;         // 2^15 / 1.6468

  // atan(2^-i) in units of 2^-PH_W turns (for PH_W = 16)
  function automatic logic [PH_W-1:0] atan_tab(int i);
    int t [14] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1};
    return PH_W'(t[i] >>> (16 - PH_W));
  endfunction

  // ---- NCO ----
  logic [PH_W-1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else if (phase_clr) phase <= in_valid ? PH_W'(freq) : '0;
    else if (in_valid) phase <= phase + PH_W'(freq);
  end

  logic [PH_W-1:0] ph_now;
  assign ph_now = phase_clr ? '0 : phase;

  // ---- stage 0: quarter-turn pre-rotation by -90 deg * ph_now[PH_W-1:PH_W-2] ----
  logic signed [DW-1:0]   xs [NIT+1];
  logic signed [DW-1:0]   ys [NIT+1];
  logic signed [PH_W-1:0] zs [NIT+1];   // angle still to rotate (turns, signed)
  logic [NIT:0]           vs;

  logic signed [DW-1:0] xi, yi;
  assign xi = DW'(in_i) <<< FR;
  assign yi = DW'(in_q) <<< FR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      // rotate by -q*90 deg so that the remaining angle is in [0, 90) deg
      case (ph_now[PH_W-1 -: 2])
        2'd0: begin xs[0] <= xi;  ys[0] <= yi;  end
        2'd1: begin xs[0] <= yi;  ys[0] <= -xi; end
        2'd2: begin xs[0] <= -xi; ys[0] <= -yi; end
        default: begin xs[0] <= -yi; ys[0] <= xi; end
      endcase
      zs[0] <= $signed({2'b00, ph_now[PH_W-3:0]});
    end
  end

  // ---- micro-rotations: drive z to 0, rotating by -z ----
  for (genvar i = 0; i < NIT; i++) begin : g_it
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (zs[i] >= 0) begin
          // rotate clockwise
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] - $signed(atan_tab(i));
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] + $signed(atan_tab(i));
        end
      end
    end
  end

  // ---- gain correction and rounding ----
  function automatic logic signed [OUT_W-1:0] scale(logic signed [DW-1:0] v);
    logic signed [DW+16:0] p;
    logic signed [DW+16:0] r;
    p = (DW+17)'(v) * (DW+17)'(GAIN);
    r = (p + (DW+17)'(1 <<< (15 + FR - 1))) >>> (15 + FR);
    if (r > (DW+17)'(2 ** (OUT_W - 1) - 1)) return OUT_W'(2 ** (OUT_W - 1) - 1);
    if (r < -(DW+17)'(2 ** (OUT_W - 1)))    return OUT_W'(-(2 ** (OUT_W - 1)));
    return OUT_W'(r);
  endfunction

  logic             v_g;
  logic signed [OUT_W-1:0] gi, gq;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_g <= 1'b0; gi <= '0; gq <= '0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      v_g       <= vs[NIT];
      gi        <= scale(xs[NIT]);
      gq        <= scale(ys[NIT]);
      out_valid <= v_g;
      out_i     <= gi;
      out_q     <= gq;
    end
  end
endmodule
