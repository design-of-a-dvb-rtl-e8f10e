// power_manager: sequential (multi-stage) power management of the receiver.
// Phases: INIT (module 1 only: synchronizers, FFT, channel estimator),
// EQUALIZE (modules 1 and 2: adds channel equalizer and TPS decoder) once
// timing and CFO acquisition reports sync_done, and DECODE (modules 1, 2 and
// 3: adds QAM demapping and channel decoding) once the TPS decoding is
// correct. Losing sync returns to INIT. For DVB-H time slicing, suspend
// switches every module off (SLEEP) until it is released, then acquisition
// starts again in INIT. en_mod1..3 are the clock-enable / hold controls of
// the three modules; they change one clock after the phase decision.
// The three phases, their order and the module grouping follow the document;
// the suspend phase and the exact trigger signals are this design's reading
// of the time-slicing requirement.
module power_manager (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       suspend,
  input  logic       sync_done,
  input  logic       tps_ok,
  output logic [1:0] phase,     // 0 INIT, 1 EQUALIZE, 2 DECODE, 3 SLEEP
  output logic       en_mod1,
  output logic       en_mod2,
  output logic       en_mod3
);
  typedef enum logic [1:0] {PH_INIT = 2'd0, PH_EQ = 2'd1, PH_DEC = 2'd2, PH_SLEEP = 2'd3} phase_e;
  phase_e st, nx;

  always_comb begin
    nx = st;
    unique case (st)
      PH_INIT:  if (sync_done) nx = PH_EQ;
      PH_EQ:    if (!sync_done) nx = PH_INIT; else if (tps_ok) nx = PH_DEC;
      PH_DEC:   if (!sync_done) nx = PH_INIT;
      PH_SLEEP: nx = PH_INIT;
    endcase
    if (suspend) nx = PH_SLEEP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= PH_INIT;
      en_mod1 <= 1'b1;
      en_mod2 <= 1'b0;
      en_mod3 <= 1'b0;
    end else begin
      st      <= nx;
      en_mod1 <= (nx != PH_SLEEP);
      en_mod2 <= (nx == PH_EQ) || (nx == PH_DEC);
      en_mod3 <= (nx == PH_DEC);
    end
  end
  assign phase = st;
endmodule
