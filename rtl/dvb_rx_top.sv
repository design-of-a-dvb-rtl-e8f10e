// dvb_rx_top: back end of the DVB-T/H COFDM baseband receiver, from the
// equalizer input to the MPEG-2 transport stream, with the TPS decoder and the
// sequential power manager.
//   cells (Y, H, flags) -> channel_equalizer -> tps_decoder (TPS cells)
//                                            -> symbol_deinterleaver (data cells)
//   -> qam_demapper -> bit_deinterleaver -> depuncturer -> viterbi_decoder
//   -> ts_sync -> outer_deinterleaver -> rs_decoder -> descrambler -> TS
// The cells come from the inner receiver's front half (synchronizers, FFT,
// channel estimator), which is not part of this RTL: each cell carries the FFT
// output Y, the channel estimate H and flags saying whether it is a data
// cell, a TPS cell and the last cell of its OFDM symbol (the last cell must
// not be a TPS cell; in DVB-T the band-edge carriers are continual pilots).
// cell_ready drops when the symbol de-interleaver cannot take more cells (its
// two symbol memories are full, or the bit-wise de-interleaver holds it).
// Power management: module 1 (front half, outside) runs from reset; the
// equalizer and TPS decoder (module 2) take cells once sync_done is reported;
// the demapping and channel decoding chain (module 3) starts once the TPS is
// decoded, with the first data cell of the next OFDM frame, so that the symbol parity used by
// the symbol de-interleaver is known. Mode, constellation and code rate come
// from the decoded TPS. Only non-hierarchical transmission (HP stream) is
// decoded. ts_err marks packets the RS decoder could not correct.
// Five pieces of the front half are included and run in module 1: the
// fractional CFO estimator on the guard interval, the integer CFO estimator
// on the guard bands of the FFT output, the carrier frequency
// compensator (8-bit time-domain samples in, 9-bit samples out to the FFT,
// frequency word from outside, where the integer part and the tracking
// loops would be added) and the scattered-pilot order detector on the FFT
// output, and the channel estimator (frequency-direction interpolation
// over the scattered pilots; it holds its input with ce_ready while it reads
// a symbol out). Because the FFT and the
// synchronisers are outside, their inputs and outputs are ports of the top.
module dvb_rx_top
  import dvb_pkg::*;
#(
  parameter int unsigned MAX_CELLS = 6048,   // 8K mode data cells
  parameter int unsigned VIT_DEPTH = 96
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   suspend,
  input  logic                   sync_done,
  input  logic                   cell_valid,
  output logic                   cell_ready,
  input  logic signed [IQ_W-1:0] cell_y_i,
  input  logic signed [IQ_W-1:0] cell_y_q,
  input  logic signed [IQ_W-1:0] cell_h_i,
  input  logic signed [IQ_W-1:0] cell_h_q,
  input  logic                   cell_is_data,
  input  logic                   cell_is_tps,
  input  logic                   cell_sym_end,
  output logic                   ts_valid,
  output logic                   ts_sop,
  output logic [7:0]             ts_data,
  output logic                   ts_err,
  output tps_params_t            tps_params,
  output logic                   tps_ok,
  output logic [6:0]             tps_sym_idx,
  output logic                   ts_locked,
  output logic [1:0]             pm_phase,
  output logic                   en_mod1,
  output logic                   en_mod2,
  output logic                   en_mod3,
  // front half: frequency compensation ahead of the FFT
  input  logic                   fe_phase_clr,
  input  logic signed [15:0]     fe_freq,
  input  logic                   fe_valid,
  input  logic signed [7:0]      fe_i,
  input  logic signed [7:0]      fe_q,
  output logic                   fft_in_valid,
  output logic signed [8:0]      fft_in_i,
  output logic signed [8:0]      fft_in_q,
  // front half: fractional CFO estimate from the guard interval
  input  fft_mode_e              fe_mode,
  input  guard_e                 fe_gi,
  input  logic                   fe_sym_start,
  output logic                   afc_valid,
  output logic signed [15:0]     afc_eps,
  // front half: scattered-pilot order from the FFT output
  input  logic                   fft_valid,
  input  logic                   fft_sop,
  input  logic                   fft_last,
  input  logic signed [IQ_W-1:0] fft_i,
  input  logic signed [IQ_W-1:0] fft_q,
  output logic                   sp_valid,
  output logic [1:0]             sp_order,
  output logic                   sp_locked,
  // front half: integer CFO from the guard bands of the FFT output (all bins)
  input  logic                   fbin_valid,
  input  logic                   fbin_sop,
  input  logic signed [IQ_W-1:0] fbin_i,
  input  logic signed [IQ_W-1:0] fbin_q,
  output logic                   icfo_valid,
  output logic signed [7:0]      icfo_est,
  output logic                   icfo_stable,
  // front half: channel estimate over the scattered pilots of the used carriers
  input  logic [1:0]             ce_sp_l,
  input  logic                   ce_valid,
  input  logic                   ce_sop,
  input  logic                   ce_last,
  input  logic signed [IQ_W-1:0] ce_i,
  input  logic signed [IQ_W-1:0] ce_q,
  output logic                   ce_ready,
  output logic                   ce_out_valid,
  output logic                   ce_out_sop,
  output logic                   ce_out_last,
  output logic signed [IQ_W-1:0] ce_y_i,
  output logic signed [IQ_W-1:0] ce_y_q,
  output logic signed [IQ_W-1:0] ce_h_i,
  output logic signed [IQ_W-1:0] ce_h_q
);
  // ---------------- power management ----------------
  power_manager u_pm (
    .clk, .rst_n, .suspend, .sync_done, .tps_ok,
    .phase(pm_phase), .en_mod1, .en_mod2, .en_mod3
  );

  // ---------------- module 1: parts of the front half ----------------
  cfo_compensator u_cfo (
    .clk, .rst_n, .phase_clr(fe_phase_clr), .freq(fe_freq),
    .in_valid(fe_valid && en_mod1), .in_i(fe_i), .in_q(fe_q),
    .out_valid(fft_in_valid), .out_i(fft_in_i), .out_q(fft_in_q)
  );

  pre_fft_afc u_afc (
    .clk, .rst_n, .mode(fe_mode), .gi(fe_gi), .in_valid(fe_valid && en_mod1),
    .sym_start(fe_sym_start), .in_i(fe_i), .in_q(fe_q), .eps_valid(afc_valid), .eps(afc_eps)
  );

  post_fft_afc u_iafc (
    .clk, .rst_n, .mode(fe_mode), .in_valid(fbin_valid && en_mod1), .in_sop(fbin_sop),
    .in_i(fbin_i), .in_q(fbin_q), .est_valid(icfo_valid), .est(icfo_est), .stable(icfo_stable)
  );

  sp_order_detection u_spd (
    .clk, .rst_n, .in_valid(fft_valid && en_mod1), .in_sop(fft_sop), .in_last(fft_last),
    .in_i(fft_i), .in_q(fft_q), .order_valid(sp_valid), .order(sp_order), .locked(sp_locked)
  );

  channel_estimator u_ce (
    .clk, .rst_n, .sp_l(ce_sp_l), .in_valid(ce_valid && en_mod1), .in_sop(ce_sop),
    .in_last(ce_last), .in_i(ce_i), .in_q(ce_q), .in_ready(ce_ready),
    .out_valid(ce_out_valid), .out_sop(ce_out_sop), .out_last(ce_out_last),
    .out_y_i(ce_y_i), .out_y_q(ce_y_q), .out_h_i(ce_h_i), .out_h_q(ce_h_q)
  );

  // ---------------- module 2: equalizer and TPS ----------------
  logic sd_in_ready;
  logic eq_ce;
  assign eq_ce      = sd_in_ready;
  assign cell_ready = sd_in_ready;

  logic                   eq_valid;
  logic signed [IQ_W-1:0] eq_i, eq_q;
  logic [2:0]             eq_tag;   // {data, tps, last}

  channel_equalizer #(.TAG_W(3)) u_eq (
    .clk, .rst_n, .ce(eq_ce),
    .in_valid(cell_valid && en_mod2),
    .y_i(cell_y_i), .y_q(cell_y_q), .h_i(cell_h_i), .h_q(cell_h_q),
    .in_tag({cell_is_data, cell_is_tps, cell_sym_end}),
    .out_valid(eq_valid), .x_i(eq_i), .x_q(eq_q), .out_tag(eq_tag)
  );

  logic eq_fire;
  assign eq_fire = eq_valid && eq_ce;

  logic tps_frame_end;
  logic unused_frame_end;
  assign unused_frame_end = tps_frame_end;
  tps_decoder u_tps (
    .clk, .rst_n,
    .in_valid(eq_fire), .in_tps(eq_tag[1]), .in_re(eq_i),
    .sym_end(eq_fire && eq_tag[0]),
    .params(tps_params), .tps_ok, .frame_end(tps_frame_end), .sym_idx(tps_sym_idx)
  );

  // ---------------- module 3: demapping and channel decoding ----------------
  // Decoding starts with the first data cell of an OFDM frame (symbol 0):
  // sym_fresh is set at every symbol end and cleared by the first data cell.
  logic dec_run, dec_start, sym_fresh;
  assign dec_start = en_mod3 && !dec_run && sym_fresh && (tps_sym_idx == 7'd0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_run   <= 1'b0;
      sym_fresh <= 1'b0;
    end else begin
      if (!en_mod3) dec_run <= 1'b0;
      else if (dec_start) dec_run <= 1'b1;
      if (eq_fire && eq_tag[0]) sym_fresh <= 1'b1;
      else if (eq_fire && eq_tag[2]) sym_fresh <= 1'b0;
    end
  end

  logic              sd_out_valid, sd_out_ready;
  logic [2*IQ_W-1:0] sd_out_data;
  symbol_deinterleaver #(.MAX_CELLS(MAX_CELLS)) u_sd (
    .clk, .rst_n, .mode(tps_params.mode),
    .in_valid(eq_valid && eq_tag[2] && (dec_run || dec_start)),
    .in_odd(tps_sym_idx[0]),
    .in_data({eq_i, eq_q}),
    .in_ready(sd_in_ready),
    .out_valid(sd_out_valid), .out_data(sd_out_data), .out_ready(sd_out_ready)
  );

  logic                     dm_valid;
  logic signed [SOFT_W-1:0] dm_soft [6];
  qam_demapper #(.OUT_REG(1'b0)) u_dm (
    .clk, .rst_n, .qam(tps_params.qam),
    .in_valid(sd_out_valid),
    .in_i(sd_out_data[2*IQ_W-1:IQ_W]), .in_q(sd_out_data[IQ_W-1:0]),
    .out_valid(dm_valid), .out_soft(dm_soft)
  );

  logic                     bd_valid;
  logic signed [SOFT_W-1:0] bd_soft;
  bit_deinterleaver u_bd (
    .clk, .rst_n, .qam(tps_params.qam),
    .in_valid(dm_valid), .in_soft(dm_soft), .in_ready(sd_out_ready),
    .out_valid(bd_valid), .out_soft(bd_soft)
  );

  logic                     dp_valid;
  logic signed [SOFT_W-1:0] dp_x, dp_y;
  depuncturer u_dp (
    .clk, .rst_n, .rate(tps_params.rate_hp), .restart(dec_start),
    .in_valid(bd_valid), .in_soft(bd_soft),
    .out_valid(dp_valid), .out_x(dp_x), .out_y(dp_y)
  );

  logic vd_valid, vd_bit;
  viterbi_decoder #(.DEPTH(VIT_DEPTH)) u_vd (
    .clk, .rst_n, .rate(tps_params.rate_hp),
    .in_valid(dp_valid), .in_x(dp_x), .in_y(dp_y),
    .out_valid(vd_valid), .out_bit(vd_bit)
  );

  logic       bs_valid, bs_sop;
  logic [7:0] bs_data;
  ts_sync u_bs (
    .clk, .rst_n, .in_valid(vd_valid), .in_bit(vd_bit),
    .locked(ts_locked), .out_valid(bs_valid), .out_sop(bs_sop), .out_data(bs_data)
  );

  logic       od_valid, od_sop;
  logic [7:0] od_data;
  outer_deinterleaver u_od (
    .clk, .rst_n, .in_valid(bs_valid), .in_sop(bs_sop), .in_data(bs_data),
    .out_valid(od_valid), .out_sop(od_sop), .out_data(od_data)
  );

  logic       rs_ready, rs_valid, rs_sop, rs_err;
  logic [7:0] rs_data;
  logic [3:0] rs_nerr;
  rs_decoder u_rs (
    .clk, .rst_n, .in_valid(od_valid), .in_sop(od_sop), .in_data(od_data), .in_ready(rs_ready),
    .out_valid(rs_valid), .out_sop(rs_sop), .out_data(rs_data), .out_err(rs_err), .out_nerr(rs_nerr)
  );

  // The byte stream arrives at most once per 8 clocks (one decoded bit per
  // clock), while the RS decoder needs about 2.1 clocks per byte: it is
  // never expected to refuse a byte.
  assert property (@(posedge clk) disable iff (!rst_n) od_valid |-> rs_ready)
    else $error("RS decoder overrun");

  descrambler u_ds (
    .clk, .rst_n, .in_valid(rs_valid), .in_sop(rs_sop), .in_data(rs_data),
    .out_valid(ts_valid), .out_sop(ts_sop), .out_data(ts_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ts_err <= 1'b0;
    else if (rs_valid) ts_err <= rs_err;
  end

  logic [3:0] unused_nerr;
  assign unused_nerr = rs_nerr;
endmodule
