// tb_tps_decoder: builds TPS frames (sync word, length 23, parameters,
// BCH parity computed by long division in the testbench), DBPSK-modulates
// them on 17 TPS carriers with random amplitudes and some carriers with a
// wrong sign (which the voting must outvote), interleaved with data cells.
// After the first full frame the decoder must report tps_ok and the
// parameters sent, and sym_idx must follow the frame.
module tb_tps_decoder;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_tps, sym_end, tps_ok, frame_end;
  logic signed [11:0] in_re;
  tps_params_t params;
  logic [6:0] sym_idx;
  int checks = 0, failures = 0;

  tps_decoder dut (.*);

  bit frame [68];
  bit phase [17];

  task automatic build_frame(int fnum);
    bit info [53];
    bit w [67];
    bit r [14];
    bit g [15] = '{1,0,0,0,0,1,1,0,1,1,1,0,1,1,1};  // x^14 .. x^0
    bit sync [16] = '{0,0,1,1,0,1,0,1,1,1,1,0,1,1,1,0};
    int p;
    for (int i = 0; i < 16; i++) info[i] = (fnum % 2 == 0) ? sync[i] : !sync[i];
    p = 16;
    foreach (len_bits[i]) info[p++] = len_bits[i];
    info[p++] = fnum[1]; info[p++] = fnum[0];
    info[p++] = 1; info[p++] = 0;                // 64-QAM
    info[p++] = 0; info[p++] = 0; info[p++] = 0; // non-hierarchical
    info[p++] = 0; info[p++] = 1; info[p++] = 0; // HP rate 3/4
    info[p++] = 0; info[p++] = 0; info[p++] = 0; // LP rate 1/2
    info[p++] = 1; info[p++] = 0;                // GI 1/8
    info[p++] = 0; info[p++] = 0;                // 2K
    while (p < 53) info[p++] = 0;
    for (int i = 0; i < 53; i++) w[i] = info[i];
    for (int i = 53; i < 67; i++) w[i] = 0;
    // remainder of w(x) = info(x) * x^14 modulo g(x)
    for (int i = 0; i < 53; i++)
      if (w[i]) for (int j = 0; j < 15; j++) w[i + j] ^= g[j];
    for (int i = 0; i < 14; i++) r[i] = w[53 + i];
    frame[0] = 0;
    for (int i = 0; i < 53; i++) frame[1 + i] = info[i];
    for (int i = 0; i < 14; i++) frame[54 + i] = r[i];
  endtask

  bit len_bits [6] = '{0,1,0,1,1,1};

  task automatic send_symbol(int s);
    for (int c = 0; c < 17; c++) begin
      int amp;
      bit sgn;
      if (s % 68 != 0 || s == 0) begin
        if (frame[s % 68]) phase[c] = !phase[c];
      end else if (frame[0]) phase[c] = !phase[c];
      amp = 200 + $urandom_range(300, 0);
      sgn = phase[c] ^ ((c % 7 == 3) && (s % 3 == 1));   // corrupted carriers
      repeat (2) begin
        @(negedge clk); in_valid = 1; in_tps = 0; in_re = 12'($urandom);
      end
      @(negedge clk); in_valid = 1; in_tps = 1; in_re = sgn ? 12'(-amp) : 12'(amp);
    end
    @(negedge clk); in_valid = 0; in_tps = 0; sym_end = 1;
    @(negedge clk); sym_end = 0;
  endtask

  initial begin
    in_valid = 0; in_tps = 0; in_re = 0; sym_end = 0;
    foreach (phase[c]) phase[c] = c[0];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 68 * 3; s++) begin
      if (s % 68 == 0) build_frame(s / 68);
      send_symbol(s);
      @(negedge clk);
      if (s == 68 * 2 - 1) begin
        checks++;
        if (!tps_ok || params.qam != QAM64 || params.rate_hp != R3_4 || params.guard != GI_1_8 ||
            params.mode != MODE_2K || params.hierarchy != 3'd0 || params.frame_num != 2'd1) begin
          failures++;
          $display("after frame 2: ok=%0d qam=%0d rate=%0d gi=%0d mode=%0d fn=%0d", tps_ok,
                   params.qam, params.rate_hp, params.guard, params.mode, params.frame_num);
        end
      end
      if (s >= 68 * 2) begin
        checks++;
        if (sym_idx != 7'((s + 1) % 68)) begin failures++; $display("s=%0d sym_idx=%0d", s, sym_idx); end
      end
      if (s == 67) begin
        // first frame has no DBPSK reference before s0, it may or may not lock
      end
    end
    checks++;
    if (params.frame_num != 2'd2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
