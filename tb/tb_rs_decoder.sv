// tb_rs_decoder: self-checking test of the RS(204,188) decoder.
// A reference encoder (log/antilog tables, generator with roots alpha^0..15)
// builds random codewords; 0..8 byte errors are added at random positions,
// including the parity bytes, and the decoded 188 bytes must equal the
// original. Codewords with 9 and 12 errors must be flagged. Codewords are
// sent back to back to exercise the ping-pong buffers and the ready signal.
module tb_rs_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_sop, in_ready, out_valid, out_sop, out_err;
  logic [7:0] in_data, out_data;
  logic [3:0] out_nerr;
  int checks = 0, failures = 0;

  rs_decoder dut (.*);

  int unsigned expn [0:509];
  int unsigned lg   [0:255];
  function automatic int unsigned mul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return expn[lg[a] + lg[b]];
  endfunction

  localparam int NCW = 12;
  logic [7:0] cw   [NCW][204];
  logic [7:0] rx   [NCW][204];
  int         nerr [NCW];
  int unsigned g [0:16];

  initial begin : build
    int unsigned v;
    v = 1;
    for (int i = 0; i < 510; i++) begin
      expn[i] = v;
      if (i < 255) lg[v] = i;
      v = v << 1;
      if (v & 256) v ^= 'h11D;
    end
    lg[0] = 0;
    // generator polynomial, g[0] = constant term
    for (int i = 0; i <= 16; i++) g[i] = 0;
    g[0] = 1;
    for (int r = 0; r < 16; r++) begin
      for (int i = 16; i >= 1; i--) g[i] = g[i-1] ^ mul(g[i], expn[r]);
      g[0] = mul(g[0], expn[r]);
    end
    for (int c = 0; c < NCW; c++) begin
      int unsigned par [0:15];
      int unsigned fb;
      for (int i = 0; i < 16; i++) par[i] = 0;
      for (int i = 0; i < 188; i++) begin
        cw[c][i] = 8'($urandom);
        fb = cw[c][i] ^ par[15];
        for (int j = 15; j >= 1; j--) par[j] = par[j-1] ^ mul(fb, g[j]);
        par[0] = mul(fb, g[0]);
      end
      for (int i = 0; i < 16; i++) cw[c][188 + i] = 8'(par[15 - i]);
      nerr[c] = (c < 9) ? c : ((c == 9) ? 9 : ((c == 10) ? 12 : 8));
      for (int i = 0; i < 204; i++) rx[c][i] = cw[c][i];
      for (int e = 0; e < nerr[c]; e++) begin
        int p;
        p = (c == 11) ? 196 + e : int'($urandom_range(203, 0));
        while (rx[c][p] != cw[c][p]) p = (p + 1) % 204;
        rx[c][p] = cw[c][p] ^ 8'($urandom_range(255, 1));
      end
    end
  end

  initial begin : drive
    in_valid = 0; in_sop = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < NCW; c++)
      for (int i = 0; i < 204; i++) begin
        in_valid <= 1; in_sop <= (i == 0); in_data <= rx[c][i];
        forever begin
          @(negedge clk);
          if (in_ready) break;
        end
        @(posedge clk);
      end
    in_valid <= 0;
  end

  initial begin : check
    int c, i, bad;
    c = 0; i = 0; bad = 0;
    while (c < NCW) begin
      @(negedge clk);
      if (out_valid) begin
        if (i == 0 && !out_sop) bad++;
        if (nerr[c] <= 8) begin
          if (out_data !== cw[c][i] || out_err) bad++;
        end
        i++;
        if (i == 188) begin
          checks++;
          if (nerr[c] > 8) begin
            if (!out_err) begin failures++; $display("codeword %0d (%0d errors) not flagged", c, nerr[c]); end
          end else begin
            if (bad != 0 || out_nerr != 4'(nerr[c])) begin
              failures++; $display("codeword %0d (%0d errors): %0d bad bytes nerr=%0d", c, nerr[c], bad, out_nerr);
            end
          end
          bad = 0; i = 0; c++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
