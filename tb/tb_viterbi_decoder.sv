// tb_viterbi_decoder: random bits are convolutionally encoded (reference
// encoder with the tap lists of 171 and 133 octal), turned into noisy 6-bit
// soft values with some sign errors, punctured to rate 1/2 and 3/4 (erased
// bits set to 0), and decoded. Every decoded bit must equal the source bit,
// and the number of steps before the first output must be the traceback
// length for the rate (36 for 1/2, 60 for 3/4): the bit of pair n comes out
// one clock after pair n+length is taken.
module tb_viterbi_decoder;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  code_rate_e rate;
  logic in_valid, out_valid, out_bit;
  logic signed [5:0] in_x, in_y;
  int checks = 0, failures = 0;

  viterbi_decoder dut (.*);

  localparam int NB = 3000;
  bit src [NB];
  int nout, nin, first_out;

  function automatic logic signed [5:0] softv(bit b, bit flip);
    int m;
    m = 10 + int'($urandom_range(14, 0));
    if (flip) m = 6;
    return 6'(((b ^ flip) ? m : -m));
  endfunction

  always @(negedge clk) if (out_valid) begin
    if (nout == 0) first_out = nin;
    checks++;
    if (out_bit !== src[nout]) begin
      failures++;
      if (failures < 5) $display("bit %0d wrong", nout);
    end
    nout++;
  end

  task automatic run(code_rate_e r, int want_lat);
    int st [7];
    rate = r;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    nout = 0; nin = 0;
    for (int j = 0; j < 7; j++) st[j] = 0;
    for (int t = 0; t < NB; t++) begin
      bit x, y;
      int g1 [5] = '{0, 1, 2, 3, 6};   // 171 octal: taps on u(t), u(t-1), u(t-2), u(t-3), u(t-6)
      int g2 [5] = '{0, 2, 3, 5, 6};   // 133 octal: taps on u(t), u(t-2), u(t-3), u(t-5), u(t-6)
      src[t] = bit'($urandom_range(1, 0));
      for (int j = 6; j > 0; j--) st[j] = st[j-1];
      st[0] = src[t];
      x = 0; y = 0;
      foreach (g1[k]) x ^= st[g1[k]];
      foreach (g2[k]) y ^= st[g2[k]];
      @(negedge clk);
      in_valid = 1;
      in_x = softv(x, $urandom_range(60, 0) == 0);
      in_y = softv(y, $urandom_range(60, 0) == 0);
      if (r == R3_4) begin   // X: 101, Y: 110
        if (t % 3 == 1) in_x = 0;
        if (t % 3 == 2) in_y = 0;
      end
      nin++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nout != NB - want_lat || first_out != want_lat + 2) begin
      failures++;
      $display("rate %0d: %0d outputs, first after %0d inputs", r, nout, first_out);
    end
  endtask

  initial begin
    in_valid = 0; in_x = 0; in_y = 0;
    run(R1_2, 36);
    run(R3_4, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * NB) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
