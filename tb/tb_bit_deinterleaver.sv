// tb_bit_deinterleaver: a reference bit interleaver (demultiplexer and six
// cyclic-shift interleavers written out from the DVB-T definition) spreads
// numbered soft bits over 126-cell sections; the de-interleaver must return
// them in the original order for QPSK, 16-QAM and 64-QAM. Checks that
// in_ready holds the input during the read-out of a section and that a
// section is read out in exactly 126*v clocks.
module tb_bit_deinterleaver;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  qam_e qam;
  logic in_valid, in_ready, out_valid;
  logic signed [5:0] in_soft [6];
  logic signed [5:0] out_soft;
  int checks = 0, failures = 0;

  bit_deinterleaver dut (.*);

  int shifts [6] = '{0, 63, 105, 42, 21, 84};
  int dm16 [4] = '{0, 2, 1, 3};
  int dm64 [6] = '{0, 2, 4, 1, 3, 5};
  logic signed [5:0] expq [$];
  logic signed [5:0] cells [126][6];
  int holds = 0, run = 0, maxrun = 0;

  task automatic section(qam_e q);
    int v;
    logic signed [5:0] x [756];
    logic signed [5:0] b [6][126];
    v = int'(bits_per_cell(q));
    for (int n = 0; n < 126 * v; n++) begin x[n] = 6'($urandom); expq.push_back(x[n]); end
    for (int w = 0; w < 126; w++)
      for (int k = 0; k < v; k++) begin
        int e;
        e = (v == 2) ? k : (v == 4) ? dm16[k] : dm64[k];
        b[e][w] = x[v * w + k];
      end
    // a[e][w] = b[e][H_e(w)], cell w carries a[0..v-1][w]
    for (int w = 0; w < 126; w++)
      for (int e = 0; e < 6; e++)
        cells[w][e] = (e < v) ? b[e][(w + shifts[e]) % 126] : 6'sd0;
    for (int w = 0; w < 126; w++) begin
      @(negedge clk);
      while (!in_ready) begin holds++; @(negedge clk); end
      in_valid = 1;
      for (int e = 0; e < 6; e++) in_soft[e] = cells[w][e];
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  always @(negedge clk) begin
    if (out_valid) begin
      run++;
      checks++;
      if (expq.size() == 0 || out_soft !== expq[0]) begin
        failures++;
        if (failures < 5) $display("got %0d want %0d", out_soft, expq.size() ? expq[0] : 6'sd0);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end else begin
      if (run > maxrun) maxrun = run;
      run = 0;
    end
  end

  initial begin
    qam_e ql [3] = '{QAM64, QPSK, QAM16};
    in_valid = 0; qam = QPSK;
    for (int e = 0; e < 6; e++) in_soft[e] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (ql[t]) begin
      qam = ql[t];
      maxrun = 0;
      repeat (2) section(ql[t]);
      while (expq.size() != 0) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (maxrun != 126 * int'(bits_per_cell(ql[t]))) begin
        failures++; $display("read-out burst %0d", maxrun);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("input never held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
