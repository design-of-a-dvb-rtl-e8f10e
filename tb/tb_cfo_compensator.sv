// tb_cfo_compensator: drives random 8-bit samples with random gaps and
// checks each output against x * exp(-j*2*pi*phi/2^16) computed in real
// arithmetic, where phi is the running sum of the frequency word since the
// last phase clear (first sample rotated by 0). Tolerance 2 LSB per
// component. Covers positive and negative frequency words, a clear in the
// middle of a run, and the 16-clock latency from input to output.
module tb_cfo_compensator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic phase_clr, in_valid, out_valid;
  logic signed [15:0] freq;
  logic signed [7:0] in_i, in_q;
  logic signed [8:0] out_i, out_q;
  int checks = 0, failures = 0;

  cfo_compensator dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_i [$], exp_q [$];
  int  in_time [$];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  // reference phase in turns * 2^16, kept modulo 2^16
  int phi = 0;

  task automatic send(int xi, int xq, bit clr);
    real th, ci, cq;
    @(negedge clk);
    if (clr) phi = 0;
    th = 2.0 * 3.14159265358979 * real'(phi) / 65536.0;
    ci = real'(xi) * $cos(th) + real'(xq) * $sin(th);
    cq = real'(xq) * $cos(th) - real'(xi) * $sin(th);
    exp_i.push_back(ci); exp_q.push_back(cq); in_time.push_back(cyc);
    phase_clr = clr; in_valid = 1; in_i = 8'(xi); in_q = 8'(xq);
    phi = (phi + int'(freq)) & 16'hFFFF;
    @(negedge clk);
    phase_clr = 0; in_valid = 0;
    if ($urandom_range(2, 0) == 0) repeat ($urandom_range(3, 1)) @(negedge clk);
  endtask

  int lat_bad = 0;
  always @(negedge clk) if (out_valid) begin
    real ei, eq, di, dq;
    int t0;
    if (exp_i.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      ei = exp_i.pop_front(); eq = exp_q.pop_front(); t0 = in_time.pop_front();
      di = real'(out_i) - ei; dq = real'(out_q) - eq;
      checks++;
      if (di > 2.0 || di < -2.0 || dq > 2.0 || dq < -2.0) begin
        failures++;
        if (failures < 6) $display("got %0d %0d want %f %f", out_i, out_q, ei, eq);
      end
      checks++;
      if (cyc - t0 != 16) begin
        failures++;
        if (lat_bad++ < 3) $display("latency %0d", cyc - t0);
      end
    end
  end

  initial begin
    phase_clr = 0; in_valid = 0; in_i = 0; in_q = 0; freq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 12; run++) begin
      freq = 16'($urandom());
      if (run == 0) freq = 16'sd0;
      if (run == 1) freq = 16'sd137;
      if (run == 2) freq = -16'sd137;
      for (int n = 0; n < 300; n++)
        send(int'($urandom_range(254, 0)) - 127, int'($urandom_range(254, 0)) - 127,
             n == 0 || n == 150);
    end
    repeat (30) @(negedge clk);
    checks++;
    if (exp_i.size() != 0) begin failures++; $display("%0d outputs missing", exp_i.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
