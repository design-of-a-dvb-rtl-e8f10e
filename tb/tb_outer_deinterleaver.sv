// tb_outer_deinterleaver: a reference convolutional interleaver (branch j
// delays by j*17 bytes, FIFO model) feeds the de-interleaver; after the
// pipeline has filled (11*12*17 bytes) every output byte must equal the
// interleaver's input delayed by exactly 11*12*17 bytes, and sync bytes must
// come out on the sop positions.
module tb_outer_deinterleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_sop, out_valid, out_sop;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;

  outer_deinterleaver dut (.*);

  localparam int TOTAL = 204 * 30;
  localparam int DELAY = 11 * 12 * 17;
  logic [7:0] src [TOTAL];
  logic [7:0] fifo [12][$];

  initial begin
    for (int n = 0; n < TOTAL; n++) src[n] = (n % 204 == 0) ? 8'h47 : 8'($urandom);
    for (int j = 0; j < 12; j++) repeat (j * 17) fifo[j].push_back(8'h00);
    in_valid = 0; in_sop = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < TOTAL; n++) begin
      int j;
      j = n % 12;
      fifo[j].push_back(src[n]);
      in_valid <= 1; in_sop <= (n % 204 == 0); in_data <= fifo[j].pop_front();
      @(posedge clk);
      if ($urandom_range(3, 0) == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k = 0;
  always @(negedge clk) if (out_valid) begin
    if (k >= DELAY) begin
      checks++;
      if (out_data !== src[k - DELAY]) begin
        failures++;
        if (failures < 5) $display("byte %0d: got %h want %h", k, out_data, src[k - DELAY]);
      end
      if (((k - DELAY) % 204 == 0) != out_sop) failures++;
    end
    k++;
  end

  initial begin
    repeat (20 * TOTAL) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
