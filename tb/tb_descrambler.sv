// tb_descrambler: a reference scrambler (PRBS 1+x^14+x^15 written as a
// 15-entry bit list) scrambles groups of eight 188-byte packets, inverting
// the first sync byte of each group; the descrambler must return the original
// packets with 0x47 sync bytes. The first three PRBS bytes of a group must be
// 03 F6 08 (the published start of the DVB energy-dispersal sequence).
module tb_descrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_sop, out_valid, out_sop;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;

  descrambler dut (.*);

  localparam int NPKT = 17;
  logic [7:0] plain [NPKT*188];
  logic [7:0] scr   [NPKT*188];
  int k = 0;

  initial begin
    bit st [15];
    for (int n = 0; n < NPKT * 188; n++) plain[n] = (n % 188 == 0) ? 8'h47 : 8'($urandom);
    for (int n = 0; n < NPKT * 188; n++) begin
      if (n % (8 * 188) == 0) begin
        st = '{1,0,0,1,0,1,0,1,0,0,0,0,0,0,0};
        scr[n] = 8'hB8;
      end else begin
        logic [7:0] p;
        for (int b = 7; b >= 0; b--) begin
          bit fb;
          fb = st[13] ^ st[14];
          p[b] = fb;
          for (int s = 14; s > 0; s--) st[s] = st[s-1];
          st[0] = fb;
        end
        if (n % 188 == 1 && n % (8 * 188) == 1) begin
          checks++;
          if (p != 8'h03) failures++;
        end
        scr[n] = (n % 188 == 0) ? plain[n] : plain[n] ^ p;
      end
    end
    in_valid = 0; in_sop = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NPKT * 188; n++) begin
      in_valid <= 1; in_sop <= (n % 188 == 0); in_data <= scr[n];
      @(posedge clk);
      if (n % 7 == 3) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    checks++;
    if (out_data !== plain[k] || out_sop != (k % 188 == 0)) begin
      failures++;
      if (failures < 5) $display("byte %0d: got %h want %h", k, out_data, plain[k]);
    end
    k++;
  end

  initial begin
    repeat (NPKT * 188 * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
