// tb_power_manager: walks the power manager through INIT -> EQUALIZE ->
// DECODE, a loss of sync, a time-slicing suspend and resume, and checks the
// phase and the three module enables after each step against the table of
// the three working phases.
module tb_power_manager;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic suspend, sync_done, tps_ok, en_mod1, en_mod2, en_mod3;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  power_manager dut (.*);

  task automatic expect_state(logic [1:0] ph, logic e1, logic e2, logic e3, string what);
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (phase !== ph || en_mod1 !== e1 || en_mod2 !== e2 || en_mod3 !== e3) begin
      failures++;
      $display("%s: phase=%0d en=%b%b%b", what, phase, en_mod1, en_mod2, en_mod3);
    end
  endtask

  initial begin
    suspend = 0; sync_done = 0; tps_ok = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_state(2'd0, 1, 0, 0, "after reset");
    tps_ok = 1;
    expect_state(2'd0, 1, 0, 0, "tps without sync");
    tps_ok = 0; sync_done = 1;
    expect_state(2'd1, 1, 1, 0, "sync done");
    tps_ok = 1;
    expect_state(2'd2, 1, 1, 1, "tps ok");
    sync_done = 0; tps_ok = 0;
    expect_state(2'd0, 1, 0, 0, "sync lost");
    sync_done = 1;
    expect_state(2'd1, 1, 1, 0, "reacquired");
    suspend = 1;
    expect_state(2'd3, 0, 0, 0, "suspend");
    suspend = 0; sync_done = 0;
    expect_state(2'd0, 1, 0, 0, "resume");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
