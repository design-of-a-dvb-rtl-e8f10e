// tb_sp_order_detection: builds 2K and 8K FFT output symbols with random
// 16-QAM data cells (levels +-1, +-3 scaled by 96) and boosted scattered
// pilots (4/3 of the data rms amplitude) on carriers k = 3*(l mod 4) + 12*p,
// adds noise, and feeds them carrier by carrier with random idle clocks. The
// first symbol index is random. Checks: no lock before the third symbol; lock
// at the third symbol; a correct index (l mod 4) on every symbol once locked;
// one corrupted symbol (pilots on the wrong class) does not break lock,
// and three symbols restarted at a different phase first unlock and then
// relock at the new phase.
module tb_sp_order_detection;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_sop, in_last, order_valid, locked;
  logic signed [11:0] in_i, in_q;
  logic [1:0] order;
  int checks = 0, failures = 0;

  sp_order_detection dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lev();
    int v;
    v = int'($urandom_range(3, 0));
    return (2 * v - 3) * 96;
  endfunction

  // sends one symbol with pilots of class pc (0..3); returns when sent
  task automatic send_symbol(int ncar, int pc);
    for (int k = 0; k < ncar; k++) begin
      int a, b;
      if (k % 12 == 3 * pc) begin
        a = ($urandom_range(1, 0) ? 1 : -1) * 405;  // 4/3 of the data rms (96*sqrt(10))
        b = 0;
      end else begin
        a = lev(); b = lev();
      end
      a += int'($urandom_range(40, 0)) - 20;
      b += int'($urandom_range(40, 0)) - 20;
      @(negedge clk);
      in_valid = 1; in_sop = (k == 0); in_last = (k == ncar - 1);
      in_i = 12'(a); in_q = 12'(b);
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_last = 0;
      if ($urandom_range(3, 0) == 0) @(negedge clk);
    end
  endtask

  int sym_no = 0;
  bit expect_lock;
  int expect_order;

  task automatic check_result(string what, bit want_lock, int want_order);
    @(negedge clk);
    while (!order_valid) @(negedge clk);
    checks++;
    if (locked !== want_lock || (want_lock && order != 2'(want_order))) begin
      failures++;
      $display("%s: locked %0d order %0d, want %0d %0d", what, locked, order, want_lock, want_order);
    end
  endtask

  initial begin
    int l0, ncar;
    in_valid = 0; in_sop = 0; in_last = 0; in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ncar_list[m]) begin
      ncar = ncar_list[m];
      l0 = int'($urandom_range(3, 0));
      // acquisition: first two symbols give no lock, third one locks
      for (int s = 0; s < 8; s++) begin
        fork
          send_symbol(ncar, (l0 + s) % 4);
          check_result("acquire", s >= 2 ? 1'b1 : 1'b0, (l0 + s) % 4);
        join
      end
      // one corrupted symbol: lock must hold, prediction stays right
      fork
        send_symbol(ncar, (l0 + 8 + 2) % 4);
        check_result("miss", 1'b1, (l0 + 8) % 4);
      join
      for (int s = 9; s < 12; s++) begin
        fork
          send_symbol(ncar, (l0 + s) % 4);
          check_result("after miss", 1'b1, (l0 + s) % 4);
        join
      end
      // phase jump: two misses unlock, then relock after three symbols
      l0 = l0 + 2;
      for (int s = 12; s < 19; s++) begin
        fork
          send_symbol(ncar, (l0 + s) % 4);
          // at s = 12 the block still reports its prediction (old phase)
          check_result("jump", (s == 12 || s >= 15) ? 1'b1 : 1'b0, (s == 12) ? (l0 + s + 2) % 4 : (l0 + s) % 4);
        join
      end
      // reset between modes so that acquisition is tested again
      rst_n = 0; @(negedge clk); rst_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ncar_list [2] = '{1705, 6817};
endmodule
