// tb_qam_demapper: sends every lattice point of QPSK, 16-QAM and 64-QAM
// (built from the Gray labels with a small random offset) and checks that the
// sign of each soft output recovers the label bit, and that soft values of a
// point exactly on the lattice have the expected magnitudes (16 per unit).
module tb_qam_demapper;
  import dvb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  qam_e qam;
  logic in_valid, out_valid;
  logic signed [11:0] in_i, in_q;
  logic signed [5:0] out_soft [6];
  int checks = 0, failures = 0;

  qam_demapper dut (.*);

  // amplitude index (0..3 -> level 1,3,5,7) from Gray bits (b_hi, b_lo)
  function automatic int level64(bit hi, bit lo);
    case ({hi, lo})
      2'b00: return 7; 2'b01: return 5; 2'b11: return 3; default: return 1;
    endcase
  endfunction

  initial begin
    in_valid = 0; in_i = 0; in_q = 0; qam = QPSK;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (qam_list[t]) begin
      int nb;
      qam = qam_list[t];
      nb = int'(bits_per_cell(qam));
      for (int lab = 0; lab < (1 << nb); lab++) begin
        bit y [6];
        int ai, aq, pi, pq;
        for (int k = 0; k < 6; k++) y[k] = (k < nb) ? bit'((lab >> k) & 1) : 1'b0;
        if (qam == QPSK)       begin ai = 1; aq = 1; end
        else if (qam == QAM16) begin ai = y[2] ? 1 : 3; aq = y[3] ? 1 : 3; end
        else                   begin ai = level64(y[2], y[4]); aq = level64(y[3], y[5]); end
        pi = (y[0] ? -ai : ai) * 128;
        pq = (y[1] ? -aq : aq) * 128;
        for (int rep = 0; rep < 2; rep++) begin
          @(negedge clk);
          in_valid = 1;
          in_i = 12'(pi + ((rep == 0) ? 0 : $urandom_range(40, 0) - 20));
          in_q = 12'(pq + ((rep == 0) ? 0 : $urandom_range(40, 0) - 20));
          @(negedge clk);
          in_valid = 0;
          for (int k = 0; k < nb; k++) begin
            checks++;
            if ((out_soft[k] > 0) != y[k] || out_soft[k] == 0) begin
              failures++;
              $display("qam %0d label %0h bit %0d soft %0d", qam, lab, k, out_soft[k]);
            end
          end
          if (rep == 0) begin
            // exact point: sign bits carry 16*amplitude (clipped at 31/-32)
            int e;
            e = (y[0] ? 1 : -1) * 16 * ai;
            if (e > 31) e = 31;
            if (e < -32) e = -32;
            checks++;
            if (int'(out_soft[0]) != e) begin failures++; $display("magnitude %0d want %0d", out_soft[0], e); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qam_e qam_list [3] = '{QPSK, QAM16, QAM64};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
