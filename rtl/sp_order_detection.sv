// sp_order_detection: finds which of the four scattered-pilot patterns an
// OFDM symbol carries, straight from the FFT output.
//
// Scattered pilots sit on carriers k = 3*(l mod 4) + 12*p and are sent with
// a boosted amplitude (4/3), so the energy summed over the carriers of each
// of the four classes k mod 12 = 0, 3, 6, 9 is largest for the class that
// holds the pilots. The block adds |I|^2 + |Q|^2 of every carrier into one of
// four accumulators, picks the largest at the end of the symbol and reports
// it as the symbol's pattern index (0..3). Since the pattern advances by one
// every symbol, it declares lock once three consecutive symbols give
// indices that step by one (mod 4); while locked it keeps predicting the
// index and drops lock after two disagreeing symbols.
//
// Interface: one carrier per in_valid, from carrier 0 (in_sop) to the last
// used carrier (in_last). The result is valid one clock after the last
// carrier (order_valid pulse); order and locked then hold until the next
// symbol ends. Any number of idle clocks may separate carriers.
//
// Follows the document: the pattern order is detected from the FFT output
// and needs three OFDM symbols. Own choices: energy accumulation over the
// four classes, the step-by-one consistency test and the unlock rule.
module sp_order_detection
  import dvb_pkg::*;
#(
  parameter int unsigned ACC_W = 40
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sop,
  input  logic                   in_last,
  input  logic signed [IQ_W-1:0] in_i,
  input  logic signed [IQ_W-1:0] in_q,
  output logic                   order_valid,
  output logic [1:0]             order,
  output logic                   locked
);
  logic [3:0]       k12;          // carrier index mod 12
  logic [ACC_W-1:0] acc [4];
  logic [1:0]       run;          // consecutive symbols in step
  logic [1:0]       prev;
  logic             miss;
  logic             have;         // a previous symbol exists

  logic [3:0] k_now;
  assign k_now = in_sop ? 4'd0 : k12;

  logic [2*IQ_W-1:0] pw;
  assign pw = (2 * IQ_W)'(in_i * in_i) + (2 * IQ_W)'(in_q * in_q);

  // accumulators including the current carrier (used on in_last)
  logic [ACC_W-1:0] acc_n [4];
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      acc_n[c] = in_sop ? '0 : acc[c];
      if (k_now == 4'(3 * c)) acc_n[c] = acc_n[c] + ACC_W'(pw);
    end
  end

  logic [1:0] best;
  always_comb begin
    best = 2'd0;
    for (int c = 1; c < 4; c++) if (acc_n[c] > acc_n[best]) best = 2'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k12         <= '0;
      for (int c = 0; c < 4; c++) acc[c] <= '0;
      run         <= '0;
      prev        <= '0;
      miss        <= 1'b0;
      have        <= 1'b0;
      order_valid <= 1'b0;
      order       <= '0;
      locked      <= 1'b0;
    end else begin
      order_valid <= 1'b0;
      if (in_valid) begin
        k12 <= (k_now == 4'd11) ? 4'd0 : k_now + 4'd1;
        for (int c = 0; c < 4; c++) acc[c] <= acc_n[c];
        if (in_last) begin
          order_valid <= 1'b1;
          prev        <= best;
          have        <= 1'b1;
          if (!locked) begin
            order <= best;
            if (have && best == prev + 2'd1) begin
              if (run == 2'd1) locked <= 1'b1;
              run <= (run == 2'd1) ? 2'd0 : run + 2'd1;
            end else run <= '0;
          end else begin
            // locked: follow the predicted index, tolerate one miss
            order <= order + 2'd1;
            if (best != order + 2'd1) begin
              if (miss) begin
                locked <= 1'b0;
                order  <= best;
              end
              miss <= 1'b1;
            end else miss <= 1'b0;
          end
        end
      end
    end
  end
endmodule
