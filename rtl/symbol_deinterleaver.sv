// symbol_deinterleaver: DVB-T symbol de-interleaver on two symbol memories
// (ping-pong), placed ahead of the QAM demapper so that the memory holds
// 24-bit equalized cells (12-bit I + 12-bit Q) rather than 36-bit soft bits.
// The transmitter writes y[H(q)] = y'[q] on even symbols and y[q] = y'[H(q)]
// on odd symbols. Here one bank is written while the other is read:
//   even symbol: written in carrier order, read at addresses H(q);
//   odd symbol:  written at addresses H(q), read in order.
// H(q) comes from two sym_perm_gen instances, one per side. Data cells enter
// with valid/ready; in_odd is sampled with the first cell of each symbol
// (cells are counted, data_cells(mode) per symbol). The read side drives a
// valid/ready output, so the bit-wise de-interleaver can hold it.
// Throughput: one cell per clock except where the permutation generator skips
// an out-of-range candidate. The 24-bit word and the two symbol memories
// follow the document; the permutation is the DVB-T native one (the DVB-H
// in-depth mode is not built).
module symbol_deinterleaver
  import dvb_pkg::*;
#(
  parameter int unsigned MAX_CELLS = 6048,
  parameter int unsigned W         = 2 * IQ_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fft_mode_e     mode,
  input  logic          in_valid,
  input  logic          in_odd,
  input  logic [W-1:0]  in_data,
  output logic          in_ready,
  output logic          out_valid,
  output logic [W-1:0]  out_data,
  input  logic          out_ready
);
  localparam int AW = $clog2(MAX_CELLS);

  logic [W-1:0] mem [2][MAX_CELLS];
  logic [1:0]   full, par;
  logic         wb, rb;
  logic [AW-1:0] wq, rq;
  logic         odd_l;
  logic         w_restart, r_restart;
  logic [12:0]  hw, hr;
  logic         hw_valid, hr_valid;

  logic [AW-1:0] ncells;
  assign ncells = AW'(data_cells(mode));

  logic odd_w;
  assign odd_w = (wq == 0) ? in_odd : odd_l;

  logic w_go, r_go;
  assign in_ready = !full[wb] && !w_restart && (!odd_w || hw_valid);
  assign w_go     = in_valid && in_ready;

  logic r_can;
  assign r_can = full[rb] && !r_restart && (par[rb] || hr_valid);
  assign r_go  = r_can && (!out_valid || out_ready);

  sym_perm_gen u_wgen (.clk, .rst_n, .mode, .restart(w_restart), .advance(w_go && odd_w),
                       .h(hw), .h_valid(hw_valid));
  sym_perm_gen u_rgen (.clk, .rst_n, .mode, .restart(r_restart), .advance(r_go && !par[rb]),
                       .h(hr), .h_valid(hr_valid));

  logic [AW-1:0] waddr, raddr;
  assign waddr = odd_w ? AW'(hw) : wq;
  assign raddr = par[rb] ? rq : AW'(hr);

  always_ff @(posedge clk) if (w_go) mem[wb][waddr] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      par       <= '0;
      wb        <= 1'b0;
      rb        <= 1'b0;
      wq        <= '0;
      rq        <= '0;
      odd_l     <= 1'b0;
      w_restart <= 1'b1;
      r_restart <= 1'b1;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      w_restart <= 1'b0;
      r_restart <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (w_go) begin
        if (wq == 0) odd_l <= in_odd;
        if (wq == ncells - 1) begin
          wq        <= '0;
          full[wb]  <= 1'b1;
          par[wb]   <= odd_w;
          wb        <= !wb;
          w_restart <= 1'b1;
        end else wq <= wq + 1'b1;
      end
      if (r_go) begin
        out_valid <= 1'b1;
        out_data  <= mem[rb][raddr];
        if (rq == ncells - 1) begin
          rq        <= '0;
          full[rb]  <= 1'b0;
          rb        <= !rb;
          r_restart <= 1'b1;
        end else rq <= rq + 1'b1;
      end
    end
  end
endmodule
