// descrambler: energy-dispersal removal at the end of the outer receiver.
// The transport stream arrives as 188-byte packets, one byte per valid cycle,
// with sop marking each sync byte. A packet whose sync byte is the inverted
// word 0xB8 starts a group of eight packets; at that point the PRBS
// 1 + x^14 + x^15 is reloaded with 100101010000000. Payload bytes are XORed
// with eight PRBS bits (first bit generated = MSB). Sync bytes are not
// descrambled: the PRBS runs through the seven non-inverted sync bytes of a
// group but is stopped during the 0xB8 byte, and 0xB8 is restored to 0x47.
// One register stage: outputs follow inputs by one clock.
// The placement of the descrambler after the RS decoder and the exemption of
// sync words are taken from the receiver description; the PRBS polynomial,
// seed and grouping are those of the DVB-T standard the receiver decodes.
module descrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sop,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic       out_sop,
  output logic [7:0] out_data
);
  localparam logic [14:0] SEED = 15'b000000010101001; // stage 1 in bit 0

  logic [14:0] prbs_q;

  // eight PRBS steps; reg[0] holds stage 1, reg[14] holds stage 15
  function automatic logic [22:0] prbs8(logic [14:0] s);
    logic [14:0] r;
    logic [7:0]  o;
    logic        fb;
    r = s;
    for (int i = 7; i >= 0; i--) begin
      fb   = r[13] ^ r[14];
      o[i] = fb;
      r    = {r[13:0], fb};
    end
    return {o, r};
  endfunction

  logic        grp_start;
  logic [22:0] step_run;
  assign grp_start = in_valid && in_sop && (in_data == 8'hB8);
  assign step_run  = prbs8(prbs_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prbs_q    <= SEED;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid && in_sop;
      if (in_valid) begin
        if (grp_start) begin
          prbs_q   <= SEED;          // PRBS held during the inverted sync byte
          out_data <= 8'h47;
        end else if (in_sop) begin
          prbs_q   <= step_run[14:0]; // runs, but sync byte left untouched
          out_data <= in_data;
        end else begin
          prbs_q   <= step_run[14:0];
          out_data <= in_data ^ step_run[22:15];
        end
      end
    end
  end
endmodule
