// ts_sync: packs the decoded bit stream of the inner decoder into bytes and
// finds the transport-packet framing. It hunts for a sync byte (0x47 or the
// inverted 0xB8) at any bit offset, then expects another one 204 bytes later;
// on that confirmation it is locked and forwards bytes with out_sop on every
// sync byte. Three missed sync bytes in a row send it back to hunting.
// Bytes are sent MSB first. Output one clock after the byte's last bit.
// The document does not describe this step; it is this design's own
// connection between the Viterbi decoder and the outer de-interleaver.
module ts_sync #(
  parameter int unsigned PKT = 204
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       locked,
  output logic       out_valid,
  output logic       out_sop,
  output logic [7:0] out_data
);
  logic [7:0] sh;
  logic [2:0] bitc;
  logic [7:0] bytec;
  logic       cand;       // waiting for confirmation
  logic [1:0] miss;

  logic [7:0] sh_n;
  assign sh_n = {sh[6:0], in_bit};
  logic is_sync;
  assign is_sync = (sh_n == 8'h47) || (sh_n == 8'hB8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; bitc <= '0; bytec <= '0; cand <= 1'b0; miss <= '0;
      locked <= 1'b0; out_valid <= 1'b0; out_sop <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      if (in_valid) begin
        sh <= sh_n;
        if (!locked && !cand) begin
          if (is_sync) begin
            cand  <= 1'b1;
            bitc  <= '0;
            bytec <= 8'd1;
          end
        end else begin
          bitc <= bitc + 3'd1;
          if (bitc == 3'd7) begin
            bytec <= (bytec == 8'(PKT - 1)) ? 8'd0 : bytec + 8'd1;
            if (bytec == 8'd0) begin           // sync position
              if (is_sync) begin
                miss   <= '0;
                locked <= 1'b1;
                cand   <= 1'b0;
              end else if (!locked || miss == 2'd2) begin
                locked <= 1'b0;
                cand   <= 1'b0;
                miss   <= '0;
              end else miss <= miss + 2'd1;
            end
            if (locked || (bytec == 8'd0 && is_sync)) begin
              out_valid <= 1'b1;
              out_sop   <= (bytec == 8'd0);
              out_data  <= sh_n;
            end
          end
        end
      end
    end
  end
endmodule
