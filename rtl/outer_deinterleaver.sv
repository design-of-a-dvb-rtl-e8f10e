// outer_deinterleaver: convolutional (Forney) byte de-interleaver with
// I = 12 branches and depth M = 17, built on one single-port memory.
// Byte n of the stream belongs to branch j = n mod 12; branch 0 carries the
// sync bytes (in_sop re-aligns the branch counter). At the transmitter branch
// j delays by j*M bytes, so here branch j delays by (I-1-j)*M bytes. Each
// branch owns a circular region of (I-1-j)*M words in the single memory
// (I*(I-1)/2*M = 1122 words in all); the address generator keeps one pointer
// per branch and the base of the current branch, so each byte costs one
// read-then-write access of the same word. Branch I-1 has no delay.
// Output follows input by one clock; the first (I-1)*I*M bytes out are the
// memory's initial contents (zero after reset is not guaranteed: the memory is
// not reset) and downstream RS decoding sorts them out.
// The single memory with an address generator follows the document; I and M
// are the DVB-T values.
module outer_deinterleaver #(
  parameter int unsigned I = 12,
  parameter int unsigned M = 17
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sop,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic       out_sop,
  output logic [7:0] out_data
);
  localparam int unsigned DEPTH = I * (I - 1) / 2 * M;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned BW    = $clog2(I);
  localparam int unsigned PW    = $clog2((I - 1) * M + 1);

  logic [7:0]    mem [DEPTH];
  logic [BW-1:0] branch;     // branch of the current byte
  logic [AW-1:0] base;       // first word of the current branch's region
  logic [PW-1:0] ptr [I];    // per-branch position inside its region

  logic [BW-1:0] br_now;
  logic [AW-1:0] base_now;
  assign br_now   = in_sop ? '0 : branch;
  assign base_now = in_sop ? '0 : base;

  logic [PW-1:0] len_now;
  assign len_now = PW'((I - 1 - br_now) * M);

  logic [AW-1:0] addr;
  assign addr = base_now + AW'(ptr[br_now]);

  always_ff @(posedge clk) begin
    if (in_valid && len_now != 0) mem[addr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      branch    <= '0;
      base      <= '0;
      for (int j = 0; j < I; j++) ptr[j] <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid && in_sop;
      if (in_valid) begin
        out_data <= (len_now == 0) ? in_data : mem[addr];
        if (len_now != 0)
          ptr[br_now] <= (ptr[br_now] == len_now - 1) ? '0 : ptr[br_now] + 1'b1;
        if (br_now == BW'(I - 1)) begin
          branch <= '0;
          base   <= '0;
        end else begin
          branch <= br_now + 1'b1;
          base   <= base_now + AW'(len_now);
        end
      end
    end
  end
endmodule
