// fsd_du: demapper unit.
//
// Turns the M detected QAM points into BPS = log2(P) bits each (4 for
// 16-QAM, 6 for 64-QAM). Each axis uses the Gray code a ^ (a >> 1) of its
// index (16-QAM: -3 -> 00, -1 -> 01, +1 -> 11, +3 -> 10); a point's bits are
// {I bits, Q bits}, and level i fills bits [BPS*i-1 : BPS*(i-1)] of the
// output word, so the word holds the symbols in the detection order of the
// channel columns set up by the host. The Gray mapping and bit order are this
// design's choice.
//
// Timing: one register stage; out_valid follows in_valid by one cycle.
module fsd_du
  import fsd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  sym_t  [M-1:0]      in_sym,
  output logic               out_valid,
  output logic [M*BPS-1:0]   out_bits
);
  logic [M*BPS-1:0] bits;
  always_comb begin
    for (int i = 0; i < M; i++)
      bits[i*BPS +: BPS] = {axis_gray(in_sym[i][BPS-1:AB]), axis_gray(in_sym[i][AB-1:0])};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bits <= bits;
    end
  end
endmodule
