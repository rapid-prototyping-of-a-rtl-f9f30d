// fsd_host_if: memory interface between the host and the decoder.
//
// The host computes, once per channel realisation (frame), the column
// ordering, the pseudoinverse and the Cholesky factor, and streams the
// received vectors of the frame; the decoder returns the detected bits. This
// unit holds what the two sides exchange:
//  - a coefficient bank the host writes word by word (cfg_*): address
//    4*i+j holds H_pinv[i][j], 16+4*i+j the ratio u_ij/u_ii (j > i) and 32+i
//    u_ii^2 (low 16 bits), each complex word as {re, im};
//  - an input buffer of received vectors (rx_*, valid/ready), drained into
//    the zero-forcing unit (dec_*);
//  - an output buffer of detected bit words (res_* in, tx_* out).
// The decoder pipeline cannot stall, so a vector leaves the input buffer only
// if the output buffer has room for it and for every vector still in flight
// (a credit count); when the host reads slowly, the input side stalls.
// The coefficient bank is single-buffered: the host may write it only while
// busy is low, i.e. with the decoder drained (checked by an assertion).
// The address map, buffer depths and credit scheme are this design's own.
module fsd_host_if
  import fsd_pkg::*;
#(
  parameter int IN_DEPTH  = 16,
  parameter int OUT_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // Coefficient writes.
  input  logic               cfg_we,
  input  logic [5:0]         cfg_addr,
  input  logic [2*W-1:0]     cfg_wdata,
  output coef_t              coef,
  // Received vectors from the host.
  input  logic               rx_valid,
  output logic               rx_ready,
  input  cplx_t [M-1:0]      rx_r,
  // To the zero-forcing unit.
  output logic               dec_valid,
  input  logic               dec_ready,
  output cplx_t [M-1:0]      dec_r,
  // Detected bits from the demapper.
  input  logic               res_valid,
  input  logic [M*BPS-1:0]   res_bits,
  // Detected bits to the host.
  output logic               tx_valid,
  input  logic               tx_ready,
  output logic [M*BPS-1:0]   tx_bits,
  output logic               busy,
  output logic               stall      // a vector waits for output room
);
  localparam int CW = $clog2(OUT_DEPTH + 1);

  // Coefficient bank.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef <= '0;
    end else if (cfg_we) begin
      if (cfg_addr < 6'd16)
        coef.hpinv[cfg_addr[3:2]][cfg_addr[1:0]] <= cplx_t'(cfg_wdata);
      else if (cfg_addr < 6'd32)
        coef.ratio[cfg_addr[3:2]][cfg_addr[1:0]] <= cplx_t'(cfg_wdata);
      else if (cfg_addr < 6'd36)
        coef.uii2[cfg_addr[1:0]] <= cfg_wdata[W-1:0];
    end
  end

  // Input buffer.
  logic                          in_full, in_rd, in_has;
  logic [M*2*W-1:0]              in_data;
  fsd_fifo #(.WIDTH(M*2*W), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst_n,
    .wr_en(rx_valid && !in_full), .wr_data(rx_r), .full(in_full),
    .rd_en(in_rd), .rd_data(in_data), .rd_valid(in_has), .count()
  );
  assign rx_ready = !in_full;
  assign dec_r    = cvec_t'(in_data);

  // Output buffer and credits.
  logic          out_full;
  logic [CW-1:0] out_count, inflight;
  logic          room;
  fsd_fifo #(.WIDTH(M*BPS), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .wr_en(res_valid), .wr_data(res_bits), .full(out_full),
    .rd_en(tx_valid && tx_ready), .rd_data(tx_bits), .rd_valid(tx_valid),
    .count(out_count)
  );

  assign room      = ((CW+1)'(out_count) + (CW+1)'(inflight)) < (CW+1)'(OUT_DEPTH);
  assign dec_valid = in_has && room;
  assign in_rd     = dec_valid && dec_ready;
  assign stall     = in_has && !room;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + CW'(in_rd) - CW'(res_valid);
  end

  assign busy = in_has || (inflight != '0);

  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !busy)
    else $error("fsd_host_if: coefficients written while the decoder is busy");
  a_res_room: assert property (@(posedge clk) disable iff (!rst_n) res_valid |-> !out_full)
    else $error("fsd_host_if: result arrived with the output buffer full");
endmodule
