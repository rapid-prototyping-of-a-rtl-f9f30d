// fsd_fifo: synchronous first-in first-out buffer.
//
// A memory array of DEPTH words with write and read pointers, as used for the
// synchronisation buffers between the host and the decoder. Show-ahead read:
// rd_data is the oldest word whenever rd_valid is high, and rd_en removes it.
// A write while full or a read while empty is ignored (and flagged by the
// assertions). count gives the number of words held.
module fsd_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       full,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       rd_valid,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  logic do_wr, do_rd;
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_valid = (count != '0);
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_en && rd_valid;
  assign rd_data  = mem[rp];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= next_ptr(wp);
      if (do_rd) rp <= next_ptr(rp);
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("fsd_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_valid)
    else $error("fsd_fifo: read while empty");
endmodule
