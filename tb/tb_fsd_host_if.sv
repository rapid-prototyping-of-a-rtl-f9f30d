// tb_fsd_host_if: checks the host memory interface.
//  - Coefficient bank: every address is written with a random word and the
//    bank contents compared with a model of the address map.
//  - Buffers: the decoder is modelled as a fixed 30-cycle delay line that
//    turns each accepted vector into a result word. Vectors are pushed at
//    random times and results drained at random times, including long
//    stretches with the host not reading; every result must come back once
//    and in order, the output buffer must never overflow, and the stall
//    (vector held back for lack of output room) must occur.
//  - busy is low only when nothing is buffered on the way in or in flight.
module tb_fsd_host_if;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  localparam int DLY = 30;

  logic             clk = 0, rst_n = 0;
  logic             cfg_we;
  logic [5:0]       cfg_addr;
  logic [2*W-1:0]   cfg_wdata;
  coef_t            coef;
  logic             rx_valid, rx_ready, dec_valid, dec_ready, res_valid;
  cvec_t            rx_r, dec_r;
  logic [M*BPS-1:0] res_bits, tx_bits;
  logic             tx_valid, tx_ready, busy, stall;
  int               checks = 0, failures = 0;

  fsd_host_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decoder model: accepts every other cycle at most, fixed delay.
  logic [DLY-1:0]             dv;
  logic [DLY-1:0][M*BPS-1:0]  dd;
  logic                       toggle;
  assign dec_ready = toggle;
  assign res_valid = dv[DLY-1];
  assign res_bits  = dd[DLY-1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv <= '0; toggle <= 0;
    end else begin
      toggle <= ~toggle;
      dv <= {dv[DLY-2:0], dec_valid && dec_ready};
      dd <= {dd[DLY-2:0], (M*BPS)'($unsigned(dec_r[0].re))};   // result = first word of the vector
    end
  end

  logic [M*BPS-1:0] sent [$];
  int               n_stall = 0, n_out = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (rx_valid && rx_ready) sent.push_back((M*BPS)'($unsigned(rx_r[0].re)));
      if (stall) n_stall++;
      if (tx_valid && tx_ready) begin
        checks++;
        n_out++;
        if (sent.size() == 0 || tx_bits !== sent[0]) begin
          failures++;
          $display("result %h out of order", tx_bits);
        end
        if (sent.size() != 0) void'(sent.pop_front());
      end
    end
  end

  initial begin
    coef_t model;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    rx_valid = 0; rx_r = '0; tx_ready = 0;
    model = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after reset"); end
    // Coefficient bank.
    for (int a = 0; a < 36; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = $urandom;
      if (a < 16)      model.hpinv[a/4][a%4] = cplx_t'(cfg_wdata);
      else if (a < 32) model.ratio[(a-16)/4][(a-16)%4] = cplx_t'(cfg_wdata);
      else             model.uii2[a-32] = cfg_wdata[W-1:0];
    end
    @(negedge clk);
    cfg_we = 0;
    checks++;
    if (coef !== model) begin failures++; $display("coefficient bank differs"); end
    // Traffic in phases: fast reader, stalled reader, slow reader.
    for (int ph = 0; ph < 3; ph++) begin
      for (int n = 0; n < 600; n++) begin
        @(negedge clk);
        rx_valid = ($urandom_range(0, 1) == 1);
        rx_r = cvec_t'({$urandom, $urandom, $urandom, $urandom});
        case (ph)
          0: tx_ready = 1;
          1: tx_ready = (n > 300) && ($urandom_range(0, 1) == 1);
          default: tx_ready = ($urandom_range(0, 7) == 0);
        endcase
      end
    end
    @(negedge clk);
    rx_valid = 0;
    tx_ready = 1;
    repeat (200) @(negedge clk);
    checks += 3;
    if (sent.size() != 0) begin failures++; $display("%0d results lost", sent.size()); end
    if (busy) begin failures++; $display("busy after draining"); end
    if (n_stall == 0) begin failures++; $display("no stall exercised"); end
    $display("results %0d, stall cycles %0d", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
