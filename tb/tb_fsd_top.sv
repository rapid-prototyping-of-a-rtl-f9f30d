// tb_fsd_top: end-to-end test of the fixed-sphere decoder at its default
// parameters.
//
// For each frame the testbench draws a random 4x4 complex Gaussian channel,
// prepares it as the host would (column ordering, pseudoinverse, Cholesky
// factor, fixed-point coefficients), writes the coefficient bank while the
// decoder is idle, and streams K = 16 received vectors r = H x / 4 + noise of
// random 16-QAM vectors x. Every detected word is compared with
//  - the bit-accurate integer model of the decoder (all frames), and
//  - the transmitted bits (noise-free frames: the decoder must find x).
// Mechanisms that must each occur at least once:
//  - full-rate streaming: consecutive words of a frame leave exactly
//    C = 4 cycles apart (400 Mbit/s at 100 MHz);
//  - input stall: with the host not reading, vectors wait for output room;
//  - coefficient reload between frames.
module tb_fsd_top;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  localparam int FRAMES = 12;
  localparam int KCH    = 16;     // vectors per channel realisation
  // Clock edges from the host's push of a vector into an empty decoder to
  // the pop of its word: 1 (input buffer) + 7 (ZFU) + 1 (issue) + 18 (PDUs
  // 3+5+5+5) + 3 (the vector's last slot) + 2 (MSU) + 1 (DU) + 1 (output
  // buffer) + 1 (host read). The last-slot term is C - 1, so LAT = 31 + C.
  localparam int LAT    = 31 + C;

  logic             clk = 0, rst_n = 0;
  logic             cfg_we;
  logic [5:0]       cfg_addr;
  logic [2*W-1:0]   cfg_wdata;
  logic             rx_valid, rx_ready, tx_valid, tx_ready, busy, stall;
  cvec_t            rx_r;
  logic [M*BPS-1:0] tx_bits;
  int               checks = 0, failures = 0;

  fsd_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [M*BPS-1:0] bits; logic [M*BPS-1:0] tx; bit clean; int frame; int t_rx; } exp_t;
  exp_t eq [$];
  int   cyc = 0, last_out = -1, last_frame = -1;
  int   n_full_rate = 0, n_stall = 0, n_reload = 0, n_clean = 0, n_clean_err = 0;
  int   n_words = 0;
  bit   streaming = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && stall) n_stall++;
    if (rst_n && tx_valid && tx_ready) begin
      exp_t x;
      n_words++;
      checks++;
      if (eq.size() == 0) begin
        failures++;
        $display("unexpected word");
      end else begin
        x = eq.pop_front();
        if (tx_bits !== x.bits) begin
          failures++;
          $display("frame %0d: word %h, model %h", x.frame, tx_bits, x.bits);
        end
        if (x.clean) begin
          n_clean++;
          if (tx_bits !== x.tx) n_clean_err++;
        end
        if (streaming && x.frame != last_frame) begin
          // First word of a frame, decoder empty: fixed latency.
          checks++;
          if (cyc - x.t_rx != LAT) begin
            failures++;
            $display("frame %0d: latency %0d cycles, expected %0d", x.frame, cyc - x.t_rx, LAT);
          end
        end
        if (streaming && x.frame == last_frame) begin
          checks++;
          if (cyc - last_out == C) n_full_rate++;
          else begin
            failures++;
            $display("frame %0d: words %0d cycles apart, expected %0d", x.frame, cyc - last_out, C);
          end
        end
        last_out = cyc;
        last_frame = x.frame;
      end
    end
  end

  task automatic write_coef(input coef_t cf);
    for (int a = 0; a < 36; a++) begin
      @(negedge clk);
      cfg_we = 1;
      cfg_addr = 6'(a);
      if (a < 16)      cfg_wdata = cf.hpinv[a/4][a%4];
      else if (a < 32) cfg_wdata = cf.ratio[(a-16)/4][(a-16)%4];
      else             cfg_wdata = {16'h0, cf.uii2[a-32]};
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    rx_valid = 0; rx_r = '0; tx_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      cmat_t h;
      int    order [M];
      coef_t cf;
      bit    clipped;
      real   sigma;
      bit    hold_reader;
      // Frames 0,4,8: noise-free; others noisy. Frames 3 and 7: host does
      // not read for a while, so the input stalls.
      sigma = (f % 4 == 0) ? 0.0 : 0.02 * real'(f % 4);
      hold_reader = (f % 4 == 3);
      clipped = make_channel(h, order, cf);
      while (busy) @(negedge clk);
      write_coef(cf);
      if (f > 0) n_reload++;
      streaming = !hold_reader;
      tx_ready = !hold_reader;
      if (hold_reader)
        fork
          begin
            repeat (300) @(negedge clk);
            tx_ready = 1;
          end
        join_none
      for (int k = 0; k < (hold_reader ? 3 * KCH : KCH); k++) begin
        int    sym [M], best [M];
        exp_t  x;
        cvec_t r;
        bit    rclip;
        for (int i = 0; i < M; i++) sym[i] = $urandom_range(0, P - 1);
        r = make_rx(h, order, sym, sigma);
        rclip = 0;
        for (int i = 0; i < M; i++)
          if (r[i].re == 16'sh7fff || r[i].re == -16'sh8000 ||
              r[i].im == 16'sh7fff || r[i].im == -16'sh8000) rclip = 1;
        void'(fsd_ref(zfu_ref(cf.hpinv, r), cf, best));
        x.bits  = bits_ref(best);
        x.tx    = bits_ref(sym);
        x.clean = (sigma == 0.0) && !clipped && !rclip;
        x.frame = f;
        @(negedge clk);
        rx_valid = 1;
        rx_r = r;
        @(posedge clk);
        while (!rx_ready) @(posedge clk);
        x.t_rx = cyc;
        eq.push_back(x);
      end
      @(negedge clk);
      rx_valid = 0;
      if (hold_reader) while (!tx_ready) @(negedge clk);
    end
    while (busy || tx_valid) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 6;
    if (eq.size() != 0)  begin failures++; $display("%0d words missing", eq.size()); end
    if (n_full_rate == 0) begin failures++; $display("full-rate streaming never seen"); end
    if (n_stall == 0)     begin failures++; $display("input stall never seen"); end
    if (n_reload == 0)    begin failures++; $display("coefficient reload never seen"); end
    if (n_clean == 0)     begin failures++; $display("no noise-free words checked"); end
    if (n_clean_err != 0) begin failures++; $display("%0d noise-free words misdetected", n_clean_err); end
    $display("words %0d, full-rate gaps %0d, stall cycles %0d, reloads %0d, noise-free words %0d",
             n_words, n_full_rate, n_stall, n_reload, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
