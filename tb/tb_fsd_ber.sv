// tb_fsd_ber: Monte Carlo bit-error test of the whole decoder against
// exhaustive maximum-likelihood detection.
//
// For two signal-to-noise ratios (SNR per receive antenna 14 dB and 20 dB)
// the testbench sends FRAMES random channels of 16 vectors each through
// fsd_top at its default parameters. Every detected word must match the
// bit-accurate model. In addition the testbench runs a floating-point
// maximum-likelihood detector (all 16^4 vectors) on the same quantised r and
// counts bit errors of both against the transmitted bits. The fixed search
// visits only 16 of the 65536 vectors, so it is close to ML but not equal:
// at 20 dB it makes roughly twice the ML bit errors. The check allows at
// most 3 x the ML bit errors plus 16, and requires the decoder to agree
// with the ML vector on at least 90% of the vectors.
//
// A second decoder with three-multiplier complex multipliers (MULT3 = 1)
// decodes the same vectors with the same coefficients. It must return the
// same words as the default decoder, each exactly 4 cycles later (one more
// cycle in the ZFU and in each of the three lower PDU levels).
//
// A third decoder in the smallest configuration (three-multiplier complex
// multipliers and the Manhattan metric, MULT3 = MANHATTAN = 1) decodes the
// same vectors with its own coefficients (u_ii instead of u_ii^2). Its words
// must match the model with the Manhattan metric, and it may make at most
// 2 x the bit errors of the Euclidean decoder plus 16.
module tb_fsd_ber;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  localparam int FRAMES = 50;
  localparam int KCH    = 16;

  logic             clk = 0, rst_n = 0;
  logic             cfg_we;
  logic [5:0]       cfg_addr;
  logic [2*W-1:0]   cfg_wdata;
  logic             rx_valid, rx_ready, tx_valid, tx_ready, busy, stall;
  cvec_t            rx_r;
  logic [M*BPS-1:0] tx_bits;
  int               checks = 0, failures = 0;

  fsd_top dut (.*);

  logic             rx_valid_m, rx_ready_m, tx_valid_m, busy_m, stall_m;
  logic [2*W-1:0]   cfg_wdata_m;
  logic [M*BPS-1:0] tx_bits_m;
  assign rx_valid_m = rx_valid && rx_ready;
  logic             rx_ready_3, tx_valid_3, busy_3, stall_3;
  logic [M*BPS-1:0] tx_bits_3;
  fsd_top #(.MULT3(1'b1)) dut_3 (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .rx_valid(rx_valid_m), .rx_ready(rx_ready_3), .rx_r,
    .tx_valid(tx_valid_3), .tx_ready(1'b1), .tx_bits(tx_bits_3),
    .busy(busy_3), .stall(stall_3)
  );

  fsd_top #(.MULT3(1'b1), .MANHATTAN(1'b1)) dut_m (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata(cfg_wdata_m),
    .rx_valid(rx_valid_m), .rx_ready(rx_ready_m), .rx_r,
    .tx_valid(tx_valid_m), .tx_ready(1'b1), .tx_bits(tx_bits_m),
    .busy(busy_m), .stall(stall_m)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [M*BPS-1:0] model, tx, ml, man; } exp_t;
  exp_t eq [$], eqm [$];
  typedef struct { logic [M*BPS-1:0] bits; int t; } out_t;
  out_t o3q [$];
  int   cyc = 0, words_3 = 0;
  real  snr_db [2] = '{14.0, 20.0};
  int   err_fsd = 0, err_ml = 0, agree = 0, words = 0, err_man = 0, words_m = 0;

  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      exp_t x;
      checks++;
      if (eq.size() == 0) begin
        failures++;
      end else begin
        x = eq.pop_front();
        words++;
        if (tx_bits !== x.model) begin
          failures++;
          $display("word %h, model %h", tx_bits, x.model);
        end
        err_fsd += $countones(tx_bits ^ x.tx);
        err_ml  += $countones(x.ml ^ x.tx);
        if (tx_bits === x.ml) agree++;
      end
    end
  end

  // Default decoder's words with their cycle, for the MULT3 decoder.
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_valid && tx_ready) o3q.push_back('{tx_bits, cyc});
    if (rst_n && rx_valid_m && !rx_ready_3) begin
      checks++;
      failures++;
      $display("MULT3 decoder refused a vector");
    end
    if (rst_n && tx_valid_3) begin
      out_t o;
      checks++;
      words_3++;
      // The default decoder's word left 4 cycles earlier and waits in o3q.
      if (o3q.size() == 0) begin
        failures++;
        $display("MULT3 decoder: word with no partner");
      end else begin
        o = o3q.pop_front();
        if (tx_bits_3 !== o.bits || cyc - o.t != 4) begin
          failures++;
          $display("MULT3 decoder: word %h after %0d cycles, default %h", tx_bits_3, cyc - o.t, o.bits);
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && rx_valid_m && !rx_ready_m) begin
      checks++;
      failures++;
      $display("Manhattan decoder refused a vector");
    end
    if (rst_n && tx_valid_m) begin
      exp_t x;
      checks++;
      if (eqm.size() == 0) begin
        failures++;
      end else begin
        x = eqm.pop_front();
        words_m++;
        if (tx_bits_m !== x.man) begin
          failures++;
          $display("Manhattan word %h, model %h", tx_bits_m, x.man);
        end
        err_man += $countones(tx_bits_m ^ x.tx);
      end
    end
  end

  // Exhaustive ML over the 16^4 points, r and H in floating point, using the
  // model r = H x / RSCALE in the ordered column order.
  function automatic void ml_detect(input cmat_t h, input int order [M], input cvec_t r,
                                    output int best [M]);
    real col_re [M][P][M], col_im [M][P][M];   // [level][point][row]
    real bmet;
    bmet = -1.0;
    for (int i = 0; i < M; i++)
      for (int p = 0; p < P; p++)
        for (int row = 0; row < M; row++) begin
          real xr, xi;
          xr = real'(2*((p >> 2) & 3) - 3);
          xi = real'(2*(p & 3) - 3);
          col_re[i][p][row] = (h[row][order[i]].re * xr - h[row][order[i]].im * xi) / RSCALE;
          col_im[i][p][row] = (h[row][order[i]].re * xi + h[row][order[i]].im * xr) / RSCALE;
        end
    for (int a = 0; a < P; a++)
      for (int b = 0; b < P; b++)
        for (int c = 0; c < P; c++) begin
          real pr [M], pim [M];
          for (int row = 0; row < M; row++) begin
            pr[row]  = real'(r[row].re) / real'(1 << FRAC) - col_re[3][a][row] - col_re[2][b][row] - col_re[1][c][row];
            pim[row] = real'(r[row].im) / real'(1 << FRAC) - col_im[3][a][row] - col_im[2][b][row] - col_im[1][c][row];
          end
          for (int d = 0; d < P; d++) begin
            real met;
            met = 0.0;
            for (int row = 0; row < M; row++)
              met += (pr[row] - col_re[0][d][row])**2 + (pim[row] - col_im[0][d][row])**2;
            if (bmet < 0.0 || met < bmet) begin
              bmet = met;
              best[3] = a; best[2] = b; best[1] = c; best[0] = d;
            end
          end
        end
  endfunction

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cfg_wdata_m = 0;
    rx_valid = 0; rx_r = '0; tx_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      // Signal power per receive antenna: E|h x|^2 / RSCALE^2 = 4*10/16 = 2.5.
      real sigma;
      sigma = $sqrt(2.5 / (2.0 * (10.0 ** (snr_db[s] / 10.0))));
      err_fsd = 0; err_ml = 0; agree = 0; words = 0; err_man = 0; words_m = 0; words_3 = 0;
      for (int f = 0; f < FRAMES; f++) begin
        cmat_t h;
        int    order [M];
        coef_t cf, cfm;
        void'(make_channel(h, order, cf));
        cfm = l1_coef(cf);
        while (busy || busy_m || busy_3) @(negedge clk);
        for (int a = 0; a < 36; a++) begin
          @(negedge clk);
          cfg_we = 1;
          cfg_addr = 6'(a);
          if (a < 16)      cfg_wdata = cf.hpinv[a/4][a%4];
          else if (a < 32) cfg_wdata = cf.ratio[(a-16)/4][(a-16)%4];
          else             cfg_wdata = {16'h0, cf.uii2[a-32]};
          if (a < 32)      cfg_wdata_m = cfg_wdata;
          else             cfg_wdata_m = {16'h0, cfm.uii2[a-32]};
        end
        @(negedge clk);
        cfg_we = 0;
        for (int k = 0; k < KCH; k++) begin
          int    sym [M], best [M], mlb [M], bestm [M];
          exp_t  x;
          cvec_t r;
          for (int i = 0; i < M; i++) sym[i] = $urandom_range(0, P - 1);
          r = make_rx(h, order, sym, sigma);
          void'(fsd_ref(zfu_ref(cf.hpinv, r), cf, best));
          ml_detect(h, order, r, mlb);
          x.model = bits_ref(best);
          x.tx    = bits_ref(sym);
          x.ml    = bits_ref(mlb);
          void'(fsd_ref(zfu_ref(cf.hpinv, r), cfm, bestm, 1'b1));
          x.man   = bits_ref(bestm);
          eq.push_back(x);
          eqm.push_back(x);
          @(negedge clk);
          rx_valid = 1;
          rx_r = r;
          @(posedge clk);
          while (!rx_ready) @(posedge clk);
        end
        @(negedge clk);
        rx_valid = 0;
      end
      while (busy || tx_valid || eq.size() != 0 || busy_m || eqm.size() != 0 || busy_3) @(negedge clk);
      $display("SNR %0.1f dB: %0d words, bit errors FSD %0d, ML %0d (of %0d bits), FSD = ML on %0d words",
               snr_db[s], words, err_fsd, err_ml, words * M * BPS, agree);
      $display("SNR %0.1f dB: Manhattan-metric decoder, %0d words, %0d bit errors; MULT3 decoder %0d words",
               snr_db[s], words_m, err_man, words_3);
      checks += 4;
      if (o3q.size() != 0) begin
        failures++;
        $display("MULT3 decoder: %0d words missing", o3q.size());
      end
      if (real'(err_man) > 2.0 * real'(err_fsd) + 16.0) begin
        failures++;
        $display("Manhattan-metric bit errors too far above the Euclidean decoder");
      end
      if (real'(err_fsd) > 3.0 * real'(err_ml) + 16.0) begin
        failures++;
        $display("FSD bit errors too far above ML");
      end
      if (agree * 10 < words * 9) begin
        failures++;
        $display("FSD and ML agree on too few vectors");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
