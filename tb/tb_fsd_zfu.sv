// tb_fsd_zfu: checks s_hat = H_pinv r of the zero-forcing unit against the
// integer model for random matrices and vectors, with back-to-back and gapped
// input. Also checks the timing: with input always valid, a vector is
// accepted every M = 4 cycles, and each estimate appears seven cycles after
// its vector was accepted.
module tb_fsd_zfu;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  logic                 clk = 0, rst_n = 0;
  logic                 in_valid, in_ready, out_valid;
  cvec_t                r, shat;
  cplx_t [M-1:0][M-1:0] hpinv;
  int                   checks = 0, failures = 0;

  fsd_zfu dut (.clk, .rst_n, .in_valid, .in_ready, .r, .hpinv, .out_valid, .shat);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rnd(input int range_bits);
    return mk($signed($urandom) >>> (32 - range_bits), $signed($urandom) >>> (32 - range_bits));
  endfunction

  cvec_t exp_q [$];
  int    acc_t [$];
  int    cyc = 0;
  int    last_acc = -1;
  bit    gaps = 0;

  always @(posedge clk) cyc++;

  // Check and record on each edge.
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      exp_q.push_back(zfu_ref(hpinv, r));
      acc_t.push_back(cyc);
      if (!gaps && last_acc >= 0) begin
        checks++;
        if (cyc - last_acc != M) begin
          failures++;
          $display("accept spacing %0d, expected %0d", cyc - last_acc, M);
        end
      end
      last_acc = cyc;
    end
    if (rst_n && out_valid) begin
      cvec_t e;
      int    t0;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("unexpected output");
      end else begin
        e  = exp_q.pop_front();
        t0 = acc_t.pop_front();
        if (shat !== e) begin
          failures++;
          if (failures < 10) $display("s_hat mismatch");
        end
        if (cyc - t0 != 7) begin
          failures++;
          $display("latency %0d, expected 7", cyc - t0);
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    r = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) hpinv[i][j] = rnd(17);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Back-to-back: in_valid held high.
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int j = 0; j < M; j++) r[j] = rnd(16);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    gaps = 1;
    repeat (12) @(negedge clk);
    // New matrix, random gaps.
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) hpinv[i][j] = rnd(14);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      for (int j = 0; j < M; j++) r[j] = rnd(16);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d estimates missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
