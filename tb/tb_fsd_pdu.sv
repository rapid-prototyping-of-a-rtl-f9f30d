// tb_fsd_pdu: checks the partial distance units of all four levels, chained
// as in one decoder lane (level 4 -> 3 -> 2 -> 1), against the integer model
// of the equations for z_i, the nearest point, d_i and D_i. A random estimate
// and candidate enter every cycle; after each level the chosen symbol, the
// difference s_i - s_hat_i and the accumulated distance are compared, and so
// is the latency of each level (3 cycles at level 4, 5 below).
module tb_fsd_pdu;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  coef_t       cf;
  logic  [M:0] v;
  path_t [M:0] p;
  sym_t        cand;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = M; i >= 1; i--) begin : g_lvl
    fsd_pdu #(.LEVEL(i)) dut (
      .clk, .rst_n, .in_valid(v[i]), .in_path(p[i]), .cand,
      .ratio(cf.ratio), .uii2(cf.uii2), .out_valid(v[i-1]), .out_path(p[i-1])
    );
  end

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

  // Expected state after each level, per input, with the input cycle.
  typedef struct {
    int     t0;
    int     sym [M];
    cvec_t  e [M+1];
    longint acc [M+1];
  } exp_t;

  exp_t q [M:0][$];
  int   cyc = 0;
  localparam int LAT [M:1] = '{3, 5, 5, 5};   // index M..1

  always @(posedge clk) begin
    cyc++;
    if (rst_n && v[M]) begin
      exp_t   x;
      cvec_t  e;
      int     sym [M];
      longint acc;
      x.t0 = cyc;
      e = '0;
      sym[M-1] = int'(cand);
      e[M-1] = sub_ref(point_ref(int'(cand)), p[M].shat[M-1]);
      acc = dist_ref(e[M-1], longint'(cf.uii2[M-1]));
      x.e[M] = e; x.acc[M] = acc;
      for (int lvl = M - 1; lvl >= 1; lvl--) begin
        level_ref(lvl, p[M].shat, cf, e, sym, acc);
        x.e[lvl] = e; x.acc[lvl] = acc;
      end
      x.sym = sym;
      for (int lvl = M; lvl >= 1; lvl--) q[lvl].push_back(x);
    end
    for (int lvl = M; lvl >= 1; lvl--) begin
      if (rst_n && v[lvl-1]) begin
        exp_t x;
        int   lat;
        checks += 4;
        if (q[lvl].size() == 0) begin
          failures += 4;
          $display("level %0d: unexpected output", lvl);
        end else begin
          x = q[lvl].pop_front();
          // latency of levels M..lvl
          lat = 0;
          for (int k = M; k >= lvl; k--) lat += LAT[k];
          if (cyc - x.t0 != lat) begin
            failures++;
            $display("level %0d: latency %0d expected %0d", lvl, cyc - x.t0, lat);
          end
          if (int'(p[lvl-1].sym[lvl-1]) != x.sym[lvl-1]) begin
            failures++;
            if (failures < 20) $display("level %0d: symbol %0d expected %0d", lvl, p[lvl-1].sym[lvl-1], x.sym[lvl-1]);
          end
          if (p[lvl-1].e[lvl-1] !== x.e[lvl][lvl-1]) begin
            failures++;
            if (failures < 20) $display("level %0d: e mismatch", lvl);
          end
          if (longint'(p[lvl-1].acc) != x.acc[lvl]) begin
            failures++;
            if (failures < 20) $display("level %0d: D %0d expected %0d", lvl, p[lvl-1].acc, x.acc[lvl]);
          end
        end
      end
    end
  end

  initial begin
    v[M] = 0;
    p[M] = '0;
    cand = '0;
    cf = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 8; frame++) begin
      // Coefficients: ratios within +-2, u_ii^2 in 0.5 .. 8.
      for (int i = 0; i < M; i++) begin
        for (int j = i + 1; j < M; j++) cf.ratio[i][j] = rnd(13);
        cf.uii2[i] = ufx_t'($urandom_range(1024, 16384));
      end
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        v[M] = ($urandom_range(0, 3) != 0);
        p[M] = '0;
        for (int i = 0; i < M; i++)
          p[M].shat[i] = (frame == 7) ? rnd(16) : rnd(14);  // last frame saturates
        cand = sym_t'($urandom);
      end
      @(negedge clk);
      v[M] = 0;
      repeat (25) @(negedge clk);
    end
    checks++;
    if (q[1].size() != 0) begin
      failures++;
      $display("%0d paths missing", q[1].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
