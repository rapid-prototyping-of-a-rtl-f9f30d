// tb_fsd_cmult: checks the complex multiplier against integer arithmetic,
// including a hand-worked product and saturation, and checks its latency by
// streaming a new operand pair every cycle. Both structures are run on the
// same operands: the four-multiplier form (latency 2) and the
// three-multiplier form (latency 3), which must give identical bits.
module tb_fsd_cmult;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  logic  clk = 0;
  cplx_t a, b, p, p3;
  int    checks = 0, failures = 0;

  fsd_cmult dut (.clk, .a, .b, .p);
  fsd_cmult #(.MULT3(1'b1)) dut3 (.clk, .a, .b, .p(p3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t exp_q [$], exp3_q [$];
  initial begin
    cplx_t e;
    // (1 + 2j)(3 + 4j) = -5 + 10j, then (0.5 - 0.25j)(-2 + 1j) = -0.75 + 1j,
    // then (120 + 120j)(15 - 15j) = 3600, saturated to just below 128.
    // Both operands and the product have 8 fractional bits.
    cplx_t fa [3], fb [3], fe [3];
    fa[0] = mk(256, 512);     fb[0] = mk(768, 1024);   fe[0] = mk(-1280, 2560);
    fa[1] = mk(128, -64);     fb[1] = mk(-512, 256);   fe[1] = mk(-192, 256);
    fa[2] = mk(30720, 30720); fb[2] = mk(3840, -3840);   fe[2] = mk(32767, 0);
    for (int n = 0; n < 1003; n++) begin
      @(negedge clk);
      if (n < 3) begin
        a = fa[n]; b = fb[n]; e = fe[n];
      end else begin
        a = cplx_t'($urandom); b = cplx_t'($urandom);
        e = cmul_ref(a, b);
      end
      exp_q.push_back(e);
      exp3_q.push_back(e);
    end
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operands set after edge k are registered at edge k+1 and appear at the
  // output after edge k+2: the first pair, set after edge 1, shows at edge 3.
  int edges = 0;
  always @(posedge clk) begin
    edges++;
    #1;
    if (edges >= 3 && exp_q.size() > 0) begin
      cplx_t e;
      e = exp_q.pop_front();
      checks++;
      if (p !== e) begin
        failures++;
        if (failures < 10) $display("mismatch: got (%0d,%0d) expected (%0d,%0d)", p.re, p.im, e.re, e.im);
      end
    end
    // The three-multiplier form is one edge later.
    if (edges >= 4 && exp3_q.size() > 0) begin
      cplx_t e;
      e = exp3_q.pop_front();
      checks++;
      if (p3 !== e) begin
        failures++;
        if (failures < 10) $display("3-mult mismatch: got (%0d,%0d) expected (%0d,%0d)", p3.re, p3.im, e.re, e.im);
      end
    end
  end
endmodule
