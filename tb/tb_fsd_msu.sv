// tb_fsd_msu: feeds the minimum search unit with vectors of P = 16 paths,
// LANES per cycle over C cycles, back to back and with idle cycles between
// vectors. Distances are random, often drawn from a narrow range so that ties
// occur. The winner must be the smallest distance, the lowest path index
// among equals, and must appear two cycles after the vector's last slot.
module tb_fsd_msu;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic             in_valid, out_valid;
  path_t [LANES-1:0] in_path;
  sym_t  [M-1:0]    out_sym;
  metric_t          out_acc;
  int               checks = 0, failures = 0;

  fsd_msu dut (.clk, .rst_n, .in_valid, .in_path, .out_valid, .out_sym, .out_acc);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { sym_t [M-1:0] sym; metric_t acc; int t_last; } exp_t;
  exp_t eq [$];
  int   cyc = 0;
  int   ties = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      exp_t x;
      checks += 3;
      if (eq.size() == 0) begin
        failures += 3;
        $display("unexpected output");
      end else begin
        x = eq.pop_front();
        if (out_acc != x.acc) begin failures++; $display("acc %0d expected %0d", out_acc, x.acc); end
        if (out_sym != x.sym) begin failures++; $display("winner symbols differ"); end
        if (cyc - x.t_last != 2) begin failures++; $display("latency %0d", cyc - x.t_last); end
      end
    end
  end

  initial begin
    in_valid = 0;
    in_path = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      path_t all [P];
      exp_t  x;
      int    nmin;
      bit    narrow;
      narrow = ($urandom_range(0, 1) == 1);
      for (int k = 0; k < P; k++) begin
        all[k] = path_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                          $urandom, $urandom, $urandom, $urandom});
        all[k].acc = narrow ? metric_t'($urandom_range(0, 5)) : metric_t'($urandom);
      end
      x.acc = all[0].acc;
      x.sym = all[0].sym;
      nmin = 1;
      for (int k = 1; k < P; k++) begin
        if (all[k].acc < x.acc) begin x.acc = all[k].acc; x.sym = all[k].sym; nmin = 1; end
        else if (all[k].acc == x.acc) nmin++;
      end
      if (nmin > 1) ties++;
      for (int s = 0; s < C; s++) begin
        @(negedge clk);
        in_valid = 1;
        for (int l = 0; l < LANES; l++) begin
          in_path[l] = all[s*LANES + l];
          in_path[l].slot = ($clog2(C))'(s);
          in_path[l].last = (s == C - 1);
        end
        if (s == C - 1) begin
          x.t_last = cyc + 1;
          eq.push_back(x);
        end
      end
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        in_valid = 0;
        in_path = path_t [LANES-1:0]'({$urandom, $urandom});
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (eq.size() != 0) begin failures++; $display("%0d results missing", eq.size()); end
    if (ties == 0) begin failures++; $display("no ties exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
