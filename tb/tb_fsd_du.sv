// tb_fsd_du: checks the demapper's Gray mapping for every 16-QAM point at
// every level, then for random symbol vectors, against a table-based model,
// and checks its one-cycle latency.
module tb_fsd_du;
  import fsd_pkg::*;
  import fsd_tb_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic             in_valid, out_valid;
  sym_t  [M-1:0]    in_sym;
  logic [M*BPS-1:0] out_bits;
  int               checks = 0, failures = 0;

  fsd_du dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_bits);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [M*BPS-1:0] bits; int t; } exp_t;
  exp_t eq [$];
  int   cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      exp_t x;
      int   s [M];
      for (int i = 0; i < M; i++) s[i] = int'(in_sym[i]);
      x.bits = bits_ref(s);
      x.t = cyc;
      eq.push_back(x);
    end
    if (rst_n && out_valid) begin
      exp_t x;
      checks += 2;
      if (eq.size() == 0) begin
        failures += 2;
      end else begin
        x = eq.pop_front();
        if (out_bits !== x.bits) begin failures++; $display("bits %h expected %h", out_bits, x.bits); end
        if (cyc - x.t != 1) begin failures++; $display("latency %0d", cyc - x.t); end
      end
    end
  end

  initial begin
    in_valid = 0;
    in_sym = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Point p at level i.
    for (int i = 0; i < M; i++)
      for (int p = 0; p < P; p++) begin
        @(negedge clk);
        in_valid = 1;
        in_sym = '0;
        in_sym[i] = sym_t'(p);
      end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_sym = (M*BPS)'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    // Spot check of the 16-QAM code itself (only when P = 16):
    // -3-3j, -1+1j, +1+3j, +3-1j at levels 1..4.
    if (P == 16) begin
      @(negedge clk);
      in_valid = 1;
      in_sym = {sym_t'(4'b1101), sym_t'(4'b1011), sym_t'(4'b0110), sym_t'(4'b0000)};
      @(negedge clk);
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (out_bits !== 16'b1001_1110_0111_0000) begin failures++; $display("spot check %b", out_bits); end
    end
    checks++;
    if (eq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
