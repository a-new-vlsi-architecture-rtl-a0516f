// tb_pcc_pe: checks one processing element (N = 7, g = 3, PE 1) with random
// operands, partial sums and tags. Expected values are computed by the
// testbench: the constant is round(sin(e(1) pi/7) 2^12) and the sign of the
// term for output j is the sign of sin(pi e(l) e(j) / 7), l = (1-j) mod 3,
// evaluated in floating point, with e(p) the even one of {3^p mod 7, 7 - 3^p mod 7}.
// The sum leaving in a cycle must hold the product of the operand presented
// one cycle before the sum (registered table read). Also checks the two-cycle
// operand delay and one-cycle sum/tag delay.
module tb_pcc_pe;
  localparam int N = 7, G = 3, P = 1, F = 12, DW = 12, TW = 28;
  localparam int M = (N - 1) / 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] a_in = '0, b_in = '0, a_out, b_out;
  logic signed [TW-1:0] ta_in = '0, tb_in = '0, ta_out, tb_out;
  logic tv_in = 1'b0, tv_out;
  logic [1:0] tj_in = '0, tj_out;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;

  always #5 clk = ~clk;

  pcc_pe #(.N(N), .G(G), .P(P), .F(F), .DW(DW), .TW(TW)) dut (.*);

  function automatic int e_of(int p);
    int r;
    r = 1;
    for (int i = 0; i < p; i++) r = (r * G) % N;
    return (r % 2 == 0) ? r : N - r;
  endfunction

  function automatic longint cst();
    return longint'($floor($sin(PI * e_of(P) / N) * 4096.0 + 0.5));
  endfunction

  initial begin
    longint a_h [$], b_h [$];
    longint exp_ta, exp_tb, c, prev_a, prev_b;
    int j, l, s;
    c = cst();
    prev_a = 0;
    prev_b = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check outputs from the previous edge
      if (t >= 3) begin
        checks += 4;
        if (a_out != a_h[0] || b_out != b_h[0]) begin
          failures++;
          $display("FAIL operand delay at %0d", t);
        end
        if (ta_out != exp_ta) begin failures++; $display("FAIL ta %0d %0d", ta_out, exp_ta); end
        if (tb_out != exp_tb) begin failures++; $display("FAIL tb %0d %0d", tb_out, exp_tb); end
        if (tv_out != 1'b1 || int'(tj_out) != j) begin failures++; $display("FAIL tag"); end
      end
      if (a_h.size() > 1) begin
        void'(a_h.pop_front());
        void'(b_h.pop_front());
      end
      // new inputs
      a_in  = DW'($urandom);
      b_in  = DW'($urandom);
      ta_in = TW'(int'($urandom_range(2000000)) - 1000000);
      tb_in = TW'(int'($urandom_range(2000000)) - 1000000);
      j     = int'($urandom_range(M - 1));
      tv_in = 1'b1;
      tj_in = 2'(j);
      l     = (P - j + M) % M;
      s     = ($sin(PI * e_of(l) * e_of(j) / N) < 0.0) ? -1 : 1;
      if (s < 0) n_neg++; else n_pos++;
      // the sum receives the product of the operand of the previous cycle
      exp_ta = longint'(ta_in) + s * c * prev_a;
      exp_tb = longint'(tb_in) - s * c * prev_b;
      prev_a = longint'(a_in);
      prev_b = longint'(b_in);
      a_h.push_back(longint'(a_in));
      b_h.push_back(longint'(b_in));
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL: both signs not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
