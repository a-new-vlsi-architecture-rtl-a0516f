// tb_in_perm: checks the input permutation (N = 7, g = 3). For random x_a
// banks the operand stream must be, in the cycles after the capture pulse,
// (starting two cycles after the pulse) A(l) = x_a(e(l)) + x_a(7-e(l)) and B(l) = x_a(e(l)) - x_a(7-e(l)) for
// l = 2,1,0,2,1 (l = (M-1-c) mod M), with tags j = 0,1,2 on the last three and
// x_a(0) issued with tag 0. e(l) is computed here from the powers of 3.
// Captures are spaced N cycles apart (back-to-back rows) and further apart.
module tb_in_perm;
  localparam int N = 7, G = 3, XW = 11, DW = XW + 1;
  localparam int M = (N - 1) / 2;
  localparam int ROWS = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0] xa [N];
  logic xa_valid = 1'b0;
  logic signed [DW-1:0] a_out, b_out;
  logic tv_out;
  logic [1:0] tj_out;
  logic signed [XW-1:0] xa0_out;
  logic xa0_valid;
  int checks = 0, failures = 0;
  int bank [N];

  always #5 clk = ~clk;

  in_perm #(.N(N), .G(G), .XW(XW)) dut (.*);

  function automatic int e_of(int p);
    int r;
    r = 1;
    for (int i = 0; i < p; i++) r = (r * G) % N;
    return (r % 2 == 0) ? r : N - r;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) xa[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++) begin
      int idle;
      for (int i = 0; i < N; i++) begin
        bank[i] = int'($urandom_range(2047)) - 1024;
        xa[i]   = XW'(bank[i]);
      end
      @(negedge clk);
      xa_valid = 1'b1;
      @(negedge clk);
      xa_valid = 1'b0;
      @(negedge clk);
      // scramble the input bank: the block must have captured it
      for (int i = 0; i < N; i++) xa[i] = XW'($urandom);
      for (int c = 0; c < 2 * M - 1; c++) begin
        int l;
        l = (M - 1 - c + M) % M;
        expect_eq("A", int'(a_out), bank[e_of(l)] + bank[N - e_of(l)]);
        expect_eq("B", int'(b_out), bank[e_of(l)] - bank[N - e_of(l)]);
        expect_eq("tv", int'(tv_out), (c >= M - 1) ? 1 : 0);
        if (c >= M - 1) expect_eq("tj", int'(tj_out), c - (M - 1));
        expect_eq("xa0v", int'(xa0_valid), (c == M - 1) ? 1 : 0);
        if (c == M - 1) expect_eq("xa0", int'(xa0_out), bank[0]);
        @(negedge clk);
      end
      expect_eq("tv idle", int'(tv_out), 0);
      idle = (r % 2 == 0) ? 0 : int'($urandom_range(5));
      repeat (idle) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
