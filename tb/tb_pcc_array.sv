// tb_pcc_array: checks the merged systolic array (N = 7, g = 3, M = 3 PEs)
// bit-exactly. For each row the testbench draws a random auxiliary sequence
// x_a(1..N-1), forms the operands A(l), B(l) with its own index map
// e(l) = even one of {3^l mod 7, 7 - 3^l mod 7}, issues them in the array's
// schedule and compares every result with the direct sum
//   T(k) = sum_{i=1}^{N-1} (-1)^i x_a(i) round(sin(i k pi / N) 2^F),
// which does not use the folding, the index maps or the sign tables of the
// design. Rows are issued with period N (as in the 1-D DST) and with the
// minimum period 2M-1; the result of tag j must leave M+1 cycles after it
// enters.
module tb_pcc_array;
  localparam int N = 7, G = 3, F = 12, XW = 11, DW = 12, TW = 28;
  localparam int M = (N - 1) / 2;
  localparam int ROWS = 40;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] a_in = '0, b_in = '0;
  logic tv_in = 1'b0;
  logic [1:0] tj_in = '0;
  logic signed [TW-1:0] txi, tzeta;
  logic tv_out;
  logic [1:0] tj_out;
  int checks = 0, failures = 0;
  int xa [ROWS][N];
  longint cyc = 0, tag_in_cyc [ROWS][M];
  int out_row = 0, fast_rows = 0, slow_rows = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pcc_array #(.N(N), .G(G), .F(F), .DW(DW), .TW(TW)) dut (
    .clk, .rst_n, .a_in, .b_in, .tv_in, .tj_in, .txi, .tzeta, .tv_out, .tj_out
  );

  function automatic int e_of(int p);
    int r;
    r = 1;
    for (int i = 0; i < p; i++) r = (r * G) % N;
    return (r % 2 == 0) ? r : N - r;
  endfunction

  function automatic longint q(real v);
    real r;
    r = v * (2.0 ** F);
    return (r >= 0.0) ? longint'($floor(r + 0.5)) : -longint'($floor(-r + 0.5));
  endfunction

  function automatic longint t_ref(int r, int k);
    longint s;
    s = 0;
    for (int i = 1; i < N; i++)
      s += ((i % 2 == 0) ? 1 : -1) * longint'(xa[r][i]) * q($sin(PI * i * k / N));
    return s;
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && tv_out) begin
      int j;
      j = int'(tj_out);
      checks += 3;
      if (txi != TW'(t_ref(out_row, e_of(j)))) begin
        failures++;
        $display("FAIL row %0d j %0d T(%0d): %0d vs %0d", out_row, j, e_of(j), txi, t_ref(out_row, e_of(j)));
      end
      if (tzeta != TW'(t_ref(out_row, N - e_of(j)))) begin
        failures++;
        $display("FAIL row %0d j %0d T(%0d): %0d vs %0d", out_row, j, N - e_of(j), tzeta, t_ref(out_row, N - e_of(j)));
      end
      if (cyc - tag_in_cyc[out_row][j] != M + 1) begin
        failures++;
        $display("FAIL latency row %0d j %0d: %0d", out_row, j, cyc - tag_in_cyc[out_row][j]);
      end
      if (j == M - 1) out_row++;
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N; i++)
        xa[r][i] = (r == 0) ? ((i % 2 == 0) ? 1023 : -1024) : int'($urandom_range(2047)) - 1024;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++) begin
      int period;
      period = (r < ROWS / 2) ? N : 2 * M - 1;
      if (r < ROWS / 2) slow_rows++; else fast_rows++;
      for (int c = 0; c < period; c++) begin
        if (c < 2 * M - 1) begin
          int l, ep, en;
          l  = (M - 1 - c + M) % M;
          ep = e_of(l);
          en = N - ep;
          a_in  <= DW'(xa[r][ep] + xa[r][en]);
          b_in  <= DW'(xa[r][ep] - xa[r][en]);
          tv_in <= (c >= M - 1);
          tj_in <= 2'(c - (M - 1));
          if (c >= M - 1) tag_in_cyc[r][c - (M - 1)] = cyc + 1;  // presented in the next cycle
        end else begin
          a_in  <= DW'($urandom);
          b_in  <= DW'($urandom);
          tv_in <= 1'b0;
        end
        @(posedge clk);
      end
    end
    tv_in <= 1'b0;
    repeat (2 * M + 4) @(posedge clk);
    checks++;
    if (out_row != ROWS) begin
      failures++;
      $display("FAIL: %0d rows out", out_row);
    end
    $display("rows at period N: %0d, at period 2M-1: %0d", slow_rows, fast_rows);
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
