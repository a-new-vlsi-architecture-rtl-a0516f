// tb_aux_seq_gen: checks the auxiliary-sequence generator (N = 7, 8-bit
// input). Rows are sent back to back and with random idle cycles; at each
// xa_valid pulse the whole output bank is compared with the alternating
// suffix sums x_a(i) = sum_{m>=i} (-1)^m x(m) computed by the testbench, and
// the pulse must be presented N+1 cycles after the cycle that presents the
// row's last sample.
module tb_aux_seq_gen;
  localparam int N = 7, IW = 8, XW = IW + $clog2(N);
  localparam int ROWS = 50;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IW-1:0] in_data = '0;
  logic signed [XW-1:0] xa [N];
  logic xa_valid;
  int checks = 0, failures = 0;
  int x [ROWS][N];
  longint cyc = 0, last_cyc [ROWS];
  int out_row = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  aux_seq_gen #(.N(N), .IW(IW)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && xa_valid) begin
      int s;
      s = 0;
      for (int i = N - 1; i >= 0; i--) begin
        s += (i % 2 == 0) ? x[out_row][i] : -x[out_row][i];
        checks++;
        if (int'(xa[i]) != s) begin
          failures++;
          $display("FAIL row %0d x_a(%0d) = %0d, expected %0d", out_row, i, xa[i], s);
        end
      end
      checks++;
      if (cyc - last_cyc[out_row] != N + 1) begin
        failures++;
        $display("FAIL timing row %0d: %0d", out_row, cyc - last_cyc[out_row]);
      end
      out_row++;
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N; i++)
        x[r][i] = (r == 0) ? ((i % 2 == 0) ? 127 : -128) : int'($urandom_range(255)) - 128;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N; i++) begin
        if (r >= ROWS / 2)
          repeat ($urandom_range(2)) begin
            in_valid <= 1'b0;
            @(posedge clk);
          end
        in_valid <= 1'b1;
        in_data  <= IW'(x[r][i]);
        if (i == N - 1) last_cyc[r] = cyc + 1;
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (2 * N) @(posedge clk);
    checks++;
    if (out_row != ROWS) begin
      failures++;
      $display("FAIL: %0d rows", out_row);
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
