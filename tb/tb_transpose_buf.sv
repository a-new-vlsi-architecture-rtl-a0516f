// tb_transpose_buf: checks the transposition memory (N = 7). Blocks of N*N
// random values are written in row-major order, first back to back, then
// with random idle cycles. Each block must come out in column-major order,
// as one gapless burst starting two cycles after the cycle that presents the
// block's last value, and both banks must be used.
module tb_transpose_buf;
  localparam int N = 7, W = 11;
  localparam int BLOCKS = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic out_valid;
  logic signed [W-1:0] out_data;
  logic bank_swap;
  int checks = 0, failures = 0;
  int blk [BLOCKS][N][N];
  longint cyc = 0, last_in [BLOCKS], first_out [BLOCKS], prev_out = -1;
  int ob = 0, on = 0, swaps_bank [2] = '{0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  transpose_buf #(.N(N), .W(W)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && bank_swap) swaps_bank[dut.rd_bank]++;
    if (rst_n && out_valid) begin
      int r, c;
      c = on / N;
      r = on % N;
      checks++;
      if (int'(out_data) != blk[ob][r][c]) begin
        failures++;
        $display("FAIL block %0d (%0d,%0d): %0d vs %0d", ob, r, c, out_data, blk[ob][r][c]);
      end
      if (on == 0) first_out[ob] = cyc;
      else if (cyc != prev_out + 1) begin
        failures++;
        $display("FAIL: gap in block %0d", ob);
      end
      prev_out = cyc;
      if (on == N * N - 1) begin
        on = 0;
        ob++;
      end else on++;
    end
  end

  initial begin
    for (int b = 0; b < BLOCKS; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) blk[b][r][c] = int'($urandom_range(2047)) - 1024;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < BLOCKS; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (b >= BLOCKS / 2)
            repeat ($urandom_range(1)) begin
              in_valid <= 1'b0;
              @(posedge clk);
            end
          in_valid <= 1'b1;
          in_data  <= W'(blk[b][r][c]);
          if (r == N - 1 && c == N - 1) last_in[b] = cyc + 1;
          @(posedge clk);
        end
    in_valid <= 1'b0;
    repeat (N * N + 5) @(posedge clk);
    checks++;
    if (ob != BLOCKS) begin
      failures++;
      $display("FAIL: %0d blocks", ob);
    end
    for (int b = 0; b < ob; b++) begin
      checks++;
      if (first_out[b] - last_in[b] != 2) begin
        failures++;
        $display("FAIL latency block %0d: %0d", b, first_out[b] - last_in[b]);
      end
    end
    checks++;
    if (swaps_bank[0] == 0 || swaps_bank[1] == 0) begin
      failures++;
      $display("FAIL: bank use %0d/%0d", swaps_bank[0], swaps_bank[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
