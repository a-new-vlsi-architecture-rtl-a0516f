// tb_dst1d: self-checking testbench of the 1-D prime-length DST.
//
// Random rows (full-scale extremes included) are sent both back to back and
// with idle cycles in between. Each result is compared with the transform
// evaluated in double precision from its definition, with a tolerance that
// bounds the coefficient quantisation (F fractional bits) plus output
// rounding: 0.5 + 2^-(F+1) * (|x_a(0)| + 4 * sum_{i>=1} |x_a(i)|). The
// testbench also checks the result order, the latency from a row's last sample
// to its first result (N + 3M + 4 cycles) and that back-to-back rows give
// back-to-back results (one row per N cycles).
module tb_dst1d;
  localparam int N  = 7;
  localparam int G  = 3;   // primitive root of N
  localparam int M  = (N - 1) / 2;
  localparam int F  = 12;
  localparam int IW = 8;
  localparam int OW = IW + $clog2(N);
  localparam int KW = $clog2(N);
  localparam int ROWS = 60;
  localparam int LATENCY = N + 3 * M + 4;
  localparam real PI = 3.14159265358979323846;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [IW-1:0] in_data = '0;
  logic                 y_valid;
  logic [KW-1:0]        y_idx;
  logic signed [OW-1:0] y_data;

  int checks = 0, failures = 0;
  int rows_x [ROWS][N];
  longint last_in_cyc [ROWS];
  longint first_out_cyc [ROWS];
  longint cyc = 0;
  int out_row = 0, out_k = 0;
  int back_to_back_rows = 0, gap_rows = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dst1d #(.N(N), .G(G), .F(F), .IW(IW)) dut (
    .clk, .rst_n, .in_valid, .in_data, .y_valid, .y_idx, .y_data
  );

  function automatic real kern(int i, int k);
    if (k == 0) return (i % 2 == 0) ? 1.0 : -1.0;
    return $sin((2 * i + 1) * k * PI / (2.0 * N));
  endfunction

  function automatic real tol(int r);
    real xa [N];
    real s;
    s = 0.0;
    for (int i = N - 1; i >= 0; i--) begin
      xa[i] = ((i % 2 == 0) ? rows_x[r][i] : -rows_x[r][i]) + ((i == N - 1) ? 0.0 : xa[i+1]);
    end
    for (int i = 1; i < N; i++) s += (xa[i] < 0.0) ? -xa[i] : xa[i];
    return 0.5 + ((xa[0] < 0.0 ? -xa[0] : xa[0]) + 4.0 * s) / (2.0 ** (F + 1)) + 1e-9;
  endfunction

  // result checker
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      real ref_v, err;
      if (out_row >= ROWS) begin
        failures++;
        $display("FAIL: unexpected extra result");
      end else begin
        ref_v = 0.0;
        for (int i = 0; i < N; i++) ref_v += rows_x[out_row][i] * kern(i, out_k);
        err = y_data - ref_v;
        if (err < 0.0) err = -err;
        checks++;
        if (int'(y_idx) != out_k || err > tol(out_row)) begin
          failures++;
          $display("FAIL row %0d k %0d: idx %0d got %0d ref %f", out_row, out_k, y_idx, y_data, ref_v);
        end
        if (out_k == 0) first_out_cyc[out_row] = cyc;
        if (out_k == N - 1) begin
          out_k = 0;
          out_row++;
        end else out_k++;
      end
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N; i++) begin
        case (r)
          0: rows_x[r][i] = 127;
          1: rows_x[r][i] = -128;
          2: rows_x[r][i] = (i % 2 == 0) ? 127 : -128;
          3: rows_x[r][i] = (i % 2 == 0) ? -128 : 127;
          default: rows_x[r][i] = int'($urandom_range(255)) - 128;
        endcase
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++) begin
      // rows 0..29 back to back; later rows with random gaps
      for (int i = 0; i < N; i++) begin
        if (r >= 30) begin
          int gap;
          gap = int'($urandom_range(3));
          repeat (gap) begin
            in_valid <= 1'b0;
            @(posedge clk);
          end
        end
        in_valid <= 1'b1;
        in_data  <= IW'(rows_x[r][i]);
        @(posedge clk);
        if (i == N - 1) last_in_cyc[r] = cyc;
      end
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 2 * N + 10) @(posedge clk);
    // order and count
    checks++;
    if (out_row != ROWS) begin
      failures++;
      $display("FAIL: %0d rows out of %0d", out_row, ROWS);
    end
    for (int r = 0; r < ROWS && r < out_row; r++) begin
      checks++;
      if (first_out_cyc[r] - last_in_cyc[r] != LATENCY) begin
        failures++;
        $display("FAIL latency row %0d: %0d", r, first_out_cyc[r] - last_in_cyc[r]);
      end
      if (r > 0 && r < 30) begin
        checks++;
        back_to_back_rows++;
        if (first_out_cyc[r] - first_out_cyc[r-1] != N) begin
          failures++;
          $display("FAIL throughput row %0d", r);
        end
      end
      if (r >= 30) gap_rows++;
    end
    $display("rows back to back %0d, rows with gaps %0d", back_to_back_rows, gap_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
