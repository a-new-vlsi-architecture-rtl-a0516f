// tb_postproc: checks the post-processing stage (N = 7, g = 3, F = 12).
// Random T(1..N-1) and x_a(0) are delivered as the array does it: x_a(0)
// first, then the pairs (T(e(j)), T(N-e(j))) with tags j = 0..M-1 on
// consecutive cycles (e(j) computed here from the powers of 3). The N results
// must be presented in natural order k = 0..N-1 on consecutive cycles,
// starting two cycles after the last pair, and equal
//   Y(0) = x_a(0),
//   Y(k) = floor((x_a(0) S(k) 2^F + 2 C(k) T(k) + 2^(2F-1)) / 2^(2F)),
// with S(k), C(k) = sin, cos(k pi / 2N) rounded to F fractional bits here.
// Rows follow each other every N cycles and with idle cycles between them.
module tb_postproc;
  localparam int N = 7, G = 3, F = 12, XW = 11, TW = 28, OW = 11;
  localparam int M = (N - 1) / 2;
  localparam int ROWS = 40;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [TW-1:0] txi = '0, tzeta = '0;
  logic tv = 1'b0;
  logic [1:0] tj = '0;
  logic signed [XW-1:0] xa0_in = '0;
  logic xa0_valid = 1'b0;
  logic y_valid;
  logic [2:0] y_idx;
  logic signed [OW-1:0] y_data;
  int checks = 0, failures = 0;
  longint tv_ [ROWS][N];
  int xa0_ [ROWS];
  longint cyc = 0, last_pair_cyc [ROWS], first_cyc [ROWS];
  int out_row = 0, out_k = 0;
  longint prev_out_cyc = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  postproc #(.N(N), .G(G), .F(F), .XW(XW), .TW(TW), .OW(OW)) dut (.*);

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

  function automatic longint y_ref(int r, int k);
    longint acc;
    if (k == 0) return xa0_[r];
    acc = longint'(xa0_[r]) * q($sin(PI * k / (2.0 * N))) * (longint'(1) << F)
        + 2 * q($cos(PI * k / (2.0 * N))) * tv_[r][k] + (longint'(1) << (2 * F - 1));
    return acc >>> (2 * F);
  endfunction

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      checks += 2;
      if (int'(y_idx) != out_k || longint'(y_data) != y_ref(out_row, out_k)) begin
        failures++;
        $display("FAIL row %0d k %0d: idx %0d data %0d expected %0d", out_row, out_k, y_idx, y_data, y_ref(out_row, out_k));
      end
      if (out_k == 0) first_cyc[out_row] = cyc;
      else if (cyc != prev_out_cyc + 1) begin
        failures++;
        $display("FAIL: gap inside row %0d", out_row);
      end
      prev_out_cyc = cyc;
      if (out_k == N - 1) begin
        out_k = 0;
        out_row++;
      end else out_k++;
    end
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      xa0_[r] = int'($urandom_range(1000)) - 500;  // keeps |Y| inside the 11-bit range
      tv_[r][0] = 0;
      for (int k = 1; k < N; k++) tv_[r][k] = longint'($urandom_range(32'd2000000)) - 1000000;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < N; c++) begin
        xa0_valid <= (c == 0);
        xa0_in    <= (c == 0) ? XW'(xa0_[r]) : XW'($urandom);
        tv        <= (c >= M && c < 2 * M);
        if (c >= M && c < 2 * M) begin
          tj    <= 2'(c - M);
          txi   <= TW'(tv_[r][e_of(c - M)]);
          tzeta <= TW'(tv_[r][N - e_of(c - M)]);
          if (c == 2 * M - 1) last_pair_cyc[r] = cyc + 1;
        end else begin
          txi   <= TW'($urandom);
          tzeta <= TW'($urandom);
        end
        @(posedge clk);
      end
      if (r >= ROWS / 2) begin
        int gap;
        gap = int'($urandom_range(4));
        for (int g = 0; g < gap; g++) begin
          tv        <= 1'b0;
          xa0_valid <= 1'b0;
          @(posedge clk);
        end
      end
    end
    tv <= 1'b0;
    xa0_valid <= 1'b0;
    repeat (2 * N) @(posedge clk);
    checks++;
    if (out_row != ROWS) begin
      failures++;
      $display("FAIL: %0d rows", out_row);
    end
    for (int r = 0; r < out_row; r++) begin
      checks++;
      if (first_cyc[r] - last_pair_cyc[r] != 2) begin
        failures++;
        $display("FAIL latency row %0d: %0d", r, first_cyc[r] - last_pair_cyc[r]);
      end
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
