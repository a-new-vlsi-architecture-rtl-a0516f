// tb_dst2d_top: end-to-end test of the 2-D DST at the default parameters
// (N = 7, g = 3, F = 12, 8-bit input), no parameter overrides.
//
// Blocks of 7x7 samples (full-scale patterns and random data) are streamed in
// row-major order. The first half are sent back to back, the rest with random
// idle cycles. Every result Y(k,l) is compared with the 2-D transform computed
// in double precision from its definition,
//   Y(k,l) = sum_i sum_j x(i,j) s(i,k) s(j,l), s(i,0) = (-1)^i,
//   s(i,k) = sin((2i+1) k pi / 14),
// with the tolerance N * b1 + b2 + 1e-6: b1 bounds the error of one row
// transform (quantised constants and output rounding), b2 the error the
// column transform adds; each is 0.5 + 2^-(F+1) (|x_a(0)| + 4 sum|x_a(i)|)
// taken over the largest auxiliary sequence the stage can see.
// Results must come column by column (out_l, out_k) without gaps inside a
// block, the first one 2(N+3M+4)+2N = 54 cycles after the block's last sample.
// Mechanism counters (each must be non-zero): back-to-back blocks leaving
// without a gap, blocks received with idle cycles, transposition bank
// switches to each bank, array terms added and subtracted by the sign
// multiplexers (tag-controlled), and T(k) values of both convolutions.
module tb_dst2d_top;
  localparam int N = 7;
  localparam int F = 12;
  localparam int IW = 8;
  localparam int W2 = IW + 2 * $clog2(N);
  localparam int BLOCKS = 16;
  localparam int M = (N - 1) / 2;
  // last sample of a block to its first result: two 1-D latencies, the last
  // row's remaining N-1 results, two cycles of transposition, N-1 samples of
  // the first column
  localparam int LATENCY = 2 * (N + 3 * M + 4) + 2 * N;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IW-1:0] in_data = '0;
  logic out_valid;
  logic [2:0] out_k, out_l;
  logic signed [W2-1:0] out_data;

  int checks = 0, failures = 0;
  int x [BLOCKS][N][N];
  real yref [BLOCKS][N][N];
  real tolb [BLOCKS];
  int ob = 0, on = 0;
  longint cyc = 0, prev_out = -1, first_out [BLOCKS], last_in [BLOCKS];
  int n_b2b = 0, n_gap_blocks = 0, n_swap [2] = '{0, 0}, n_neg = 0, n_pos = 0, n_t = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dst2d_top dut (.*);

  function automatic real kern(int i, int k);
    if (k == 0) return (i % 2 == 0) ? 1.0 : -1.0;
    return $sin((2 * i + 1) * k * PI / (2.0 * N));
  endfunction

  // error bound of one 1-D stage for an input row bounded by amax
  function automatic real stage_bound(real amax);
    real xa_sum;
    xa_sum = 0.0;
    for (int i = 1; i < N; i++) xa_sum += (N - i) * amax;   // |x_a(i)| <= (N-i) amax
    return 0.5 + (N * amax + 4.0 * xa_sum) / (2.0 ** (F + 1));
  endfunction

  // mechanism probes
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_tr.bank_swap) n_swap[dut.u_tr.rd_bank]++;
      if (dut.u_row.u_array.g_pe[0].u_pe.tv_in) begin
        if (dut.u_row.u_array.g_pe[0].u_pe.neg) n_neg++; else n_pos++;
      end
      if (dut.u_row.u_array.g_pe[1].u_pe.tv_in) begin
        if (dut.u_row.u_array.g_pe[1].u_pe.neg) n_neg++; else n_pos++;
      end
      if (dut.u_row.u_array.g_pe[2].u_pe.tv_in) begin
        if (dut.u_row.u_array.g_pe[2].u_pe.neg) n_neg++; else n_pos++;
      end
      if (dut.u_col.u_array.tv_out) n_t += 2;
    end
  end

  // result checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k, l;
      real err;
      l = on / N;
      k = on % N;
      if (ob >= BLOCKS) begin
        failures++;
        $display("FAIL: extra output");
      end else begin
        checks++;
        err = out_data - yref[ob][k][l];
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        if (int'(out_k) != k || int'(out_l) != l || err > tolb[ob]) begin
          failures++;
          $display("FAIL block %0d Y(%0d,%0d): got %0d (k %0d l %0d) ref %f", ob, k, l, out_data, out_k, out_l, yref[ob][k][l]);
        end
        if (on == 0) begin
          first_out[ob] = cyc;
          if (ob > 0 && cyc == prev_out + 1) n_b2b++;
        end else if (cyc != prev_out + 1) begin
          failures++;
          $display("FAIL: gap inside block %0d", ob);
        end
        prev_out = cyc;
        if (on == N * N - 1) begin
          on = 0;
          ob++;
        end else on++;
      end
    end
  end

  initial begin
    for (int b = 0; b < BLOCKS; b++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          case (b)
            0: x[b][i][j] = 127;
            1: x[b][i][j] = ((i + j) % 2 == 0) ? 127 : -128;
            2: x[b][i][j] = -128;
            default: x[b][i][j] = int'($urandom_range(255)) - 128;
          endcase
      for (int k = 0; k < N; k++)
        for (int l = 0; l < N; l++) begin
          real s;
          s = 0.0;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) s += x[b][i][j] * kern(i, k) * kern(j, l);
          yref[b][k][l] = s;
        end
      tolb[b] = N * stage_bound(128.0) + stage_bound(N * 128.0 + stage_bound(128.0)) + 1e-6;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < BLOCKS; b++) begin
      if (b >= BLOCKS / 2) n_gap_blocks++;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (b >= BLOCKS / 2) begin
            int gap;
            gap = int'($urandom_range(2));
            for (int g = 0; g < gap; g++) begin
              in_valid <= 1'b0;
              @(posedge clk);
            end
          end
          in_valid <= 1'b1;
          in_data  <= IW'(x[b][i][j]);
          if (i == N - 1 && j == N - 1) last_in[b] = cyc + 1;
          @(posedge clk);
        end
    end
    in_valid <= 1'b0;
    repeat (3 * N * N + 100) @(posedge clk);
    checks++;
    if (ob != BLOCKS) begin
      failures++;
      $display("FAIL: %0d of %0d blocks", ob, BLOCKS);
    end
    for (int b = 0; b < ob; b++) begin
      checks++;
      if (first_out[b] - last_in[b] != LATENCY) begin
        failures++;
        $display("FAIL latency block %0d: %0d", b, first_out[b] - last_in[b]);
      end
    end
    $display("max |error| %f, tolerance %f", max_err, tolb[0]);
    $display("mechanisms: back-to-back blocks out %0d, blocks with input gaps %0d, bank switches %0d/%0d, subtracted terms %0d, added terms %0d, T values %0d",
             n_b2b, n_gap_blocks, n_swap[0], n_swap[1], n_neg, n_pos, n_t);
    checks++;
    if (n_b2b == 0 || n_gap_blocks == 0 || n_swap[0] == 0 || n_swap[1] == 0 ||
        n_neg == 0 || n_pos == 0 || n_t == 0) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
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
