// transpose_buf: transposition memory between the row and the column 1-D DST.
//
// Values arrive in row-major order (row r, element c = 0 .. N-1) and leave in
// column-major order (column c, row r = 0 .. N-1), so the second 1-D DST sees
// the columns of the first one's result. Two banks of N*N words are used in
// ping-pong fashion: while one block is read out, the next one is written.
// A block starts to leave the cycle after its last value is written, one value
// per cycle (out_valid), output registered; it drains in N*N cycles, which is
// no longer than the next block takes to arrive, so back-to-back blocks flow
// without a gap. The transposition itself is part of the row-column scheme;
// the double-buffered memory is this design's implementation of it.
module transpose_buf #(
  parameter int N = 7,
  parameter int W = 11,
  localparam int AW = $clog2(2 * N * N),
  localparam int CW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data,
  output logic                bank_swap    // pulses when a full bank starts to drain
);
  logic signed [W-1:0] mem [2 * N * N];
  logic                wr_bank, rd_bank;
  logic [CW-1:0]       wr_r, wr_c, rd_r, rd_c;
  logic                rd_active;
  logic                wr_last;

  function automatic logic [AW-1:0] addr(logic bank, logic [CW-1:0] r, logic [CW-1:0] c);
    return AW'(bank ? N * N : 0) + AW'(r) * AW'(N) + AW'(c);
  endfunction

  assign wr_last = in_valid && wr_r == CW'(N - 1) && wr_c == CW'(N - 1);

  always_ff @(posedge clk) begin
    if (in_valid) mem[addr(wr_bank, wr_r, wr_c)] <= in_data;
    out_data <= mem[addr(rd_bank, rd_r, rd_c)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank   <= 1'b0;
      rd_bank   <= 1'b0;
      wr_r      <= '0;
      wr_c      <= '0;
      rd_r      <= '0;
      rd_c      <= '0;
      rd_active <= 1'b0;
      out_valid <= 1'b0;
      bank_swap <= 1'b0;
    end else begin
      out_valid <= rd_active;
      bank_swap <= 1'b0;
      if (in_valid) begin
        if (wr_c == CW'(N - 1)) begin
          wr_c <= '0;
          wr_r <= (wr_r == CW'(N - 1)) ? '0 : wr_r + 1'b1;
        end else begin
          wr_c <= wr_c + 1'b1;
        end
      end
      if (rd_active) begin
        if (rd_r == CW'(N - 1)) begin
          rd_r <= '0;
          if (rd_c == CW'(N - 1)) begin
            rd_c      <= '0;
            rd_active <= 1'b0;
          end else begin
            rd_c <= rd_c + 1'b1;
          end
        end else begin
          rd_r <= rd_r + 1'b1;
        end
      end
      if (wr_last) begin
        wr_bank   <= ~wr_bank;
        rd_bank   <= wr_bank;
        rd_active <= 1'b1;
        rd_r      <= '0;
        rd_c      <= '0;
        bank_swap <= 1'b1;
      end
    end
  end

endmodule
