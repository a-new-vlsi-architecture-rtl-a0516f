// dst2d_top: 2-D DST of an N x N block, N an odd prime (default 7), by
// row-column decomposition:
//   Y(k,l) = sum_i sum_j x(i,j) s(i,k) s(j,l),
//   s(i,k) = sin((2i+1) k pi / 2N) for k = 1..N-1, s(i,0) = (-1)^i (k = N).
// A first 1-D DST (dst1d) transforms the rows, transpose_buf turns its result
// around, and a second dst1d transforms the columns. Each 1-D DST contains the
// merged linear systolic array of (N-1)/2 PEs.
//
// Interface: in_valid/in_data carry the block in row-major order, x(0,0),
// x(0,1), .., one value per cycle at most, blocks back to back. out_valid /
// out_data carry Y(k,l) in column-major order: for l = 0..N-1, k = 0..N-1
// (out_l, out_k give the indices), one per cycle; a block of N*N results is
// issued without gaps once started. Throughput: one block per N*N cycles.
// Output width IW + 2*clog2(N) holds the full range N*N*2^(IW-1).
// Rounding to integers happens once after each 1-D DST, so results agree
// with the exact transform to within about one unit per stage.
module dst2d_top #(
  parameter int N       = 7,
  parameter int G       = 3,
  parameter int F       = 12,
  parameter int IW      = 8,
  parameter bit USE_ROM = 1'b1,
  localparam int W1 = IW + $clog2(N),
  localparam int W2 = W1 + $clog2(N),
  localparam int KW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic [KW-1:0]        out_k,
  output logic [KW-1:0]        out_l,
  output logic signed [W2-1:0] out_data
);
  logic                 r_valid;
  logic [KW-1:0]        r_idx;
  logic signed [W1-1:0] r_data;
  logic                 c_valid;
  logic signed [W1-1:0] c_data;

  dst1d #(.N(N), .G(G), .F(F), .IW(IW), .USE_ROM(USE_ROM)) u_row (
    .clk, .rst_n, .in_valid, .in_data,
    .y_valid(r_valid), .y_idx(r_idx), .y_data(r_data)
  );

  transpose_buf #(.N(N), .W(W1)) u_tr (
    .clk, .rst_n, .in_valid(r_valid), .in_data(r_data),
    .out_valid(c_valid), .out_data(c_data), .bank_swap()
  );

  dst1d #(.N(N), .G(G), .F(F), .IW(W1), .USE_ROM(USE_ROM)) u_col (
    .clk, .rst_n, .in_valid(c_valid), .in_data(c_data),
    .y_valid(out_valid), .y_idx(out_k), .y_data(out_data)
  );

  // column index of the result stream
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_l <= '0;
    else if (out_valid && out_k == KW'(N - 1))
      out_l <= (out_l == KW'(N - 1)) ? '0 : out_l + 1'b1;
  end

  // the row stage issues each row's N results consecutively in k order,
  // which the transposition relies on
  property p_row_order;
    @(posedge clk) disable iff (!rst_n)
      (r_valid && r_idx != KW'(N - 1)) |=> (r_valid && r_idx == $past(r_idx) + 1'b1);
  endproperty
  assert property (p_row_order);

endmodule
