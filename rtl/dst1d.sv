// dst1d: 1-D DST of odd prime length N (default 7, primitive root 3),
//   Y(k) = sum_{i=0}^{N-1} x(i) sin((2i+1) k pi / 2N),
// issued as Y(0) = Y(N), Y(1), .., Y(N-1) (y_idx gives k).
//
// Pipeline: aux_seq_gen (auxiliary sequence x_a) -> in_perm (operands A/B in
// the array's order, tags) -> pcc_array (M = (N-1)/2 PEs, both pseudo-cyclic
// convolutions at once) -> postproc (natural order, final combination).
// Input: one sample per cycle at most (in_valid/in_data, natural order, rows
// back to back). Output: N results per row, one per cycle, each row's results
// consecutive. Throughput one row per N cycles. Y(0) of a row is presented
// N + 3M + 4 cycles (20 for N = 7) after the cycle that presents its last
// sample: N cycles of recursion, 2M-1 of operand issue, M+1 through the
// array, and register stages in between.
//
// Number formats: input IW-bit signed integers; constants with F fractional
// bits; products and sums are kept exact inside the array; outputs are
// rounded to integers of OW = IW + clog2(N) bits, which holds the full range
// N * 2^(IW-1). The partitioning into pre-processing, array and
// post-processing follows the architecture; the formats and the handshake
// are this design's choices.
module dst1d #(
  parameter int N       = 7,
  parameter int G       = 3,
  parameter int F       = 12,
  parameter int IW      = 8,
  parameter bit USE_ROM = 1'b1,
  localparam int OW = IW + $clog2(N),
  localparam int KW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 y_valid,
  output logic [KW-1:0]        y_idx,
  output logic signed [OW-1:0] y_data
);
  localparam int M  = (N - 1) / 2;
  localparam int JW = (M > 1) ? $clog2(M) : 1;
  localparam int XW = IW + $clog2(N);
  localparam int DW = XW + 1;
  localparam int TW = DW + F + 3 + $clog2(M + 1);

  logic signed [XW-1:0] xa [N];
  logic                 xa_valid;
  logic signed [DW-1:0] a_s, b_s;
  logic                 tv_s, tv_r;
  logic [JW-1:0]        tj_s, tj_r;
  logic signed [XW-1:0] xa0;
  logic                 xa0_valid;
  logic signed [TW-1:0] txi, tzeta;

  aux_seq_gen #(.N(N), .IW(IW)) u_aux (
    .clk, .rst_n, .in_valid, .in_data, .xa, .xa_valid
  );

  in_perm #(.N(N), .G(G), .XW(XW)) u_perm (
    .clk, .rst_n, .xa, .xa_valid,
    .a_out(a_s), .b_out(b_s), .tv_out(tv_s), .tj_out(tj_s),
    .xa0_out(xa0), .xa0_valid
  );

  pcc_array #(.N(N), .G(G), .F(F), .DW(DW), .TW(TW), .USE_ROM(USE_ROM)) u_array (
    .clk, .rst_n, .a_in(a_s), .b_in(b_s), .tv_in(tv_s), .tj_in(tj_s),
    .txi, .tzeta, .tv_out(tv_r), .tj_out(tj_r)
  );

  postproc #(.N(N), .G(G), .F(F), .XW(XW), .TW(TW), .OW(OW)) u_post (
    .clk, .rst_n, .txi, .tzeta, .tv(tv_r), .tj(tj_r),
    .xa0_in(xa0), .xa0_valid,
    .y_valid, .y_idx, .y_data
  );

endmodule
