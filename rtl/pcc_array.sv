// pcc_array: the merged linear systolic array that computes both
// pseudo-cyclic convolutions of the prime-length DST (the sum convolution for
// T(xi(j)) = T(e(j)) and the difference convolution for T(zeta(j)) = T(N-e(j))).
//
// M = (N-1)/2 processing elements (pcc_pe) are chained; PE p holds kernel
// constant C(p). The two convolutions use the same constants and the same
// cyclic index pattern, so one chain of PEs serves both: each PE has two
// multiplications and two partial-sum lanes. All inputs enter at the left end
// and all results leave at the right end; no PE has a connection other than
// to its neighbours.
//
// Input schedule for one row (cycle 0 = cycle in which tag j = 0 is presented):
//   operands (A(l), B(l)) with l = (-tau) mod M at cycle tau = -(M-1) .. M-1,
//   tags {valid=1, j} at cycle j = 0 .. M-1 (partial sums enter as zero).
// The tags pass one register before PE 0, because each PE adds the product of
// the operand it held one cycle earlier (registered table read).
// Result T(e(j)), T(N-e(j)) with tag j leaves the right end at cycle j + M + 1.
// A new row may start every 2M-1 cycles or later; the 1-D DST feeds one row
// every N = 2M+1 cycles. The chaining and the tag control follow the
// description of the architecture; the schedule is this design's mapping.
module pcc_array
  import dst_pkg::*;
#(
  parameter int N       = 7,
  parameter int G       = 3,
  parameter int F       = 12,
  parameter int DW      = 12,
  parameter int TW      = 28,
  parameter bit USE_ROM = 1'b1,
  localparam int M      = (N - 1) / 2,
  localparam int JW     = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] a_in,
  input  logic signed [DW-1:0] b_in,
  input  logic                 tv_in,
  input  logic [JW-1:0]        tj_in,
  output logic signed [TW-1:0] txi,     // T(e(j))
  output logic signed [TW-1:0] tzeta,   // T(N - e(j))
  output logic                 tv_out,
  output logic [JW-1:0]        tj_out
);
  logic signed [DW-1:0] a_c  [M+1];
  logic signed [DW-1:0] b_c  [M+1];
  logic signed [TW-1:0] ta_c [M+1];
  logic signed [TW-1:0] tb_c [M+1];
  logic                 tv_c [M+1];
  logic [JW-1:0]        tj_c [M+1];

  assign a_c[0]  = a_in;
  assign b_c[0]  = b_in;
  assign ta_c[0] = '0;
  assign tb_c[0] = '0;
  // tags run one cycle behind the operands (product register in the PEs)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tv_c[0] <= 1'b0;
      tj_c[0] <= '0;
    end else begin
      tv_c[0] <= tv_in;
      tj_c[0] <= tj_in;
    end
  end

  for (genvar p = 0; p < M; p++) begin : g_pe
    pcc_pe #(.N(N), .G(G), .P(p), .F(F), .DW(DW), .TW(TW), .USE_ROM(USE_ROM)) u_pe (
      .clk, .rst_n,
      .a_in (a_c[p]),   .b_in (b_c[p]),
      .ta_in(ta_c[p]),  .tb_in(tb_c[p]),
      .tv_in(tv_c[p]),  .tj_in(tj_c[p]),
      .a_out(a_c[p+1]), .b_out(b_c[p+1]),
      .ta_out(ta_c[p+1]), .tb_out(tb_c[p+1]),
      .tv_out(tv_c[p+1]), .tj_out(tj_c[p+1])
    );
  end

  assign txi    = ta_c[M];
  assign tzeta  = tb_c[M];
  assign tv_out = tv_c[M];
  assign tj_out = tj_c[M];

  initial begin
    assert (is_primitive(G, N)) else $error("G is not a primitive root of N");
  end

endmodule
