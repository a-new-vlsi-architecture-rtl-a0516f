// in_perm: second half of the pre-processing stage. Captures the auxiliary
// sequence x_a of one row, forms the operands of the two convolutions
//   A(l) = x_a(e(l)) + x_a(N - e(l)),   B(l) = x_a(e(l)) - x_a(N - e(l)),
// l = 0 .. M-1 (e(l) = even representative of +-g^l, see dst_pkg), and issues
// them in the order the systolic array needs, together with the output tags.
//
// The permutation is one multiplexer pair over a latched copy of x_a, driven
// by a cycle counter c = 0 .. 2M-2 (2M-1 = N-2 cycles per row):
//   operand index l = (M-1-c) mod M  (A/B for l = M-1, .., 1, 0, M-1, .., 1),
//   tag valid with j = c-(M-1) for c >= M-1.
// x_a(0) (the coefficient Y(0), and a term of every Y(k)) leaves on xa0 with
// the tag j = 0. All outputs are registered: the first operand is presented
// two cycles after the cycle in which xa_valid is high. A new row may be
// captured every N-2 cycles or later.
// Operand formation and the use of a multiplexer with latches follow the
// description of the pre-processing stage; the issue order is derived from
// the array schedule of this design.
module in_perm
  import dst_pkg::*;
#(
  parameter int N  = 7,
  parameter int G  = 3,
  parameter int XW = 11,          // width of x_a
  localparam int DW = XW + 1,     // operand width
  localparam int M  = (N - 1) / 2,
  localparam int JW = (M > 1) ? $clog2(M) : 1,
  localparam int CW = $clog2(2 * M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [XW-1:0] xa [N],
  input  logic                 xa_valid,
  output logic signed [DW-1:0] a_out,
  output logic signed [DW-1:0] b_out,
  output logic                 tv_out,
  output logic [JW-1:0]        tj_out,
  output logic signed [XW-1:0] xa0_out,
  output logic                 xa0_valid
);
  typedef int idx_t [M];

  function automatic idx_t make_ip();
    idx_t t;
    for (int l = 0; l < M; l++) t[l] = e_idx(G, l, N);
    return t;
  endfunction
  function automatic idx_t make_in();
    idx_t t;
    for (int l = 0; l < M; l++) t[l] = N - e_idx(G, l, N);
    return t;
  endfunction
  localparam idx_t IP = make_ip();
  localparam idx_t IN = make_in();

  logic signed [XW-1:0] xl [N];
  logic                 active;
  logic [CW-1:0]        c;
  int                   l;
  logic signed [DW-1:0] a_n, b_n;

  always_comb begin
    l   = (int'(c) < M) ? M - 1 - int'(c) : 2 * M - 1 - int'(c);
    a_n = DW'(xl[IP[l]]) + DW'(xl[IN[l]]);
    b_n = DW'(xl[IP[l]]) - DW'(xl[IN[l]]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      c         <= '0;
      a_out     <= '0;
      b_out     <= '0;
      tv_out    <= 1'b0;
      tj_out    <= '0;
      xa0_out   <= '0;
      xa0_valid <= 1'b0;
      for (int i = 0; i < N; i++) xl[i] <= '0;
    end else begin
      tv_out    <= 1'b0;
      xa0_valid <= 1'b0;
      if (active) begin
        a_out <= a_n;
        b_out <= b_n;
        if (int'(c) >= M - 1) begin
          tv_out <= 1'b1;
          tj_out <= JW'(int'(c) - (M - 1));
        end
        if (int'(c) == M - 1) begin
          xa0_out   <= xl[0];
          xa0_valid <= 1'b1;
        end
        if (int'(c) == 2 * M - 2) active <= 1'b0;
        c <= c + 1'b1;
      end
      if (xa_valid) begin
        xl     <= xa;
        active <= 1'b1;
        c      <= '0;
      end
    end
  end

endmodule
