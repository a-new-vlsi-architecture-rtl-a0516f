// pcc_pe: processing element of the merged pseudo-cyclic-convolution array.
//
// PE number P owns one kernel constant C(P) = round(sin(e(P) pi/N) * 2^F)
// (see dst_pkg) and serves both convolutions at once: the sum operand A and
// the difference operand B are multiplied by the same constant (rom_cmult),
// and the two products are added into the two partial sums that pass through
// the element, T_xi (for T(e(j))) and T_zeta (for T(N-e(j))).
//
// Tag control: every partial sum travels with a tag {valid, j}, j being the
// position of the output within its row. The sign of the term, sigma, depends
// on P and j only, so each PE holds an M-entry sign table indexed by the tag
// and two add/subtract multiplexers; the zeta sum takes the opposite sign.
//
// Data flow per PE: the operands pass through two registers (they advance one
// PE every two cycles); partial sums and tags pass through one register (one
// PE per cycle). The constant multiplication has one register stage (the
// synchronous table read), so the sum passing in cycle t receives the product
// of the operand that was at the PE in cycle t-1; the array therefore runs the
// tags one cycle behind the operands. This makes output j meet operand index
// (P - j) mod M at PE P, which is the cyclic index the convolution needs.
// The sum lane has a table read in one stage and a sign-controlled add in the
// next. Latency: one cycle for the sums, two for the operands. The structure of the element (two constant
// multiplications, adders, sign multiplexers, tag-controlled) follows the
// description of the architecture; the register placement, the tag encoding
// and the asynchronous active-low reset are this design's choices.
module pcc_pe
  import dst_pkg::*;
#(
  parameter int N       = 7,
  parameter int G       = 3,
  parameter int P       = 0,    // PE position, 0 .. M-1
  parameter int F       = 12,   // fractional bits of the constants
  parameter int DW      = 12,   // operand width
  parameter int TW      = 28,   // partial-sum width
  parameter bit USE_ROM = 1'b1,
  localparam int M      = (N - 1) / 2,
  localparam int JW     = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] a_in,
  input  logic signed [DW-1:0] b_in,
  input  logic signed [TW-1:0] ta_in,
  input  logic signed [TW-1:0] tb_in,
  input  logic                 tv_in,
  input  logic [JW-1:0]        tj_in,
  output logic signed [DW-1:0] a_out,
  output logic signed [DW-1:0] b_out,
  output logic signed [TW-1:0] ta_out,
  output logic signed [TW-1:0] tb_out,
  output logic                 tv_out,
  output logic [JW-1:0]        tj_out
);
  localparam int CW    = F + 2;
  localparam int CONST = pe_const(G, P, N, F);

  // sign table: bit j set when the term of PE P for output j is negative
  function automatic logic [2**JW-1:0] make_neg();
    logic [2**JW-1:0] t;
    t = '0;
    for (int j = 0; j < M; j++) t[j] = sigma_neg(G, (P - j + M) % M, j, N);
    return t;
  endfunction
  localparam logic [2**JW-1:0] NEG = make_neg();

  logic signed [DW+CW-1:0] pa, pb;
  logic signed [DW-1:0]    a_d, b_d;
  logic                    neg;

  rom_cmult #(.DW(DW), .CW(CW), .CONST(CONST), .USE_ROM(USE_ROM)) u_mult (
    .clk, .rst_n, .a(a_in), .b(b_in), .pa(pa), .pb(pb)
  );

  assign neg = NEG[tj_in];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_d    <= '0;
      b_d    <= '0;
      a_out  <= '0;
      b_out  <= '0;
      ta_out <= '0;
      tb_out <= '0;
      tv_out <= 1'b0;
      tj_out <= '0;
    end else begin
      a_d    <= a_in;
      b_d    <= b_in;
      a_out  <= a_d;
      b_out  <= b_d;
      ta_out <= neg ? ta_in - TW'(pa) : ta_in + TW'(pa);
      tb_out <= neg ? tb_in + TW'(pb) : tb_in - TW'(pb);
      tv_out <= tv_in;
      tj_out <= tj_in;
    end
  end

endmodule
