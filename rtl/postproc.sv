// postproc: post-processing stage of the 1-D DST. Puts the auxiliary output
// sequence T(k) back into natural order and forms the transform
//   Y(0) = x_a(0)                     (the k = N coefficient)
//   Y(k) = x_a(0) sin(k pi/2N) + 2 cos(k pi/2N) T(k),   k = 1 .. N-1.
//
// The array delivers T(e(j)) and T(N-e(j)) with tag j = 0 .. M-1; they are
// written into a collection bank at addresses e(j) and N-e(j) (the inverse of
// the xi/zeta permutations). With the pair j = M-1 the bank, together with
// x_a(0) captured when the pre-processing issues it, moves into an output bank, and N results are
// then issued one per cycle, k = 0, 1, .., N-1, with one multiply-add pair
// and rounding of the 2F fractional bits (half up). The first result appears
// one cycle after the last pair arrives. x_a(0) of the next row may arrive
// from the cycle after that pair on. Rows every N cycles are sustained:
// the output bank drains in N cycles while the next row is collected.
// The reordering and eq. (9)/(10) follow the algorithm; the serial output,
// double bank, rounding and the indexing Y(0) = Y(N) are this design's choices.
module postproc
  import dst_pkg::*;
#(
  parameter int N  = 7,
  parameter int G  = 3,
  parameter int F  = 12,
  parameter int XW = 11,
  parameter int TW = 28,
  parameter int OW = 11,
  localparam int M  = (N - 1) / 2,
  localparam int JW = (M > 1) ? $clog2(M) : 1,
  localparam int KW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [TW-1:0] txi,
  input  logic signed [TW-1:0] tzeta,
  input  logic                 tv,
  input  logic [JW-1:0]        tj,
  input  logic signed [XW-1:0] xa0_in,
  input  logic                 xa0_valid,
  output logic                 y_valid,
  output logic [KW-1:0]        y_idx,
  output logic signed [OW-1:0] y_data
);
  localparam int CW = F + 2;
  localparam int AW = TW + CW + F + 2;

  typedef int tab_t [N];
  function automatic tab_t make_e(bit zeta);
    tab_t t;
    for (int j = 0; j < N; j++) t[j] = 0;
    for (int j = 0; j < M; j++) t[j] = zeta ? N - e_idx(G, j, N) : e_idx(G, j, N);
    return t;
  endfunction
  function automatic tab_t make_s(bit cosine);
    tab_t t;
    for (int k = 0; k < N; k++) t[k] = cosine ? post_cos(k, N, F) : post_sin(k, N, F);
    return t;
  endfunction
  localparam tab_t EX = make_e(1'b0);
  localparam tab_t EZ = make_e(1'b1);
  localparam tab_t SK = make_s(1'b0);
  localparam tab_t CK = make_s(1'b1);

  logic signed [TW-1:0] tc [N];     // collection bank (index 0 unused)
  logic signed [TW-1:0] tc_n [N];
  logic signed [TW-1:0] to [N];     // output bank
  logic signed [XW-1:0] xa0_c, xa0_o;
  logic                 busy;
  logic [KW-1:0]        k;
  logic signed [AW-1:0] acc;

  always_comb begin
    tc_n = tc;
    if (tv) begin
      tc_n[EX[int'(tj)]] = txi;
      tc_n[EZ[int'(tj)]] = tzeta;
    end
  end

  always_comb begin
    acc = ((AW'(xa0_o) * AW'(signed'(CW'(SK[k])))) <<< F)
        + ((AW'(to[k]) * AW'(signed'(CW'(CK[k])))) <<< 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      k       <= '0;
      xa0_c   <= '0;
      xa0_o   <= '0;
      y_valid <= 1'b0;
      y_idx   <= '0;
      y_data  <= '0;
      for (int i = 0; i < N; i++) begin
        tc[i] <= '0;
        to[i] <= '0;
      end
    end else begin
      y_valid <= 1'b0;
      tc      <= tc_n;
      if (xa0_valid) xa0_c <= xa0_in;
      if (busy) begin
        y_valid <= 1'b1;
        y_idx   <= k;
        y_data  <= (k == '0) ? OW'(xa0_o)
                             : OW'((acc + (AW'(1) <<< (2 * F - 1))) >>> (2 * F));
        k       <= k + 1'b1;
        if (k == KW'(N - 1)) busy <= 1'b0;
      end
      if (tv && tj == JW'(M - 1)) begin
        to    <= tc_n;
        xa0_o <= xa0_c;
        busy  <= 1'b1;
        k     <= '0;
      end
    end
  end

endmodule
