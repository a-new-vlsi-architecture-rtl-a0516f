// rom_cmult: multiplies two operands by the same fixed constant, either with a
// shared look-up table (USE_ROM = 1, the default) or with two multipliers
// (USE_ROM = 0, the direct form).
//
// A processing element of the DST array multiplies its two data operands (the
// sum sequence A and the difference sequence B) by one and the same kernel
// constant, so both products can come from one table. The table holds
// CONST * v for v = 0 .. 2^HI-1, HI = ceil(DW/2), that is 2^(L/2) words for an
// L-bit operand. Each operand is split into a signed high half and an unsigned
// low half; the product is (TAB[hi] - msb*CONST*2^HI) * 2^LO + TAB[lo]. The
// table is therefore read at four addresses per cycle (two halves of two
// operands); the constant correction and the shifted add replace the
// multiplier array.
//
// Timing: the table is read synchronously (registered outputs, like a ROM
// macro), and the correction and shifted add follow the register, so pa/pb
// are the products of the operands presented one cycle earlier. The PE then
// has a table read in one stage and only adders in the next, giving a clock
// period of max(T_rom, T_adders). With USE_ROM = 0 the multiplier outputs are
// registered instead, with the same one-cycle latency.
//
// The table-based form, its size and the ROM-or-adder clock period follow the
// description of the architecture; splitting the operand into halves and the
// four reads per cycle are this design's reading of how a 2^(L/2)-word table
// serves an L-bit operand.
module rom_cmult #(
  parameter int DW      = 12,   // operand width (signed)
  parameter int CW      = 14,   // constant width (signed)
  parameter int CONST   = 3202, // constant value (default: sin(2 pi/7) * 2^12)
  parameter bit USE_ROM = 1'b1  // 1: look-up table, 0: multipliers
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DW-1:0]    a,
  input  logic signed [DW-1:0]    b,
  output logic signed [DW+CW-1:0] pa,   // CONST * a, one cycle later
  output logic signed [DW+CW-1:0] pb    // CONST * b, one cycle later
);
  localparam int PW = DW + CW;
  localparam int LO = DW / 2;
  localparam int HI = DW - LO;

  typedef logic signed [PW-1:0] tab_t [2**HI];

  function automatic tab_t make_tab();
    tab_t t;
    for (int v = 0; v < 2**HI; v++) t[v] = PW'(longint'(CONST) * longint'(v));
    return t;
  endfunction

  localparam tab_t TAB = make_tab();
  localparam logic signed [PW-1:0] CORR = PW'(longint'(CONST) * (longint'(1) <<< HI));
  localparam logic signed [CW-1:0] C = CW'(CONST);

  // combine the two registered table words of one operand
  function automatic logic signed [PW-1:0] combine(logic signed [PW-1:0] th,
                                                   logic signed [PW-1:0] tl,
                                                   logic neg);
    return ((th - (neg ? CORR : '0)) <<< LO) + tl;
  endfunction

  if (USE_ROM) begin : g_rom
    logic signed [PW-1:0] tha, tla, thb, tlb;   // registered table reads
    logic                 nega, negb;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tha  <= '0;
        tla  <= '0;
        thb  <= '0;
        tlb  <= '0;
        nega <= 1'b0;
        negb <= 1'b0;
      end else begin
        tha  <= TAB[a[DW-1:LO]];
        tla  <= TAB[HI'(a[LO-1:0])];
        thb  <= TAB[b[DW-1:LO]];
        tlb  <= TAB[HI'(b[LO-1:0])];
        nega <= a[DW-1];
        negb <= b[DW-1];
      end
    end

    assign pa = combine(tha, tla, nega);
    assign pb = combine(thb, tlb, negb);
  end else begin : g_mul
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pa <= '0;
        pb <= '0;
      end else begin
        pa <= PW'(a) * PW'(C);
        pb <= PW'(b) * PW'(C);
      end
    end
  end

endmodule
