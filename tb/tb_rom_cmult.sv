// tb_rom_cmult: checks the constant multiplier exhaustively over all
// operand values of a 12-bit operand, for the table form with two constants
// (the largest kernel constant and the largest 12-bit value) and for the
// multiplier form. A new operand pair is presented every cycle; the products
// must appear one cycle later. Reference: the product computed by the
// testbench in 64-bit arithmetic.
module tb_rom_cmult;
  localparam int DW = 12;
  localparam int CW = 14;
  localparam int C0 = 3993;   // kernel constant sin(3 pi/7) * 2^12
  localparam int C1 = 4095;
  localparam int C2 = 1777;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0]    a = '0, b = '0;
  logic signed [DW+CW-1:0] pa0, pb0, pa1, pb1, pa2, pb2;
  int checks = 0, failures = 0;

  rom_cmult #(.DW(DW), .CW(CW), .CONST(C0), .USE_ROM(1'b1)) u0 (.clk, .rst_n, .a, .b, .pa(pa0), .pb(pb0));
  rom_cmult #(.DW(DW), .CW(CW), .CONST(C1), .USE_ROM(1'b1)) u1 (.clk, .rst_n, .a, .b, .pa(pa1), .pb(pb1));
  rom_cmult #(.DW(DW), .CW(CW), .CONST(C2), .USE_ROM(1'b0)) u2 (.clk, .rst_n, .a, .b, .pa(pa2), .pb(pb2));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d b=%0d got %0d exp %0d", what, a, b, got, exp);
    end
  endtask

  always #5 clk = ~clk;

  initial begin
    int pv;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = -(2 ** (DW - 1)); v <= 2 ** (DW - 1); v++) begin
      // present operands v (if in range); check the products of the previous one
      @(negedge clk);
      if (v > -(2 ** (DW - 1))) begin
        check("pa0", pa0, longint'(C0) * pv);
        check("pb0", pb0, longint'(C0) * (-pv - 1));
        check("pa1", pa1, longint'(C1) * pv);
        check("pb1", pb1, longint'(C1) * (-pv - 1));
        check("pa2", pa2, longint'(C2) * pv);
        check("pb2", pb2, longint'(C2) * (-pv - 1));
      end
      a  = DW'(v);
      b  = DW'(-v - 1);
      pv = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
