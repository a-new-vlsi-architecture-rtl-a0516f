// aux_seq_gen: first half of the pre-processing stage. Collects one row of N
// input samples and computes the auxiliary input sequence
//   x_a(N-1) = x(N-1),   x_a(i) = (-1)^i x(i) + x_a(i+1),  i = N-2 .. 0,
// i.e. the alternating suffix sums of the row.
//
// Samples arrive one per cycle at most (in_valid), in natural order. The
// N-th sample of a row copies the row into a work bank, and the recursion then
// runs with one adder/subtractor, one index per cycle from i = N-1 down to 0,
// writing x_a(i) into the output bank. N+1 cycles after the cycle that
// presents the last sample of a row, xa_valid pulses for one cycle and the output bank holds the whole
// sequence; it stays unchanged until the recursion of the next row starts, so
// the consumer captures it on the pulse. Input gaps are allowed; with
// back-to-back rows (N cycles per row) the recursion of one row ends in the
// cycle in which the next one starts, so there is no dead time between rows.
// The recursion is the one of the algorithm; the serial one-adder form, the
// double row bank and the reset are this design's choices.
module aux_seq_gen #(
  parameter int N  = 7,
  parameter int IW = 8,                 // input sample width (signed)
  localparam int XW = IW + $clog2(N),   // |x_a| <= N * 2^(IW-1)
  localparam int CNW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic signed [XW-1:0] xa [N],
  output logic                 xa_valid
);
  logic signed [IW-1:0] xin [N];   // row being received
  logic signed [IW-1:0] wrk [N];   // row being transformed
  logic [CNW-1:0]       cnt;
  logic [CNW-1:0]       step;
  logic                 busy;
  logic signed [XW-1:0] acc;
  logic signed [XW-1:0] acc_n;
  logic [CNW-1:0]       idx;

  assign idx = CNW'(N - 1) - step;

  always_comb begin
    logic signed [XW-1:0] term;
    term  = idx[0] ? -XW'(wrk[idx]) : XW'(wrk[idx]);
    acc_n = (step == '0) ? term : acc + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      step     <= '0;
      busy     <= 1'b0;
      acc      <= '0;
      xa_valid <= 1'b0;
      for (int i = 0; i < N; i++) begin
        xin[i] <= '0;
        wrk[i] <= '0;
        xa[i]  <= '0;
      end
    end else begin
      xa_valid <= 1'b0;
      if (busy) begin
        acc     <= acc_n;
        xa[idx] <= acc_n;
        step    <= step + 1'b1;
        if (step == CNW'(N - 1)) begin
          busy     <= 1'b0;
          xa_valid <= 1'b1;
        end
      end
      if (in_valid) begin
        xin[cnt] <= in_data;
        if (cnt == CNW'(N - 1)) begin
          cnt  <= '0;
          busy <= 1'b1;
          step <= '0;
          for (int i = 0; i < N - 1; i++) wrk[i] <= xin[i];
          wrk[N-1] <= in_data;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
