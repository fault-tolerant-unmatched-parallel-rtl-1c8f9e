// One FIR filter of the parallel bank.
//
// Direct-form FIR: y[n] = sum_{k=0}^{TAPS-1} COEF[k] * x[n-k], computed modulo
// 2^DW, i.e. the output has the same DW bits as the input. All filters of the
// bank (four originals and the two redundant ones) are instances of this
// module with different COEF; because the wrap-around modulo 2^DW is a ring
// homomorphism, the redundant outputs stay exact linear combinations of the
// original outputs, which is what the ECS check relies on.
//
// Interface: on a clock edge with x_valid high the sample x is taken in, the
// delay line shifts, and y/y_valid show the new output in the next cycle
// (latency 1, one sample per cycle). Reset clears the delay line, so the
// first outputs after reset see zeros for the older samples.
//
// The 8-bit sample width follows the case study; the filter structure, the
// tap count and the modulo arithmetic are this design's choices.
module fir_filter #(
  parameter int                     DW   = ft_pkg::DW,
  parameter int                     TAPS = ft_pkg::TAPS,
  parameter logic [TAPS-1:0][DW-1:0] COEF = ft_pkg::H1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  input  logic [DW-1:0] x,
  output logic [DW-1:0] y,
  output logic          y_valid
);

  // x_hist[k] holds x[n-k-1] (the samples before the current one)
  logic [TAPS-2:0][DW-1:0] x_hist;
  logic [DW-1:0]           acc;

  always_comb begin
    acc = DW'(COEF[0] * x);
    for (int k = 1; k < TAPS; k++) begin
      acc = DW'(acc + COEF[k] * x_hist[k-1]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_hist  <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        y         <= acc;
        x_hist[0] <= x;
        for (int k = 1; k < TAPS - 1; k++) x_hist[k] <= x_hist[k-1];
      end
    end
  end

endmodule
