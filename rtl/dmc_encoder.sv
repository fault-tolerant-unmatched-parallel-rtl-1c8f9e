// Decimal matrix code (DMC) encoder.
//
// The N = K1*K2*M data bits are cut into K1*K2 symbols of M bits; symbol
// s = r*K2 + c (row r, column c) is d[s*M +: M], so row 0 holds d[K2*M-1:0].
// Horizontal check bits: in each row, symbol c and symbol c+K2/2 are added as
// unsigned integers, giving an (M+1)-bit sum; group g = r*(K2/2) + c occupies
// h[g*(M+1) +: M+1]. Vertical check bits: v[j] is the XOR of bit j of every
// row, v[j] = d[j] ^ d[j+K2*M] ^ ... .
// For the default 32-bit word (K1=2, K2=4, M=4):
//   h[4:0]   = d[3:0]   + d[11:8]     h[9:5]   = d[7:4]   + d[15:12]
//   h[14:10] = d[19:16] + d[27:24]    h[19:15] = d[23:20] + d[31:28]
//   v[j]     = d[j] ^ d[j+16], j = 0..15
// u passes the data bits through. Purely combinational.
//
// The symbol split, the row-wise adders and the column-wise XOR follow the
// DMC description; generalising the pairing to other K2 is this design's
// choice.
module dmc_encoder #(
  parameter int K1 = ft_pkg::DMC_K1,
  parameter int K2 = ft_pkg::DMC_K2,
  parameter int M  = ft_pkg::DMC_M,
  localparam int N  = K1 * K2 * M,
  localparam int HW = K1 * (K2 / 2) * (M + 1),
  localparam int VW = K2 * M
) (
  input  logic [N-1:0]  d,
  output logic [HW-1:0] h,
  output logic [VW-1:0] v,
  output logic [N-1:0]  u
);

  localparam int HALF = K2 / 2;

  for (genvar r = 0; r < K1; r++) begin : g_row
    for (genvar c = 0; c < HALF; c++) begin : g_add
      localparam int SA = r * K2 + c;
      localparam int SB = r * K2 + c + HALF;
      localparam int G  = r * HALF + c;
      assign h[G*(M+1) +: M+1] = (M+1)'(d[SA*M +: M]) + (M+1)'(d[SB*M +: M]);
    end
  end

  always_comb begin
    v = '0;
    for (int r = 0; r < K1; r++) v ^= d[r*VW +: VW];
  end

  assign u = d;

endmodule
