// Decimal matrix code (DMC) decoder: syndrome calculator, error locator and
// error corrector.
//
// The check bits h_new/v_new are recomputed from the read data by the DMC
// encoder (the encoder is shared with the write path, see dmc_memory) and
// compared with the stored ones:
//   dH_g = h_new_g - h_st_g     (M+1)-bit integer subtraction per adder group
//   S    = v_new ^ v_st         one bit per column bit
// Symbol s (row r, column c) belongs to adder group g = r*(K2/2) + c mod (K2/2)
// and to vertical column c, whose syndrome is S[c*M +: M]. The locator marks
// symbol s as erroneous when both dH_g and S[c*M +: M] are non-zero, and the
// corrector inverts the bits of that symbol selected by S:
//   d_corr[s*M +: M] = d_rd[s*M +: M] ^ S[c*M +: M].
// An upset that only touches check bits gives a non-zero syndrome on one side
// only: it is reported by err but leaves the data untouched.
//
// Purely combinational. Syndrome, locator and corrector follow the DMC
// description; the err output and the per-symbol flags are this design's.
module dmc_decoder #(
  parameter int K1 = ft_pkg::DMC_K1,
  parameter int K2 = ft_pkg::DMC_K2,
  parameter int M  = ft_pkg::DMC_M,
  localparam int N  = K1 * K2 * M,
  localparam int NG = K1 * (K2 / 2),
  localparam int HW = NG * (M + 1),
  localparam int VW = K2 * M
) (
  input  logic [N-1:0]     d_rd,     // data bits as read (D')
  input  logic [HW-1:0]    h_st,     // stored horizontal check bits
  input  logic [VW-1:0]    v_st,     // stored vertical check bits
  input  logic [HW-1:0]    h_new,    // H' recomputed from d_rd
  input  logic [VW-1:0]    v_new,    // V' recomputed from d_rd
  output logic [N-1:0]     d_corr,   // corrected data
  output logic [HW-1:0]    dh,       // horizontal syndrome
  output logic [VW-1:0]    s,        // vertical syndrome
  output logic [K1*K2-1:0] sym_err,  // located erroneous symbols
  output logic             err       // any syndrome bit non-zero
);

  localparam int HALF = K2 / 2;

  // Syndrome calculator: subtracters and XOR gates
  for (genvar g = 0; g < NG; g++) begin : g_sub
    assign dh[g*(M+1) +: M+1] = h_new[g*(M+1) +: M+1] - h_st[g*(M+1) +: M+1];
  end
  assign s   = v_new ^ v_st;
  assign err = (dh != '0) || (s != '0);

  // Error locator and corrector
  for (genvar r = 0; r < K1; r++) begin : g_row
    for (genvar c = 0; c < K2; c++) begin : g_sym
      localparam int SYM = r * K2 + c;
      localparam int G   = r * HALF + (c % HALF);
      assign sym_err[SYM] = (dh[G*(M+1) +: M+1] != '0) && (s[c*M +: M] != '0);
      assign d_corr[SYM*M +: M] = sym_err[SYM] ? (d_rd[SYM*M +: M] ^ s[c*M +: M])
                                               : d_rd[SYM*M +: M];
    end
  end

endmodule
