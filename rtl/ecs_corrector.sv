// Single-fault detection, location and correction for four parallel filters
// protected with the efficient coding scheme (ECS).
//
// The two redundant filters compute r5 = y1+y2+y3+y4 and r6 = y1+2y2+3y3+4y4
// (their impulse responses are the same sums of h1..h4). For every output
// sample this block forms the two syndromes, modulo 2^DW:
//   z1 = (y1+y2+y3+y4) - r5
//   z2 = (y1+2y2+3y3+4y4) - r6
// An error e in filter i gives z1 = e and z2 = i*e; an error e in redundant
// filter 5 gives z1 = -e, z2 = 0; one in filter 6 gives z1 = 0, z2 = e. The
// locator lists every single-filter explanation of (z1, z2):
//   filter i (1..4)   z1 != 0 and z2 == i*z1
//   filter 5          z1 != 0 and z2 == 0
//   filter 6          z1 == 0 and z2 != 0
// If exactly one fits, that filter is the faulty one: an original filter's
// sample is corrected to yi - z1, a redundant filter's error leaves the
// originals as they are. If none or several fit (several filters wrong, or
// an error that is a multiple of 2^(DW-2), for which weights 2 and 4 are
// zero divisors modulo 2^DW) the sample is flagged ECS_UNCORR and passed on
// uncorrected, so a single error is never miscorrected.
//
// Purely combinational; one sample of each filter per evaluation. The ECS
// equations (two redundant filters, weights 1..4) follow the case study; the
// modulo arithmetic and the handling of ambiguous syndromes are this design's
// choices.
module ecs_corrector #(
  parameter int DW    = ft_pkg::DW,
  localparam int NFILT = ft_pkg::NFILT
) (
  input  logic [NFILT-1:0][DW-1:0] y,        // original filter outputs
  input  logic [DW-1:0]            r5,       // redundant filter h1+h2+h3+h4
  input  logic [DW-1:0]            r6,       // redundant filter h1+2h2+3h3+4h4
  output logic [NFILT-1:0][DW-1:0] y_corr,   // corrected outputs
  output logic [DW-1:0]            z1,       // syndrome of r5
  output logic [DW-1:0]            z2,       // syndrome of r6
  output logic                     err,      // any syndrome non-zero
  output logic [NFILT-1:0]         filt_err, // one-hot: which original filter
  output ft_pkg::ecs_loc_e         loc
);

  logic [DW-1:0]    s1, s2;
  logic [NFILT-1:0] match;
  logic             m5, m6;
  int unsigned      nmatch;

  always_comb begin
    s1 = '0;
    s2 = '0;
    for (int i = 0; i < NFILT; i++) begin
      s1 = DW'(s1 + y[i]);
      s2 = DW'(s2 + (i + 1) * y[i]);
    end
    z1 = DW'(s1 - r5);
    z2 = DW'(s2 - r6);
    err = (z1 != '0) || (z2 != '0);

    nmatch = 0;
    for (int i = 0; i < NFILT; i++) begin
      match[i] = (z1 != '0) && (z2 == DW'((i + 1) * z1));
      if (match[i]) nmatch++;
    end
    m5 = (z1 != '0) && (z2 == '0);
    m6 = (z1 == '0) && (z2 != '0);
    if (m5) nmatch++;
    if (m6) nmatch++;

    filt_err = '0;
    y_corr   = y;
    loc      = ft_pkg::ECS_UNCORR;
    if (!err)              loc = ft_pkg::ECS_OK;
    else if (nmatch == 1) begin
      if (m5)      loc = ft_pkg::ECS_R5;
      else if (m6) loc = ft_pkg::ECS_R6;
      for (int i = 0; i < NFILT; i++) begin
        if (match[i]) begin
          loc         = ft_pkg::ecs_loc_e'(i + 1);
          filt_err[i] = 1'b1;
          y_corr[i]   = DW'(y[i] - z1);
        end
      end
    end
  end

endmodule
