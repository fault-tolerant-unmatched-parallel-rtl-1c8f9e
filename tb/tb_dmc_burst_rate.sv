// Correction rate of the 32-bit decimal matrix code for bursts of flipped
// cells.
//
// For every burst length L = 1..16 and every start bit (L adjacent data bits,
// bit index order D0..D31), 200 random words are encoded, the burst is
// flipped in the data, and the word is decoded with the check bits recomputed
// from the flipped data (as the shared encoder does on a read). The fraction
// of words returned correctly is printed per length. Bursts of up to 5 bits
// always fall into at most two neighbouring symbols and must all be
// corrected; that is checked. For 6, 7 and 8 bits whether a burst is
// corrected depends only on where it starts, not on the data, and the rates
// must come out as 92, 84 and 76 percent, the figures published for this
// code; longer bursts depend on the data too and are only reported.
module tb_dmc_burst_rate;
  logic [31:0] d_enc, d_rd, d_corr, u;
  logic [19:0] h_st, h_new, dh;
  logic [15:0] v_st, v_new, s;
  logic [7:0]  sym_err;
  logic        err;
  int checks = 0, failures = 0;

  dmc_encoder u_enc_wr (.d(d_enc), .h(h_st), .v(v_st), .u(u));
  dmc_encoder u_enc_rd (.d(d_rd), .h(h_new), .v(v_new), .u());
  dmc_decoder u_dec (.d_rd, .h_st, .v_st, .h_new, .v_new, .d_corr, .dh, .s, .sym_err, .err);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int len = 1; len <= 16; len++) begin
      int ok, total;
      logic [31:0] mask;
      ok = 0; total = 0;
      for (int start = 0; start + len <= 32; start++) begin
        mask = 32'((64'(1) << len) - 1) << start;
        for (int n = 0; n < 200; n++) begin
          d_enc = $urandom;
          #1;
          d_rd = d_enc ^ mask;
          #1;
          total++;
          if (d_corr == d_enc) ok++;
          if (len <= 5) begin
            checks++;
            if (d_corr != d_enc) begin
              failures++;
              $display("FAIL burst len %0d at bit %0d not corrected (word %h)", len, start, d_enc);
            end
          end
          checks++;
          if (!err) begin failures++; $display("FAIL burst len %0d at %0d not detected", len, start); end
        end
      end
      if (len >= 6 && len <= 8) begin
        int exp_pct;
        exp_pct = (len == 6) ? 92 : (len == 7) ? 84 : 76;
        checks++;
        if ((100 * ok) / total != exp_pct) begin
          failures++;
          $display("FAIL burst len %0d: rate %0d %% expected %0d %%", len, (100 * ok) / total, exp_pct);
        end
      end
      $display("burst of %2d bits: %0d of %0d words corrected (%0d %%)", len, ok, total, (100 * ok) / total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
