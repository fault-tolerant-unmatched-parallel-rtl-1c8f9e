// Self-checking testbench of dmc_decoder (32-bit word, 2 x 4 symbols of 4
// bits).
//
// A reference encoder in the testbench makes the stored check bits of a
// random word and, after cells are flipped, the check bits recomputed from
// the flipped data (the role of the shared encoder). Cases:
//   - no error: data unchanged, err low
//   - any error pattern inside one symbol: corrected, only that symbol flagged
//   - errors in two symbols whose columns differ in parity (e.g. a burst
//     across two neighbouring symbols): both corrected
//   - flipped check bits only (H or V): data unchanged, err high
module tb_dmc_decoder;
  logic [31:0] d_rd, d_corr;
  logic [19:0] h_st, h_new, dh;
  logic [15:0] v_st, v_new, s;
  logic [7:0]  sym_err;
  logic        err;
  int checks = 0, failures = 0;

  dmc_decoder dut (.d_rd, .h_st, .v_st, .h_new, .v_new, .d_corr, .dh, .s, .sym_err, .err);

  function automatic logic [19:0] ref_h(logic [31:0] w);
    logic [19:0] r;
    r[4:0]   = 5'(w[3:0])   + 5'(w[11:8]);
    r[9:5]   = 5'(w[7:4])   + 5'(w[15:12]);
    r[14:10] = 5'(w[19:16]) + 5'(w[27:24]);
    r[19:15] = 5'(w[23:20]) + 5'(w[31:28]);
    return r;
  endfunction

  function automatic logic [15:0] ref_v(logic [31:0] w);
    return w[15:0] ^ w[31:16];
  endfunction

  // store w, flip data cells dmask and check cells hmask/vmask, decode
  task automatic run(logic [31:0] w, logic [31:0] dmask, logic [19:0] hmask,
                     logic [15:0] vmask, logic [7:0] exp_sym, string what);
    h_st  = ref_h(w) ^ hmask;
    v_st  = ref_v(w) ^ vmask;
    d_rd  = w ^ dmask;
    h_new = ref_h(d_rd);
    v_new = ref_v(d_rd);
    #1;
    checks += 3;
    if (d_corr !== w) begin failures++; $display("FAIL %s: w=%h mask=%h corr=%h", what, w, dmask, d_corr); end
    if (sym_err !== exp_sym) begin failures++; $display("FAIL %s: sym_err=%b exp %b", what, sym_err, exp_sym); end
    if (err !== ((dmask | 32'(hmask) | 32'(vmask)) != 0)) begin failures++; $display("FAIL %s: err=%b", what, err); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] w, m;
      int a, b;
      w = $urandom;
      case (n % 5)
        0: run(w, '0, '0, '0, '0, "clean");
        1, 2: begin
          a = $urandom_range(0, 7);
          m = 32'($urandom_range(1, 15)) << (4 * a);
          run(w, m, '0, '0, 8'(1 << a), "one symbol");
        end
        3: begin
          a = $urandom_range(0, 7);
          do b = $urandom_range(0, 7); while ((a % 2) == (b % 2));
          m = (32'($urandom_range(1, 15)) << (4 * a)) | (32'($urandom_range(1, 15)) << (4 * b));
          run(w, m, '0, '0, 8'((1 << a) | (1 << b)), "two symbols");
        end
        default: begin
          if ($urandom_range(0, 1) == 0) run(w, '0, 20'($urandom_range(1, 20'hFFFFF)), '0, '0, "H cells");
          else                           run(w, '0, '0, 16'($urandom_range(1, 16'hFFFF)), '0, "V cells");
        end
      endcase
    end
    // the 4-bit burst of symbol 0 and a 2-bit burst across symbols 0 and 1
    run(32'h1234_5678, 32'h0000_000F, '0, '0, 8'b0000_0001, "burst symbol 0");
    run(32'h1234_5678, 32'h0000_0018, '0, '0, 8'b0000_0011, "burst across 0/1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
