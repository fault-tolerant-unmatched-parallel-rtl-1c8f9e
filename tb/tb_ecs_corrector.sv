// Self-checking testbench of ecs_corrector.
//
// Builds random output samples y1..y4, the matching redundant samples
// r5 = y1+y2+y3+y4 and r6 = y1+2y2+3y3+4y4 (modulo 256), then adds a random
// error to one of the six values and checks the detection flag, the
// syndromes, the located filter and that the corrected samples equal the
// error-free ones. Errors that are multiples of 64, which the modulo-256
// check cannot always place, must then be flagged and never miscorrected.
// Also checks error-free samples and a double error.
module tb_ecs_corrector;
  import ft_pkg::*;

  logic [3:0][7:0] y, y_corr, y_good;
  logic [7:0] r5, r6, z1, z2;
  logic err;
  logic [3:0] filt_err;
  ecs_loc_e loc;
  int checks = 0, failures = 0;

  ecs_corrector dut (.y, .r5, .r6, .y_corr, .z1, .z2, .err, .filt_err, .loc);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: y=%h r5=%h r6=%h z1=%h z2=%h loc=%s y_corr=%h", what, y, r5, r6, z1, z2, loc.name(), y_corr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int which, e, s5, s6;
      for (int i = 0; i < 4; i++) y_good[i] = 8'($urandom);
      s5 = 0; s6 = 0;
      for (int i = 0; i < 4; i++) begin s5 += y_good[i]; s6 += (i + 1) * y_good[i]; end
      y  = y_good;
      r5 = 8'(s5);
      r6 = 8'(s6);
      which = (n % 7);            // 0..3 filter, 4 r5, 5 r6, 6 none
      e = (n % 10 == 3) ? 64 * $urandom_range(1, 3) : $urandom_range(1, 255);
      case (which)
        0, 1, 2, 3: y[which] = 8'(y[which] + e);
        4: r5 = 8'(r5 + e);
        5: r6 = 8'(r6 + e);
        default: ;
      endcase
      #1;
      if (which == 6) begin
        check(!err && loc == ECS_OK && y_corr == y_good && filt_err == 0, "no error");
      end else if (which < 4) begin
        check(err, "detect");
        check(z1 == 8'(e) && z2 == 8'((which + 1) * e), "syndromes");
        if (e % 64 == 0) begin
          // may be ambiguous: either located and corrected, or flagged
          if (loc == ECS_UNCORR) check(y_corr == y && filt_err == 0, "ambiguous untouched");
          else check(loc == ecs_loc_e'(which + 1) && y_corr == y_good, "ambiguous located");
          if (which == 3) check(loc == ECS_UNCORR, "4e = 0 is ambiguous");
        end else begin
          check(loc == ecs_loc_e'(which + 1), "locate");
          check(filt_err == 4'(1 << which), "filt_err");
          check(y_corr == y_good, "correct");
        end
      end else begin
        check(err, "detect redundant");
        if (which == 5 || e % 64 != 0)
          check(loc == ((which == 4) ? ECS_R5 : ECS_R6), "locate redundant");
        else
          check(loc == ECS_UNCORR, "ambiguous redundant");
        check(y_corr == y_good && filt_err == 0, "originals untouched");
      end
    end
    // two filters in error with an ambiguous pattern: e1=1 in f1, e2=1 in f2
    // gives z1=2, z2=3: no single filter fits
    y = y_good; y[0] = 8'(y[0] + 1); y[1] = 8'(y[1] + 1);
    r5 = 8'(int'(y_good[0]) + y_good[1] + y_good[2] + y_good[3]);
    r6 = 8'(int'(y_good[0]) + 2 * y_good[1] + 3 * y_good[2] + 4 * y_good[3]);
    #1;
    check(err && loc == ECS_UNCORR && y_corr == y, "double error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
