// tb_twiddle_rom: every entry of the stage-1 table of a 16-point FFT, for a
// nested (13) and a plain (16) modulus, against twiddles quantised to 18 bits
// in the bench; also spot-checks the exact values W^0 = 1 and W^4 = -i.
module tb_twiddle_rom;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] k;
  cres_t w13, w16;

  twiddle_rom #(.N(16), .STAGE(1), .M(13), .TW_W(18)) u13 (.k(k), .w(w13));
  twiddle_rom #(.N(16), .STAGE(1), .M(16), .TW_W(18)) u16 (.k(k), .w(w16));

  task automatic chk(int m, res_t got, longint exp);
    checks++;
    if (decode(m, got) != int'(pmod(exp, m))) begin
      failures++;
      $display("mod %0d k=%0d: got %0d expected %0d", m, k, decode(m, got), pmod(exp, m));
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      k = 2'(i);
      #1;
      chk(13, w13.re, twiddle(16, 2 * i, 18, 0));
      chk(13, w13.im, twiddle(16, 2 * i, 18, 1));
      chk(16, w16.re, twiddle(16, 2 * i, 18, 0));
      chk(16, w16.im, twiddle(16, 2 * i, 18, 1));
    end
    k = 0; #1;
    chk(13, w13.re, 131071); chk(13, w13.im, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
