// tb_rns_butterfly: random complex operands for a nested modulus (11) and a
// plain one (7); X = A + B and Y = (A - B) * W are recomputed in the bench with
// ordinary modular arithmetic and compared part by part.
module tb_rns_butterfly;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  cres_t a11, b11, w11, x11, y11, a7, b7, w7, x7, y7;
  int ar, ai, br, bi, wr, wi;

  rns_butterfly #(.M(11)) u11 (.a(a11), .b(b11), .w(w11), .x(x11), .y(y11));
  rns_butterfly #(.M(7))  u7  (.a(a7),  .b(b7),  .w(w7),  .x(x7),  .y(y7));

  task automatic chk(int m, res_t got, longint exp);
    checks++;
    if (decode(m, got) != int'(pmod(exp, m))) begin
      failures++;
      if (failures < 10) $display("mod %0d: got %0d expected %0d", m, decode(m, got), pmod(exp, m));
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
    for (int n = 0; n < 2000; n++) begin
      ar = $urandom_range(0, 76); ai = $urandom_range(0, 76);
      br = $urandom_range(0, 76); bi = $urandom_range(0, 76);
      wr = $urandom_range(0, 76); wi = $urandom_range(0, 76);
      a11 = '{enc(11, ar), enc(11, ai)}; b11 = '{enc(11, br), enc(11, bi)};
      w11 = '{enc(11, wr), enc(11, wi)};
      a7  = '{enc(7, ar),  enc(7, ai)};  b7  = '{enc(7, br),  enc(7, bi)};
      w7  = '{enc(7, wr),  enc(7, wi)};
      #1;
      chk(11, x11.re, ar + br);  chk(11, x11.im, ai + bi);
      chk(11, y11.re, (ar - br) * wr - (ai - bi) * wi);
      chk(11, y11.im, (ar - br) * wi + (ai - bi) * wr);
      chk(7, x7.re, ar + br);    chk(7, x7.im, ai + bi);
      chk(7, y7.re, (ar - br) * wr - (ai - bi) * wi);
      chk(7, y7.im, (ar - br) * wi + (ai - bi) * wr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
