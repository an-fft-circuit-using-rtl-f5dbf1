// tb_bin2rns: all 256 signed 8-bit inputs into a nested (11) and a plain (16)
// converter; the decoded residue must equal the input modulo the modulus.
module tb_bin2rns;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [7:0] x;
  res_t r11, r16;

  bin2rns #(.M(11), .W(8)) u11 (.x(x), .r(r11));
  bin2rns #(.M(16), .W(8)) u16 (.x(x), .r(r16));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      checks += 2;
      if (r11 != enc(11, v) || decode(11, r11) != int'(pmod(v, 11))) failures++;
      if (decode(16, r16) != int'(pmod(v, 16))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
