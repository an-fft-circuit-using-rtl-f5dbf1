// tb_nrns_reduce: every integer below the inner range of outer modulus 13 is
// given as inner digits; the block must return the digits of its value mod 13.
module tb_nrns_reduce;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  res_t d, y;
  int   mask;
  longint rng;

  nrns_reduce #(.M(13)) dut (.d(d), .y(y));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask = field_mask(13);
    rng = 1;
    for (int p = 0; p < NPRIME; p++) if (mask[p]) rng = rng * prime_at(p);
    for (int v = 0; v < rng; v++) begin
      d = '0;
      for (int p = 0; p < NPRIME; p++) if (mask[p]) d[4*p +: 4] = 4'(v % prime_at(p));
      #1;
      checks++;
      if (decode(13, y) != v % 13) begin
        failures++;
        if (failures < 10) $display("v=%0d got %0d", v, decode(13, y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
