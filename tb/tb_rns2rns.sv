// tb_rns2rns: adds modulus 13 (nested) to (5,7,9,11) and modulus 16 to
// (5,7,9,11,13); random signed values inside each source range must come out
// with the right residue for the new modulus.
module tb_rns2rns;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  localparam mod_list_t MODS = '{5, 7, 9, 11, 13, 16, 0, 0};
  int checks = 0, failures = 0;
  res_t r4 [4];
  res_t r5 [5];
  res_t e13, e16;
  longint v;

  rns2rns #(.NIN(4), .MODS(MODS)) u13 (.res(r4), .ext(e13));
  rns2rns #(.NIN(5), .MODS(MODS)) u16 (.res(r5), .ext(e16));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      v = longint'($urandom_range(0, 3464)) - 1732;
      for (int i = 0; i < 4; i++) r4[i] = enc(MODS[i], v);
      v = longint'($urandom_range(0, 45044)) - 22522;
      for (int i = 0; i < 5; i++) r5[i] = enc(MODS[i], v);
      #1;
      checks += 2;
      if (decode(13, e13) != int'(pmod(garner(MODS, 4, '{decode(5, r4[0]), decode(7, r4[1]),
          decode(9, r4[2]), decode(11, r4[3]), 0, 0, 0, 0}), 13))) failures++;
      if (decode(16, e16) != int'(pmod(v, 16))) begin
        failures++;
        if (failures < 10) $display("v=%0d got %0d", v, decode(16, e16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
