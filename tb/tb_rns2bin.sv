// tb_rns2bin: random integers across the centred range of the moduli
// (5,7,9,11), with 9 and 11 in nested form, are given as residues; the
// converter must return the integer itself. Both range ends are included.
module tb_rns2bin;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  localparam mod_list_t MODS = '{5, 7, 9, 11, 13, 16, 0, 0};
  int checks = 0, failures = 0;
  res_t res [4];
  logic signed [47:0] x;
  longint v;

  rns2bin #(.NIN(4), .MODS(MODS)) dut (.res(res), .x(x));

  task automatic try(longint val);
    for (int i = 0; i < 4; i++) res[i] = enc(MODS[i], val);
    #1;
    checks++;
    if (x != 48'(val)) begin
      failures++;
      if (failures < 10) $display("value %0d: got %0d", val, x);
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
    try(0); try(-1); try(1); try(-1732); try(1732);
    for (int n = 0; n < 3000; n++) begin
      v = longint'($urandom_range(0, 3464)) - 1732;
      try(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
