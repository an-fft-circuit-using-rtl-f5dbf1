// tb_rns_mod_op: exhaustive check of the plain modular add, subtract and
// multiply circuits for moduli 7 and 16 against arithmetic done in the bench.
module tb_rns_mod_op;
  import nrns_pkg::*;
  int checks = 0, failures = 0;
  res_t a7, b7, a16, b16, s7, d7, p7, s16, d16, p16;

  rns_mod_op #(.M(7),  .OP(OP_ADD)) u_s7  (.a(a7),  .b(b7),  .y(s7));
  rns_mod_op #(.M(7),  .OP(OP_SUB)) u_d7  (.a(a7),  .b(b7),  .y(d7));
  rns_mod_op #(.M(7),  .OP(OP_MUL)) u_p7  (.a(a7),  .b(b7),  .y(p7));
  rns_mod_op #(.M(16), .OP(OP_ADD)) u_s16 (.a(a16), .b(b16), .y(s16));
  rns_mod_op #(.M(16), .OP(OP_SUB)) u_d16 (.a(a16), .b(b16), .y(d16));
  rns_mod_op #(.M(16), .OP(OP_MUL)) u_p16 (.a(a16), .b(b16), .y(p16));

  task automatic chk(res_t got, int exp);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      if (failures < 10) $display("mismatch: got %0d expected %0d", got, exp);
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
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a16 = res_t'(x); b16 = res_t'(y);
        a7 = res_t'(x % 7); b7 = res_t'(y % 7);
        #1;
        chk(s16, (x + y) % 16);
        chk(d16, (x - y + 16) % 16);
        chk(p16, (x * y) % 16);
        chk(s7, (x % 7 + y % 7) % 7);
        chk(d7, (x % 7 - y % 7 + 7) % 7);
        chk(p7, ((x % 7) * (y % 7)) % 7);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
