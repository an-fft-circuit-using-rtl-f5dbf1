// tb_nrns_mod_op: exhaustive check of the nested-RNS modular circuits for the
// outer moduli 13 and 17: every operand pair is encoded, operated on, decoded
// and compared with the modular result computed in the bench.
module tb_nrns_mod_op;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  res_t a13, b13, a17, b17, s13, d13, p13, s17, d17, p17;

  nrns_mod_op #(.M(13), .OP(OP_ADD)) u_s13 (.a(a13), .b(b13), .y(s13));
  nrns_mod_op #(.M(13), .OP(OP_SUB)) u_d13 (.a(a13), .b(b13), .y(d13));
  nrns_mod_op #(.M(13), .OP(OP_MUL)) u_p13 (.a(a13), .b(b13), .y(p13));
  nrns_mod_op #(.M(17), .OP(OP_ADD)) u_s17 (.a(a17), .b(b17), .y(s17));
  nrns_mod_op #(.M(17), .OP(OP_SUB)) u_d17 (.a(a17), .b(b17), .y(d17));
  nrns_mod_op #(.M(17), .OP(OP_MUL)) u_p17 (.a(a17), .b(b17), .y(p17));

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
    checks++;
    if (!is_nested(13) || !is_nested(17)) failures++;
    for (int x = 0; x < 17; x++)
      for (int y = 0; y < 17; y++) begin
        a17 = enc(17, x); b17 = enc(17, y);
        a13 = enc(13, x); b13 = enc(13, y);
        #1;
        chk(17, s17, x + y);
        chk(17, d17, x - y);
        chk(17, p17, x * y);
        chk(13, s13, x % 13 + y % 13);
        chk(13, d13, x % 13 - y % 13);
        chk(13, p13, (x % 13) * (y % 13));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
