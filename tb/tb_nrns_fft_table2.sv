// tb_nrns_fft_table2: the FFT sizes and moduli sets of the design's size
// table beyond the default 1024 points: 2048 points on (7,8,9,11,13,17),
// 4096 on (7,8,11,13,15,31) and 16384 on (11,13,14,15,17,19), each with 8-bit
// inputs. One frame of each is streamed with stalls and checked residue by
// residue against the bench model (fft_run).
module tb_nrns_fft_table2;
  int c [3], f [3];
  logic d [3];
  int checks, failures;

  fft_run #(.N(2048),  .IN_W(8), .MODS('{7, 8, 9, 11, 13, 17, 0, 0}))   u2k  (.checks(c[0]), .failures(f[0]), .done(d[0]));
  fft_run #(.N(4096),  .IN_W(8), .MODS('{7, 8, 11, 13, 15, 31, 0, 0}))  u4k  (.checks(c[1]), .failures(f[1]), .done(d[1]));
  fft_run #(.N(16384), .IN_W(8), .MODS('{11, 13, 14, 15, 17, 19, 0, 0})) u16k (.checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] && d[1] && d[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
