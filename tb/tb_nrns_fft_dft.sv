// tb_nrns_fft_dft: checks that the residue outputs are the actual spectrum
// where the twiddles are exact. A 4-point FFT with 2-bit twiddles has the exact
// factors 1 and -i, so no value leaves the dynamic range; each output bin,
// rebuilt from its six residues by Garner's method, must equal the DFT of the
// 8-bit input frame computed directly in the bench
// (c_k = sum_j x_j * i^(-jk)). Random stalls and back-to-back frames.
module tb_nrns_fft_dft;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  localparam int        N    = 4;
  localparam int        L    = 6;
  localparam mod_list_t MODS = '{5, 7, 9, 11, 13, 16, 0, 0};
  localparam int        FR   = 200;

  int checks = 0, failures = 0, n_stall = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] in_re, in_im;
  logic out_valid;
  logic [1:0] out_bin;
  cres_t out_res [L];
  int xr [FR + 2][N], xi [FR + 2][N];
  int accepted = 0, got = 0;

  nrns_fft #(.N(N), .IN_W(8), .TW_W(2), .L(L), .MODS(MODS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_bin(out_bin), .out_res(out_res));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * N * FR) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && got < FR * N) begin
      int f, k;
      longint r_re [MAXL], r_im [MAXL], er, ei;
      f = got / N;
      k = int'(out_bin);
      for (int i = 0; i < MAXL; i++) begin
        r_re[i] = (i < L) ? decode(MODS[i], out_res[i].re) : 0;
        r_im[i] = (i < L) ? decode(MODS[i], out_res[i].im) : 0;
      end
      er = 0; ei = 0;
      // x_j * (-i)^(jk)
      for (int j = 0; j < N; j++)
        case ((j * k) % 4)
          0: begin er += xr[f][j]; ei += xi[f][j]; end
          1: begin er += xi[f][j]; ei -= xr[f][j]; end
          2: begin er -= xr[f][j]; ei -= xi[f][j]; end
          default: begin er -= xi[f][j]; ei += xr[f][j]; end
        endcase
      checks += 2;
      if (garner(MODS, L, r_re) != er || garner(MODS, L, r_im) != ei) begin
        failures++;
        if (failures < 10) $display("frame %0d bin %0d: got (%0d,%0d) expected (%0d,%0d)", f, k,
          garner(MODS, L, r_re), garner(MODS, L, r_im), er, ei);
      end
      got++;
    end
  end

  initial begin
    for (int f = 0; f < FR + 2; f++)
      for (int j = 0; j < N; j++) begin
        xr[f][j] = int'($urandom_range(0, 255)) - 128;
        xi[f][j] = int'($urandom_range(0, 255)) - 128;
      end
    xr[0] = '{-128, -128, -128, -128};     // extreme frame: bin 0 = -512
    xi[0] = '{127, 127, 127, 127};
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (accepted < (FR + 2) * N) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        in_re = 8'(xr[accepted / N][accepted % N]);
        in_im = 8'(xi[accepted / N][accepted % N]);
        accepted++;
      end else n_stall++;
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks += 2;
    if (got != FR * N) begin failures++; $display("only %0d outputs", got); end
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
