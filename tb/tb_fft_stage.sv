// tb_fft_stage: first stage of an 8-point FFT on moduli (7, 11), 11 nested.
// Random residue frames are streamed with random stall cycles. The expected
// stream per frame is X_k = x_k + x_(k+4) for k = 0..3 followed by
// Y_k = (x_k - x_(k+4)) * W8^k, computed in the bench with 18-bit twiddles.
// Also checks that the first valid output follows the first sample after
// D = 4 accepted samples (plus the output register).
module tb_fft_stage;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  localparam mod_list_t MODS = '{7, 11, 0, 0, 0, 0, 0, 0};
  localparam int FR = 6;
  int checks = 0, failures = 0, stalls = 0;
  logic clk = 0, rst_n = 0, en = 0, vin = 0, vout;
  cres_t din [2];
  cres_t dout [2];
  int xr [FR][8], xi [FR][8];
  int got = 0, accepted = 0, first_out_at = -1;

  fft_stage #(.N(8), .STAGE(0), .L(2), .MODS(MODS), .ACT(2), .TW_W(18)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .vin(vin), .din(din), .vout(vout), .dout(dout));

  always #5 clk = ~clk;

  function automatic longint expect_part(int m, int idx, int part);
    int f = idx / 8, k = idx % 8;
    longint dr, di, wr, wi;
    if (k < 4) return part == 0 ? xr[f][k] + xr[f][k+4] : xi[f][k] + xi[f][k+4];
    k = k - 4;
    dr = xr[f][k] - xr[f][k+4]; di = xi[f][k] - xi[f][k+4];
    wr = twiddle(8, k, 18, 0);  wi = twiddle(8, k, 18, 1);
    return part == 0 ? pmod(dr * wr - di * wi, m) : pmod(dr * wi + di * wr, m);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FR; f++)
      for (int k = 0; k < 8; k++) begin
        xr[f][k] = $urandom_range(0, 300);
        xi[f][k] = $urandom_range(0, 300);
      end
    din[0] = '0; din[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (accepted < FR * 8) begin
      @(negedge clk);
      // outputs registered on the previous enabled edge
      en = ($urandom_range(0, 4) != 0);
      if (!en) stalls++;
      if (en) begin
        vin = 1;
        din[0] = '{enc(7,  xr[accepted/8][accepted%8]), enc(7,  xi[accepted/8][accepted%8])};
        din[1] = '{enc(11, xr[accepted/8][accepted%8]), enc(11, xi[accepted/8][accepted%8])};
        if (vout && got < (FR - 1) * 8) begin
          if (first_out_at < 0) first_out_at = accepted;
          for (int c = 0; c < 2; c++) begin
            int m;
            m = (c == 0) ? 7 : 11;
            checks += 2;
            if (decode(m, dout[c].re) != int'(pmod(expect_part(m, got, 0), m)) ||
                decode(m, dout[c].im) != int'(pmod(expect_part(m, got, 1), m))) begin
              failures++;
              if (failures < 10) $display("out %0d mod %0d wrong: got %0d,%0d exp %0d,%0d raw %h %h", got, m, decode(m, dout[c].re), decode(m, dout[c].im), pmod(expect_part(m, got, 0), m), pmod(expect_part(m, got, 1), m), dout[0], dout[1]);
            end
          end
          got++;
        end
        accepted++;
      end
    end
    checks++;
    if (first_out_at != 5) begin
      failures++;
      $display("first output after %0d accepted samples, expected 5", first_out_at);
    end
    checks++;
    if (stalls == 0 || got != (FR - 1) * 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
