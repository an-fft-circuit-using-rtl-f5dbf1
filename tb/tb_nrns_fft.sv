// tb_nrns_fft: end-to-end test of the residue FFT at 16 points with 12-bit
// inputs, so that the moduli schedule starts with five moduli and the RNS2RNS
// converters add the sixth (16) in front of stage 3. Random frames stream back
// to back with random stall cycles; every output residue of every modulus is
// compared with a model that runs the same staged residue FFT in the bench,
// the bin index with the bit-reversed output count, and the latency with
// N + log2(N) accepted samples. Counts how often each mechanism happened:
// stalls, outputs of a modulus added by a converter, outputs of a nested
// modulus, and back-to-back frames; one that never happened is a failure.
module tb_nrns_fft;
  import nrns_pkg::*;
  import tb_ref_pkg::*;
  localparam int        N    = 16;
  localparam int        IN_W = 12;
  localparam int        TW_W = 18;
  localparam int        L    = 6;
  localparam mod_list_t MODS = '{5, 7, 9, 11, 13, 16, 0, 0};
  localparam int        S    = $clog2(N);
  localparam int        FR   = 8;          // frames checked
  localparam int        FEED = FR + 2;     // frames fed (the rest flush)

  int checks = 0, failures = 0;
  int n_stall = 0, n_ext = 0, n_nested = 0, n_frames = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0] in_re, in_im;
  logic out_valid;
  logic [S-1:0] out_bin;
  cres_t out_res [L];

  longint x [FEED][];
  longint y [FEED][];
  int accepted = 0, got = 0, first_at = -1;

  nrns_fft #(.N(N), .IN_W(IN_W), .TW_W(TW_W), .L(L), .MODS(MODS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_bin(out_bin), .out_res(out_res));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * N * FEED + 1000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < S; b++) if (v & (1 << b)) r |= 1 << (S - 1 - b);
    return r;
  endfunction

  // check one output (sampled in the cycle it is flagged)
  always @(posedge clk) begin
    if (rst_n && out_valid && got < FR * N) begin
      int f, t, a0;
      f = got / N; t = got % N;
      a0 = ref_active(MODS, L, IN_W, 0, S);
      if (first_at < 0) first_at = accepted - (in_valid ? 1 : 0);  // samples consumed so far
      checks++;
      if (int'(out_bin) != bitrev(t)) failures++;
      for (int i = 0; i < L; i++) begin
        checks += 2;
        if (i >= a0) n_ext++;
        if (field_mask(MODS[i]) != 0) n_nested++;
        if (decode(MODS[i], out_res[i].re) != int'(y[f][(i*N + t)*2]) ||
            decode(MODS[i], out_res[i].im) != int'(y[f][(i*N + t)*2 + 1])) begin
          failures++;
          if (failures < 10) $display("frame %0d out %0d mod %0d: got %0d,%0d exp %0d,%0d", f, t,
            MODS[i], decode(MODS[i], out_res[i].re), decode(MODS[i], out_res[i].im),
            y[f][(i*N + t)*2], y[f][(i*N + t)*2 + 1]);
        end
      end
      if (t == N - 1) n_frames++;
      got++;
    end
  end

  initial begin
    for (int f = 0; f < FEED; f++) begin
      x[f] = new[2 * N];
      foreach (x[f][q]) x[f][q] = longint'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W - 1));
      ref_fft(N, IN_W, TW_W, MODS, L, x[f], y[f]);
    end
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (accepted < FEED * N) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) begin
        in_re = IN_W'(x[accepted / N][2 * (accepted % N)]);
        in_im = IN_W'(x[accepted / N][2 * (accepted % N) + 1]);
        accepted++;
      end else n_stall++;
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (got != FR * N) begin failures++; $display("only %0d outputs", got); end
    checks++;
    // first bin after N + log2(N) consumed samples
    if (first_at != N + S) begin failures++; $display("latency %0d accepted samples", first_at); end
    checks += 4;
    if (n_stall == 0)  begin failures++; $display("no stall happened"); end
    if (n_ext == 0)    begin failures++; $display("no converter-added modulus checked"); end
    if (n_nested == 0) begin failures++; $display("no nested modulus checked"); end
    if (n_frames < 2)  begin failures++; $display("fewer than two frames"); end
    $display("stalls=%0d extended=%0d nested=%0d frames=%0d", n_stall, n_ext, n_nested, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
