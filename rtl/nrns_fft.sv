// nrns_fft: streaming N-point radix-2 FFT computed in a nested residue number
// system, with a dynamic range that grows from stage to stage.
//
// Complex IN_W-bit samples are converted at the input to residues of the first
// few moduli of MODS (bin2rns, one per modulus and part). They then pass through
// log2(N) pipelined radix-2 stages (fft_stage). Each stage only computes the
// moduli it needs: ACT(s) moduli, enough for a signed value of IN_W+s+1 bits, and
// all L moduli in the last stage. Where a stage needs more moduli than its
// predecessor, RNS2RNS converters (rns2rns) derive the residues of each new
// modulus from those already present, on the real and the imaginary part.
// Moduli for which it saves LUTs are computed in nested RNS (see nrns_pkg).
// The result leaves as residues of all L moduli; conversion back to binary is
// not part of the circuit. Each residue field is 24 bits wide; the bits a
// modulus does not use (above a plain residue, or above each inner digit) are
// constant zero.
//
// Interface: a sample is accepted on every cycle with in_valid high, and the
// whole pipeline advances only on those cycles (in_valid low is a stall). The
// spectrum of each frame of N accepted samples leaves one bin per accepted
// sample, in bit-reversed order: out_bin gives the bin index, out_valid marks a
// new output for one cycle. The first bin of a frame is ready after N + log2(N)
// accepted samples counted from the frame's first one (the stage delays add up
// to N-1, plus the input register and one register per stage), so a frame is
// pushed out by the samples of the next one.
// The input conversion, the butterfly stages, the stage-by-stage converters and
// the moduli sets follow the document; the schedule of when moduli are added,
// the signed reading of values and the handshake are this design's choices.
module nrns_fft
  import nrns_pkg::*;
#(
  parameter int        N    = 1024,
  parameter int        IN_W = 8,
  parameter int        TW_W = 18,
  parameter int        L    = 6,
  parameter mod_list_t MODS = '{5, 7, 9, 11, 13, 16, 0, 0}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic [$clog2(N)-1:0]   out_bin,
  output cres_t                  out_res [L]
);
  localparam int S = $clog2(N);

  typedef int act_t [S + 1];

  // act[s]: moduli used by stage s (act[S] repeats the last stage)
  function automatic act_t schedule();
    act_t t;
    for (int s = 0; s < S; s++) t[s] = active_moduli(MODS, L, IN_W, s, S);
    t[S] = L;
    return t;
  endfunction

  localparam act_t ACT = schedule();

  // stage inputs (after any modulus extension) and stage outputs
  cres_t sin_d [S + 1][L];
  cres_t sout  [S][L];
  logic  sv    [S + 1];

  // input conversion: Bin2RNS for the moduli of stage 0
  cres_t in_conv [L];
  for (genvar i = 0; i < L; i++) begin : g_in
    if (i < ACT[0]) begin : g_on
      bin2rns #(.M(MODS[i]), .W(IN_W)) u_re (.x(in_re), .r(in_conv[i].re));
      bin2rns #(.M(MODS[i]), .W(IN_W)) u_im (.x(in_im), .r(in_conv[i].im));
    end else begin : g_off
      assign in_conv[i] = '0;
    end
  end

  cres_t in_q [L];
  logic  in_qv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_qv <= 1'b0;
      for (int i = 0; i < L; i++) in_q[i] <= '0;
    end else if (in_valid) begin
      in_qv <= 1'b1;
      for (int i = 0; i < L; i++) in_q[i] <= in_conv[i];
    end
  end

  assign sv[0] = in_qv;
  for (genvar i = 0; i < L; i++) begin : g_s0
    assign sin_d[0][i] = in_q[i];
  end

  for (genvar s = 0; s < S; s++) begin : g_st
    fft_stage #(
      .N(N), .STAGE(s), .L(L), .MODS(MODS), .ACT(ACT[s]), .TW_W(TW_W)
    ) u_stage (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .vin(sv[s]), .din(sin_d[s]),
      .vout(sv[s+1]), .dout(sout[s])
    );

    // moduli extension in front of the next stage
    for (genvar i = 0; i < L; i++) begin : g_ext
      cres_t v;                // channel i at the input of stage s+1
      assign sin_d[s+1][i] = v;
      if (i < ACT[s]) begin : g_keep
        assign v = sout[s][i];
      end else if (i < ACT[s+1]) begin : g_new
        res_t rre [i];
        res_t rim [i];
        for (genvar j = 0; j < i; j++) begin : g_src
          assign rre[j] = g_ext[j].v.re;
          assign rim[j] = g_ext[j].v.im;
        end
        rns2rns #(.NIN(i), .MODS(MODS)) u_xre (.res(rre), .ext(v.re));
        rns2rns #(.NIN(i), .MODS(MODS)) u_xim (.res(rim), .ext(v.im));
      end else begin : g_idle
        assign v = '0;
      end
    end
  end

  // output: bins in bit-reversed order, one per accepted sample
  logic         adv_q;
  logic [S-1:0] ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adv_q <= 1'b0;
      ocnt  <= '0;
    end else begin
      adv_q <= in_valid;
      if (out_valid) ocnt <= ocnt + 1'b1;
    end
  end

  assign out_valid = adv_q && sv[S];
  assign out_res   = sin_d[S];
  always_comb for (int b = 0; b < S; b++) out_bin[b] = ocnt[S-1-b];
endmodule
