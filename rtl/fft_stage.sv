// fft_stage: one stage of the pipelined radix-2 residue FFT.
//
// Stage STAGE of an N-point decimation-in-frequency FFT pairs samples that are
// D = N/2^(STAGE+1) apart. It is a single-path delay-feedback stage: a counter
// runs over 2D accepted samples. In the first half the incoming samples go into
// the swap memory while the memory's previous contents (the second butterfly
// outputs of the last block) are sent on. In the second half each incoming
// sample B meets its partner A from the memory; X = A + B is sent on at once and
// Y = (A - B) * W goes into the memory. The first ACT moduli of MODS are
// computed, each by its own rns_butterfly and twiddle_rom, in lock step and
// sharing one swap memory; channels from ACT up are driven to zero. In the
// memory each residue takes only its own bits: ceil(log2 m) for a plain
// modulus, ceil(log2 p) per inner prime for a nested one.
// Interface: samples move when en is high; vin marks a valid stream and the
// counter starts with the first valid sample, so frames stay aligned however
// many cycles stall. The output is registered; vout rises D accepted samples
// after the first valid input, and the latency is D samples plus one register.
// The stage structure follows the document's pipelined radix-2 FFT; the delay
// feedback form and the handshake are this design's choices.
module fft_stage
  import nrns_pkg::*;
#(
  parameter int        N     = 1024,
  parameter int        STAGE = 0,
  parameter int        L     = 6,
  parameter mod_list_t MODS  = '{5, 7, 9, 11, 13, 16, 0, 0},
  parameter int        ACT   = 6,
  parameter int        TW_W  = 18
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  vin,
  input  cres_t din  [L],
  output logic  vout,
  output cres_t dout [L]
);
  localparam int D  = N >> (STAGE + 1);
  localparam int KW = (D > 1) ? $clog2(D) : 1;
  typedef int off_t [L + 1];

  // bit offset of channel i in a swap-memory word; entry L is the word width
  function automatic off_t offsets();
    off_t t;
    t[0] = 0;
    for (int i = 0; i < L; i++) t[i+1] = t[i] + ((i < ACT) ? 2 * field_bits(MODS[i]) : 0);
    return t;
  endfunction

  localparam off_t OFF = offsets();
  localparam int   SW  = OFF[L];

  logic          step;
  logic [KW:0]   cnt;          // msb: second half of the block
  logic          second;
  logic [KW-1:0] k;
  logic          primed;
  logic [SW-1:0] mem_in, mem_out;
  cres_t         nxt [L];

  assign step   = en && vin;
  assign second = (D > 1) ? cnt[KW] : cnt[0];
  assign k      = (D > 1) ? cnt[KW-1:0] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (step) begin
      cnt <= (cnt == (KW+1)'(2 * D - 1)) ? '0 : cnt + 1'b1;
      if (second) primed <= 1'b1;
    end
  end

  swap_memory #(.DEPTH(D), .WIDTH(SW)) u_swap (
    .clk(clk), .rst_n(rst_n), .en(step), .din(mem_in), .dout(mem_out)
  );

  for (genvar i = 0; i < L; i++) begin : g_ch
    if (i < ACT) begin : g_on
      localparam int FB   = field_bits(MODS[i]);
      localparam int MASK = field_mask(MODS[i]);
      cres_t a, w, x, y, st;
      assign st = second ? y : din[i];
      if (MASK == 0) begin : g_plain
        assign a.re = res_t'(mem_out[OFF[i] +: FB]);
        assign a.im = res_t'(mem_out[OFF[i] + FB +: FB]);
        assign mem_in[OFF[i] +: FB]      = st.re[FB-1:0];
        assign mem_in[OFF[i] + FB +: FB] = st.im[FB-1:0];
      end else begin : g_nest
        for (genvar p = 0; p < NPRIME; p++) begin : g_dig
          localparam int DB = digit_bits(p);
          localparam int DO = digit_off(MASK, p);
          if (MASK[p]) begin : g_on
            assign a.re[DIG_W*p +: DIG_W] = DIG_W'(mem_out[OFF[i] + DO +: DB]);
            assign a.im[DIG_W*p +: DIG_W] = DIG_W'(mem_out[OFF[i] + FB + DO +: DB]);
            assign mem_in[OFF[i] + DO +: DB]      = st.re[DIG_W*p +: DB];
            assign mem_in[OFF[i] + FB + DO +: DB] = st.im[DIG_W*p +: DB];
          end else begin : g_off
            assign a.re[DIG_W*p +: DIG_W] = '0;
            assign a.im[DIG_W*p +: DIG_W] = '0;
          end
        end
      end
      twiddle_rom #(.N(N), .STAGE(STAGE), .M(MODS[i]), .TW_W(TW_W)) u_tw (.k(k), .w(w));
      rns_butterfly #(.M(MODS[i])) u_bf (.a(a), .b(din[i]), .w(w), .x(x), .y(y));
      assign nxt[i] = second ? x : a;
    end else begin : g_off
      assign nxt[i] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vout <= 1'b0;
      for (int i = 0; i < L; i++) dout[i] <= '0;
    end else if (en) begin
      vout <= step && (primed || second);
      if (step) for (int i = 0; i < L; i++) dout[i] <= nxt[i];
    end
  end
endmodule
