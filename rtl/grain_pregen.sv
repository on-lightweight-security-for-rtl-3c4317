// grain_pregen - pre-output generator of Grain-128AEAD, P steps per clock.
//
// Holds the 128-bit LFSR S and the 128-bit NFSR B (Fibonacci form, index 0
// is the bit that leaves next, new bits enter at index 127) and advances
// them P cipher steps whenever en is high. The P steps are built as a chain
// of P stages; stage k sees the register windows after k steps, computes
// the pre-output y_{t+k} with grain_h, the feedbacks with grain_f/grain_g,
// and passes on the windows shifted by one. For P <= 32 no stage reads a
// bit produced by another stage, which is the native parallelism of Grain:
// P copies of f, g and h side by side. For P = 64 stage k >= 32 reads the
// feedback output of earlier stages (f_32 takes the output of f_0, and so
// on), which is the unrolling beyond the native level.
//
// What a step shifts in depends on mode:
//   MODE_LOAD    s <- ld_s[k], b <- ld_b[k]     (key and nonce loading)
//   MODE_INIT    s <- L(S)+y,  b <- s0+F(B)+y    (first 256 init steps)
//   MODE_KEYMIX  s <- L(S)+key_bits[k], b <- s0+F(B) (last 128 init steps)
//   MODE_RUN     s <- L(S),    b <- s0+F(B)
// y[k] is the pre-output of step k of the current clock, computed from the
// state before that step, so y is valid in the same clock (combinational
// from the registers). Reset clears both registers; the cipher is always
// loaded before use. The step equations, the loading order and the init
// feedback follow the cipher specification; the stage-chain form and the
// reset value are this implementation's choice.
module grain_pregen
  import grain_pkg::*;
#(
  parameter int unsigned P = 32  // steps per clock: 1, 2, 4, ... 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // advance P steps this clock
  input  fsr_mode_e    mode,
  input  logic [P-1:0] ld_b,      // key bits to load, bit 0 first
  input  logic [P-1:0] ld_s,      // nonce/padding bits to load, bit 0 first
  input  logic [P-1:0] key_bits,  // key bits added to the LFSR in MODE_KEYMIX
  output logic [P-1:0] y          // pre-output of the P steps, y[0] first
);

  logic [FSR_BITS-1:0] s_q, b_q;

  for (genvar k = 0; k < P; k++) begin : g_step
    logic [FSR_BITS-1:0] s_in, b_in, s_out, b_out;
    logic l, fb, yk, s_new, b_new;

    if (k == 0) begin : g_head
      assign s_in = s_q;
      assign b_in = b_q;
    end else begin : g_link
      assign s_in = g_step[k-1].s_out;
      assign b_in = g_step[k-1].b_out;
    end

    grain_f u_f (.s(s_in), .l(l));
    grain_g u_g (.b(b_in), .fb(fb));
    grain_h u_h (.s(s_in), .b(b_in), .y(yk));

    // Feedback additions selected by the mode of this step.
    assign s_new = (mode == MODE_LOAD)   ? ld_s[k] :
                   (mode == MODE_INIT)   ? (l ^ yk) :
                   (mode == MODE_KEYMIX) ? (l ^ key_bits[k]) : l;
    assign b_new = (mode == MODE_LOAD)   ? ld_b[k] :
                   (mode == MODE_INIT)   ? (s_in[0] ^ fb ^ yk) : (s_in[0] ^ fb);

    assign s_out = {s_new, s_in[FSR_BITS-1:1]};
    assign b_out = {b_new, b_in[FSR_BITS-1:1]};
    assign y[k]  = yk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      b_q <= '0;
    end else if (en) begin
      s_q <= g_step[P-1].s_out;
      b_q <= g_step[P-1].b_out;
    end
  end

  if (P < 1 || P > 64 || (P & (P - 1)) != 0) begin : g_bad_p
    $error("grain_pregen: P must be a power of two from 1 to 64");
  end

endmodule
