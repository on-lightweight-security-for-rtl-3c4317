// grain128aead - Grain-128AEAD authenticated encryption core, P pre-output
// bits per clock.
//
// The pre-output generator (grain_pregen: LFSR, NFSR and P copies of f, g
// and h) produces P pre-output bits y_t per clock. After loading and
// initialization, even bits become keystream z_i = y_{384+2i} and odd bits
// authentication bits z'_i = y_{384+2i+1}; the multiplexer between them is
// simply the even/odd split of the P-bit word, so one clock handles
// W = P/2 message bits. At P = 1 the core alternates: a clock that takes a
// message bit and produces its keystream bit, then a clock that produces
// z'_i and updates the authentication module.
//
// Sequence after start (key and iv must stay valid until ready; the key is
// read a second time during initialization, so it is kept outside the core):
//   128/P clocks  load: b_i <- k_i, s_i <- IV_i, s_96..126 <- 1, s_127 <- 0
//   256/P clocks  initialization with y fed back into both registers
//   128/P clocks  key bits added into the LFSR feedback; y_256..383 fill
//                 the register and the accumulator (grain_auth)
// then ready rises: 512/P clocks from start to the first message chunk.
//
// Message interface: in_valid/in_ready handshake, W message bits per chunk,
// bit 0 first. The host appends the padding bit 1 after the last message
// bit and fills the rest of the last chunk with zeros (zeros do not change
// the tag), and marks that chunk with in_last. in_ad marks bits that are
// associated data: they are authenticated but passed through unencrypted
// (their keystream bit is forced to zero). The ciphertext appears on
// out_data with out_valid one clock after the chunk is accepted. The tag is
// the accumulator: tag[j] = a_j; tag_valid rises 1 clock (2 with AUTH_PIPE)
// after the last chunk and holds until the next start. No chunk is taken
// while in_valid is low: the cipher state simply waits (stall).
//
// Bit order: key[i] = k_i, iv[i] = IV_i, tag[j] = a_j. In the usual hex
// notation of the cipher's test vectors, k_0 is the most significant bit of
// the first byte.
//
// Parameters: P steps per clock (1..64, power of two; 32 is the highest
// level Grain supports natively, 64 unrolls beyond it), AUTH_PIPE inserts
// the pipeline register in front of the authentication module, OPT_CTRL
// selects the divider/shift-register controller instead of the counter FSM.
// The cipher, its phases and these three options follow the cipher's
// hardware description; the handshakes, the padding convention at the port
// and the reset behaviour are this design's choice.
module grain128aead
  import grain_pkg::*;
#(
  parameter int unsigned P         = 32,
  parameter bit          AUTH_PIPE = 1'b1,
  parameter bit          OPT_CTRL  = 1'b1,
  localparam int unsigned W        = (P > 1) ? P / 2 : 1,
  localparam int unsigned CPW      = 128 / P,
  localparam int unsigned SW       = (CPW > 1) ? $clog2(CPW) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [KEY_BITS-1:0] key,
  input  logic [IV_BITS-1:0]  iv,
  output logic                ready,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [W-1:0]        in_data,
  input  logic [W-1:0]        in_ad,
  input  logic                in_last,
  output logic                out_valid,
  output logic [W-1:0]        out_data,
  output logic [TAG_BITS-1:0] tag,
  output logic                tag_valid
);

  phase_e        phase;
  logic [SW-1:0] slice;
  logic          acc_move;
  logic          done;

  grain_ctrl #(.P(P), .OPT_CTRL(OPT_CTRL)) u_ctrl (
    .clk, .rst_n, .start, .done, .phase, .slice, .acc_move
  );

  // Loading data: NFSR gets the key, LFSR the nonce then 31 ones and a zero.
  logic [FSR_BITS-1:0] s_init;
  logic [P-1:0]        key_slice, s_slice;

  assign s_init    = {1'b0, {31{1'b1}}, iv};
  assign key_slice = key[int'(slice) * P +: P];
  assign s_slice   = s_init[int'(slice) * P +: P];

  // Running phase: split the pre-output into keystream and auth bits.
  logic [P-1:0] y;
  logic [W-1:0] z, zp, z_eff, m_auth;
  logic         running, accept, step_run, auth_run, auth_last;

  assign running = (phase == PH_RUN);

  if (P > 1) begin : g_par
    for (genvar i = 0; i < W; i++) begin : g_split
      assign z[i]  = y[2 * i];
      assign zp[i] = y[2 * i + 1];
    end
    assign in_ready  = running;
    assign accept    = in_valid && in_ready;
    assign step_run  = accept;
    assign auth_run  = accept;
    assign m_auth    = in_data;
    assign auth_last = in_last;
    assign done      = accept && in_last;
  end else begin : g_ser
    // P = 1: even clock takes the message bit, odd clock makes z'.
    logic odd_q, m_q, last_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        odd_q  <= 1'b0;
        m_q    <= 1'b0;
        last_q <= 1'b0;
      end else if (start) begin
        odd_q  <= 1'b0;
      end else if (accept) begin
        odd_q  <= 1'b1;
        m_q    <= in_data[0];
        last_q <= in_last;
      end else if (odd_q) begin
        odd_q  <= 1'b0;
      end
    end
    assign z         = y;
    assign zp        = y;
    assign in_ready  = running && !odd_q;
    assign accept    = in_valid && in_ready;
    assign step_run  = accept || (running && odd_q);
    assign auth_run  = running && odd_q;
    assign m_auth    = m_q;
    assign auth_last = last_q;
    assign done      = auth_run && last_q;
  end

  // Pre-output generator.
  fsr_mode_e mode;
  logic      pg_en;

  always_comb begin
    unique case (phase)
      PH_LOAD:   mode = MODE_LOAD;
      PH_INIT:   mode = MODE_INIT;
      PH_KEYMIX: mode = MODE_KEYMIX;
      default:   mode = MODE_RUN;
    endcase
  end

  assign pg_en = !start && ((phase == PH_LOAD) || (phase == PH_INIT) ||
                            (phase == PH_KEYMIX) || step_run);

  grain_pregen #(.P(P)) u_pregen (
    .clk, .rst_n,
    .en       (pg_en),
    .mode     (mode),
    .ld_b     (key_slice),
    .ld_s     (s_slice),
    .key_bits (key_slice),
    .y        (y)
  );

  // Authentication module.
  grain_auth #(.P(P), .AUTH_PIPE(AUTH_PIPE)) u_auth (
    .clk, .rst_n,
    .clear     (start),
    .ld_en     ((phase == PH_KEYMIX) && !start),
    .ld_move   (acc_move),
    .ld_y      (y),
    .run_en    (auth_run && !start),
    .m         (m_auth),
    .zp        (zp),
    .last      (auth_last),
    .acc       (tag),
    .tag_valid (tag_valid)
  );

  // Encryption: associated-data bits see a zero keystream bit.
  assign z_eff = z & ~in_ad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= accept && !start;
      if (accept) out_data <= in_data ^ z_eff;
    end
  end

  assign ready = running;

  // The chunk offered must stay put until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_ready && running |=> $stable(in_data) || !in_valid)
    else $error("grain128aead: in_data changed while waiting");

endmodule
