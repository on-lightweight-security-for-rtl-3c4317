// grain_auth - authentication module of Grain-128AEAD: 64-bit shift
// register R, 64-bit accumulator A and the accumulator logic.
//
// Initialization (ld_en): the P pre-output bits of each clock of the key
// re-introduction phase are shifted into R, newest bit at r63. When the first
// 64 of them (y_256..y_319) have filled R, ld_move copies R into A in the
// same clock that the next bits start to shift in, so that at the end A
// holds y_256..y_319 and R holds y_320..y_383.
// Running (run_en): each clock handles W = P/2 message bits m_i..m_{i+W-1}
// (W = 1 when P = 1) and the W authentication bits z'_i.. of the same steps:
//   a_j <- a_j + sum_u m_{i+u} r_{j+u}     (0 <= j < 64, 0 <= u < W)
// where r_{64+u} = z'_{i+u} are the "future" register bits that have been
// generated but not yet shifted in; then R shifts by W with the z' bits.
// This is the per-step rule a_j += m_i r_j, r63 <- z'_i applied W times.
// With last set, the chunk is the final one (it carries the padding bit
// m_L = 1) and tag_valid rises once A holds the tag; clear drops it.
//
// AUTH_PIPE = 1 puts one register stage on every input (the pre-output bits,
// the message bits and the controls) before the register and accumulator
// logic, cutting the path from the shift registers through y into the
// accumulator at the cost of one clock of latency; all updates shift by
// one clock together, so the result is unchanged. Both the update rule and
// the pipeline stage follow the cipher's hardware description; the
// handshake-free interface and the reset to zero are this design's choice.
module grain_auth
  import grain_pkg::*;
#(
  parameter int unsigned P         = 32,  // pre-output bits per clock
  parameter bit          AUTH_PIPE = 1'b1,
  localparam int unsigned W        = (P > 1) ? P / 2 : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,    // start of a new key/nonce
  input  logic                ld_en,    // shift ld_y into R
  input  logic                ld_move,  // copy R into A (before the shift)
  input  logic [P-1:0]        ld_y,     // init pre-output, bit 0 first
  input  logic                run_en,   // accumulate one chunk
  input  logic [W-1:0]        m,        // message bits, bit 0 first
  input  logic [W-1:0]        zp,       // authentication bits z'
  input  logic                last,     // chunk holds the padding bit
  output logic [TAG_BITS-1:0] acc,      // A: acc[j] = a_j
  output logic                tag_valid
);

  // Optional input stage (isolation of the authentication module).
  logic         ld_en_d, ld_move_d, run_en_d, last_d;
  logic [P-1:0] ld_y_d;
  logic [W-1:0] m_d, zp_d;

  if (AUTH_PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ld_en_d   <= 1'b0;
        ld_move_d <= 1'b0;
        run_en_d  <= 1'b0;
        last_d    <= 1'b0;
        ld_y_d    <= '0;
        m_d       <= '0;
        zp_d      <= '0;
      end else begin
        ld_en_d   <= ld_en & ~clear;
        ld_move_d <= ld_move & ~clear;
        run_en_d  <= run_en & ~clear;
        last_d    <= last;
        ld_y_d    <= ld_y;
        m_d       <= m;
        zp_d      <= zp;
      end
    end
  end else begin : g_nopipe
    assign ld_en_d   = ld_en;
    assign ld_move_d = ld_move;
    assign run_en_d  = run_en;
    assign last_d    = last;
    assign ld_y_d    = ld_y;
    assign m_d       = m;
    assign zp_d      = zp;
  end

  logic [TAG_BITS-1:0]     r_q, a_q, a_upd;
  logic                    tag_valid_q;
  logic [TAG_BITS+P-1:0]   ext_ld;   // {new init bits, R}
  logic [TAG_BITS+W-1:0]   ext_run;  // {z' bits, R}: r_0 .. r_{63+W}

  assign ext_ld  = {ld_y_d, r_q};
  assign ext_run = {zp_d, r_q};

  // Accumulator logic: one 64-bit AND-XOR row per message bit of the chunk.
  always_comb begin
    a_upd = a_q;
    for (int u = 0; u < int'(W); u++) begin
      if (m_d[u]) a_upd = a_upd ^ ext_run[u +: TAG_BITS];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q         <= '0;
      a_q         <= '0;
      tag_valid_q <= 1'b0;
    end else begin
      if (ld_en_d) begin
        r_q <= ext_ld[TAG_BITS+P-1:P];
        if (ld_move_d) a_q <= r_q;
      end else if (run_en_d) begin
        r_q <= ext_run[TAG_BITS+W-1:W];
        a_q <= a_upd;
      end
      if (clear)                  tag_valid_q <= 1'b0;
      else if (run_en_d && last_d) tag_valid_q <= 1'b1;
    end
  end

  assign acc       = a_q;
  assign tag_valid = tag_valid_q;

  // Loading and accumulating never happen in the same clock.
  assert property (@(posedge clk) disable iff (!rst_n) !(ld_en && run_en))
    else $error("grain_auth: ld_en and run_en both high");

endmodule
