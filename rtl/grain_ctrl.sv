// grain_ctrl - phase controller of the Grain-128AEAD core.
//
// After start the core spends 128/P clocks loading key and nonce, 256/P
// clocks of initialization with pre-output feedback, 128/P clocks of key
// re-introduction (during which the authentication register and accumulator
// are filled) and then stays in the running phase until done, after which it
// waits for the next start. start restarts from loading in any phase.
// slice numbers the P-bit slice of the 128-bit key/nonce that the current
// clock uses in loading and key re-introduction; acc_move marks the clock
// of key re-introduction that produces y_320.., when the register is moved
// into the accumulator.
//
// Two implementations, chosen by OPT_CTRL:
//  0: a state machine with a cycle counter (the straightforward controller).
//  1: a clock divider of K = log2(128/P) bits that advances a 4-bit
//     thermometer shift register once every 128 cipher steps; after n
//     advances bit n is set, so bit 1 ends loading, bit 3 ends the
//     feedback part of initialization and bit 4 starts running
//     (512/(2^K P) + K = 4 + K flip-flops). Phases that hold once entered
//     use a bit directly; one-phase windows use a bit AND the inverse of the
//     next. The 64-step mark inside key re-introduction is the divider's
//     half count. A busy and a done flag are added to this.
// Both give the same outputs clock for clock. The phase lengths come from
// the cipher; the divider/thermometer scheme follows the optimized
// controller described for it; the start/done handshake is this design's.
module grain_ctrl
  import grain_pkg::*;
#(
  parameter int unsigned P        = 32,
  parameter bit          OPT_CTRL = 1'b1,
  localparam int unsigned CPW     = LOAD_BITS / P,      // clocks per 128 steps
  localparam int unsigned SW      = (CPW > 1) ? $clog2(CPW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,     // begin loading
  input  logic          done,      // last chunk accepted
  output phase_e        phase,
  output logic [SW-1:0] slice,     // P-bit slice index within 128 bits
  output logic          acc_move   // register -> accumulator this clock
);

  if (!OPT_CTRL) begin : g_fsm
    localparam int unsigned CW = $clog2(2 * CPW);
    phase_e        ph_q;
    logic [CW-1:0] cnt_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ph_q  <= PH_IDLE;
        cnt_q <= '0;
      end else if (start) begin
        ph_q  <= PH_LOAD;
        cnt_q <= '0;
      end else begin
        unique case (ph_q)
          PH_LOAD: begin
            cnt_q <= (cnt_q == CW'(CPW - 1)) ? '0 : cnt_q + 1'b1;
            if (cnt_q == CW'(CPW - 1)) ph_q <= PH_INIT;
          end
          PH_INIT: begin
            cnt_q <= (cnt_q == CW'(INIT_BITS / P - 1)) ? '0 : cnt_q + 1'b1;
            if (cnt_q == CW'(INIT_BITS / P - 1)) ph_q <= PH_KEYMIX;
          end
          PH_KEYMIX: begin
            cnt_q <= (cnt_q == CW'(KEYMIX_BITS / P - 1)) ? '0 : cnt_q + 1'b1;
            if (cnt_q == CW'(KEYMIX_BITS / P - 1)) ph_q <= PH_RUN;
          end
          PH_RUN:  if (done) ph_q <= PH_DONE;
          default: ;
        endcase
      end
    end

    assign phase    = ph_q;
    assign slice    = SW'(cnt_q);
    assign acc_move = (ph_q == PH_KEYMIX) && (cnt_q == CW'(CPW / 2));

  end else begin : g_opt
    localparam int unsigned K = $clog2(CPW);
    logic [K-1:0] div_q;
    logic [4:1]   sr_q;      // thermometer: sr_q[n] set after n * 128 steps
    logic         busy_q, done_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        div_q  <= '0;
        sr_q   <= '0;
        busy_q <= 1'b0;
        done_q <= 1'b0;
      end else if (start) begin
        div_q  <= '0;
        sr_q   <= '0;
        busy_q <= 1'b1;
        done_q <= 1'b0;
      end else if (busy_q && !sr_q[4]) begin
        div_q <= div_q + 1'b1;
        if (&div_q) sr_q <= {sr_q[3:1], 1'b1};
      end else if (busy_q && sr_q[4] && done) begin
        done_q <= 1'b1;
      end
    end

    always_comb begin
      if (!busy_q)         phase = PH_IDLE;
      else if (!sr_q[1])   phase = PH_LOAD;
      else if (!sr_q[3])   phase = PH_INIT;
      else if (!sr_q[4])   phase = PH_KEYMIX;
      else if (!done_q)    phase = PH_RUN;
      else                 phase = PH_DONE;
    end

    assign slice    = SW'(div_q);
    assign acc_move = sr_q[3] && !sr_q[4] && (div_q == K'(CPW / 2));
  end

  if (P < 1 || P > 64 || (P & (P - 1)) != 0) begin : g_bad_p
    $error("grain_ctrl: P must be a power of two from 1 to 64");
  end

endmodule
