// engine_controller: the sequencer shared by every key tester of one engine.
//
// All testers of an engine run the same RC4 steps on different keys in the
// same cycle, so one controller drives them all through a broadcast control
// word (rc4_pkg::ctrl_t): phase, index i, i mod 5, the S-box byte in use, the
// keystream byte being checked and the shared key bytes K[0..3].
//
// Sequence after start:
//   INIT      256 cycles filling both S-box bytes with the identity (only once)
//   KSA       256 iterations of RD, SJ, SI: 3 cycles per iteration
//   keystream RD, SJ, SI, RT: 4 cycles for one keystream byte (i = 1, 2, ...)
//   CHK       1 cycle: compare; it is also the read of S[0] for the next key
// If no tester matched the first byte, CHK advances the key counter, swaps the
// S-box byte in use and goes on with the KSA of the next keys: one
// key test then takes 772 cycles (CHK + 2 + 255 * 3 + 4). If any tester
// matched every byte so far, the controller generates the next keystream byte
// for all testers (5 extra cycles per byte) until five bytes have matched
// (found, DONE) or no tester matches any more (the search goes on). When the
// next pass would leave the 40-bit key space the controller stops with
// exhausted set.
//
// The cycle counts, the shared FSM and the early exit after a wrong first byte
// follow the design this block implements; the one-off INIT pass, the extra
// CHK cycle when a byte matches, stopping on a found key and stopping at the
// end of the key space are this design's choices.
//
// The shared key bytes (key_hi) and the next K5 value (next_k5) pass through
// unchanged into ctrl.k_hi and k5_next so that the testers receive one bundle.
module engine_controller
  import rc4_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,       // pulse: load start key and begin
  input  logic  any_hit,     // CHK cycle: some tester matches all bytes so far
  // key counter
  input  logic [KEY_BITS-9:0] key_hi,   // key bytes K[0..3] of the current pass
  input  byte_t next_k5,     // last byte the counter takes when loaded or advanced
  input  logic  last_pass,   // advancing would leave the key space
  output logic  key_load,
  output logic  key_advance,
  // testers
  output ctrl_t ctrl,
  output logic  load_key,    // testers load K5 at this edge
  output byte_t k5_next,
  // status
  output logic  busy,
  output logic  done,        // stopped: found or exhausted
  output logic  exhausted,
  output logic  key_switch   // one-cycle pulse when a new pass of keys begins
);

  phase_e     phase;
  byte_t      i;
  logic [2:0] kidx;
  logic       half;
  logic [2:0] ks_byte;
  logic       ex_q;

  logic chk_more, chk_found, chk_next, chk_end;

  assign chk_more  = (phase == ST_CHK) && any_hit && (ks_byte != 3'(MATCH_BYTES - 1));
  assign chk_found = (phase == ST_CHK) && any_hit && (ks_byte == 3'(MATCH_BYTES - 1));
  assign chk_next  = (phase == ST_CHK) && !any_hit && !last_pass;
  assign chk_end   = (phase == ST_CHK) && !any_hit && last_pass;

  assign key_load    = start && (phase == ST_IDLE || phase == ST_DONE);
  assign key_advance = chk_next;
  assign key_switch  = key_load || chk_next;

  always_comb begin
    ctrl.phase    = phase;
    ctrl.i        = i;
    ctrl.kidx     = kidx;
    ctrl.half     = half;
    ctrl.ks_byte  = ks_byte;
    ctrl.k_hi     = key_hi;
  end

  assign load_key = key_switch;
  assign k5_next  = next_k5;

  assign busy      = (phase != ST_IDLE) && (phase != ST_DONE);
  assign done      = (phase == ST_DONE);
  assign exhausted = ex_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= ST_IDLE;
      i       <= '0;
      kidx    <= '0;
      half    <= 1'b0;
      ks_byte <= '0;
      ex_q    <= 1'b0;
    end else begin
      unique case (phase)
        ST_IDLE, ST_DONE: if (start) begin
          phase   <= ST_INIT;
          i       <= '0;
          kidx    <= '0;
          half    <= 1'b0;
          ks_byte <= '0;
          ex_q    <= 1'b0;
        end
        ST_INIT: begin
          i <= i + 8'd1;
          if (i == 8'd255) phase <= ST_KSA_RD;
        end
        ST_KSA_RD: phase <= ST_KSA_SJ;
        ST_KSA_SJ: phase <= ST_KSA_SI;
        ST_KSA_SI: begin
          if (i == 8'd255) begin
            phase   <= ST_KS_RD;
            i       <= 8'd1;
            ks_byte <= '0;
          end else begin
            phase <= ST_KSA_RD;
            i     <= i + 8'd1;
            kidx  <= (kidx == 3'(KEY_BYTES - 1)) ? 3'd0 : kidx + 3'd1;
          end
        end
        ST_KS_RD: phase <= ST_KS_SJ;
        ST_KS_SJ: phase <= ST_KS_SI;
        ST_KS_SI: phase <= ST_KS_RT;
        ST_KS_RT: phase <= ST_CHK;
        ST_CHK: begin
          if (chk_found) begin
            phase <= ST_DONE;
          end else if (chk_more) begin
            phase   <= ST_KS_RD;
            i       <= i + 8'd1;
            ks_byte <= ks_byte + 3'd1;
          end else if (chk_end) begin
            phase <= ST_DONE;
            ex_q  <= 1'b1;
          end else begin
            // next pass: S[0] of the refilled byte was read in this cycle
            phase   <= ST_KSA_SJ;
            i       <= '0;
            kidx    <= '0;
            half    <= ~half;
            ks_byte <= '0;
          end
        end
        default: phase <= ST_IDLE;
      endcase
    end
  end

  // The compare cycle is entered only from the read of S[t].
  a_chk_after_rt: assert property (@(posedge clk) disable iff (!rst_n)
      phase == ST_CHK |-> $past(phase) == ST_KS_RT);

endmodule
