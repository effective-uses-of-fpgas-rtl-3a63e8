// key_tester_datapath: the datapath that tests one RC4 key against known
// keystream bytes, working on one S-box through one RAM port.
//
// Per key it holds an 8-bit K5 register (the last key byte; key bytes K[0..3]
// come from the engine's shared key counter), the j register with its adder
// chain j + K[i mod 5] + S[i], the S[i] register, the t register with its
// adder S[i] + S[j], the address and write-data multiplexers of the S-box port,
// and a comparator against the expected byte with a match flag and a found
// flag. Everything is steered by the control word of the shared engine
// controller, so a tester has no sequencer of its own.
//
// S-box words are 16 bits: the active byte (the high byte when ctrl.half = 0,
// the low byte when ctrl.half = 1) holds the permutation being scrambled, and
// every write puts the word's own address into the other byte. Each address is
// written as S[i] once per key schedule, so at the end of a key the idle byte
// holds the identity permutation and the next key starts on it without a
// separate initialisation pass.
//
// Port operations by phase (one RAM access per cycle):
//   INIT    write {i, i} at i                 (one-off identity fill)
//   *_RD    read at i
//   *_SJ    j <= j + K + S[i] (K = 0 in the keystream phase);
//           write S[i] at j_new, old S[j] comes back on the next cycle
//   *_SI    write old S[j] at i; keystream phase also sets t <= S[i] + S[j]
//   KS_RT   read at t
//   CHK     S[t] is on dout: compare with expected[ks_byte]; read at 0 for the
//           next key's first KSA iteration
// RAM read data is used combinationally in the cycle after the access.
//
// The component set (K mux, zero mux, two adders for j, an adder for t, one
// address mux over i/j/t, one data mux, one comparator with a flag) follows the
// signal-flow figure of the unit; the phase encoding, the word layout and the
// use of the address as the idle byte's value are this design's choices.
module key_tester_datapath
  import rc4_pkg::*;
#(
  parameter byte_t SLOT = 8'd0   // offset of this tester's key within the engine's pass
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,
  input  logic       load_key,    // load K5 from k5_next | SLOT at this edge
  input  byte_t      k5_next,
  input  byte_t      expected [MATCH_BYTES],  // first keystream bytes to match
  // S-box port
  output byte_t      addr,
  output logic       we,
  output logic [15:0] din,
  input  logic [15:0] dout,
  // status
  output byte_t      k5,          // last key byte of the key under test
  output logic       hit,         // CHK cycle: all bytes so far match
  output logic       found        // the key under test matched every byte
);

  byte_t j, si, t;
  logic  alive;

  byte_t s_act;      // active byte of the word read last cycle
  byte_t kbyte;      // K[i mod 5]
  byte_t kterm;      // K[i mod 5] in the KSA, 0 in the keystream phase
  byte_t j_cur;      // j, read as 0 at the first step of the KSA and of the keystream
  byte_t j_new;

  // pack a value for the active byte with the index for the idle byte
  function automatic logic [15:0] pack(input byte_t act, input byte_t idx, input logic half);
    return half ? {idx, act} : {act, idx};
  endfunction

  assign s_act = ctrl.half ? dout[7:0] : dout[15:8];

  always_comb begin
    unique case (ctrl.kidx)
      3'd0:    kbyte = ctrl.k_hi[31:24];
      3'd1:    kbyte = ctrl.k_hi[23:16];
      3'd2:    kbyte = ctrl.k_hi[15:8];
      3'd3:    kbyte = ctrl.k_hi[7:0];
      default: kbyte = k5;
    endcase
  end

  assign kterm = (ctrl.phase == ST_KSA_SJ) ? kbyte : 8'd0;
  assign j_cur = ((ctrl.phase == ST_KSA_SJ && ctrl.i == 8'd0) ||
                  (ctrl.phase == ST_KS_SJ && ctrl.i == 8'd1)) ? 8'd0 : j;
  assign j_new = j_cur + kterm + s_act;

  // address and write-data multiplexers
  always_comb begin
    addr = ctrl.i;
    we   = 1'b0;
    din  = pack(s_act, ctrl.i, ctrl.half);
    unique case (ctrl.phase)
      ST_INIT:              begin we = 1'b1; din = {ctrl.i, ctrl.i}; end
      ST_KSA_SJ, ST_KS_SJ:  begin addr = j_new; we = 1'b1; din = pack(s_act, j_new, ctrl.half); end
      ST_KSA_SI, ST_KS_SI:  begin we = 1'b1; end
      ST_KS_RT:             addr = t;
      ST_CHK:               addr = 8'd0;
      default:              ;
    endcase
  end

  assign hit    = (ctrl.phase == ST_CHK) && (s_act == expected[ctrl.ks_byte]) &&
                  ((ctrl.ks_byte == 3'd0) || alive);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j     <= '0;
      si    <= '0;
      t     <= '0;
      k5    <= '0;
      alive <= 1'b0;
      found <= 1'b0;
    end else begin
      if (ctrl.phase == ST_KSA_SJ || ctrl.phase == ST_KS_SJ) begin
        j  <= j_new;
        si <= s_act;
      end
      if (ctrl.phase == ST_KS_SI)
        t <= si + s_act;
      if (ctrl.phase == ST_CHK)
        alive <= hit;
      if (ctrl.phase == ST_CHK && hit && ctrl.ks_byte == 3'(MATCH_BYTES - 1))
        found <= 1'b1;
      if (ctrl.phase == ST_INIT)
        found <= 1'b0;
      if (load_key)
        k5 <= k5_next | SLOT;
    end
  end

endmodule
