// w_gen: message-schedule generator producing two words per cycle.
//
// For step t (even), it computes
//   W_t   = sigma1(W_{t-2}) + W_{t-7} + sigma0(W_{t-15}) + W_{t-16}
//   W_t+1 = sigma1(W_{t-1}) + W_{t-6} + sigma0(W_{t-14}) + W_{t-15}
// from seven earlier words read out of the message-schedule register file.
// Both words depend only on words already stored, so the pair is formed in
// one cycle, matching the two operations per cycle of the merged round.
// Purely combinational. The input order is fixed by the port names.
// The architecture only names schedule generators; the recurrence is the
// standard one and the two-words-per-cycle form is this design's choice.
module w_gen
  import sha256_pkg::*;
(
  input  word_t w_m16_i,  // W_{t-16}
  input  word_t w_m15_i,  // W_{t-15}
  input  word_t w_m14_i,  // W_{t-14}
  input  word_t w_m7_i,   // W_{t-7}
  input  word_t w_m6_i,   // W_{t-6}
  input  word_t w_m2_i,   // W_{t-2}
  input  word_t w_m1_i,   // W_{t-1}
  output word_t w0_o,     // W_t
  output word_t w1_o      // W_{t+1}
);

  always_comb begin
    w0_o = ssig1(w_m2_i) + w_m7_i + ssig0(w_m15_i) + w_m16_i;
    w1_o = ssig1(w_m1_i) + w_m6_i + ssig0(w_m14_i) + w_m15_i;
  end

endmodule
