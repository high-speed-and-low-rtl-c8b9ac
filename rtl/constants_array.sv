// constants_array: hardwired round constants and initial hash values for one
// SHA-256 hashing core.
//
// K port: for the common phase p (0..7) of the pipeline, stage s (0..3)
// executes operations t = 16*s + 2*p and t+1; the array returns K_t and
// K_{t+1} for every stage at once from the fixed table.
// H port: holds the initial values H0..H7 used for messages. During HMAC
// initialization a core hashes a key block starting from the standard
// initial value; the resulting chaining value is written here (h_load_i) and
// used from then on as the initial value of every message (h_o). iv_o gives
// the value selected by init_i: the standard IV when 1, the stored one when 0.
// The stored value is cleared to the standard IV at reset; it is secret and
// should be treated like the key.
// Timing: K and iv outputs are combinational; the H register loads at the
// rising edge.
// The K table and the stored key-block hash are the architecture's; the
// reset value and the per-stage K ports are this implementation's choice.
module constants_array
  import sha256_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] phase_i,
  output word_t      k0_o [NUM_STAGES],
  output word_t      k1_o [NUM_STAGES],
  input  logic       h_load_i,
  input  digest_t    h_i,
  output digest_t    h_o,
  input  logic       init_i,
  output digest_t    iv_o
);

  digest_t h_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        h_q <= IV;
    else if (h_load_i) h_q <= h_i;
  end

  always_comb begin
    for (int s = 0; s < int'(NUM_STAGES); s++) begin
      k0_o[s] = K[{s[1:0], phase_i, 1'b0}];
      k1_o[s] = K[{s[1:0], phase_i, 1'b1}];
    end
    h_o  = h_q;
    iv_o = init_i ? IV : h_q;
  end

endmodule
