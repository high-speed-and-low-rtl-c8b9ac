// padding_register: register between the inner and the outer hashing core.
//
// Captures the 256-bit inner digest and presents it already padded as the
// single block of the outer hash: digest, a '1' bit, zeros and the length
// 512 + 256 = 768 bits (the outer key block K xor opad is pre-computed).
// It costs one clock cycle between the two cores.
// Handshake: load_i writes the register and sets valid_o at the rising edge;
// take_i (the outer core accepting the block) clears it. A load in the same
// cycle as a take keeps the register full with the new block.
// The register and its one-cycle cost are the architecture's; its padded
// content follows HMAC over SHA-256.
module padding_register
  import sha256_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load_i,
  input  digest_t digest_i,
  input  logic    take_i,
  output logic    valid_o,
  output block_t  block_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      block_o <= '0;
    end else if (load_i) begin
      valid_o <= 1'b1;
      block_o <= {digest_i, 1'b1, 191'b0, 64'd768};
    end else if (take_i) begin
      valid_o <= 1'b0;
    end
  end

endmodule
