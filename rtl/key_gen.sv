// key_gen: HMAC key generation unit.
//
// Stores the secret key and forms the two 512-bit key blocks hashed during
// initialization: K xor ipad (0x36 repeated) for the inner core and
// K xor opad (0x5c repeated) for the outer core. The key is given as up to
// 64 bytes, left-aligned in key_i (first byte in [511:504]) and padded with
// zero bytes, which is the HMAC rule for keys no longer than one block.
// Longer keys would first have to be hashed; that is not done here.
// Timing: the key register loads on key_load_i at the rising edge; the key
// blocks are combinational from the register. Reset clears the key.
// The architecture names a key generation unit; the standard HMAC key-block
// rule used here and the key format are this implementation's choice.
module key_gen
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load_i,
  input  block_t key_i,
  output block_t ipad_block_o,
  output block_t opad_block_o
);

  localparam block_t IPAD = {64{8'h36}};
  localparam block_t OPAD = {64{8'h5c}};

  block_t key_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          key_q <= '0;
    else if (key_load_i) key_q <= key_i;
  end

  assign ipad_block_o = key_q ^ IPAD;
  assign opad_block_o = key_q ^ OPAD;

endmodule
