// padding_unit: SHA-256 padding of a single-block HMAC message.
//
// Takes a message of msg_bits_i bits (0..447), left-aligned in msg_i (first
// bit in [511]), and builds the padded 512-bit block: the message, one '1'
// bit, zeros, and the 64-bit big-endian length in [63:0]. Because the block
// is the second block of the inner hash (the first, K xor ipad, is
// pre-computed), the length field is LEN_OFFSET + msg_bits, with
// LEN_OFFSET = 512 by default. Message bits beyond msg_bits_i are ignored.
//
// The unit holds one padded block in a register, so a message can be
// padded and waiting while the cores are still being initialized.
// Handshake: valid/ready on both sides; a message is taken when
// msg_valid_i && msg_ready_o, and the block leaves when blk_valid_o &&
// blk_ready_i. One cycle from message to block; full throughput.
// The padding unit and the wait during initialization are the
// architecture's; the handshake and bit-granular length are this design's.
module padding_unit
  import sha256_pkg::*;
#(
  parameter int unsigned LEN_OFFSET = 512
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       msg_valid_i,
  input  block_t     msg_i,
  input  logic [8:0] msg_bits_i,
  output logic       msg_ready_o,
  output logic       blk_valid_o,
  output block_t     blk_o,
  input  logic       blk_ready_i
);

  block_t padded;

  always_comb begin
    for (int i = 0; i < 512; i++) begin
      if (i < int'(msg_bits_i))       padded[511-i] = msg_i[511-i];
      else if (i == int'(msg_bits_i)) padded[511-i] = 1'b1;
      else                            padded[511-i] = 1'b0;
    end
    padded[63:0] = 64'(LEN_OFFSET) + 64'(msg_bits_i);
  end

  assign msg_ready_o = !blk_valid_o || blk_ready_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_valid_o <= 1'b0;
      blk_o       <= '0;
    end else if (msg_ready_o) begin
      blk_valid_o <= msg_valid_i;
      if (msg_valid_i) blk_o <= padded;
    end
  end

  // valid/ready rule: an offered message stays offered, unchanged, until taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           msg_valid_i && !msg_ready_o |=> msg_valid_i && $stable(msg_i) && $stable(msg_bits_i));

  // a single-block message leaves room for the '1' bit and the length
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          msg_valid_i |-> msg_bits_i <= 9'd447);

endmodule
