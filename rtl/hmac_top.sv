// hmac_top: HMAC-SHA256 engine for single-block messages, built from two
// pipelined SHA-256 cores with merged double operations.
//
// HMAC(K, m) = H((K^opad) || H((K^ipad) || m)). The hash of the first block
// of each of the two hashes depends only on the key, so it is computed once
// per key (initialization) and kept as the initial value of the core that
// needs it. Each message then costs one block in the inner core and one in
// the outer core:
//
//   msg -> padding_unit -> inner sha256_core -> padding_register
//       -> outer sha256_core -> mac
//
// Each core is a four-stage pipeline that accepts a block every 8 cycles
// (two SHA-256 operations per cycle) and returns it 32 cycles later, so the
// engine has a throughput of one 512-bit message per 8 cycles and a latency
// of 32 + 1 + 32 = 65 cycles from the padded block entering the inner core
// to mac_valid_o. Up to four messages are in each core and one in the
// padding register at a time.
//
// Interface:
//   key_valid_i/key_ready_o/key_i - load a key of up to 64 bytes
//       (left-aligned, zero-filled). Loading a key while running drains the
//       pipelines and re-initializes; until then no new message is taken.
//   msg_valid_i/msg_ready_o/msg_i/msg_bits_i - message of 0..447 bits,
//       left-aligned. Messages are taken only once a key is loaded; one
//       padded message can wait inside while the engine initializes.
//   mac_valid_o/mac_o - one-cycle pulse per message, in message order; no
//       back-pressure.
//   keyed_o - initialization done; busy_o - messages in flight.
// The block structure, the stored key-block hashes, 8 cycles per message and
// the 65-cycle latency follow the architecture; the interfaces, key format
// and re-key sequencing are this implementation's choices.
module hmac_top
  import sha256_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_valid_i,
  output logic       key_ready_o,
  input  block_t     key_i,
  input  logic       msg_valid_i,
  output logic       msg_ready_o,
  input  block_t     msg_i,
  input  logic [8:0] msg_bits_i,
  output logic       mac_valid_o,
  output digest_t    mac_o,
  output logic       keyed_o,
  output logic       busy_o
);

  logic       key_load;
  logic [2:0] phase1, phase2;
  block_t     ipad_blk, opad_blk;
  logic       blk_valid, blk_ready;
  block_t     blk;
  logic       c1_valid, c1_init, c1_ready, c1_ovalid, c1_oinit, c1_busy;
  logic       c2_valid, c2_init, c2_ready, c2_ovalid, c2_oinit, c2_busy;
  digest_t    c1_dig, c2_dig;
  logic       preg_valid, preg_take;
  block_t     preg_blk;
  logic       init_busy;

  control_unit u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .key_valid_i    (key_valid_i),
    .key_ready_o    (key_ready_o),
    .key_load_o     (key_load),
    .phase1_o       (phase1),
    .phase2_o       (phase2),
    .blk_valid_i    (blk_valid),
    .blk_ready_o    (blk_ready),
    .c1_valid_o     (c1_valid),
    .c1_init_o      (c1_init),
    .c1_init_done_i (c1_ovalid && c1_oinit),
    .preg_valid_i   (preg_valid),
    .preg_take_o    (preg_take),
    .c2_valid_o     (c2_valid),
    .c2_init_o      (c2_init),
    .c2_init_done_i (c2_ovalid && c2_oinit),
    .empty_i        (!c1_busy && !c2_busy && !preg_valid),
    .keyed_o        (keyed_o),
    .init_o         (init_busy)
  );

  key_gen u_keygen (
    .clk          (clk),
    .rst_n        (rst_n),
    .key_load_i   (key_load),
    .key_i        (key_i),
    .ipad_block_o (ipad_blk),
    .opad_block_o (opad_blk)
  );

  padding_unit #(.LEN_OFFSET(512)) u_pad (
    .clk         (clk),
    .rst_n       (rst_n),
    .msg_valid_i (msg_valid_i),
    .msg_i       (msg_i),
    .msg_bits_i  (msg_bits_i),
    .msg_ready_o (msg_ready_o),
    .blk_valid_o (blk_valid),
    .blk_o       (blk),
    .blk_ready_i (blk_ready)
  );

  sha256_core u_inner (
    .clk          (clk),
    .rst_n        (rst_n),
    .phase_i      (phase1),
    .in_valid_i   (c1_valid),
    .in_init_i    (c1_init),
    .in_block_i   (c1_init ? ipad_blk : blk),
    .in_ready_o   (c1_ready),
    .out_valid_o  (c1_ovalid),
    .out_init_o   (c1_oinit),
    .out_digest_o (c1_dig),
    .busy_o       (c1_busy)
  );

  padding_register u_preg (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_i   (c1_ovalid && !c1_oinit),
    .digest_i (c1_dig),
    .take_i   (preg_take),
    .valid_o  (preg_valid),
    .block_o  (preg_blk)
  );

  sha256_core u_outer (
    .clk          (clk),
    .rst_n        (rst_n),
    .phase_i      (phase2),
    .in_valid_i   (c2_valid),
    .in_init_i    (c2_init),
    .in_block_i   (c2_init ? opad_blk : preg_blk),
    .in_ready_o   (c2_ready),
    .out_valid_o  (c2_ovalid),
    .out_init_o   (c2_oinit),
    .out_digest_o (c2_dig),
    .busy_o       (c2_busy)
  );

  // MAC output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_valid_o <= 1'b0;
      mac_o       <= '0;
    end else begin
      mac_valid_o <= c2_ovalid && !c2_oinit;
      if (c2_ovalid && !c2_oinit) mac_o <= c2_dig;
    end
  end

  assign busy_o = c1_busy || c2_busy || preg_valid || blk_valid || init_busy;

  // the stage-to-stage hand-over is the only time a core takes a block
  a_c1_take: assert property (@(posedge clk) disable iff (!rst_n)
                              blk_ready |-> c1_ready);
  a_c2_take: assert property (@(posedge clk) disable iff (!rst_n)
                              preg_take |-> c2_ready);

endmodule
