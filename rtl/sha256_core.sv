// sha256_core: SHA-256 hashing core, four pipeline stages, two operations
// per clock cycle.
//
// The 64 operations of one 512-bit block are split over four stages of 16
// operations. Each stage is a TEMP DATA state register feeding a merged
// two-operation round (sha256_op2), so a stage finishes its 16 operations in
// 8 cycles; the round output is fed back into the same register for 7
// cycles and handed to the next stage's register on the 8th. Up to four
// blocks are in flight, one new block is accepted every 8 cycles and a
// block's result appears 32 cycles after it was accepted.
//
// All stages share one phase count p = 0..7 supplied by the control unit
// (phase_i): in phase p stage s executes operations 16s+2p and 16s+2p+1.
// Every 8th cycle (phase 7) the stages hand over: in_ready_o is high, a
// valid input block is loaded into stage 0 with its initial value, and the
// result of stage 3 is offered on out_digest_o (chaining value + working
// state, combinational) with out_valid_o.
//
// Message schedule: the block's words W0..W15 go into this message's slot of
// the MS RAM when it is accepted; stage 0 reads them from there. Stages 1..3
// each have a schedule generator (w_gen) that forms the two words they need
// in the same cycle from earlier words of the slot and writes them back for
// later stages.
//
// Initial values: a block flagged in_init_i is a key block, hashed from the
// standard IV; its digest is stored in the constants array and used as the
// initial value of every following block. The caller must not start a
// message block before that digest has been stored (out_valid_o with
// out_init_o).
//
// The stage/phase split follows the four-stage, 16-operation pipeline and
// the merged double operation of the design; the slot-per-message schedule
// storage and the phase-driven handshake are this implementation's choices.
module sha256_core
  import sha256_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] phase_i,
  input  logic       in_valid_i,
  input  logic       in_init_i,
  input  block_t     in_block_i,
  output logic       in_ready_o,
  output logic       out_valid_o,
  output logic       out_init_o,
  output digest_t    out_digest_o,
  output logic       busy_o
);

  localparam int unsigned NS  = NUM_STAGES;
  localparam int unsigned NRD = 2 + 7 * (NS - 1);
  localparam int unsigned NWR = NS - 1;

  state_t     st_q   [NS];
  logic       vld_q  [NS];
  logic       init_q [NS];
  logic [1:0] slot_q [NS];
  logic [1:0] next_slot_q;

  state_t     op_out [NS];
  word_t      w0 [NS], w1 [NS];
  word_t      k0 [NS], k1 [NS];

  logic       handoff;
  logic       accept;
  digest_t    iv_new, h_q;

  assign handoff    = (phase_i == 3'(CYC_PER_STAGE - 1));
  assign in_ready_o = handoff;
  assign accept     = handoff && in_valid_i;

  // ---------------- constants array ----------------
  constants_array u_consts (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase_i  (phase_i),
    .k0_o     (k0),
    .k1_o     (k1),
    .h_load_i (out_valid_o && out_init_o),
    .h_i      (out_digest_o),
    .h_o      (h_q),
    .init_i   (in_init_i),
    .iv_o     (iv_new)
  );

  // ---------------- message schedule RAM ----------------
  logic       wr_en   [NWR];
  logic [1:0] wr_slot [NWR];
  logic [5:0] wr_addr [NWR];
  word_t      wr_d0   [NWR], wr_d1 [NWR];
  logic [1:0] rd_slot [NRD];
  logic [5:0] rd_addr [NRD];
  word_t      rd_data [NRD];

  ms_ram #(.SLOTS(NS), .NWR(NWR), .NRD(NRD)) u_msram (
    .clk        (clk),
    .ld_en_i    (accept),
    .ld_slot_i  (next_slot_q),
    .ld_block_i (in_block_i),
    .wr_en_i    (wr_en),
    .wr_slot_i  (wr_slot),
    .wr_addr_i  (wr_addr),
    .wr_d0_i    (wr_d0),
    .wr_d1_i    (wr_d1),
    .rd_slot_i  (rd_slot),
    .rd_addr_i  (rd_addr),
    .rd_data_o  (rd_data)
  );

  // stage 0 reads W_{2p}, W_{2p+1} directly
  assign rd_slot[0] = slot_q[0];
  assign rd_slot[1] = slot_q[0];
  assign rd_addr[0] = {2'b00, phase_i, 1'b0};
  assign rd_addr[1] = {2'b00, phase_i, 1'b1};
  assign w0[0] = rd_data[0];
  assign w1[0] = rd_data[1];

  // stages 1..3: schedule generators
  for (genvar s = 1; s < NS; s++) begin : g_wgen
    localparam int unsigned B = 2 + 7 * (s - 1);
    logic [5:0] t;
    assign t = {s[1:0], phase_i, 1'b0};
    assign rd_addr[B+0] = t - 6'd16;
    assign rd_addr[B+1] = t - 6'd15;
    assign rd_addr[B+2] = t - 6'd14;
    assign rd_addr[B+3] = t - 6'd7;
    assign rd_addr[B+4] = t - 6'd6;
    assign rd_addr[B+5] = t - 6'd2;
    assign rd_addr[B+6] = t - 6'd1;
    for (genvar j = 0; j < 7; j++) begin : g_rs
      assign rd_slot[B+j] = slot_q[s];
    end
    w_gen u_wgen (
      .w_m16_i (rd_data[B+0]),
      .w_m15_i (rd_data[B+1]),
      .w_m14_i (rd_data[B+2]),
      .w_m7_i  (rd_data[B+3]),
      .w_m6_i  (rd_data[B+4]),
      .w_m2_i  (rd_data[B+5]),
      .w_m1_i  (rd_data[B+6]),
      .w0_o    (w0[s]),
      .w1_o    (w1[s])
    );
    assign wr_en[s-1]   = vld_q[s];
    assign wr_slot[s-1] = slot_q[s];
    assign wr_addr[s-1] = t;
    assign wr_d0[s-1]   = w0[s];
    assign wr_d1[s-1]   = w1[s];
  end

  // ---------------- transformation rounds ----------------
  for (genvar s = 0; s < NS; s++) begin : g_round
    sha256_op2 u_op (
      .st_i (st_q[s]),
      .k0_i (k0[s]),
      .w0_i (w0[s]),
      .k1_i (k1[s]),
      .w1_i (w1[s]),
      .st_o (op_out[s])
    );
  end

  // ---------------- TEMP DATA registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NS); s++) begin
        st_q[s]   <= '0;
        vld_q[s]  <= 1'b0;
        init_q[s] <= 1'b0;
        slot_q[s] <= 2'(s);
      end
      next_slot_q <= '0;
    end else if (handoff) begin
      for (int s = 1; s < int'(NS); s++) begin
        st_q[s]   <= op_out[s-1];
        vld_q[s]  <= vld_q[s-1];
        init_q[s] <= init_q[s-1];
        slot_q[s] <= slot_q[s-1];
      end
      st_q[0]   <= digest_to_state(iv_new);
      vld_q[0]  <= in_valid_i;
      init_q[0] <= in_init_i;
      slot_q[0] <= next_slot_q;
      if (accept) next_slot_q <= next_slot_q + 2'd1;
    end else begin
      for (int s = 0; s < int'(NS); s++)
        st_q[s] <= op_out[s];
    end
  end

  // ---------------- result ----------------
  always_comb begin
    out_valid_o  = handoff && vld_q[NS-1];
    out_init_o   = init_q[NS-1];
    out_digest_o = add_state(init_q[NS-1] ? IV : h_q, op_out[NS-1]);
    busy_o = 1'b0;
    for (int s = 0; s < int'(NS); s++) busy_o |= vld_q[s];
  end

endmodule
