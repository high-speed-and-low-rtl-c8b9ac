// control_unit: sequencing of the HMAC engine.
//
// Phase counters: the inner core runs on a free-running count phase1 =
// 0..7 (one pipeline hand-over every 8 cycles). The outer core's count
// phase2 lags it by one cycle, so that the inner result, written into the
// padding register at the inner hand-over, is taken by the outer core on
// the very next clock edge (its own hand-over).
//
// Key handling (state machine):
//   NOKEY - after reset; no message is accepted until a key arrives.
//   INIT  - the key blocks K^ipad and K^opad are issued once each, to the
//           inner and outer core at their next hand-over, and hashed in
//           parallel. When both chaining values are stored -> RUN.
//   RUN   - padded messages enter the inner core at each hand-over; inner
//           digests move through the padding register into the outer core.
//   DRAIN - a new key was loaded while running. A message already padded
//           and waiting in the padding unit when the key was taken still
//           goes in (it belongs to the old key); nothing else does. Once
//           that is done and both cores and the padding register are
//           empty -> INIT. Messages taken after the key use the new key.
// key_ready_o is high in NOKEY and RUN; the key is loaded in the cycle it
// is accepted (key_load_o).
// The architecture says only that the control unit is made of small
// counters and that the engine is initialized before messages and again on
// a key change; the states, the phase lag and the drain are this design's.
module control_unit
  import sha256_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // key interface
  input  logic       key_valid_i,
  output logic       key_ready_o,
  output logic       key_load_o,
  // pipeline phases
  output logic [2:0] phase1_o,
  output logic [2:0] phase2_o,
  // inner core input
  input  logic       blk_valid_i,
  output logic       blk_ready_o,
  output logic       c1_valid_o,
  output logic       c1_init_o,
  input  logic       c1_init_done_i,
  // outer core input
  input  logic       preg_valid_i,
  output logic       preg_take_o,
  output logic       c2_valid_o,
  output logic       c2_init_o,
  input  logic       c2_init_done_i,
  // status
  input  logic       empty_i,      // both cores and the padding register empty
  output logic       keyed_o,      // RUN: initialization complete
  output logic       init_o        // INIT or DRAIN: a key change is in progress
);

  typedef enum logic [1:0] {S_NOKEY, S_INIT, S_RUN, S_DRAIN} state_e;

  state_e     state_q;
  logic [2:0] ph_q;
  logic       iss1_q, iss2_q, done1_q, done2_q;
  logic       flush_q;   // DRAIN: an old-key block still waits in the padding unit
  logic       h1, h2;

  assign phase1_o = ph_q;
  assign phase2_o = ph_q - 3'd1;
  assign h1 = (phase1_o == 3'd7);
  assign h2 = (phase2_o == 3'd7);

  always_comb begin
    key_ready_o = (state_q == S_NOKEY) || (state_q == S_RUN);
    key_load_o  = key_ready_o && key_valid_i;
    keyed_o     = (state_q == S_RUN);
    init_o      = (state_q == S_INIT) || (state_q == S_DRAIN);
    // inner core
    c1_init_o   = (state_q == S_INIT);
    c1_valid_o  = (state_q == S_INIT)  ? !iss1_q
                : (state_q == S_RUN)   ? blk_valid_i
                : (state_q == S_DRAIN) ? blk_valid_i && flush_q : 1'b0;
    blk_ready_o = h1 && ((state_q == S_RUN) || ((state_q == S_DRAIN) && flush_q));
    // outer core
    c2_init_o   = (state_q == S_INIT);
    c2_valid_o  = (state_q == S_INIT) ? !iss2_q : preg_valid_i;
    preg_take_o = (state_q != S_INIT) && h2 && preg_valid_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_NOKEY;
      ph_q    <= '0;
      iss1_q  <= 1'b0;
      iss2_q  <= 1'b0;
      done1_q <= 1'b0;
      done2_q <= 1'b0;
      flush_q <= 1'b0;
    end else begin
      ph_q <= ph_q + 3'd1;
      unique case (state_q)
        S_NOKEY: if (key_valid_i) begin
          state_q <= S_INIT;
          {iss1_q, iss2_q, done1_q, done2_q} <= '0;
        end
        S_RUN: if (key_valid_i) begin
          state_q <= S_DRAIN;
          flush_q <= blk_valid_i && !blk_ready_o;
        end
        S_DRAIN: begin
          if (blk_valid_i && blk_ready_o) flush_q <= 1'b0;
          if (empty_i && !flush_q) begin
            state_q <= S_INIT;
            {iss1_q, iss2_q, done1_q, done2_q} <= '0;
          end
        end
        S_INIT: begin
          if (h1) iss1_q <= 1'b1;
          if (h2) iss2_q <= 1'b1;
          if (c1_init_done_i) done1_q <= 1'b1;
          if (c2_init_done_i) done2_q <= 1'b1;
          if ((done1_q || c1_init_done_i) && (done2_q || c2_init_done_i))
            state_q <= S_RUN;
        end
        default: state_q <= S_NOKEY;
      endcase
    end
  end

  // valid/ready rule on the key input: a key request is held until taken
  a_key_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               key_valid_i && !key_ready_o |=> key_valid_i);

  // the pipelines never receive a message block while a key is being hashed
  a_no_msg_in_init: assert property (@(posedge clk) disable iff (!rst_n)
                                     (state_q == S_INIT) |-> !blk_ready_o && !preg_take_o);
  // at most the one waiting old-key block enters during a drain
  a_one_flush: assert property (@(posedge clk) disable iff (!rst_n)
                                (state_q == S_DRAIN) && blk_ready_o && blk_valid_i |=> !blk_ready_o);

endmodule
