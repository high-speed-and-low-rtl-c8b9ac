// tb_hmac_top: end-to-end test of the HMAC-SHA256 engine at its default
// configuration.
//
// Checks the two single-block RFC 4231 vectors (test cases 1 and 2) and a
// stream of random keys and messages of random length against a reference
// model, all in message order. It also checks the timing: the engine takes
// a new message every 8 cycles when fed back to back, and each MAC appears
// 65 cycles after its padded block entered the inner core. Mechanisms that
// must occur at least once: initialization, a message padded and waiting
// during initialization, a re-key with pipeline drain (including the
// message still waiting in the padding unit under the old key), a full inner
// pipeline (four blocks in flight), and input back-pressure.
module tb_hmac_top;
  import sha_ref_pkg::*;

  localparam int NRAND = 40;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         key_valid = 1'b0, key_ready;
  logic [511:0] key = '0;
  logic         msg_valid = 1'b0, msg_ready;
  logic [511:0] msg = '0;
  logic [8:0]   msg_bits = '0;
  logic         mac_valid;
  logic [255:0] mac;
  logic         keyed, busy;

  hmac_top dut (
    .clk(clk), .rst_n(rst_n),
    .key_valid_i(key_valid), .key_ready_o(key_ready), .key_i(key),
    .msg_valid_i(msg_valid), .msg_ready_o(msg_ready), .msg_i(msg), .msg_bits_i(msg_bits),
    .mac_valid_o(mac_valid), .mac_o(mac), .keyed_o(keyed), .busy_o(busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // scoreboard
  logic [511:0] cur_key;
  logic [255:0] q_exp_m [$];
  logic [255:0] q_exp [$];
  longint       q_t [$];
  longint       last_accept = -1;
  int           n_inner = 0, n_b2b = 0, n_mac = 0;
  int           m_init = 0, m_wait_init = 0, m_drain = 0, m_full = 0, m_bp = 0, m_flush = 0;
  logic         in_drain_prev = 1'b0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endfunction

  // a message is signed with the key in force when it is taken; a key taken
  // in the same cycle counts as already in force
  always @(posedge clk) if (rst_n) begin
    if (key_valid && key_ready) cur_key = key;
    if (msg_valid && msg_ready) begin
      q_exp_m.push_back(hmac(cur_key, msg, int'(msg_bits)));
      if (dut.u_ctrl.state_q != dut.u_ctrl.S_RUN) m_wait_init++;
    end
    if (msg_valid && !msg_ready) m_bp++;
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_INIT && !in_drain_prev) m_init++;
    in_drain_prev <= (dut.u_ctrl.state_q == dut.u_ctrl.S_INIT);
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_DRAIN && dut.u_ctrl.empty_i) m_drain++;
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_DRAIN && dut.blk_valid && dut.blk_ready) m_flush++;
    if (dut.u_inner.vld_q[0] && dut.u_inner.vld_q[1] && dut.u_inner.vld_q[2] &&
        dut.u_inner.vld_q[3] && dut.u_inner.handoff) m_full++;
    // padded block enters the inner core
    if (dut.blk_valid && dut.blk_ready) begin
      q_exp.push_back(q_exp_m.pop_front());
      q_t.push_back(cyc);
      if (last_accept >= 0) begin
        if (cyc - last_accept == 8) n_b2b++;
        check((cyc - last_accept) % 8 == 0, "inner accepts on 8-cycle grid");
      end
      last_accept = cyc;
      n_inner++;
    end
    if (mac_valid) begin
      logic [255:0] e;
      longint t;
      if (q_exp.size() == 0) check(0, "unexpected MAC");
      else begin
        e = q_exp.pop_front();
        t = q_t.pop_front();
        check(mac == e, "MAC value");
        // the MAC register is written at the 65th edge after the accept edge;
        // it is sampled here one edge later
        check(cyc - t - 1 == 65, $sformatf("latency %0d", cyc - t - 1));
        n_mac++;
      end
    end
  end

  task automatic load_key(logic [511:0] k);
    @(negedge clk);
    key = k; key_valid = 1'b1;
    do @(posedge clk); while (!key_ready);
    @(negedge clk); key_valid = 1'b0;
  endtask

  task automatic send(logic [511:0] m, int nbits);
    @(negedge clk);
    msg = m; msg_bits = 9'(nbits); msg_valid = 1'b1;
    do @(posedge clk); while (!msg_ready);
    @(negedge clk); msg_valid = 1'b0;
  endtask

  task automatic send_stream(int n, bit rand_len);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      msg = rand_block();
      msg_bits = rand_len ? 9'($urandom_range(0, 447)) : 9'd256;
      msg_valid = 1'b1;
      do @(posedge clk); while (!msg_ready);
    end
    @(negedge clk); msg_valid = 1'b0;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (busy || q_exp.size() != 0);
  endtask

  // RFC 4231 vectors, single-block messages
  localparam logic [511:0] K1 = {{20{8'h0b}}, 352'b0};
  localparam logic [511:0] M1 = {64'h4869205468657265, 448'b0};  // "Hi There"
  localparam logic [255:0] R1 = 256'hb0344c61d8db38535ca8afceaf0bf12b881dc200c9833da726e9376c2e32cff7;
  localparam logic [511:0] K2 = {32'h4a656665, 480'b0};           // "Jefe"
  localparam logic [511:0] M2 = {224'h7768617420646f2079612077616e7420666f72206e6f7468696e673f, 288'b0};
  localparam logic [255:0] R2 = 256'h5bdcc146bf60754e6a042426089575c75a003f089d2739839dec58b964ec3843;

  initial begin
    // reference model self-check against the published vectors
    check(hmac(K1, M1, 64) == R1, "reference model TC1");
    check(hmac(K2, M2, 224) == R2, "reference model TC2");
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // TC1: key, then message supplied while initialization is in progress
    load_key(K1);
    send(M1, 64);
    wait_idle();
    check(mac == R1, "RFC 4231 TC1");
    // TC2 via re-key from the running state
    load_key(K2);
    send(M2, 224);
    wait_idle();
    check(mac == R2, "RFC 4231 TC2");
    // back-to-back stream with random lengths
    send_stream(NRAND, 1'b1);
    // re-key while messages are in flight: drains, then the new key applies
    send_stream(6, 1'b0);
    load_key(rand_block());
    send_stream(10, 1'b1);
    wait_idle();
    repeat (10) @(posedge clk);
    check(n_mac == n_inner && n_mac == NRAND + 18, $sformatf("MAC count %0d/%0d", n_mac, n_inner));
    check(n_b2b >= NRAND - 2, $sformatf("back-to-back 8-cycle accepts %0d", n_b2b));
    check(m_init >= 3, $sformatf("initializations %0d", m_init));
    check(m_wait_init >= 1, "message waiting during initialization");
    check(m_drain >= 1, "re-key drain");
    check(m_flush >= 1, "old-key block let in during drain");
    check(m_full >= 1, "full inner pipeline");
    check(m_bp >= 1, "input back-pressure");
    $display("mechanisms: init=%0d wait_init=%0d drain=%0d flush=%0d full=%0d backpressure=%0d b2b=%0d macs=%0d",
             m_init, m_wait_init, m_drain, m_flush, m_full, m_bp, n_b2b, n_mac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
