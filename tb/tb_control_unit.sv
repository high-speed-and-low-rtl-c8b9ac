// tb_control_unit: drives the sequencer with a simple model of the two
// cores (init digests return 32 cycles after the key blocks are issued) and
// checks: the phase relation (outer = inner - 1), no message before a key,
// one key block per core issued on its own hand-over during INIT, RUN after
// both init digests, message hand-over only at the inner hand-over phase,
// padding-register take only at the outer hand-over phase, and a re-key in
// RUN that lets in only the block already waiting at the key hand-shake
// (if any), then holds intake until empty_i and re-initializes.
module tb_control_unit;
  import sha256_pkg::*;

  logic clk = 0, rst_n = 0;
  logic kv = 0, kr, kl;
  logic [2:0] p1, p2;
  logic bv = 0, br, c1v, c1i, c1d = 0;
  logic pv = 0, pt, c2v, c2i, c2d = 0;
  logic empty = 1, keyed, initing;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint iss1_t [$], iss2_t [$];
  int n_iss1 = 0, n_iss2 = 0, n_blk = 0, n_take = 0;

  control_unit dut (.clk(clk), .rst_n(rst_n), .key_valid_i(kv), .key_ready_o(kr), .key_load_o(kl),
                    .phase1_o(p1), .phase2_o(p2), .blk_valid_i(bv), .blk_ready_o(br),
                    .c1_valid_o(c1v), .c1_init_o(c1i), .c1_init_done_i(c1d),
                    .preg_valid_i(pv), .preg_take_o(pt), .c2_valid_o(c2v), .c2_init_o(c2i),
                    .c2_init_done_i(c2d), .empty_i(empty), .keyed_o(keyed), .init_o(initing));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0d", s, cyc); end
  endtask

  // core model: init digest returns 32 cycles after the key block is taken
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      chk(p2 == p1 - 3'd1, "phase offset");
      if (c1v && c1i && p1 == 3'd7) begin iss1_t.push_back(cyc); n_iss1++; end
      if (c2v && c2i && p2 == 3'd7) begin iss2_t.push_back(cyc); n_iss2++; end
      if (br) begin chk(p1 == 3'd7 && (keyed || initing), "message only at inner hand-over"); if (bv) n_blk++; end
      if (pt) begin chk(p2 == 3'd7, "take only at outer hand-over"); n_take++; end
      c1d <= (iss1_t.size() != 0 && cyc + 1 - iss1_t[0] == 32);
      c2d <= (iss2_t.size() != 0 && cyc + 1 - iss2_t[0] == 32);
      if (iss1_t.size() != 0 && cyc + 1 - iss1_t[0] == 32) void'(iss1_t.pop_front());
      if (iss2_t.size() != 0 && cyc + 1 - iss2_t[0] == 32) void'(iss2_t.pop_front());
    end
  end

  bit exp_flush;
  task automatic key();
    @(negedge clk); kv = 1;
    do @(posedge clk); while (!kr);
    chk(kl, "key load strobe");
    exp_flush = bv && !br;
    @(negedge clk); kv = 0;
  endtask

  initial begin
    int waited;
    repeat (2) @(posedge clk);
    rst_n = 1;
    bv = 1; pv = 0;
    repeat (20) @(posedge clk);
    chk(!keyed && n_blk == 0, "no message before key");
    key();
    chk(initing, "INIT after key");
    waited = 0;
    while (!keyed) begin @(posedge clk); waited++; end
    chk(n_iss1 == 1 && n_iss2 == 1, "one key block per core");
    chk(waited <= 45, $sformatf("init took %0d cycles", waited));
    repeat (40) @(posedge clk);
    chk(n_blk == 5, $sformatf("one message per 8 cycles: %0d", n_blk));
    pv = 1;
    repeat (16) @(posedge clk);
    chk(n_take == 2, $sformatf("takes %0d", n_take));
    // re-key while busy
    for (int r = 0; r < 3; r++) begin
      empty = 0;
      // key taken in phase 6, 7 (block goes in normally) or 0
      do @(negedge clk); while (p1 != 3'(5 + r));
      key();
      chk(exp_flush == (r != 1), "key phase");
      n_blk = 0;
      repeat (50) @(posedge clk);
      chk(!keyed && initing, "draining");
      chk(n_blk == int'(exp_flush), $sformatf("drain intake %0d, waiting block %0d", n_blk, exp_flush));
      pv = 0; empty = 1;
      while (!keyed) @(posedge clk);
      pv = 1;
    end
    chk(n_iss1 == 4 && n_iss2 == 4, "re-initialized three times");
    empty = 0;
    key();
    repeat (50) @(posedge clk);
    chk(n_iss1 == 4, "no key block while draining");
    pv = 0; empty = 1;
    while (!keyed) @(posedge clk);
    chk(n_iss1 == 5 && n_iss2 == 5, "re-initialized");
    n_blk = 0;
    repeat (16) @(posedge clk);
    chk(n_blk == 2, "messages resume");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
