// tb_sha256_core: one hashing core driven by a free-running phase count.
//
// Checks, against the reference compression function:
//  - a key block flagged init is hashed from the standard IV and its result
//    becomes the stored initial value;
//  - following blocks are hashed from the stored value, including a run of
//    back-to-back blocks that fills all four pipeline stages;
//  - a second init block, the padded FIPS 180-4 "abc" message, whose
//    stored result must be the published SHA-256("abc");
//  - blocks are accepted only on the hand-over phase, results come out in
//    order exactly 32 cycles after acceptance, one every 8 cycles when fed
//    back to back; gaps (empty stages) are handled.
module tb_sha256_core;
  import sha256_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] ph = '0;
  logic iv_ = 0, ii = 0, ir, ov, oi, busy;
  block_t ib = '0;
  digest_t od, hs;
  assign hs = dut.h_q;   // stored initial value inside the constants array
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [255:0] href;
  logic [255:0] exp_q [$];
  logic         expi_q [$];
  longint       t_q [$];
  int full_seen = 0, outs = 0;

  sha256_core dut (.clk(clk), .rst_n(rst_n), .phase_i(ph), .in_valid_i(iv_), .in_init_i(ii),
                   .in_block_i(ib), .in_ready_o(ir), .out_valid_o(ov), .out_init_o(oi),
                   .out_digest_o(od), .busy_o(busy));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) ph <= ph + 3'd1;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0d", s, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    chk(ir == (ph == 3'd7), "ready only on hand-over");
    if (dut.vld_q[0] && dut.vld_q[1] && dut.vld_q[2] && dut.vld_q[3]) full_seen++;
    if (iv_ && ir) begin
      exp_q.push_back(ii ? compress(REF_IV, ib) : compress(href, ib));
      expi_q.push_back(ii);
      if (ii) href = compress(REF_IV, ib);
      t_q.push_back(cyc);
    end
    if (ov) begin
      if (exp_q.size() == 0) chk(0, "unexpected output");
      else begin
        chk(od == exp_q.pop_front(), "digest");
        chk(oi == expi_q.pop_front(), "init flag");
        chk(cyc - t_q.pop_front() == 32, "latency 32");
        outs++;
      end
    end
  end

  // present a block until it is accepted
  task automatic put(block_t b, bit init);
    @(negedge clk);
    ib = b; ii = init; iv_ = 1;
    do @(posedge clk); while (!ir);
    @(negedge clk); iv_ = 0; ii = 0;
  endtask

  task automatic stream(int n);
    @(negedge clk);
    iv_ = 1; ii = 0; ib = rand_block();
    for (int i = 0; i < n; i++) begin
      do @(posedge clk); while (!ir);
      @(negedge clk); ib = rand_block();
    end
    iv_ = 0;
  endtask

  task automatic drain();
    do @(posedge clk); while (busy);
    @(posedge clk);
  endtask

  initial begin
    longint t0;
    href = REF_IV;
    repeat (2) @(posedge clk);
    rst_n = 1;
    put(rand_block(), 1'b1);        // key block
    drain();
    chk(hs == href, "stored chaining value");
    stream(12);                     // back-to-back, fills the pipeline
    drain();
    put(rand_block(), 1'b0);        // single block with empty stages around it
    repeat (13) @(posedge clk);
    put(rand_block(), 1'b0);
    drain();
    chk(full_seen > 0, "pipeline full");
    chk(n_b2b >= 11, $sformatf("outputs 8 cycles apart: %0d", n_b2b));
    // SHA-256("abc") through an init block
    put({32'h61626380, 416'b0, 64'd24}, 1'b1);
    drain();
    chk(hs == 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, "abc");
    stream(5);
    drain();
    chk(outs == 21, $sformatf("output count %0d", outs));
    chk(exp_q.size() == 0, "all results out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-to-back outputs are exactly 8 cycles apart
  longint last_out = -1;
  int n_b2b = 0;
  always @(posedge clk) if (ov) begin
    if (last_out >= 0) chk((cyc - last_out) % 8 == 0, "output grid");
    if (last_out >= 0 && cyc - last_out == 8) n_b2b++;
    last_out = cyc;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
