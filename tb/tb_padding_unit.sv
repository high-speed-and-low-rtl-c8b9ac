// tb_padding_unit: random messages of random length 0..447 bits (with
// garbage beyond the length) against the reference padding with the HMAC
// inner length offset of 512; random back-pressure on the output. Checks
// order, values and that the one-entry buffer neither drops nor repeats a
// block, and that a message becomes a block one cycle after it is taken.
module tb_padding_unit;
  import sha256_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic mv = 0, mr, bv, br = 0;
  block_t m = '0, b;
  logic [8:0] nb = '0;
  int checks = 0, failures = 0;
  block_t exp_q [$];
  int sent = 0, got = 0, stalls = 0;

  padding_unit dut (.clk(clk), .rst_n(rst_n), .msg_valid_i(mv), .msg_i(m), .msg_bits_i(nb),
                    .msg_ready_o(mr), .blk_valid_o(bv), .blk_o(b), .blk_ready_i(br));
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (bv && br) begin
      checks++;
      if (exp_q.size() == 0 || b !== exp_q[0]) begin failures++; $display("FAIL block %0d", got); end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      got++;
    end
    if (bv && !br) stalls++;
    if (mv && mr) begin exp_q.push_back(pad(m, int'(nb), 512)); sent++; end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one-cycle latency
    @(negedge clk); m = rand_block(); nb = 9'd256; mv = 1;
    @(negedge clk); mv = 0;
    checks++;
    if (!bv) begin failures++; $display("FAIL latency"); end
    br = 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      br = ($urandom_range(0, 3) != 0);
      if (!mv || mr) begin
        mv = ($urandom_range(0, 3) != 0);
        m = rand_block();
        nb = (n < 2) ? 9'(n * 447) : 9'($urandom_range(0, 447));
      end
    end
    @(negedge clk); mv = 0; br = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (got != sent || exp_q.size() != 0) begin failures++; $display("FAIL count %0d %0d", got, sent); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
