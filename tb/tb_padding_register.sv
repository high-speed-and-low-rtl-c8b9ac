// tb_padding_register: checks the padded outer block built from random
// digests (digest, '1' bit, zeros, length 768), the valid flag set by a load
// and cleared by a take, and a load in the same cycle as a take.
module tb_padding_register;
  import sha256_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, take = 0, valid;
  digest_t d = '0;
  block_t blk;
  int checks = 0, failures = 0;

  padding_register dut (.clk(clk), .rst_n(rst_n), .load_i(load), .digest_i(d),
                        .take_i(take), .valid_o(valid), .block_o(blk));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    digest_t x;
    #12 chk(!valid, "empty after reset");
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk); d = x; load = 1; take = (n % 3 == 2);
      @(negedge clk); load = 0; take = 0; d = ~x;
      chk(valid, "valid after load");
      chk(blk == pad({x, 256'b0}, 256, 512), "outer block");
      @(negedge clk);
      chk(valid, "held");
      take = 1;
      @(negedge clk); take = 0;
      chk(!valid, "cleared by take");
    end
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
