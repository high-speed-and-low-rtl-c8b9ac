// tb_key_gen: loads random keys and checks the two key blocks (key xor
// 0x36.. and key xor 0x5c..), that the key is held while key_load is low,
// and the cleared key after reset.
module tb_key_gen;
  import sha256_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  block_t key = '0, ip, op;
  int checks = 0, failures = 0;

  key_gen dut (.clk(clk), .rst_n(rst_n), .key_load_i(load), .key_i(key),
               .ipad_block_o(ip), .opad_block_o(op));
  always #5 clk = ~clk;

  task automatic chk(block_t k);
    block_t ei, eo;
    for (int i = 0; i < 64; i++) begin
      ei[8*i +: 8] = k[8*i +: 8] ^ 8'h36;
      eo[8*i +: 8] = k[8*i +: 8] ^ 8'h5c;
    end
    checks++;
    if (ip !== ei || op !== eo) begin failures++; $display("FAIL key blocks"); end
  endtask

  initial begin
    block_t k;
    #12 chk('0);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk); key = k; load = 1;
      @(negedge clk); load = 0; key = ~k;
      chk(k);
      @(negedge clk); chk(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
