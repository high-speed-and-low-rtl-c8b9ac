// tb_constants_array: checks K_t for every stage and phase against the
// reference table, the standard IV after reset, loading a stored initial
// value, and the IV selection by init.
module tb_constants_array;
  import sha256_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst_n = 0, hl = 0, init = 0;
  logic [2:0] ph = '0;
  word_t k0 [NUM_STAGES], k1 [NUM_STAGES];
  digest_t hi = '0, ho, iv;
  int checks = 0, failures = 0;

  constants_array dut (.clk(clk), .rst_n(rst_n), .phase_i(ph), .k0_o(k0), .k1_o(k1),
                       .h_load_i(hl), .h_i(hi), .h_o(ho), .init_i(init), .iv_o(iv));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    digest_t x;
    #12;
    chk(ho == REF_IV, "IV at reset");
    rst_n = 1;
    for (int p = 0; p < 8; p++) begin
      ph = 3'(p);
      #1;
      for (int s = 0; s < 4; s++) begin
        chk(k0[s] == kc(16*s + 2*p),     $sformatf("K%0d", 16*s + 2*p));
        chk(k1[s] == kc(16*s + 2*p + 1), $sformatf("K%0d", 16*s + 2*p + 1));
      end
    end
    for (int n = 0; n < 10; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk); hi = x; hl = 1;
      @(negedge clk); hl = 0; hi = ~x;
      chk(ho == x, "stored H");
      init = 0; #1 chk(iv == x, "iv = stored");
      init = 1; #1 chk(iv == REF_IV, "iv = standard");
      @(negedge clk); chk(ho == x, "H held");
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
