// tb_w_gen: checks the two-word schedule generator against the reference
// message schedule of random blocks, for every even step t = 16..62.
module tb_w_gen;
  import sha256_pkg::*;
  import sha_ref_pkg::*;

  word_t m16, m15, m14, m7, m6, m2, m1, w0, w1;
  int checks = 0, failures = 0;

  w_gen dut (.w_m16_i(m16), .w_m15_i(m15), .w_m14_i(m14), .w_m7_i(m7), .w_m6_i(m6),
             .w_m2_i(m2), .w_m1_i(m1), .w0_o(w0), .w1_o(w1));

  initial begin
    logic [511:0] b;
    for (int n = 0; n < 30; n++) begin
      b = rand_block();
      for (int t = 16; t < 64; t += 2) begin
        m16 = sched(b, t-16); m15 = sched(b, t-15); m14 = sched(b, t-14);
        m7 = sched(b, t-7); m6 = sched(b, t-6); m2 = sched(b, t-2); m1 = sched(b, t-1);
        #1;
        checks += 2;
        if (w0 !== sched(b, t))   begin failures++; $display("FAIL W%0d", t); end
        if (w1 !== sched(b, t+1)) begin failures++; $display("FAIL W%0d", t+1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
