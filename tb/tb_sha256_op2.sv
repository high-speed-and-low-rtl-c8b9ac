// tb_sha256_op2: checks the merged two-operation block against two
// successive single operations of the reference model, for random states,
// constants and schedule words, and for a full 64-operation hash of the
// FIPS 180-4 "abc" block run through the block 32 times.
module tb_sha256_op2;
  import sha256_pkg::*;
  import sha_ref_pkg::*;

  state_t st_i, st_o;
  word_t  k0, w0, k1, w1;
  int checks = 0, failures = 0;

  sha256_op2 dut (.st_i(st_i), .k0_i(k0), .w0_i(w0), .k1_i(k1), .w1_i(w1), .st_o(st_o));

  initial begin
    logic [255:0] s, e;
    logic [511:0] abc;
    for (int n = 0; n < 2000; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      k0 = $urandom; w0 = $urandom; k1 = $urandom; w1 = $urandom;
      st_i = state_t'(s);
      #1;
      e = op1(op1(s, k0, w0), k1, w1);
      checks++;
      if (st_o !== state_t'(e)) begin
        failures++;
        if (failures < 5) $display("FAIL random %0d: %h vs %h", n, st_o, e);
      end
    end
    // SHA-256("abc"), 32 double operations
    abc = {32'h61626380, 416'b0, 64'd24};
    s = REF_IV;
    for (int t = 0; t < 64; t += 2) begin
      st_i = state_t'(s);
      k0 = kc(t); w0 = sched(abc, t); k1 = kc(t + 1); w1 = sched(abc, t + 1);
      #1;
      s = st_o;
    end
    for (int i = 0; i < 8; i++) e[255-32*i -: 32] = REF_IV[255-32*i -: 32] + s[255-32*i -: 32];
    checks++;
    if (e !== 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad) begin
      failures++;
      $display("FAIL abc digest %h", e);
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
