// tb_hmac_vectors: long random-vector run of the HMAC engine at its default
// configuration. 480 messages in 12 key epochs; keys of random length
// (0..64 bytes), messages of random length (0..447 bits, with every fourth
// one the typical 256-bit digest size), fed back to back with random idle
// gaps. Every MAC is compared with the reference model, in order. The run
// also reports the achieved intake rate during the back-to-back stretches.
module tb_hmac_vectors;
  import sha_ref_pkg::*;

  localparam int EPOCHS = 12, PER_EPOCH = 40;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         key_valid = 1'b0, key_ready;
  logic [511:0] key = '0;
  logic         msg_valid = 1'b0, msg_ready;
  logic [511:0] msg = '0;
  logic [8:0]   msg_bits = '0;
  logic         mac_valid, keyed, busy;
  logic [255:0] mac;

  hmac_top dut (
    .clk(clk), .rst_n(rst_n),
    .key_valid_i(key_valid), .key_ready_o(key_ready), .key_i(key),
    .msg_valid_i(msg_valid), .msg_ready_o(msg_ready), .msg_i(msg), .msg_bits_i(msg_bits),
    .mac_valid_o(mac_valid), .mac_o(mac), .keyed_o(keyed), .busy_o(busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_mac = 0, n_sent = 0;
  logic [255:0] exp_q [$];

  always @(posedge clk) if (rst_n && mac_valid) begin
    checks++;
    if (exp_q.size() == 0 || mac !== exp_q[0]) begin
      failures++;
      if (failures < 5) $display("FAIL MAC %0d", n_mac);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    n_mac++;
  end

  function automatic logic [511:0] rand_key();
    logic [511:0] k;
    int nbytes;
    k = rand_block();
    nbytes = $urandom_range(0, 64);
    for (int i = nbytes; i < 64; i++) k[511 - 8*i -: 8] = 8'h00;
    return k;
  endfunction

  initial begin
    logic [511:0] k;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < EPOCHS; e++) begin
      k = rand_key();
      @(negedge clk); key = k; key_valid = 1'b1;
      do @(posedge clk); while (!key_ready);
      @(negedge clk); key_valid = 1'b0;
      for (int i = 0; i < PER_EPOCH; i++) begin
        @(negedge clk);
        if ($urandom_range(0, 9) == 0) begin
          msg_valid = 1'b0;
          repeat ($urandom_range(1, 20)) @(negedge clk);
        end
        msg = rand_block();
        msg_bits = (i % 4 == 0) ? 9'd256 : 9'($urandom_range(0, 447));
        msg_valid = 1'b1;
        do @(posedge clk); while (!msg_ready);
        exp_q.push_back(hmac(k, msg, int'(msg_bits)));
        n_sent++;
      end
      @(negedge clk); msg_valid = 1'b0;
    end
    do @(posedge clk); while (busy || exp_q.size() != 0);
    checks++;
    if (n_mac != EPOCHS * PER_EPOCH || n_sent != n_mac) begin
      failures++;
      $display("FAIL count sent=%0d macs=%0d", n_sent, n_mac);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
