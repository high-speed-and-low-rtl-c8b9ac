// tb_ms_ram: a small register file (4 slots, 2 pair write ports, 3 read
// ports) checked against a shadow array: block loads of words 0..15,
// pair writes at random even addresses, random reads of every port.
module tb_ms_ram;
  import sha256_pkg::*;
  import sha_ref_pkg::*;

  localparam int NWR = 2, NRD = 3;
  logic clk = 0;
  logic ld = 0;
  logic [1:0] ld_slot = '0;
  block_t ld_blk = '0;
  logic we [NWR];
  logic [1:0] ws [NWR];
  logic [5:0] wa [NWR];
  word_t wd0 [NWR], wd1 [NWR];
  logic [1:0] rs [NRD];
  logic [5:0] ra [NRD];
  word_t rd [NRD];
  word_t shadow [4][64];
  int checks = 0, failures = 0;

  ms_ram #(.SLOTS(4), .NWR(NWR), .NRD(NRD)) dut (
    .clk(clk), .ld_en_i(ld), .ld_slot_i(ld_slot), .ld_block_i(ld_blk),
    .wr_en_i(we), .wr_slot_i(ws), .wr_addr_i(wa), .wr_d0_i(wd0), .wr_d1_i(wd1),
    .rd_slot_i(rs), .rd_addr_i(ra), .rd_data_o(rd));
  always #5 clk = ~clk;

  initial begin
    // fill every word first
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 64; a += 2) begin
        @(negedge clk);
        we[0] = 1; ws[0] = 2'(s); wa[0] = 6'(a); wd0[0] = $urandom; wd1[0] = $urandom;
        we[1] = 0; ws[1] = '0; wa[1] = '0; wd0[1] = '0; wd1[1] = '0;
        shadow[s][a] = wd0[0]; shadow[s][a+1] = wd1[0];
      end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // reads of the current contents
      for (int r = 0; r < NRD; r++) begin
        rs[r] = 2'($urandom); ra[r] = 6'($urandom);
      end
      #1;
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rd[r] !== shadow[rs[r]][ra[r]]) begin
          failures++; $display("FAIL read slot %0d addr %0d", rs[r], ra[r]);
        end
      end
      // writes for the next edge: port p writes slot p or p+2, distinct slots
      ld = (n % 5 == 0);
      ld_slot = 2'($urandom);
      ld_blk = rand_block();
      for (int p = 0; p < NWR; p++) begin
        we[p] = ($urandom_range(0, 1) == 1);
        ws[p] = 2'(p + 2 * $urandom_range(0, 1));
        wa[p] = 6'(16 + 2 * $urandom_range(0, 23));
        wd0[p] = $urandom; wd1[p] = $urandom;
        if (we[p]) begin shadow[ws[p]][wa[p]] = wd0[p]; shadow[ws[p]][wa[p] + 1] = wd1[p]; end
      end
      if (ld) for (int i = 0; i < 16; i++) shadow[ld_slot][i] = ld_blk[511 - 32*i -: 32];
    end
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
