// ms_ram: message-schedule register file.
//
// Holds all 64 schedule words W_0..W_63 of every message in flight, one slot
// of 64 words per message (SLOTS slots, one for each pipeline stage of the
// hashing core). A new padded block writes its sixteen words W_0..W_15 into
// its slot through the load port; the schedule generators write the
// expanded words W_16..W_63, two per cycle each, through NWR pair write
// ports. NRD asynchronous read ports serve the operation blocks and the
// generators.
//
// Timing: writes take effect at the rising clock edge; reads are
// combinational from the stored contents. Each write port writes the
// addresses wr_addr and wr_addr+1 (wr_addr even). Concurrent writes to the
// same word are not expected; if they happen the load port wins over the
// pair ports and a higher-numbered pair port wins over a lower one.
// The contents are not reset: every word is written before it is read.
// That all schedule words are kept in a register file is the architecture's;
// the slot organisation and port counts are this implementation's choice.
module ms_ram
  import sha256_pkg::*;
#(
  parameter int unsigned SLOTS = 4,
  parameter int unsigned NWR   = 3,
  parameter int unsigned NRD   = 23,
  localparam int unsigned SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1
)(
  input  logic             clk,
  // block load: W_0..W_15
  input  logic             ld_en_i,
  input  logic [SW-1:0]    ld_slot_i,
  input  block_t           ld_block_i,
  // pair write ports
  input  logic             wr_en_i   [NWR],
  input  logic [SW-1:0]    wr_slot_i [NWR],
  input  logic [5:0]       wr_addr_i [NWR],
  input  word_t            wr_d0_i   [NWR],
  input  word_t            wr_d1_i   [NWR],
  // read ports
  input  logic [SW-1:0]    rd_slot_i [NRD],
  input  logic [5:0]       rd_addr_i [NRD],
  output word_t            rd_data_o [NRD]
);

  word_t mem [SLOTS][64];

  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(NWR); p++) begin
      if (wr_en_i[p]) begin
        mem[wr_slot_i[p]][{wr_addr_i[p][5:1], 1'b0}] <= wr_d0_i[p];
        mem[wr_slot_i[p]][{wr_addr_i[p][5:1], 1'b1}] <= wr_d1_i[p];
      end
    end
    if (ld_en_i) begin
      for (int i = 0; i < 16; i++)
        mem[ld_slot_i][i] <= ld_block_i[511 - 32*i -: 32];
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NRD); r++)
      rd_data_o[r] = mem[rd_slot_i[r]][rd_addr_i[r]];
  end

endmodule
