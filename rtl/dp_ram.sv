// dp_ram: true dual port RAM, one per core, forming the mid-level memory that
// sits between the global MMU and each core's local MMU (8 x 128 KB = 1 MB in
// the eight-core system).
//
// Port A faces the global MMU, port B the core's local MMU. Each port reads or
// writes one word per cycle, independently of the other. Reads are
// synchronous: the word addressed in cycle t appears on rdata in cycle t+1
// (a read returns the old contents when the same port writes the same word).
// If both ports write the same word in one cycle, port A (the global MMU)
// wins. The contents are not reset.
//
// From the source architecture: a 128 KB dual port RAM per core between the
// global and the local MMU. This design's own choices: 32-bit words (32768 of
// them), word addressing, the read latency and the port-A write priority.
module dp_ram
  import mpcam_pkg::*;
#(
  parameter int unsigned WORDS  = 32768,
  localparam int unsigned ADDR_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic              clk,
  // port A: global MMU side
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  data_t             a_wdata,
  output data_t             a_rdata,
  // port B: local MMU side
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  data_t             b_wdata,
  output data_t             b_rdata
);

  data_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;   // later assignment: port A wins
  end

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
