// mpcam_system: the memory side of an N_CORES multi-core processor built
// around the MPCAM shared cache.
//
// Each core keeps private L1 instruction and data caches (outside this
// module) and reaches shared data through two pipeline stages only: its
// store-back (SB) unit writes on its own row of the MPCAM and its
// operand-fetch (OF) unit searches its own column. Every core therefore has a
// private write port and a private read port into the shared cache, and no
// core ever waits for another. Coherence needs no protocol: a new value is
// written as a new version under a new tag, every version stays readable
// until its line is reused, and a consumer asks for exactly the version it
// needs. The global MMU loads primary shared data through an extra MPCAM row
// (mmu_wr) and reaches each core's mid-level dual port RAM through port A;
// the core's local MMU uses port B.
//
// Interface (arrays indexed by core number):
//   sb_wr[i]          write request of core i's SB unit (tag, data, far_reach)
//   of_rd[i]/of_rsp[i] search request of core i's OF unit and its answer one
//                     cycle later (valid, hit, data)
//   mmu_wr            global MMU write into the MMU row of the MPCAM
//   row_last_data[r]  word most recently written on MPCAM row r (r = N_CORES
//                     is the MMU row)
//   gm_* / lm_*       port A (global MMU) / port B (local MMU) of core i's
//                     dual port RAM; read data one cycle after the request
// Cores, L1 caches, the local and global MMUs and the memory beyond the chip
// are outside this module and connect through these ports.
//
// From the source architecture: eight cores, the MPCAM on the cores' SB and
// OF stages, the MMU connection to the MPCAM, one 128 KB dual port RAM per
// core between global and local MMU. This design's own choices: all widths
// and handshakes, and the sizes noted in the sub-modules.
module mpcam_system
  import mpcam_pkg::*;
#(
  parameter int unsigned N_CORES   = 8,
  parameter int unsigned LINES     = 2048,
  parameter int unsigned FAR_LINES = 512,
  parameter int unsigned RAM_WORDS = 32768,
  localparam int unsigned RAM_AW   = (RAM_WORDS > 1) ? $clog2(RAM_WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // shared cache (MPCAM)
  input  wr_req_t           sb_wr  [N_CORES],
  input  rd_req_t           of_rd  [N_CORES],
  output rd_rsp_t           of_rsp [N_CORES],
  input  wr_req_t           mmu_wr,
  output data_t             row_last_data [N_CORES + 1],
  // per-core mid-level dual port RAM
  input  logic              gm_en    [N_CORES],
  input  logic              gm_we    [N_CORES],
  input  logic [RAM_AW-1:0] gm_addr  [N_CORES],
  input  data_t             gm_wdata [N_CORES],
  output data_t             gm_rdata [N_CORES],
  input  logic              lm_en    [N_CORES],
  input  logic              lm_we    [N_CORES],
  input  logic [RAM_AW-1:0] lm_addr  [N_CORES],
  input  data_t             lm_wdata [N_CORES],
  output data_t             lm_rdata [N_CORES]
);

  mpcam #(
    .N_CORES  (N_CORES),
    .MMU_ROW  (1'b1),
    .LINES    (LINES),
    .FAR_LINES(FAR_LINES)
  ) u_mpcam (
    .clk, .rst_n,
    .sb_wr, .mmu_wr, .of_rd, .of_rsp, .row_last_data
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    dp_ram #(.WORDS(RAM_WORDS)) u_l2ram (
      .clk,
      .a_en   (gm_en[i]),
      .a_we   (gm_we[i]),
      .a_addr (gm_addr[i]),
      .a_wdata(gm_wdata[i]),
      .a_rdata(gm_rdata[i]),
      .b_en   (lm_en[i]),
      .b_we   (lm_we[i]),
      .b_addr (lm_addr[i]),
      .b_wdata(lm_wdata[i]),
      .b_rdata(lm_rdata[i])
    );
  end

endmodule
