// mpcam: multi-port content addressable memory, the shared cache of the
// multi-core processor.
//
// The memory is a crossbar of ROWS x N_CORES cross points (mpcam_xpoint), each
// holding its own DPCAMs. Row i is a horizontal bus: core i's store-back unit
// writes (broadcasts) a (tag, data) pair to every cross point of its row in
// the same cycle, so every column receives a copy. Column j is a vertical
// bus: core j's operand-fetch unit applies a tag to every cross point of its
// column, and each of them searches all its lines at once. Since every row
// has a copy in every column, all cores can write and all cores can search in
// the same cycle, for the same or for different tags, with no arbitration and
// no queue: no request ever waits for another. With MMU_ROW = 1 one more row,
// the last, is written by the global MMU to load primary shared data.
//
// A column answers with the data of the first row (lowest index) whose cross
// point hits; the answer is a miss if none does. A miss means the version
// asked for has not been written yet (or was overwritten after LINES later
// writes to its memory); the requesting core simply asks again.
//
// Timing: a write in cycle t is seen by searches presented from cycle t+1 on;
// a search presented in cycle t answers in cycle t+1 (of_rsp.valid). The
// latency is the same for every N_CORES and LINES. row_last_data[i] shows the
// word most recently written on row i (read at its column-0 cross point).
//
// From the source architecture: the crossbar with a DPCAM at each cross point,
// store-back units on the rows, operand-fetch units on the columns, the
// broadcast write and the per-column search, and the extra MMU row. This
// design's own choices: lowest-row priority among several hitting rows, and
// the clocked one-cycle timing inherited from dpcam.
module mpcam
  import mpcam_pkg::*;
#(
  parameter int unsigned N_CORES   = 8,
  parameter bit          MMU_ROW   = 1'b1,
  parameter int unsigned LINES     = 2048,
  parameter int unsigned FAR_LINES = 512,
  localparam int unsigned ROWS     = N_CORES + (MMU_ROW ? 1 : 0)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wr_req_t sb_wr  [N_CORES],     // store-back unit of core i -> row i
  input  wr_req_t mmu_wr,               // global MMU -> last row (MMU_ROW = 1)
  input  rd_req_t of_rd  [N_CORES],     // operand-fetch unit of core j -> column j
  output rd_rsp_t of_rsp [N_CORES],
  output data_t   row_last_data [ROWS]
);

  wr_req_t row_bus [ROWS];
  rd_rsp_t xp_rsp  [ROWS][N_CORES];
  data_t   xp_last [ROWS][N_CORES];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    if (r < N_CORES) begin : g_core_row
      assign row_bus[r] = sb_wr[r];
    end else begin : g_mmu_row
      assign row_bus[r] = mmu_wr;
    end

    for (genvar c = 0; c < N_CORES; c++) begin : g_col
      mpcam_xpoint #(.LINES(LINES), .FAR_LINES(FAR_LINES)) u_xp (
        .clk, .rst_n,
        .wr       (row_bus[r]),
        .rd       (of_rd[c]),
        .rsp      (xp_rsp[r][c]),
        .last_data(xp_last[r][c])
      );
    end

    assign row_last_data[r] = xp_last[r][0];
  end

  // column merge: the lowest hitting row drives the vertical bus
  for (genvar c = 0; c < N_CORES; c++) begin : g_merge
    always_comb begin
      of_rsp[c] = '{valid: xp_rsp[0][c].valid, hit: 1'b0, data: '0};
      for (int r = ROWS - 1; r >= 0; r--) begin
        if (xp_rsp[r][c].hit) begin
          of_rsp[c].hit  = 1'b1;
          of_rsp[c].data = xp_rsp[r][c].data;
        end
      end
    end

    a_hit_in_answer_cycle: assert property (@(posedge clk) disable iff (!rst_n)
      of_rsp[c].hit |-> of_rsp[c].valid);
    a_answer_follows_search: assert property (@(posedge clk) disable iff (!rst_n)
      of_rd[c].en |=> of_rsp[c].valid);
  end

endmodule
