// dpcam: dual port content addressable memory, the storage element placed at
// every cross point of the MPCAM crossbar.
//
// Port 1 (write) stores a (tag, data) pair into the line under the write
// pointer and advances the pointer by one, wrapping at LINES. The pointer
// therefore always names the least recently written line, and a line is
// overwritten only after LINES-1 later writes: the memory behaves as a
// circular scratch book holding the last LINES versions written to it.
//
// Port 2 (search) compares the applied tag with the tag of every valid line
// in parallel (one comparator per line, giving one match line per memory
// line) and returns the data of the matching line. Both ports work in the
// same cycle. When the search would hit the very line that port 1 is
// overwriting in that cycle, the write wins: that line takes no part in the
// search, and the new pair becomes visible from the next cycle on. If several
// lines hold the same tag, the lowest-numbered line answers (software keeps
// tags unique, so this only settles a corner case).
//
// Timing: both ports are synchronous to clk. A write presented in cycle t is
// searchable from cycle t+1. A search presented in cycle t (rd_en, rd_tag)
// answers in cycle t+1 on rd_valid / rd_hit / rd_data; rd_data is zero on a
// miss. last_data holds the word most recently written through port 1, the
// monitor point of the written line. rst_n (asynchronous, active low) empties
// the memory by clearing every valid bit and the pointer.
//
// From the source architecture: the two specialised ports, writing to the
// least recently written line, the per-line comparators and write priority on
// a same-line conflict. This design's own choices: the clocked interface and
// its one-cycle latency, valid bits and reset, the lowest-line rule for
// duplicate tags, and a miss returning zero data.
module dpcam
  import mpcam_pkg::*;
#(
  parameter int unsigned LINES = 2048
) (
  input  logic  clk,
  input  logic  rst_n,
  // port 1: write
  input  logic  wr_en,
  input  tag_t  wr_tag,
  input  data_t wr_data,
  // port 2: search
  input  logic  rd_en,
  input  tag_t  rd_tag,
  output logic  rd_valid,
  output logic  rd_hit,
  output data_t rd_data,
  // monitor of the most recently written word
  output data_t last_data
);

  localparam int unsigned PTR_W = (LINES > 1) ? $clog2(LINES) : 1;
  typedef logic [PTR_W-1:0] ptr_t;

  ptr_t             wr_ptr;
  tag_t             tag_mem  [LINES];
  data_t            data_mem [LINES];
  logic [LINES-1:0] line_valid;
  logic [LINES-1:0] match;     // one match line per memory line
  logic [LINES-1:0] first;     // lowest set bit of match

  // storage carries no reset; a line is only searched once its valid bit is set
  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_mem[wr_ptr]  <= wr_tag;
      data_mem[wr_ptr] <= wr_data;
    end
  end

  // one comparator per line; the line being overwritten this cycle is kept
  // out of the search (write priority)
  always_comb begin
    for (int unsigned i = 0; i < LINES; i++) begin
      match[i] = line_valid[i] && (tag_mem[i] == rd_tag) &&
                 !(wr_en && wr_ptr == ptr_t'(i));
    end
  end

  // priority encoder: isolate the lowest match line, then AND-OR the data
  assign first = match & (~match + 1'b1);

  data_t data_c;
  always_comb begin
    data_c = '0;
    for (int unsigned i = 0; i < LINES; i++) begin
      data_c |= data_mem[i] & {DATA_W{first[i]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_valid <= '0;
      wr_ptr     <= '0;
      last_data  <= '0;
      rd_valid   <= 1'b0;
      rd_hit     <= 1'b0;
      rd_data    <= '0;
    end else begin
      if (wr_en) begin
        line_valid[wr_ptr] <= 1'b1;
        last_data          <= wr_data;
        wr_ptr             <= (wr_ptr == ptr_t'(LINES - 1)) ? '0 : wr_ptr + 1'b1;
      end
      rd_valid <= rd_en;
      rd_hit   <= rd_en && (|match);
      rd_data  <= rd_en ? data_c : '0;
    end
  end

endmodule
