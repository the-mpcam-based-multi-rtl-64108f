// mpcam_xpoint: one cross point of the MPCAM crossbar.
//
// A cross point joins one horizontal bus (written by one core's store-back
// unit, or by the global MMU) to one vertical bus (searched by one core's
// operand-fetch unit). It holds two DPCAMs side by side: a near-reaching one
// for versions that are consumed soon after they are produced, and a smaller
// far-reaching one for versions consumed long after, which would otherwise be
// overwritten in the busy near-reaching memory before use.
//
// Write: the `far_reach` bit of the request, set by software for far-reaching
// variables, steers the pair into the far-reaching DPCAM; otherwise it goes to
// the near-reaching one. Search: the tag is applied to both DPCAMs at once;
// the cross point hits if either does, and the near-reaching DPCAM answers if
// both do. With FAR_LINES = 0 the cross point holds the near-reaching DPCAM
// only and `far_reach` is ignored.
//
// Timing is that of dpcam: a write is searchable one cycle later, a search
// answers one cycle after it is presented. last_data is the word most
// recently written into this cross point, in whichever DPCAM it went.
//
// From the source architecture: two DPCAMs per cross point on the same buses,
// the far-reaching one smaller. This design's own choices: steering by a
// `far_reach` bit carried with the write, near-first priority, and FAR_LINES = LINES/4.
module mpcam_xpoint
  import mpcam_pkg::*;
#(
  parameter int unsigned LINES     = 2048,
  parameter int unsigned FAR_LINES = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  wr_req_t wr,          // horizontal bus
  input  rd_req_t rd,          // vertical bus, search
  output rd_rsp_t rsp,         // vertical bus, answer (one cycle later)
  output data_t   last_data
);

  logic  near_wr, far_wr;
  logic  near_valid, near_hit;
  data_t near_data, near_last;

  assign near_wr = wr.en && !(wr.far_reach && FAR_LINES > 0);
  assign far_wr  = wr.en && wr.far_reach && FAR_LINES > 0;

  dpcam #(.LINES(LINES)) u_near (
    .clk, .rst_n,
    .wr_en   (near_wr),
    .wr_tag  (wr.tag),
    .wr_data (wr.data),
    .rd_en   (rd.en),
    .rd_tag  (rd.tag),
    .rd_valid(near_valid),
    .rd_hit  (near_hit),
    .rd_data (near_data),
    .last_data(near_last)
  );

  if (FAR_LINES > 0) begin : g_far
    logic  far_valid, far_hit, last_was_far;
    data_t far_data, far_last;

    dpcam #(.LINES(FAR_LINES)) u_far (
      .clk, .rst_n,
      .wr_en   (far_wr),
      .wr_tag  (wr.tag),
      .wr_data (wr.data),
      .rd_en   (rd.en),
      .rd_tag  (rd.tag),
      .rd_valid(far_valid),
      .rd_hit  (far_hit),
      .rd_data (far_data),
      .last_data(far_last)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      last_was_far <= 1'b0;
      else if (wr.en)  last_was_far <= far_wr;
    end

    assign rsp.valid = near_valid || far_valid;   // both follow rd.en
    assign rsp.hit   = near_hit || far_hit;
    assign rsp.data  = near_hit ? near_data : far_data;
    assign last_data = last_was_far ? far_last : near_last;
  end else begin : g_near_only
    assign rsp.valid = near_valid;
    assign rsp.hit   = near_hit;
    assign rsp.data  = near_data;
    assign last_data = near_last;
  end

endmodule
