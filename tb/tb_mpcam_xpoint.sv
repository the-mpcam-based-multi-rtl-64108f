// tb_mpcam_xpoint: self-checking testbench of one cross point (near-reaching
// plus far-reaching DPCAM).
//
// The testbench models both memories (circular pointers, valid bits, write
// priority on a same-line conflict) and predicts each search answer: near
// first, then far. Directed phase: a far-reaching version survives many more
// near-reaching writes than the near memory holds; a near-reaching one does
// not; a tag held by both answers from the near memory; last_data follows the
// latest write in either memory. A random phase then mixes writes (near or
// far) and searches. One-cycle search latency is checked on every search.
module tb_mpcam_xpoint;
  import mpcam_pkg::*;

  localparam int unsigned LINES = 4, FAR_LINES = 2;

  logic    clk = 1'b0, rst_n = 1'b0;
  wr_req_t wr = '0;
  rd_req_t rd = '0;
  rd_rsp_t rsp;
  data_t   last_data;

  int checks = 0, failures = 0;

  mpcam_xpoint #(.LINES(LINES), .FAR_LINES(FAR_LINES)) dut (.*);

  always #5 clk = ~clk;

  // model: memory 0 = near, 1 = far
  tag_t  m_tag  [2][LINES];
  data_t m_data [2][LINES];
  logic  m_valid[2][LINES];
  int    m_ptr  [2];
  data_t m_last;

  function automatic int size_of(int k);
    return (k == 0) ? LINES : FAR_LINES;
  endfunction

  function automatic void model_search(input tag_t t, input int wk,
                                       output logic hit, output data_t d);
    hit = 1'b0; d = '0;
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < size_of(k); i++)
        if (!hit && m_valid[k][i] && m_tag[k][i] == t && !(wk == k && i == m_ptr[k])) begin
          hit = 1'b1; d = m_data[k][i];
        end
  endfunction

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(input logic w, input logic f, input tag_t wt, input data_t wd,
                       input logic r, input tag_t rt);
    logic exp_hit; data_t exp_d; int k;
    k = w ? (f ? 1 : 0) : -1;
    wr = '{en: w, far_reach: f, tag: wt, data: wd};
    rd = '{en: r, tag: rt};
    model_search(rt, k, exp_hit, exp_d);
    if (w) begin
      m_tag[k][m_ptr[k]] = wt; m_data[k][m_ptr[k]] = wd; m_valid[k][m_ptr[k]] = 1'b1;
      m_ptr[k] = (m_ptr[k] + 1) % size_of(k); m_last = wd;
    end
    @(posedge clk); #1;
    check("rsp.valid", rsp.valid == r);
    if (r) begin
      check($sformatf("hit tag=%0h", rt), rsp.hit == exp_hit);
      check($sformatf("data tag=%0h", rt), rsp.data == exp_d);
    end
    check("last_data", last_data == m_last);
    @(negedge clk);
    wr = '0; rd = '0;
  endtask

  initial begin
    #(20000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      m_ptr[k] = 0;
      for (int i = 0; i < LINES; i++) begin
        m_valid[k][i] = 1'b0; m_tag[k][i] = '0; m_data[k][i] = '0;
      end
    end
    m_last = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    cycle(1, 1, 32'hF0, 32'hFA12, 0, 0);           // far-reaching version
    cycle(1, 0, 32'h10, 32'h1111, 0, 0);           // near-reaching version
    for (int i = 0; i < 2 * LINES; i++) cycle(1, 0, 32'h20 + i, 32'h2000 + i, 0, 0);
    cycle(0, 0, 0, 0, 1, 32'hF0);
    check("far-reaching version survives", rsp.hit && rsp.data == 32'hFA12);
    cycle(0, 0, 0, 0, 1, 32'h10);
    check("near-reaching version overwritten", !rsp.hit);
    cycle(1, 1, 32'h27, 32'h7777, 0, 0);           // tag also in near memory
    cycle(0, 0, 0, 0, 1, 32'h27);
    check("near memory answers first", rsp.hit && rsp.data == 32'h2007);
    check("last_data from far write", last_data == 32'h7777);

    for (int n = 0; n < 3000; n++)
      cycle(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 32'($urandom_range(0, 11)),
            $urandom, 1'($urandom_range(0, 1)), 32'($urandom_range(0, 11)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
