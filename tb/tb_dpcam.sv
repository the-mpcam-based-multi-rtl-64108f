// tb_dpcam: self-checking testbench of the dual port CAM.
//
// A reference model kept in the testbench (tag/data/valid arrays and a
// circular pointer) predicts, at the cycle a search is presented, which line
// answers; the DUT's answer is checked one cycle later (the one-cycle search
// latency). Directed phases cover: an empty memory misses; a write is
// searchable from the next cycle; a search of the line being overwritten in
// the same cycle misses (write priority) and the old version is gone after;
// the oldest line is reused after LINES writes; duplicate tags answer from the
// lowest line; last_data follows the latest write. A random phase then mixes
// writes and searches over a small tag range. Inputs change on the falling
// clock edge, outputs are sampled after the rising one.
module tb_dpcam;
  import mpcam_pkg::*;

  localparam int unsigned LINES = 8;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  wr_en = 1'b0, rd_en = 1'b0;
  tag_t  wr_tag = '0, rd_tag = '0;
  data_t wr_data = '0;
  logic  rd_valid, rd_hit;
  data_t rd_data, last_data;

  int checks = 0, failures = 0;
  int n_conflict = 0, n_wrap = 0;

  dpcam #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  // reference model
  tag_t  m_tag  [LINES];
  data_t m_data [LINES];
  logic  m_valid[LINES];
  int    m_ptr;
  data_t m_last;

  function automatic void model_search(input tag_t t, input logic w,
                                       output logic hit, output data_t d);
    hit = 1'b0; d = '0;
    for (int i = 0; i < LINES; i++)
      if (!hit && m_valid[i] && m_tag[i] == t && !(w && i == m_ptr)) begin
        hit = 1'b1; d = m_data[i];
      end
  endfunction

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one cycle: present (optional) write and search, check the answer next cycle
  task automatic cycle(input logic w, input tag_t wt, input data_t wd,
                       input logic r, input tag_t rt);
    logic exp_hit; data_t exp_d;
    wr_en = w; wr_tag = wt; wr_data = wd; rd_en = r; rd_tag = rt;
    model_search(rt, w, exp_hit, exp_d);
    if (r && w && m_valid[m_ptr] && m_tag[m_ptr] == rt) n_conflict++;
    if (w) begin
      if (m_valid[m_ptr]) n_wrap++;
      m_tag[m_ptr] = wt; m_data[m_ptr] = wd; m_valid[m_ptr] = 1'b1;
      m_ptr = (m_ptr + 1) % LINES; m_last = wd;
    end
    @(posedge clk); #1;
    check("rd_valid", rd_valid == r);
    if (r) begin
      check($sformatf("rd_hit tag=%0h", rt), rd_hit == exp_hit);
      check($sformatf("rd_data tag=%0h", rt), rd_data == exp_d);
    end
    check("last_data", last_data == m_last);
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0;
  endtask

  initial begin
    #(20000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LINES; i++) begin m_valid[i] = 1'b0; m_tag[i] = '0; m_data[i] = '0; end
    m_ptr = 0; m_last = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // empty memory misses
    cycle(0, 0, 0, 1, 32'h0);
    check("empty miss", rd_hit == 1'b0);

    // write then search next cycle (latency one cycle each way)
    cycle(1, 32'h100, 32'hA000_0000, 0, 0);
    cycle(0, 0, 0, 1, 32'h100);
    check("write visible next cycle", rd_hit && rd_data == 32'hA000_0000);

    // fill the rest
    for (int i = 1; i < LINES; i++) cycle(1, 32'h100 + i, 32'hA000_0000 + i, 1, 32'h100 + i - 1);

    // pointer is back at line 0 (tag 100): search it while overwriting it
    cycle(1, 32'h200, 32'hB000_0000, 1, 32'h100);
    check("write priority: overwritten line misses", rd_hit == 1'b0);
    cycle(0, 0, 0, 1, 32'h100);
    check("old version gone after reuse", rd_hit == 1'b0);
    cycle(0, 0, 0, 1, 32'h200);
    check("new version present", rd_hit && rd_data == 32'hB000_0000);
    cycle(0, 0, 0, 1, 32'h101);
    check("line 1 still holds its version", rd_hit && rd_data == 32'hA000_0001);

    // duplicate tag: line 1 gets tag 200 again, line 0 (lower) must answer
    cycle(1, 32'h200, 32'hC000_0000, 0, 0);
    cycle(0, 0, 0, 1, 32'h200);
    check("duplicate tag: lowest line answers", rd_hit && rd_data == 32'hB000_0000);

    // random mix
    for (int n = 0; n < 3000; n++) begin
      cycle(1'($urandom_range(0, 1)), 32'($urandom_range(0, 15)), $urandom,
            1'($urandom_range(0, 1)), 32'($urandom_range(0, 15)));
    end

    check("same-line conflict seen", n_conflict > 0);
    check("line reuse seen", n_wrap > 0);
    $display("conflicts=%0d reuses=%0d", n_conflict, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
