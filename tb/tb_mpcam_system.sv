// tb_mpcam_system: end-to-end testbench of the MPCAM multi-core memory system
// (4 cores, small memories so that line reuse happens quickly).
//
// It runs a producer/consumer program of the kind the architecture targets,
// through the same ports the cores' pipeline stages and the MMUs would use:
//   1. the global MMU loads primary shared data into the MMU row, and every
//      core reads it through its own column in the same cycle;
//   2. rounds of a shared-variable loop: in each round every core produces a
//      new version of its own variable (tag = variable << 16 | version) on its
//      row, all in the same cycle, and consumes its neighbour's version of
//      that round. A consumer that asks in the cycle of the write misses and
//      asks again the next cycle; the retry must hit;
//   3. a far-reaching version survives more near-reaching writes than a near
//      memory holds, while an old near-reaching version is lost to line reuse;
//   4. a search aimed at the line being overwritten in the same cycle misses
//      (write priority);
//   5. the global MMU fills each core's dual port RAM through port A and the
//      local MMU reads it back through port B, including a same-word write
//      collision.
// Every answer is compared with a model of the rows' memories and of the
// RAMs. Each mechanism is counted and must have happened at least once.
module tb_mpcam_system;
  import mpcam_pkg::*;

  localparam int unsigned N = 4, LINES = 8, FAR_LINES = 4, RAM_WORDS = 64, AW = 6;
  localparam int unsigned ROWS = N + 1;

  logic    clk = 1'b0, rst_n = 1'b0;
  wr_req_t sb_wr [N];
  rd_req_t of_rd [N];
  rd_rsp_t of_rsp[N];
  wr_req_t mmu_wr;
  data_t   row_last_data[ROWS];
  logic          gm_en[N], gm_we[N], lm_en[N], lm_we[N];
  logic [AW-1:0] gm_addr[N], lm_addr[N];
  data_t         gm_wdata[N], gm_rdata[N], lm_wdata[N], lm_rdata[N];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_broadcast = 0, n_same_tag_read = 0, n_miss_retry = 0, n_mmu_load = 0;
  int n_far_survive = 0, n_reuse_loss = 0, n_wr_priority = 0, n_ram_collision = 0;
  int n_ram_path = 0;

  mpcam_system #(.N_CORES(N), .LINES(LINES), .FAR_LINES(FAR_LINES), .RAM_WORDS(RAM_WORDS)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- model ----------------
  tag_t  m_tag  [ROWS][2][LINES];
  data_t m_data [ROWS][2][LINES];
  logic  m_valid[ROWS][2][LINES];
  int    m_ptr  [ROWS][2];
  data_t m_last [ROWS];
  data_t m_ram  [N][RAM_WORDS];
  logic  m_ram_ok[N][RAM_WORDS];   // word written since start
  logic  last_hit [N];
  data_t last_data[N];

  function automatic int size_of(int k);
    return (k == 0) ? LINES : FAR_LINES;
  endfunction
  function automatic wr_req_t row_req(int r);
    return (r < N) ? sb_wr[r] : mmu_wr;
  endfunction

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic clear_inputs();
    for (int c = 0; c < N; c++) begin
      sb_wr[c] = '0; of_rd[c] = '0;
      gm_en[c] = 0; gm_we[c] = 0; gm_addr[c] = '0; gm_wdata[c] = '0;
      lm_en[c] = 0; lm_we[c] = 0; lm_addr[c] = '0; lm_wdata[c] = '0;
    end
    mmu_wr = '0;
  endtask

  // one clock cycle with the requests now on the ports; checks every answer
  task automatic step();
    logic  exp_hit[N];
    data_t exp_d[N], exp_ga[N], exp_lb[N];
    logic  ok_ga[N], ok_lb[N];
    for (int c = 0; c < N; c++) begin
      exp_hit[c] = 1'b0; exp_d[c] = '0;
      for (int r = 0; r < ROWS; r++) begin
        wr_req_t q; q = row_req(r);
        for (int k = 0; k < 2; k++)
          for (int i = 0; i < size_of(k); i++)
            if (m_valid[r][k][i] && m_tag[r][k][i] == of_rd[c].tag) begin
              if (q.en && (q.far_reach ? 1 : 0) == k && i == m_ptr[r][k]) begin
                if (of_rd[c].en) n_wr_priority++;
              end else if (!exp_hit[c]) begin
                exp_hit[c] = 1'b1; exp_d[c] = m_data[r][k][i];
              end
            end
      end
      exp_ga[c] = m_ram[c][gm_addr[c]];
      exp_lb[c] = m_ram[c][lm_addr[c]];
      ok_ga[c] = m_ram_ok[c][gm_addr[c]];
      ok_lb[c] = m_ram_ok[c][lm_addr[c]];
    end
    for (int r = 0; r < ROWS; r++) begin
      wr_req_t q; int k; q = row_req(r);
      if (q.en) begin
        k = q.far_reach ? 1 : 0;
        m_tag[r][k][m_ptr[r][k]] = q.tag; m_data[r][k][m_ptr[r][k]] = q.data;
        m_valid[r][k][m_ptr[r][k]] = 1'b1;
        m_ptr[r][k] = (m_ptr[r][k] + 1) % size_of(k);
        m_last[r] = q.data;
      end
    end
    for (int c = 0; c < N; c++) begin
      if (lm_en[c] && lm_we[c]) begin m_ram[c][lm_addr[c]] = lm_wdata[c]; m_ram_ok[c][lm_addr[c]] = 1'b1; end
      if (gm_en[c] && gm_we[c]) begin m_ram[c][gm_addr[c]] = gm_wdata[c]; m_ram_ok[c][gm_addr[c]] = 1'b1; end
      if (gm_en[c] && gm_we[c] && lm_en[c] && lm_we[c] && gm_addr[c] == lm_addr[c]) n_ram_collision++;
    end
    begin
      int nw; nw = 0;
      for (int c = 0; c < N; c++) if (sb_wr[c].en) nw++;
      if (nw == N) n_broadcast++;
    end
    @(posedge clk); #1;
    for (int c = 0; c < N; c++) begin
      check("of_rsp.valid", of_rsp[c].valid == of_rd[c].en);
      if (of_rd[c].en) begin
        check($sformatf("hit core %0d tag %0h", c, of_rd[c].tag), of_rsp[c].hit == exp_hit[c]);
        check($sformatf("data core %0d tag %0h", c, of_rd[c].tag), of_rsp[c].data == exp_d[c]);
      end
      last_hit[c] = of_rsp[c].hit; last_data[c] = of_rsp[c].data;
      if (gm_en[c] && ok_ga[c]) check("global MMU RAM read", gm_rdata[c] == exp_ga[c]);
      if (lm_en[c] && ok_lb[c]) check("local MMU RAM read", lm_rdata[c] == exp_lb[c]);
    end
    for (int r = 0; r < ROWS; r++) check("row_last_data", row_last_data[r] == m_last[r]);
    @(negedge clk);
    clear_inputs();
  endtask

  function automatic tag_t vtag(int var_id, int version);
    return tag_t'((var_id << 16) | version);
  endfunction

  initial begin
    #(50000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      m_last[r] = '0;
      for (int k = 0; k < 2; k++) begin
        m_ptr[r][k] = 0;
        for (int i = 0; i < LINES; i++) begin
          m_valid[r][k][i] = 1'b0; m_tag[r][k][i] = '0; m_data[r][k][i] = '0;
        end
      end
    end
    for (int c = 0; c < N; c++) for (int a = 0; a < RAM_WORDS; a++) m_ram_ok[c][a] = 1'b0;
    clear_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. primary shared data from the global MMU, read by all cores at once
    for (int i = 0; i < 3; i++) begin
      mmu_wr = '{en: 1'b1, far_reach: 1'b1, tag: vtag(100 + i, 0), data: 32'hD0_0000 + i};
      step();
    end
    for (int i = 0; i < 3; i++) begin
      for (int c = 0; c < N; c++) of_rd[c] = '{en: 1'b1, tag: vtag(100 + i, 0)};
      step();
      for (int c = 0; c < N; c++) check("primary data", last_hit[c] && last_data[c] == 32'hD0_0000 + i);
      n_mmu_load++;
      n_same_tag_read++;
    end

    // 2. shared-variable rounds: produce on the rows, consume the neighbour's
    for (int v = 1; v <= 6; v++) begin
      for (int c = 0; c < N; c++) begin
        sb_wr[c] = '{en: 1'b1, far_reach: 1'b0, tag: vtag(c, v), data: 32'(c * 1000 + v)};
        of_rd[c] = '{en: 1'b1, tag: vtag((c + 1) % N, v)};   // too early
      end
      step();
      for (int c = 0; c < N; c++) begin
        check("consumer asking in the write cycle misses", !last_hit[c]);
        of_rd[c] = '{en: 1'b1, tag: vtag((c + 1) % N, v)};   // retry
      end
      step();
      for (int c = 0; c < N; c++) begin
        check("retry hits", last_hit[c] && last_data[c] == 32'(((c + 1) % N) * 1000 + v));
        if (last_hit[c]) n_miss_retry++;
      end
    end

    // 3. far-reaching version vs line reuse of near-reaching versions
    sb_wr[0] = '{en: 1'b1, far_reach: 1'b1, tag: vtag(50, 1), data: 32'hFA12};
    step();
    for (int i = 0; i < LINES + 2; i++) begin
      sb_wr[0] = '{en: 1'b1, far_reach: 1'b0, tag: vtag(60, i), data: 32'(i)};
      step();
    end
    for (int c = 0; c < N; c++) of_rd[c] = '{en: 1'b1, tag: vtag(50, 1)};
    step();
    for (int c = 0; c < N; c++) check("far-reaching version kept", last_hit[c] && last_data[c] == 32'hFA12);
    if (last_hit[0]) n_far_survive++;
    of_rd[1] = '{en: 1'b1, tag: vtag(60, 0)};
    step();
    check("oldest near-reaching version reused", !last_hit[1]);
    if (!last_hit[1]) n_reuse_loss++;

    // 4. search the line that is being overwritten in this very cycle:
    //    row 0's pointer now names the line holding version (60, 2)
    sb_wr[0] = '{en: 1'b1, far_reach: 1'b0, tag: vtag(61, 0), data: 32'h6100};
    of_rd[2] = '{en: 1'b1, tag: vtag(60, 2)};
    step();
    check("write priority on the same line", !last_hit[2]);

    // 5. mid-level RAMs: global MMU writes, local MMU reads back
    for (int a = 0; a < RAM_WORDS; a++) begin
      for (int c = 0; c < N; c++) begin
        gm_en[c] = 1; gm_we[c] = 1; gm_addr[c] = AW'(a); gm_wdata[c] = 32'(c << 24 | a);
      end
      step();
    end
    for (int a = 0; a < RAM_WORDS; a++) begin
      for (int c = 0; c < N; c++) begin
        lm_en[c] = 1; lm_we[c] = 0; lm_addr[c] = AW'(a);
      end
      step();
      for (int c = 0; c < N; c++) if (lm_rdata[c] == 32'(c << 24 | a)) n_ram_path++;
    end
    for (int c = 0; c < N; c++) begin
      gm_en[c] = 1; gm_we[c] = 1; gm_addr[c] = 7; gm_wdata[c] = 32'hAAAA;
      lm_en[c] = 1; lm_we[c] = 1; lm_addr[c] = 7; lm_wdata[c] = 32'hBBBB;
    end
    step();
    for (int c = 0; c < N; c++) begin lm_en[c] = 1; lm_addr[c] = 7; end
    step();
    for (int c = 0; c < N; c++) check("global MMU wins RAM collision", lm_rdata[c] == 32'hAAAA);

    check("broadcast writes on all rows", n_broadcast > 0);
    check("same tag read by all cores", n_same_tag_read > 0);
    check("miss then retry", n_miss_retry > 0);
    check("MMU row load", n_mmu_load > 0);
    check("far-reaching survival", n_far_survive > 0);
    check("line reuse", n_reuse_loss > 0);
    check("write priority", n_wr_priority > 0);
    check("RAM global->local path", n_ram_path == N * RAM_WORDS);
    check("RAM collision", n_ram_collision > 0);
    $display("broadcast=%0d same_tag_read=%0d miss_retry=%0d mmu_load=%0d far=%0d reuse=%0d wr_priority=%0d ram_path=%0d ram_collision=%0d",
             n_broadcast, n_same_tag_read, n_miss_retry, n_mmu_load, n_far_survive, n_reuse_loss,
             n_wr_priority, n_ram_path, n_ram_collision);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
