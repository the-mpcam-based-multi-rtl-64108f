// tb_mpcam: self-checking testbench of the MPCAM crossbar, 3 cores plus the
// MMU row.
//
// Part 1 replays the four intervals of the 3 x 3 operation example: (1) the
// three cores write different variables on their rows in the same cycle;
// (2) the three cores search the variable written by core 2 in the same cycle
// and all get it; (3) cores 1 and 2 write new variables while core 3 reads
// the one written by core 1; (4) core 3 writes while cores 1 and 2 read the
// same variable. Part 2 is random: every cycle each core may write its row
// (near or far), the MMU may write its row, and each core may search its
// column. A model holding one copy of each row's memories (all columns of a
// row hold the same copy) predicts every column's answer, including the
// lowest-row rule when several rows hold a tag; the one-cycle latency and
// row_last_data are checked too.
module tb_mpcam;
  import mpcam_pkg::*;

  localparam int unsigned N = 3, LINES = 4, FAR_LINES = 2, ROWS = N + 1;

  logic    clk = 1'b0, rst_n = 1'b0;
  wr_req_t sb_wr [N];
  wr_req_t mmu_wr;
  rd_req_t of_rd [N];
  rd_rsp_t of_rsp[N];
  data_t   row_last_data[ROWS];

  int checks = 0, failures = 0, n_multi_row = 0, n_all_write = 0, n_all_read = 0;

  mpcam #(.N_CORES(N), .MMU_ROW(1'b1), .LINES(LINES), .FAR_LINES(FAR_LINES)) dut (.*);

  always #5 clk = ~clk;

  tag_t  m_tag  [ROWS][2][LINES];
  data_t m_data [ROWS][2][LINES];
  logic  m_valid[ROWS][2][LINES];
  int    m_ptr  [ROWS][2];
  data_t m_last [ROWS];

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

  // apply the requests already placed on sb_wr / mmu_wr / of_rd for one cycle
  task automatic step();
    logic  exp_hit [N];
    data_t exp_d   [N];
    int    nrows;
    for (int c = 0; c < N; c++) begin
      exp_hit[c] = 1'b0; exp_d[c] = '0; nrows = 0;
      for (int r = 0; r < ROWS; r++) begin
        wr_req_t q; logic rh; q = row_req(r); rh = 1'b0;
        for (int k = 0; k < 2; k++)
          for (int i = 0; i < size_of(k); i++)
            if (m_valid[r][k][i] && m_tag[r][k][i] == of_rd[c].tag &&
                !(q.en && (q.far_reach ? 1 : 0) == k && i == m_ptr[r][k])) begin
              if (!exp_hit[c]) begin exp_hit[c] = 1'b1; exp_d[c] = m_data[r][k][i]; end
              rh = 1'b1;
            end
        if (rh) nrows++;
      end
      if (of_rd[c].en && nrows > 1) n_multi_row++;
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
    if (sb_wr[0].en && sb_wr[1].en && sb_wr[2].en) n_all_write++;
    if (of_rd[0].en && of_rd[1].en && of_rd[2].en) n_all_read++;
    @(posedge clk); #1;
    for (int c = 0; c < N; c++) begin
      check($sformatf("valid col %0d", c), of_rsp[c].valid == of_rd[c].en);
      if (of_rd[c].en) begin
        check($sformatf("hit col %0d tag %0h", c, of_rd[c].tag), of_rsp[c].hit == exp_hit[c]);
        check($sformatf("data col %0d tag %0h", c, of_rd[c].tag), of_rsp[c].data == exp_d[c]);
      end
    end
    for (int r = 0; r < ROWS; r++) check($sformatf("row_last_data %0d", r), row_last_data[r] == m_last[r]);
    @(negedge clk);
    for (int c = 0; c < N; c++) begin sb_wr[c] = '0; of_rd[c] = '0; end
    mmu_wr = '0;
  endtask

  function automatic wr_req_t w(tag_t t, data_t d);
    return '{en: 1'b1, far_reach: 1'b0, tag: t, data: d};
  endfunction
  function automatic rd_req_t s(tag_t t);
    return '{en: 1'b1, tag: t};
  endfunction

  initial begin
    #(20000 * 10);
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
    for (int c = 0; c < N; c++) begin sb_wr[c] = '0; of_rd[c] = '0; end
    mmu_wr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // interval 1: three cores write different variables
    sb_wr[0] = w(32'h1, 32'h0000_1111);
    sb_wr[1] = w(32'h2, 32'h0000_2222);
    sb_wr[2] = w(32'h3, 32'h0003_0303);
    step();
    check("row 1 stored", row_last_data[0] == 32'h0000_1111);
    check("row 2 stored", row_last_data[1] == 32'h0000_2222);
    check("row 3 stored", row_last_data[2] == 32'h0003_0303);
    // interval 2: all three read the variable written by core 2
    for (int c = 0; c < N; c++) of_rd[c] = s(32'h2);
    step();
    for (int c = 0; c < N; c++)
      check("all cores read core 2's variable", of_rsp[c].hit && of_rsp[c].data == 32'h0000_2222);
    // interval 3: cores 1, 2 write new variables, core 3 reads core 1's
    sb_wr[0] = w(32'h11, 32'h0011_1111);
    sb_wr[1] = w(32'h22, 32'h0022_2222);
    of_rd[2] = s(32'h1);
    step();
    check("core 3 reads core 1's variable", of_rsp[2].hit && of_rsp[2].data == 32'h0000_1111);
    // interval 4: core 3 writes, cores 1, 2 read the same variable
    sb_wr[2] = w(32'h303, 32'h0303_0303);
    of_rd[0] = s(32'h22);
    of_rd[1] = s(32'h22);
    step();
    check("core 1 reads", of_rsp[0].hit && of_rsp[0].data == 32'h0022_2222);
    check("core 2 reads", of_rsp[1].hit && of_rsp[1].data == 32'h0022_2222);
    check("core 3 stored", row_last_data[2] == 32'h0303_0303);

    // random traffic on every bus
    for (int n = 0; n < 3000; n++) begin
      for (int c = 0; c < N; c++) begin
        if ($urandom_range(0, 1)) sb_wr[c] = '{en: 1'b1, far_reach: 1'($urandom_range(0, 1)),
                                               tag: 32'($urandom_range(0, 15)), data: $urandom};
        if ($urandom_range(0, 1)) of_rd[c] = s(32'($urandom_range(0, 15)));
      end
      if ($urandom_range(0, 3) == 0) mmu_wr = '{en: 1'b1, far_reach: 1'($urandom_range(0, 1)),
                                                tag: 32'($urandom_range(0, 15)), data: $urandom};
      step();
    end

    check("simultaneous writes on all rows seen", n_all_write > 0);
    check("simultaneous searches on all columns seen", n_all_read > 0);
    check("tag held by several rows seen", n_multi_row > 0);
    $display("all-write=%0d all-read=%0d multi-row=%0d", n_all_write, n_all_read, n_multi_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
