// tb_mpcam_system_full: the memory system at its full size (8 cores,
// 2048-line near-reaching and 512-line far-reaching DPCAMs at each of the
// 9 x 8 cross points, 128 KB dual port RAM per core), taken through one
// complete exchange of shared data:
//   - the global MMU loads a primary value into the MMU row;
//   - all eight cores write (broadcast) their own variable in one cycle;
//   - for eight cycles every core searches its column, each cycle for a
//     different core's variable, so that every core reads every variable and
//     all eight reads of a cycle happen together; each answer comes one cycle
//     after its request;
//   - core 0 then writes 2048 more near-reaching versions, which reuses every
//     line of its row once: its first variable is gone, the others are not;
//   - the global MMU writes a word into the first and last address of every
//     core's RAM and the local MMU reads them back.
// Expected values are formed from the indices alone.
module tb_mpcam_system_full;
  import mpcam_pkg::*;

  localparam int unsigned N = 8, LINES = 2048, RAM_WORDS = 32768, AW = 15;

  logic    clk = 1'b0, rst_n = 1'b0;
  wr_req_t sb_wr [N];
  rd_req_t of_rd [N];
  rd_rsp_t of_rsp[N];
  wr_req_t mmu_wr;
  data_t   row_last_data[N + 1];
  logic          gm_en[N], gm_we[N], lm_en[N], lm_we[N];
  logic [AW-1:0] gm_addr[N], lm_addr[N];
  data_t         gm_wdata[N], gm_rdata[N], lm_wdata[N], lm_rdata[N];

  int checks = 0, failures = 0;

  mpcam_system dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle();
    for (int c = 0; c < N; c++) begin
      sb_wr[c] = '0; of_rd[c] = '0;
      gm_en[c] = 0; gm_we[c] = 0; gm_addr[c] = '0; gm_wdata[c] = '0;
      lm_en[c] = 0; lm_we[c] = 0; lm_addr[c] = '0; lm_wdata[c] = '0;
    end
    mmu_wr = '0;
  endtask

  function automatic data_t value_of(int core);
    return 32'hC0DE_0000 | 32'(core);
  endfunction

  initial begin
    #(20000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    mmu_wr = '{en: 1'b1, far_reach: 1'b0, tag: 32'hFFFF_0000, data: 32'h1234_5678};
    for (int c = 0; c < N; c++)
      sb_wr[c] = '{en: 1'b1, far_reach: 1'b0, tag: tag_t'(c + 1), data: value_of(c)};
    @(negedge clk);
    idle();
    for (int r = 0; r < N; r++) check("row stored", row_last_data[r] == value_of(r));
    check("MMU row stored", row_last_data[N] == 32'h1234_5678);

    for (int k = 0; k < N; k++) begin
      for (int c = 0; c < N; c++) of_rd[c] = '{en: 1'b1, tag: tag_t'((c + k) % N + 1)};
      @(posedge clk); #1;
      for (int c = 0; c < N; c++)
        check($sformatf("core %0d reads core %0d", c, (c + k) % N),
              of_rsp[c].valid && of_rsp[c].hit && of_rsp[c].data == value_of((c + k) % N));
      @(negedge clk);
    end
    for (int c = 0; c < N; c++) of_rd[c] = '{en: 1'b1, tag: 32'hFFFF_0000};
    @(posedge clk); #1;
    for (int c = 0; c < N; c++) check("primary value", of_rsp[c].hit && of_rsp[c].data == 32'h1234_5678);
    @(negedge clk);
    idle();

    for (int i = 0; i < LINES; i++) begin
      sb_wr[0] = '{en: 1'b1, far_reach: 1'b0, tag: tag_t'(32'h1_0000 + i), data: 32'(i)};
      @(negedge clk);
    end
    idle();
    of_rd[0] = '{en: 1'b1, tag: tag_t'(1)};
    of_rd[1] = '{en: 1'b1, tag: tag_t'(2)};
    of_rd[2] = '{en: 1'b1, tag: tag_t'(32'h1_0000)};
    of_rd[3] = '{en: 1'b1, tag: tag_t'(32'h1_0000 + LINES - 1)};
    @(posedge clk); #1;
    check("reused line lost its version", !of_rsp[0].hit);
    check("other row keeps its version", of_rsp[1].hit && of_rsp[1].data == value_of(1));
    check("oldest of the new versions", of_rsp[2].hit && of_rsp[2].data == 32'(0));
    check("newest version", of_rsp[3].hit && of_rsp[3].data == 32'(LINES - 1));
    @(negedge clk);
    idle();

    for (int j = 0; j < 2; j++) begin
      for (int c = 0; c < N; c++) begin
        gm_en[c] = 1; gm_we[c] = 1; gm_addr[c] = j ? AW'(RAM_WORDS - 1) : '0;
        gm_wdata[c] = 32'(c << 20 | j);
      end
      @(negedge clk);
    end
    idle();
    for (int j = 0; j < 2; j++) begin
      for (int c = 0; c < N; c++) begin
        lm_en[c] = 1; lm_addr[c] = j ? AW'(RAM_WORDS - 1) : '0;
      end
      @(posedge clk); #1;
      for (int c = 0; c < N; c++) check("RAM readback", lm_rdata[c] == 32'(c << 20 | j));
      @(negedge clk);
    end
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
