// tb_workload_matmul: a dependent multithreaded program run on the MPCAM
// memory system: multiply two 4 x 4 matrices, then take the determinant of
// the product.
//
// The cores are modelled by concurrent processes, one per core, that use only
// their own store-back (row) and operand-fetch (column) ports:
//   - the global MMU first loads A and B into the MMU row (primary data);
//   - the rows of C = A x B are dealt out to the producing cores (core 0
//     alone when one core is active, cores 1.. otherwise); a producer fetches
//     the elements of A and B it needs from its column, one search per cycle,
//     and writes each element of C, as a new tagged version, on its row;
//   - core 0 is the consumer: it fetches all of C and computes det(C). With
//     several cores it starts at once, so it asks for elements that are not
//     written yet; each such miss is retried on the next cycle.
// The program is run with 1, 2 and 4 active cores on the same 4-core system;
// each run uses its own tag space. Every element of C read back and det(C)
// are checked against values computed directly in the testbench; the run
// time in cycles must fall as cores are added, the retries caused by reading
// ahead of the producer are counted and must occur.
module tb_workload_matmul;
  import mpcam_pkg::*;

  localparam int unsigned N = 4, LINES = 64, FAR_LINES = 16, RAM_WORDS = 16, AW = 4, M = 4;

  logic    clk = 1'b0, rst_n = 1'b0;
  wr_req_t sb_wr [N];
  rd_req_t of_rd [N];
  rd_rsp_t of_rsp[N];
  wr_req_t mmu_wr;
  data_t   row_last_data[N + 1];
  logic          gm_en[N], gm_we[N], lm_en[N], lm_we[N];
  logic [AW-1:0] gm_addr[N], lm_addr[N];
  data_t         gm_wdata[N], gm_rdata[N], lm_wdata[N], lm_rdata[N];

  int checks = 0, failures = 0, retries = 0;
  int cycles_of[N + 1];

  mpcam_system #(.N_CORES(N), .LINES(LINES), .FAR_LINES(FAR_LINES), .RAM_WORDS(RAM_WORDS)) dut (.*);

  always #5 clk = ~clk;

  int cycle_count = 0;
  always @(posedge clk) cycle_count <= cycle_count + 1;

  int signed a [M][M], b [M][M], c_ref [M][M], c_got [M][M];

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // tag = run | matrix | row | column
  function automatic tag_t tg(int run, int mat, int i, int j);
    return tag_t'((run << 16) | (mat << 8) | (i << 4) | j);
  endfunction

  task automatic fetch(input int core, input tag_t t, output data_t d);
    logic done;
    done = 1'b0;
    while (!done) begin
      @(negedge clk);
      of_rd[core] = '{en: 1'b1, tag: t};
      @(posedge clk); #1;
      of_rd[core] = '0;
      if (of_rsp[core].hit) begin
        d = of_rsp[core].data; done = 1'b1;
      end else begin
        retries++;
      end
    end
  endtask

  task automatic store(input int core, input tag_t t, input data_t d);
    @(negedge clk);
    sb_wr[core] = '{en: 1'b1, far_reach: 1'b0, tag: t, data: d};
    @(posedge clk); #1;
    sb_wr[core] = '0;
  endtask

  function automatic longint det3(longint m [3][3]);
    return m[0][0] * (m[1][1] * m[2][2] - m[1][2] * m[2][1])
         - m[0][1] * (m[1][0] * m[2][2] - m[1][2] * m[2][0])
         + m[0][2] * (m[1][0] * m[2][1] - m[1][1] * m[2][0]);
  endfunction

  function automatic longint det4(int signed m [M][M]);
    longint s, minor [3][3];
    s = 0;
    for (int col = 0; col < M; col++) begin
      for (int r = 1; r < M; r++) begin
        int k; k = 0;
        for (int cc = 0; cc < M; cc++) if (cc != col) begin minor[r - 1][k] = m[r][cc]; k++; end
      end
      s += ((col % 2) ? -1 : 1) * longint'(m[0][col]) * det3(minor);
    end
    return s;
  endfunction

  task automatic core_proc(input int run, input int core, input int ncores);
    data_t x, y;
    int signed acc;
    int first, step;
    // with one core it does everything; otherwise core 0 only consumes
    first = (ncores == 1) ? 0 : core - 1;
    step  = (ncores == 1) ? 1 : ncores - 1;
    if (ncores == 1 || core > 0)
    for (int i = first; i < M; i += step)
      for (int j = 0; j < M; j++) begin
        acc = 0;
        for (int k = 0; k < M; k++) begin
          fetch(core, tg(run, 0, i, k), x);
          fetch(core, tg(run, 1, k, j), y);
          acc += int'(x) * int'(y);
        end
        store(core, tg(run, 2, i, j), data_t'(acc));
      end
    if (core == 0)
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          fetch(0, tg(run, 2, i, j), x);
          c_got[i][j] = int'(x);
        end
  endtask

  task automatic run_program(input int run, input int ncores);
    int start;
    // the global MMU loads A and B
    for (int mat = 0; mat < 2; mat++)
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          @(negedge clk);
          mmu_wr = '{en: 1'b1, far_reach: 1'b0, tag: tg(run, mat, i, j),
                     data: data_t'(mat ? b[i][j] : a[i][j])};
        end
    @(negedge clk);
    mmu_wr = '0;
    start = cycle_count;
    for (int c = 0; c < ncores; c++) begin
      automatic int cc = c;
      fork
        core_proc(run, cc, ncores);
      join_none
    end
    wait fork;
    cycles_of[ncores] = cycle_count - start;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        check($sformatf("C[%0d][%0d] with %0d cores", i, j, ncores), c_got[i][j] == c_ref[i][j]);
    check($sformatf("det(C) with %0d cores", ncores), det4(c_got) == det4(a) * det4(b));
    $display("%0d core(s): %0d cycles, det(C) = %0d", ncores, cycles_of[ncores], det4(c_got));
  endtask

  initial begin
    #(50000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      sb_wr[c] = '0; of_rd[c] = '0;
      gm_en[c] = 0; gm_we[c] = 0; gm_addr[c] = '0; gm_wdata[c] = '0;
      lm_en[c] = 0; lm_we[c] = 0; lm_addr[c] = '0; lm_wdata[c] = '0;
    end
    mmu_wr = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        a[i][j] = $urandom_range(0, 9) - 4;
        b[i][j] = $urandom_range(0, 9) - 4;
      end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        c_ref[i][j] = 0;
        for (int k = 0; k < M; k++) c_ref[i][j] += a[i][k] * b[k][j];
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    run_program(1, 1);
    run_program(2, 2);
    run_program(3, 4);

    check("2 cores faster than 1", cycles_of[2] < cycles_of[1]);
    check("4 cores faster than 2", cycles_of[4] < cycles_of[2]);
    check("reads ahead of the producer were retried", retries > 0);
    $display("retries=%0d", retries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
