// tb_dp_ram: self-checking testbench of the dual port RAM.
//
// Both ports issue random reads and writes every cycle over a small RAM so
// that same-word accesses are frequent. A model array predicts each read
// (old contents on a read-during-write, one cycle of latency) and the
// port-A-wins rule when both ports write one word; the rule is also forced in
// a directed case.
module tb_dp_ram;
  import mpcam_pkg::*;

  localparam int unsigned WORDS = 16, AW = 4;

  logic          clk = 1'b0;
  logic          a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  data_t         a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  int checks = 0, failures = 0, n_collide = 0;
  data_t m [WORDS];
  logic  chk = 1'b0;   // reads are checked once every word has been written

  dp_ram #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step();
    data_t ea, eb;
    ea = m[a_addr]; eb = m[b_addr];
    if (b_en && b_we) m[b_addr] = b_wdata;
    if (a_en && a_we) m[a_addr] = a_wdata;
    if (a_en && a_we && b_en && b_we && a_addr == b_addr) n_collide++;
    @(posedge clk); #1;
    if (chk && a_en) check("port A read", a_rdata == ea);
    if (chk && b_en) check("port B read", b_rdata == eb);
    @(negedge clk);
  endtask

  initial begin
    #(20000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    // initialise through both ports
    for (int i = 0; i < WORDS; i += 2) begin
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wdata = 32'h1000 + i;
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = 32'h1000 + i + 1;
      step();
    end
    chk = 1'b1;
    // both ports write word 5: port A wins
    a_en = 1; a_we = 1; a_addr = 5; a_wdata = 32'hAAAA;
    b_en = 1; b_we = 1; b_addr = 5; b_wdata = 32'hBBBB;
    step();
    a_we = 0; b_we = 0;
    step();
    check("port A wins a write collision", a_rdata == 32'hAAAA && b_rdata == 32'hAAAA);
    for (int n = 0; n < 4000; n++) begin
      a_en = 1'($urandom_range(0, 1)); a_we = 1'($urandom_range(0, 1));
      b_en = 1'($urandom_range(0, 1)); b_we = 1'($urandom_range(0, 1));
      a_addr = AW'($urandom_range(0, WORDS - 1)); b_addr = AW'($urandom_range(0, WORDS - 1));
      a_wdata = $urandom; b_wdata = $urandom;
      step();
    end
    check("random write collisions seen", n_collide > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
