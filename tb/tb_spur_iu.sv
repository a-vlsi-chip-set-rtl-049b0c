// Instruction unit test. A model of the external cache port answers
// demand fetches and prefetches (with random busy cycles, random data
// accesses taking the port and randomly ignored prefetches). Every
// delivered instruction is compared with memory. Directed phases check
// the cycle counts: a demand miss costs two cycles, prefetching lets a
// sequential block run with one miss, a cached loop runs at one
// instruction per cycle, the disabled mode takes three cycles per
// instruction, and user and kernel code at the same address do not hit
// each other's entries.
module tb_spur_iu;
  import spur_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, pf_en, kernel, fetch_req, inst_valid, if_req, if_done, pf_req, pf_done, pf_stop;
  logic st_fetching, st_prefetching;
  logic [29:0] fetch_pc, if_addr, pf_addr;
  logic [31:0] inst, ext_inst;
  logic busy, steal, ign;
  int checks = 0, failures = 0;
  int pf_seen = 0, pf_stops = 0;

  spur_iu dut (.*);

  function automatic logic [31:0] mem(logic [29:0] a, logic k);
    return (32'(a) * 32'h9E3779B1) ^ (k ? 32'hFFFF0000 : 32'h0000A5A5);
  endfunction

  // external cache port
  always_comb begin
    if_done  = if_req && !busy && !steal;
    pf_done  = !if_req && pf_req && !busy && !steal && !ign;
    pf_stop  = pf_req && (steal || (!if_req && !busy && ign));
    ext_inst = mem(if_req ? if_addr : pf_addr, kernel);
  end

  // sampled mid-cycle, where all inputs are stable
  always @(negedge clk) begin
    if ($test$plusargs("trace")) $display("%0t req=%b pc=%h v=%b ifr=%b ifd=%b pfr=%b st=%b%b k=%b en=%b pf=%b b=%b s=%b i=%b", $time, fetch_req, fetch_pc, inst_valid, if_req, if_done, pf_req, st_fetching, st_prefetching, kernel, en, pf_en, busy, steal, ign);
    if (inst_valid) begin
      checks++;
      if (inst !== mem(fetch_pc, kernel)) begin
        failures++;
        $display("FAIL pc=%h k=%0d inst=%h exp=%h", fetch_pc, kernel, inst, mem(fetch_pc, kernel));
      end
    end
    if (pf_done) pf_seen++;
    if (pf_stop) pf_stops++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // Fetch n sequential words from start; returns the cycles taken.
  task automatic run_seq(logic [29:0] start, int n, output int cycles);
    logic v;
    cycles = 0;
    @(posedge clk);
    #1;
    fetch_pc = start; fetch_req = 1;
    for (int i = 0; i < n; ) begin
      @(negedge clk);
      cycles++;
      v = inst_valid;
      @(posedge clk);
      #1;
      if (v) begin i++; fetch_pc = fetch_pc + 1; end
    end
    fetch_req = 0;
  endtask

  task automatic quiet();
    busy = 0; steal = 0; ign = 0;
  endtask

  initial begin
    int c;
    logic v;
    en = 1; pf_en = 1; kernel = 0; fetch_req = 0; fetch_pc = 0;
    quiet();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // one miss costs two cycles
    run_seq(30'h100, 1, c);   check("single miss cycles", c, 3);
    run_seq(30'h100, 1, c);   check("hit cycles", c, 1);
    // a sequential block with prefetching: only the first word misses
    repeat (8) @(posedge clk);
    pf_seen = 0;
    run_seq(30'h208, 8, c);   check("block with prefetch", c, 10);
    check("prefetches done", pf_seen, 7);
    // the same code again hits every cycle
    run_seq(30'h208, 8, c);   check("cached loop", c, 8);
    // other mode, same address: must miss
    kernel = 1;
    run_seq(30'h208, 1, c);   check("kernel entry separate", c, 3);
    kernel = 0;
    // no prefetch: every new word misses
    pf_en = 0;
    run_seq(30'h310, 4, c);   check("no prefetch", c, 12);
    run_seq(30'h310, 4, c);   check("no prefetch cached", c, 4);
    // disabled: three cycles per instruction, nothing kept
    en = 0;
    run_seq(30'h310, 4, c);   check("disabled", c, 12);
    en = 1; pf_en = 1;
    @(negedge clk);
    run_seq(30'h310, 1, c);   check("disable cleared valid bits", c, 3);
    // prefetch stopped when the port is taken
    run_seq(30'h400, 1, c);
    steal = 1; @(posedge clk); #1 steal = 0;
    check("prefetch stopped by data access", st_prefetching, 0);
    // random operation
    pf_stops = 0;
    fetch_req = 1; fetch_pc = 30'h500;
    for (int n = 0; n < 20000; n++) begin
      busy = $urandom % 4 == 0; steal = $urandom % 6 == 0; ign = $urandom % 8 == 0;
      @(negedge clk);
      v = inst_valid;
      @(posedge clk);
      #1;
      if (v) begin
        if ($urandom % 5 == 0) fetch_pc = 30'h500 + 30'($urandom % 300);
        else fetch_pc = fetch_pc + 1;
      end
      if (!st_fetching && !st_prefetching && $urandom % 50 == 0) begin
        kernel = $urandom % 2; en = $urandom % 8 != 0; pf_en = $urandom % 4 != 0;
      end
    end
    check("random prefetch stops seen", pf_stops > 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
