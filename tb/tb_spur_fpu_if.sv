// FPU interface test: the 22 instruction lines and the issue line follow
// the issued instruction one cycle later, cancel follows a squash, and a
// coprocessor instruction stalls while the FPU is busy.
module tb_spur_fpu_if;
  import spur_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] issue_inst;
  logic issue_valid, squash, ex_is_fpu, fpu_issue, fpu_cancel, fp_stall, fp_exc;
  logic [21:0] fpu_inst;
  logic [2:0] fpu_status;
  int checks = 0, failures = 0;

  spur_fpu_if dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pi;
    logic pv, ps;
    issue_inst = 0; issue_valid = 0; squash = 0; ex_is_fpu = 0; fpu_status = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      issue_inst = $urandom; issue_valid = $urandom % 2; squash = $urandom % 5 == 0;
      ex_is_fpu = $urandom % 2; fpu_status = 3'($urandom);
      pi = issue_inst; pv = issue_valid; ps = squash;
      #1;
      checks += 2;
      if (fp_stall !== (ex_is_fpu && fpu_status[0])) begin failures++; $display("FAIL stall"); end
      if (fp_exc !== fpu_status[1]) begin failures++; $display("FAIL exc"); end
      @(negedge clk);
      checks++;
      if (fpu_inst !== {pi[31:25], pi[24:20], pi[19:15], pi[13:9]} || fpu_issue !== pv || fpu_cancel !== ps) begin
        failures++; $display("FAIL pins n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
