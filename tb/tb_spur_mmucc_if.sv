// MMU/CC interface test: port priority (data, demand fetch, prefetch),
// completion under busy, faults, ignored and pre-empted prefetches,
// mode and status lines.
module tb_spur_mmucc_if;
  import spur_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic d_req, d_done, d_fault, if_req, if_done, pf_req, pf_done, pf_stop;
  cache_op_t d_op, ext_op;
  logic [31:0] d_addr, ext_addr;
  word40_t d_wdata, rdata, ext_wdata, ext_rdata;
  logic [29:0] if_addr, pf_addr;
  logic kernel, virt, trap_taken, stalled, ext_kernel, ext_virtual, intr;
  logic [3:0] ext_status_out;
  logic [4:0] ext_status_in;
  int checks = 0, failures = 0;

  spur_mmucc_if dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic busy, pfi, flt;
    for (int n = 0; n < 3000; n++) begin
      d_req = $urandom % 2; if_req = $urandom % 2; pf_req = $urandom % 2;
      d_op = cache_op_t'(4'(3 + $urandom % 2)); d_addr = $urandom; d_wdata = {$urandom, $urandom};
      if_addr = 30'($urandom); pf_addr = 30'($urandom);
      ext_status_in = 5'($urandom) & 5'($urandom);
      ext_rdata = {$urandom, $urandom};
      {kernel, virt, trap_taken, stalled} = 4'($urandom);
      busy = ext_status_in[0]; flt = ext_status_in[1] | ext_status_in[4]; pfi = ext_status_in[2];
      #1;
      checks += 6;
      if (d_req) begin
        if (ext_op !== d_op || ext_addr !== d_addr || ext_wdata !== d_wdata) begin failures++; $display("FAIL data drive"); end
      end else if (if_req) begin
        if (ext_op !== CO_IFETCH || ext_addr !== {if_addr, 2'b00}) begin failures++; $display("FAIL fetch drive"); end
      end else if (pf_req) begin
        if (ext_op !== CO_PREFETCH || ext_addr !== {pf_addr, 2'b00}) begin failures++; $display("FAIL prefetch drive"); end
      end else if (ext_op !== CO_NONE) begin failures++; $display("FAIL idle"); end
      if (d_done !== (d_req && !busy)) begin failures++; $display("FAIL d_done"); end
      if (d_fault !== (d_req && !busy && flt)) begin failures++; $display("FAIL d_fault"); end
      if (if_done !== (!d_req && if_req && !busy)) begin failures++; $display("FAIL if_done"); end
      if (pf_done !== (!d_req && !if_req && pf_req && !busy && !pfi)) begin failures++; $display("FAIL pf_done"); end
      if (pf_stop !== (pf_req && (d_req || (!if_req && !busy && pfi)))) begin failures++; $display("FAIL pf_stop"); end
      checks += 2;
      if ({ext_kernel, ext_virtual} !== {kernel, virt} || intr !== ext_status_in[3]) begin failures++; $display("FAIL mode"); end
      if (ext_status_out !== {trap_taken, stalled, if_req, d_req} || rdata !== ext_rdata) begin failures++; $display("FAIL status"); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
