// Scan register test: random bus values are captured while shift is low;
// after shift rises the captured word must come out on scan_out, most
// significant bit first, while the buses keep changing, and the bits
// shifted in follow it out.
module tb_spur_scan;
  localparam int W = 150;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shift, scan_in, scan_out;
  logic [W-1:0] cap_data;
  int checks = 0, failures = 0;

  spur_scan dut (.*);   // default width, 150 bits

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] snap, fill;
    shift = 0; scan_in = 0; cap_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      // capture a few cycles; the last value before shifting is kept
      repeat (1 + $urandom % 4) begin
        cap_data = rnd();
        @(negedge clk);
      end
      snap = cap_data;
      fill = rnd();
      shift = 1;
      for (int i = 0; i < 2 * W; i++) begin
        cap_data = rnd();                    // buses keep moving
        scan_in = (i < W) ? fill[W-1-i] : 1'b0;
        checks++;
        if (scan_out !== ((i < W) ? snap[W-1-i] : fill[2*W-1-i])) begin
          failures++;
          $display("FAIL t=%0d bit %0d", t, i);
        end
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
