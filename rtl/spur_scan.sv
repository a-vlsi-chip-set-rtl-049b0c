// Passive scan register for test observability.
//
// A shadow register of W bits sits on a group of internal buses. In
// normal operation it copies the buses at every clock edge without
// affecting them (passive: nothing is ever driven back onto a bus). When
// the test pin shift is high it stops capturing and becomes a shift
// register: each clock moves it one place towards scan_out (most
// significant bit first) and takes scan_in at the bottom, so the values
// the buses held in the cycle before shifting began can be read out
// serially, W clocks in all. The document says scan registers are
// attached to all major buses; the single chain, its order and the
// capture-every-cycle rule are this design's choices.
module spur_scan #(
  parameter int unsigned W = 150
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,      // 1: shift out, 0: capture every cycle
  input  logic         scan_in,
  input  logic [W-1:0] cap_data,   // the observed buses
  output logic         scan_out
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (shift) sr <= {sr[W-2:0], scan_in};
    else            sr <= cap_data;
  end

  assign scan_out = sr[W-1];
endmodule
