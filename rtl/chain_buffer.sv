// chain_buffer: the intermediate buffering behind one floating-point unit in
// the chaining style: a series of one-stage delay memories (strip_delay),
// every element's output tapped and offered to the input selection. Tap 0 is
// the unit's stage-aligned output itself; tap j is the same stream j stages
// later. A value produced in stage p for item i is therefore found in stage k
// at tap k-p-1, at the cycle at which item i is processed. There is no
// control logic and no multiplexer in the chain: the schedule decides which
// tap a consumer reads. TAPS = 1 is a bare wire (no memory).
module chain_buffer #(
  parameter int W     = 32,
  parameter int STRIP = 16,
  parameter int TAPS  = 2
) (
  input  logic                     clk,
  input  logic [$clog2(STRIP)-1:0] idx,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             taps [TAPS]
);
  assign taps[0] = din;

  for (genvar j = 1; j < TAPS; j++) begin : g_elem
    strip_delay #(.W(W), .STRIP(STRIP)) u_z (
      .clk, .idx, .din(taps[j-1]), .dout(taps[j])
    );
  end
endmodule
