// strip_delay: one element of an intermediate-value chain. It delays a stream
// of words by exactly one schedule stage, STRIP cycles, using a STRIP-word
// memory instead of a shift register. All elements share the item index idx,
// which counts 0..STRIP-1 once per stage: in each cycle the word stored STRIP
// cycles earlier at mem[idx] is read out (asynchronous read) and the incoming
// word is written in its place. The memory needs no reset: its contents are
// only read after a full stage has been written.
module strip_delay #(
  parameter int W     = 32,
  parameter int STRIP = 16
) (
  input  logic                     clk,
  input  logic [$clog2(STRIP)-1:0] idx,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);
  logic [W-1:0] mem [STRIP];

  assign dout = mem[idx];

  always_ff @(posedge clk) mem[idx] <= din;
endmodule
