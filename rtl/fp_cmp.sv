// fp_cmp: pipelined IEEE-754 single-precision less-than comparator.
//
// y is 1 when a < b, 0 otherwise (also when either operand is NaN); +0 and -0
// are equal and subnormals count as zero, matching the flush-to-zero
// arithmetic units. The one-bit result is returned in bit 0 of a 32-bit word
// so that it can travel through the same intermediate buffers as the
// arithmetic results. The decision is one combinational step followed by LAT
// registers (one result per cycle, latency LAT). A greater-than test is made
// by swapping the operands.
module fp_cmp #(
  parameter int LAT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  function automatic logic lt(input logic [31:0] x, input logic [31:0] z);
    logic [30:0] mx, mz;
    if ((x[30:23] == 8'hFF && x[22:0] != 0) || (z[30:23] == 8'hFF && z[22:0] != 0)) return 1'b0;
    mx = (x[30:23] == 8'h00) ? 31'h0 : x[30:0];
    mz = (z[30:23] == 8'h00) ? 31'h0 : z[30:0];
    if (mx == 0 && mz == 0) return 1'b0;
    if (x[31] != z[31]) return x[31];
    if (!x[31]) return mx < mz;
    return mx > mz;
  endfunction

  pipe_delay #(.W(32), .DEPTH(LAT)) u_pipe (
    .clk, .rst_n, .in_valid, .in_data({31'h0, lt(a, b)}), .out_valid, .out_data(y)
  );
endmodule
