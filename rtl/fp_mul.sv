// fp_mul: pipelined IEEE-754 single-precision multiplier.
//
// The product is formed in one combinational step (24x24-bit significand
// multiply, normalise by at most one place, round to nearest even) and then
// passes through LAT registers, so a new operand pair is accepted every cycle
// and its result appears LAT cycles later. The kernel's floating-point units
// are specified as deeply pipelined (10 to 17 stages) and fully pipelined;
// precision, rounding and the handling of special values are choices of this
// design: subnormal inputs and results are flushed to signed zero,
// overflow gives infinity, any NaN operand or inf*0 gives the quiet NaN
// 7FC00000. The register chain behind one combinational step is meant to be
// retimed by synthesis.
module fp_mul #(
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
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic [31:0] mul(input logic [31:0] x, input logic [31:0] z);
    logic        s;
    logic [7:0]  ex, ez;
    logic [23:0] mx, mz;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, r, st, up;
    logic [24:0] mr;
    int          e;
    s  = x[31] ^ z[31];
    ex = x[30:23];
    ez = z[30:23];
    mx = {1'b1, x[22:0]};
    mz = {1'b1, z[22:0]};
    if ((ex == 8'hFF && x[22:0] != 0) || (ez == 8'hFF && z[22:0] != 0)) return QNAN;
    if (ex == 8'hFF || ez == 8'hFF) begin
      if (ex == 8'h00 || ez == 8'h00) return QNAN;      // inf * 0
      return {s, 8'hFF, 23'h0};
    end
    if (ex == 8'h00 || ez == 8'h00) return {s, 31'h0};   // zero or flushed subnormal
    p = mx * mz;
    e = int'(ex) + int'(ez) - 127;
    if (p[47]) begin
      m = p[47:24]; g = p[23]; r = p[22]; st = |p[21:0];
      e = e + 1;
    end else begin
      m = p[46:23]; g = p[22]; r = p[21]; st = |p[20:0];
    end
    up = g & (r | st | m[0]);
    mr = {1'b0, m} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'h0};
    if (e <= 0) return {s, 31'h0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  pipe_delay #(.W(32), .DEPTH(LAT)) u_pipe (
    .clk, .rst_n, .in_valid, .in_data(mul(a, b)), .out_valid, .out_data(y)
  );
endmodule
