// fp_add: pipelined IEEE-754 single-precision adder/subtractor.
//
// y = a + b, or a - b when sub is set (the subtraction only flips b's sign).
// The sum is formed in one combinational step: order the operands by
// magnitude, align the smaller significand with guard, round and sticky
// bits, add or subtract, renormalise and round to nearest even. It then
// passes through LAT registers: one operation is accepted per cycle and its
// result appears LAT cycles later. The pipelining follows the kernel's
// specification of deeply pipelined (10 to 17 stage) units; precision,
// rounding and special values are choices of this design: subnormals are
// flushed to signed zero, an exact zero difference is +0, overflow gives
// infinity, and NaN operands or inf - inf give the quiet NaN 7FC00000.
module fp_add #(
  parameter int LAT = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        sub,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic [31:0] add(input logic [31:0] x, input logic [31:0] z0, input logic neg);
    logic [31:0] z, big, sml;
    logic [7:0]  eb, es;
    logic [26:0] mb, ms;       // significand with guard, round, sticky places
    logic [53:0] sh;
    logic [27:0] acc;
    logic [23:0] m;
    logic [24:0] mr;
    logic        s, up;
    int          e, d, lz;
    z = {z0[31] ^ neg, z0[30:0]};
    if ((x[30:23] == 8'hFF && x[22:0] != 0) || (z[30:23] == 8'hFF && z[22:0] != 0)) return QNAN;
    if (x[30:23] == 8'hFF && z[30:23] == 8'hFF) return (x[31] == z[31]) ? x : QNAN;
    if (x[30:23] == 8'hFF) return x;
    if (z[30:23] == 8'hFF) return z;
    // flush subnormals
    if (x[30:23] == 8'h00) x = {x[31], 31'h0};
    if (z[30:23] == 8'h00) z = {z[31], 31'h0};
    if (x[30:0] == 0 && z[30:0] == 0) return {x[31] & z[31], 31'h0};
    if (x[30:0] >= z[30:0]) begin big = x; sml = z; end
    else begin big = z; sml = x; end
    if (sml[30:0] == 0) return big;
    s  = big[31];
    eb = big[30:23];
    es = sml[30:23];
    mb = {1'b1, big[22:0], 3'b000};
    d  = int'(eb) - int'(es);
    if (d > 31) d = 31;
    sh = {1'b1, sml[22:0], 3'b000, 27'h0} >> d;
    ms = {sh[53:28], sh[27] | (|sh[26:0])};
    e  = int'(eb);
    if (big[31] == sml[31]) acc = {1'b0, mb} + {1'b0, ms};
    else                    acc = {1'b0, mb} - {1'b0, ms};
    if (acc == 0) return 32'h0;
    if (acc[27]) begin
      acc = {1'b0, acc[27:2], acc[1] | acc[0]};
      e   = e + 1;
    end else begin
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (acc[i]) break;
        lz++;
      end
      acc = acc << lz;
      e   = e - lz;
    end
    m  = acc[26:3];
    up = acc[2] & (acc[1] | acc[0] | m[0]);
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
    .clk, .rst_n, .in_valid, .in_data(add(a, b, sub)), .out_valid, .out_data(y)
  );
endmodule
