// tb_fp_mul: checks the pipelined multiplier against the reference arithmetic
// of fp_ref_pkg, bit for bit: random operands, products near overflow and
// underflow, and special values. One operation per cycle; each result must
// appear exactly LAT cycles after issue.
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int LAT = 10;
  localparam int N   = 4000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0, y;
  int          checks = 0, failures = 0, cycle = 0;

  logic [31:0] exp_q [$];
  int          t_q   [$];

  fp_mul #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", y);
      end else begin
        logic [31:0] e;
        int t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (y !== e || cycle - t != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL: got %h expected %h latency %0d", y, e, cycle - t);
        end
      end
    end
  end

  task automatic issue(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] e;
    logic        xn, zn, xi, zi, x0, z0;
    a <= x; b <= z; in_valid <= 1'b1;
    xn = x[30:23] == 8'hFF && x[22:0] != 0;  zn = z[30:23] == 8'hFF && z[22:0] != 0;
    xi = x[30:23] == 8'hFF && x[22:0] == 0;  zi = z[30:23] == 8'hFF && z[22:0] == 0;
    x0 = x[30:23] == 8'h00;                  z0 = z[30:23] == 8'h00;
    if (xn || zn || (xi && z0) || (zi && x0)) e = 32'h7FC0_0000;
    else if (xi || zi) e = {x[31] ^ z[31], 8'hFF, 23'h0};
    else e = rmul(x, z);
    exp_q.push_back(e);
    t_q.push_back(cycle + 1);   // the edge that samples the operands
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    issue(32'h7F80_0000, 32'h0000_0000);   // inf * 0
    issue(32'hFF80_0000, 32'h4000_0000);   // -inf * 2
    issue(32'h7FC0_0000, 32'h3F80_0000);   // NaN
    issue(32'h3F80_0000, 32'h8000_0000);   // 1 * -0
    issue(32'h7F00_0000, 32'h4100_0000);   // overflow
    issue(32'h0080_0000, 32'h3E80_0000);   // underflow, flushed
    issue(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // carry out of rounding
    for (int i = 0; i < N; i++) begin
      if (i % 2 == 0) issue(rand_f32(-60, 60), rand_f32(-60, 60));
      else            issue(rand_f32(-3, 3), rand_f32(-3, 3));
    end
    in_valid <= 1'b0;
    repeat (LAT + 4) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
