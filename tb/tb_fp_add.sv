// tb_fp_add: checks the pipelined adder/subtractor against the reference
// arithmetic of fp_ref_pkg, bit for bit, for random operands over a wide
// exponent range, for close operands (cancellation), equal operands and
// special values. One operation is issued per cycle; every result must
// appear exactly LAT cycles after its operation was issued.
module tb_fp_add;
  import fp_ref_pkg::*;

  localparam int LAT = 12;
  localparam int N   = 4000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, sub = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0, y;
  int          checks = 0, failures = 0, cycle = 0;

  logic [31:0] exp_q [$];
  int          t_q   [$];

  fp_add #(.LAT(LAT)) dut (.*);

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

  task automatic issue(input logic [31:0] x, input logic [31:0] z, input logic s);
    logic [31:0] e;
    a <= x; b <= z; sub <= s; in_valid <= 1'b1;
    if ((x[30:23] == 8'hFF && x[22:0] != 0) || (z[30:23] == 8'hFF && z[22:0] != 0)) e = 32'h7FC0_0000;
    else if (x[30:23] == 8'hFF && z[30:23] == 8'hFF) e = ((x[31] ^ 1'b0) == (z[31] ^ s)) ? x : 32'h7FC0_0000;
    else if (x[30:23] == 8'hFF) e = x;
    else if (z[30:23] == 8'hFF) e = {z[31] ^ s, z[30:0]};
    else e = s ? rsub(x, z) : radd(x, z);
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
    logic [31:0] x, z;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // specials
    issue(32'h7F80_0000, 32'h3F80_0000, 1'b0);   // inf + 1
    issue(32'h7F80_0000, 32'h7F80_0000, 1'b1);   // inf - inf
    issue(32'h7FC0_0000, 32'h3F80_0000, 1'b0);   // NaN
    issue(32'h3F80_0000, 32'h3F80_0000, 1'b1);   // 1 - 1 = +0
    issue(32'h0000_0000, 32'h8000_0000, 1'b0);   // 0 + -0
    issue(32'h4000_0000, 32'h0000_0000, 1'b1);   // 2 - 0
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);   // overflow
    issue(32'h3F80_0000, 32'h3380_0000, 1'b0);   // 1 + 2^-24: tie, stays 1
    issue(32'h3F80_0001, 32'h3380_0000, 1'b0);   // tie, rounds up to even
    for (int i = 0; i < N; i++) begin
      case (i % 4)
        0: begin x = rand_f32(-60, 60); z = rand_f32(-60, 60); end
        1: begin x = rand_f32(-4, 4); z = rand_f32(-4, 4); end
        2: begin x = rand_f32(0, 0); z = {x[31], x[30:8], 8'($urandom)}; end  // cancellation
        default: begin x = rand_f32(-10, 10); z = rand_f32(-40, -10); end
      endcase
      issue(x, z, 1'($urandom));
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
