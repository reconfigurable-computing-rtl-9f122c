// tb_fp_cmp: checks the pipelined less-than comparator against a comparison
// of the operands as real numbers: random operands of both signs, equal
// operands, signed zeros, infinities and NaN. One comparison per cycle; each
// result must appear exactly LAT cycles after issue.
module tb_fp_cmp;
  import fp_ref_pkg::*;

  localparam int LAT = 10;
  localparam int N   = 3000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0, y;
  int          checks = 0, failures = 0, cycle = 0;

  logic [31:0] exp_q [$];
  int          t_q   [$];

  fp_cmp #(.LAT(LAT)) dut (.*);

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
    logic nan;
    a <= x; b <= z; in_valid <= 1'b1;
    nan = (x[30:23] == 8'hFF && x[22:0] != 0) || (z[30:23] == 8'hFF && z[22:0] != 0);
    exp_q.push_back({31'h0, !nan && rlt(x, z)});
    t_q.push_back(cycle + 1);
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
    logic [31:0] x;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    issue(32'h8000_0000, 32'h0000_0000);   // -0 < +0 is false
    issue(32'hBF80_0000, 32'h0000_0000);   // -1 < 0
    issue(32'h0000_0000, 32'h3F80_0000);   // 0 < 1
    issue(32'hFF80_0000, 32'h7F80_0000);   // -inf < inf
    issue(32'h7FC0_0000, 32'h3F80_0000);   // NaN
    issue(32'h3F80_0000, 32'h7FC0_0000);   // NaN
    for (int i = 0; i < N; i++) begin
      x = rand_f32(-20, 20);
      case (i % 3)
        0: issue(x, rand_f32(-20, 20));
        1: issue(x, x);
        default: issue(x, {x[31], x[30:0] + 31'(int'($urandom % 5) - 2)});
      endcase
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
