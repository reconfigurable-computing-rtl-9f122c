// tb_result_select: applies random compare bits and (T, D) pairs and checks
// the hit decision (inside the triangle and closer than the old hit), the
// selected pair, the flags and the one-cycle output register.
module tb_result_select;
  import rti_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, out_valid, out_hit;
  logic [3:0] cmp = '0, out_flags;
  fp32_t      t_new = '0, d_new = '0, t_old = '0, d_old = '0, out_t, out_d;
  int         checks = 0, failures = 0, hits = 0;

  result_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic  h;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      cmp = 4'($urandom); t_new = $urandom; d_new = $urandom; t_old = $urandom; d_old = $urandom;
      in_valid = 1'($urandom);
      h = (cmp == 4'b1000);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid || (in_valid && (out_hit !== h || out_flags !== cmp ||
          out_t !== (h ? t_new : t_old) || out_d !== (h ? d_new : d_old)))) begin
        failures++;
        if (failures < 10) $display("FAIL: cmp %b hit %b t %h d %h", cmp, out_hit, out_t, out_d);
      end
      if (in_valid && h) hits++;
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
