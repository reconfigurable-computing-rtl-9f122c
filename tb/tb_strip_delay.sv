// tb_strip_delay: drives a random word every cycle with the item index
// counting 0..STRIP-1 and checks that each output equals the input of
// exactly STRIP cycles earlier.
module tb_strip_delay;
  localparam int STRIP = 8;

  logic                     clk = 1'b0;
  logic [$clog2(STRIP)-1:0] idx = '0;
  logic [31:0]              din = '0, dout;
  logic [31:0]              hist [$];
  int                       checks = 0, failures = 0;

  strip_delay #(.W(32), .STRIP(STRIP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 40 * STRIP; c++) begin
      din = $urandom;
      #1;
      if (hist.size() == STRIP) begin
        checks++;
        if (dout !== hist[0]) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d got %h expected %h", c, dout, hist[0]);
        end
        void'(hist.pop_front());
      end
      hist.push_back(din);
      @(posedge clk);
      #1 idx = (idx == $clog2(STRIP)'(STRIP - 1)) ? '0 : idx + 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
