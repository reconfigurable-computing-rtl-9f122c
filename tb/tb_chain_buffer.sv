// tb_chain_buffer: drives a random word every cycle into a four-tap chain and
// checks that tap j always shows the input of j*STRIP cycles earlier.
module tb_chain_buffer;
  localparam int STRIP = 8;
  localparam int TAPS  = 4;

  logic                     clk = 1'b0;
  logic [$clog2(STRIP)-1:0] idx = '0;
  logic [31:0]              din = '0;
  logic [31:0]              taps [TAPS];
  logic [31:0]              hist [$];
  int                       checks = 0, failures = 0;

  chain_buffer #(.W(32), .STRIP(STRIP), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 30 * STRIP; c++) begin
      din = $urandom;
      hist.push_front(din);   // hist[k] = input of k cycles ago
      #1;
      for (int j = 0; j < TAPS; j++) begin
        if (hist.size() > j * STRIP) begin
          checks++;
          if (taps[j] !== hist[j * STRIP]) begin
            failures++;
            if (failures < 10) $display("FAIL: cycle %0d tap %0d got %h expected %h", c, j, taps[j], hist[j * STRIP]);
          end
        end
      end
      @(posedge clk);
      #1 idx = (idx == $clog2(STRIP)'(STRIP - 1)) ? '0 : idx + 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
