// tb_input_bank: fills the strip buffers from the input stream (full strips
// and short strips closed by in_last), checks the full flags, lengths and
// the stored words of every buffer, checks that the stream stalls
// (in_ready low) while the next buffer is still full, and that a released
// buffer is refilled in order.
module tb_input_bank;
  import rti_pkg::*;

  localparam int STRIP = 4;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic                     in_valid = 1'b0, in_ready, in_last = 1'b0;
  fp32_t                    in_words [N_IN];
  logic [$clog2(STRIP)-1:0] rd_idx = '0;
  fp32_t                    rd_words [N_BANKS][N_IN];
  logic [N_BANKS-1:0]       full, release_b = '0;
  logic [$clog2(STRIP):0]   len [N_BANKS];
  fp32_t                    model [N_BANKS][STRIP][N_IN];
  int                       mlen [N_BANKS];
  int                       checks = 0, failures = 0;

  input_bank #(.STRIP(STRIP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // write one strip of n items into buffer b of the model
  task automatic put_strip(input int b, input int n);
    for (int i = 0; i < n; i++) begin
      for (int w = 0; w < N_IN; w++) begin
        in_words[w] = $urandom;
        model[b][i][w] = in_words[w];
      end
      in_valid = 1'b1;
      in_last  = (i == n - 1) && (n < STRIP);
      #1;
      check(in_ready == 1'b1, "in_ready while a buffer is free");
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    in_last  = 1'b0;
    mlen[b] = n;
  endtask

  task automatic check_bank(input int b);
    check(full[b] == 1'b1, $sformatf("buffer %0d full", b));
    check(int'(len[b]) == mlen[b], $sformatf("buffer %0d length %0d", b, len[b]));
    for (int i = 0; i < mlen[b]; i++) begin
      rd_idx = $clog2(STRIP)'(i);
      #1;
      for (int w = 0; w < N_IN; w++)
        check(rd_words[b][w] === model[b][i][w], $sformatf("buffer %0d item %0d word %0d", b, i, w));
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < N_IN; w++) in_words[w] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(full == '0 && in_ready, "empty after reset");
    put_strip(0, STRIP);
    put_strip(1, 2);          // short strip
    put_strip(2, STRIP);
    put_strip(3, 1);          // short strip
    for (int b = 0; b < N_BANKS; b++) check_bank(b);
    // all buffers full: the stream must stall
    in_valid = 1'b1;
    #1 check(in_ready == 1'b0, "stall with all buffers full");
    @(posedge clk);
    #1 check(full == '1, "nothing taken while stalled");
    in_valid = 1'b0;
    // release buffer 0 and refill it
    release_b = 4'b0001;
    @(posedge clk);
    #1 release_b = '0;
    check(full == 4'b1110 && in_ready, "buffer 0 released");
    put_strip(0, 3);
    check_bank(0);
    for (int b = 1; b < N_BANKS; b++) check_bank(b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
