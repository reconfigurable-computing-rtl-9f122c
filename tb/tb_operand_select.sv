// tb_operand_select: applies random source selections (input words, chain
// taps, zero) with random data and checks the selected word.
module tb_operand_select;
  import rti_pkg::*;

  src_t  sel;
  fp32_t in_words [N_IN];
  fp32_t taps [N_UNITS][MAX_TAP];
  fp32_t y, e;
  int    checks = 0, failures = 0;

  operand_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N_IN; i++) in_words[i] = $urandom;
      for (int u = 0; u < N_UNITS; u++)
        for (int j = 0; j < MAX_TAP; j++) taps[u][j] = $urandom;
      case (n % 3)
        0: begin sel = s_in(int'($urandom % N_IN)); e = in_words[sel.word]; end
        1: begin
             sel = s_tap(int'($urandom % N_UNITS), int'($urandom % MAX_TAP));
             e = taps[sel.unit][sel.tap];
           end
        default: begin sel = s_zero(); e = '0; end
      endcase
      #1;
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: sel %p got %h expected %h", sel, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
