// tb_rti_control: checks the schedule sequencer against an independent
// cycle-count model. The stage and item counters must follow the cycle count;
// a strip that is ready is taken by slot A at the start of a period and by
// slot B two stages later; a slot without a ready strip starts empty (a
// bubble); a strip's buffer is released at the end of its output stage
// (row 0 of the next period for slot A, row 2 for slot B); item_valid
// marks only the items of a short strip.
module tb_rti_control;
  import rti_pkg::*;

  localparam int STRIP = 4;
  localparam int PER   = PERIOD * STRIP;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(STRIP)-1:0] idx;
  logic [3:0]               row;
  logic [N_BANKS-1:0]       full = '0, release_b;
  logic [$clog2(STRIP):0]   len [N_BANKS];
  logic [3:0]               tag_valid, item_valid;
  logic [1:0]               tag_bank [4];
  logic                     slot_start, slot_bubble;
  int                       checks = 0, failures = 0, c = 0, bubbles = 0, releases = 0;

  rti_control #(.STRIP(STRIP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: cycle %0d: %s", c, what);
    end
  endtask

  initial begin
    repeat (20 * PER) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected release cycles: strip in buffer 0 (slot A of period 1) after
  // row 0 of period 2, buffer 1 (slot B of period 1) after row 2 of period 2,
  // buffer 2 (slot A of period 3) after row 0 of period 4
  function automatic logic [3:0] exp_release(int cc);
    logic [3:0] r;
    r = '0;
    if (cc == 2 * PER + STRIP - 1)                 r[0] = 1'b1;
    if (cc == 2 * PER + (B_OFS + 1) * STRIP - 1)   r[1] = 1'b1;
    if (cc == 4 * PER + STRIP - 1)                 r[2] = 1'b1;
    return r;
  endfunction

  initial begin
    int p, r, i;
    for (int b = 0; b < N_BANKS; b++) len[b] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (c = 0; c < 5 * PER; c++) begin
      p = c / PER; r = (c / STRIP) % PERIOD; i = c % STRIP;
      // strips in buffers 0 and 1 become ready after slot B of period 0 started
      if (c == (B_OFS + 1) * STRIP) begin full = 4'b0011; len[0] = 3'(STRIP); len[1] = 3'(STRIP); end
      // a short strip of 3 items in buffer 2 becomes ready during period 2
      if (c == 2 * PER + 10) begin full[2] = 1'b1; len[2] = 3'd3; end
      #1;
      check(int'(idx) == i && int'(row) == r, $sformatf("counters idx %0d row %0d", idx, row));
      check(release_b == exp_release(c), $sformatf("release %b", release_b));
      case (p)
        1: begin
             check(tag_valid[TAG_ACUR] && tag_bank[TAG_ACUR] == 2'd0 && item_valid[TAG_ACUR], "A slot holds buffer 0");
             if (r >= B_OFS)
               check(tag_valid[TAG_BCUR] && tag_bank[TAG_BCUR] == 2'd1 && item_valid[TAG_BCUR], "B slot holds buffer 1");
             else
               check(!item_valid[TAG_BCUR], "B slot empty before row 2");
           end
        2: begin
             check(!item_valid[TAG_ACUR] && !item_valid[TAG_BCUR], "period 2 slots are bubbles");
             if (r == 0) check(item_valid[TAG_APREV] && tag_bank[TAG_APREV] == 2'd0, "previous A for output");
             if (r <= B_OFS) check(item_valid[TAG_BPREV] && tag_bank[TAG_BPREV] == 2'd1, "previous B for output");
           end
        3: begin
             check(tag_valid[TAG_ACUR] && tag_bank[TAG_ACUR] == 2'd2, "A slot holds buffer 2");
             check(item_valid[TAG_ACUR] == (i < 3), "short strip item_valid");
             if (r >= B_OFS) check(!item_valid[TAG_BCUR], "period 3 B bubble");
           end
        default: ;
      endcase
      if (slot_bubble) bubbles++;
      if (|release_b) releases++;
      @(posedge clk);
      // the model's buffers are handed back on release
      for (int b = 0; b < N_BANKS; b++) if (release_b[b]) full[b] = 1'b0;
    end
    // bubbles: period 0 B, period 2 A and B, period 3 B, period 4 A and B, period 5 A
    check(bubbles == 7, $sformatf("bubble count %0d", bubbles));
    check(releases == 3, $sformatf("release count %0d", releases));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
