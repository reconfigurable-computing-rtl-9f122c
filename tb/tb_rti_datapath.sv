// tb_rti_datapath: runs the floating-point array under the schedule with the
// counters and the per-iteration input items driven by the testbench, two
// full strips per period. At each output stage (row 0 for slot A's strip of
// the previous period, row 2 for slot B's) it compares the four compare bits
// and the new T and D of every item with the operation-by-operation
// reference kernel, bit for bit. It also counts unit operations over one
// steady period: 48 additions, 52 multiplications and 8 comparisons per item
// pair, i.e. 80% adder and 72% multiplier use. Small unit latencies and strip
// length keep the run short; each latency differs, so the stage alignment
// is exercised.
module tb_rti_datapath;
  import rti_pkg::*;
  import fp_ref_pkg::*;

  localparam int STRIP = 8;
  localparam int NP    = 5;             // periods with new strips
  localparam int PER   = PERIOD * STRIP;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(STRIP)-1:0] idx = '0;
  logic [3:0]               row = '0;
  fp32_t                    in_words [4][N_IN];
  logic [3:0]               item_valid = '0;
  logic [3:0]               out_cmp;
  fp32_t                    out_t, out_d;
  logic [N_UNITS-1:0]       unit_busy, unit_done;

  logic [31:0] items [2*NP][STRIP][N_IN];
  int checks = 0, failures = 0, hits = 0, misses = 0;
  int n_add = 0, n_mul = 0, n_cmp = 0;

  rti_datapath #(.STRIP(STRIP), .ADD_LAT(7), .MUL_LAT(5), .CMP_LAT(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat ((NP + 3) * PER) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_inputs(input int p, input int r, input int i);
    int s [4];
    s[TAG_ACUR] = 2 * p; s[TAG_BCUR] = 2 * p + 1; s[TAG_APREV] = 2 * p - 2; s[TAG_BPREV] = 2 * p - 1;
    for (int t = 0; t < 4; t++) begin
      item_valid[t] = s[t] >= 0 && s[t] < 2 * NP && !(t == TAG_BCUR && r < B_OFS);
      for (int w = 0; w < N_IN; w++) in_words[t][w] = item_valid[t] ? items[s[t]][i][w] : 32'h0;
    end
  endtask

  initial begin
    kres_t e;
    int    p, r, i, sid;
    for (int s = 0; s < 2 * NP; s++)
      for (int i2 = 0; i2 < STRIP; i2++) begin
        logic [31:0] w [17];
        rand_item(w, r2f(0.5 + real'($urandom % 1000) / 1000.0), 32'h3F80_0000);
        items[s][i2] = w;
      end
    if (sched_conflict()) begin
      failures++;
      $display("FAIL: schedule gives a unit to both slots");
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < (NP + 1) * PER; c++) begin
      p = c / PER; r = (c / STRIP) % PERIOD; i = c % STRIP;
      idx = $clog2(STRIP)'(i); row = 4'(r);
      set_inputs(p, r, i);
      #1;
      if (p == 2) begin
        for (int u = 0; u < N_ADD; u++) n_add += int'(unit_busy[u]);
        for (int u = N_ADD; u < N_ADD + N_MUL; u++) n_mul += int'(unit_busy[u]);
        for (int u = N_ADD + N_MUL; u < N_UNITS; u++) n_cmp += int'(unit_busy[u]);
      end
      if (p >= 1 && (r == 0 || r == B_OFS)) begin
        sid = (r == 0) ? 2 * p - 2 : 2 * p - 1;
        e = kernel_ref(items[sid][i]);
        checks++;
        if (out_cmp !== e.flags || out_t !== e.t || out_d !== e.d) begin
          failures++;
          if (failures < 10)
            $display("FAIL: strip %0d item %0d: flags %b/%b T %h/%h D %h/%h", sid, i,
                     out_cmp, e.flags, out_t, e.t, out_d, e.d);
        end
        if (e.hit) hits++; else misses++;
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_add != 48 * STRIP || n_mul != 52 * STRIP || n_cmp != 8 * STRIP) begin
      failures++;
      $display("FAIL: operations per period add %0d mul %0d cmp %0d", n_add, n_mul, n_cmp);
    end
    checks++;
    if (hits == 0 || misses == 0) begin
      failures++;
      $display("FAIL: hits %0d misses %0d", hits, misses);
    end
    $display("hits %0d misses %0d; per period: %0d adds, %0d multiplies, %0d compares", hits, misses, n_add, n_mul, n_cmp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
