// tb_rti_top: end-to-end test of the kernel at its default parameters.
//
// Phase 1 streams independent ray/triangle items: a continuous run of full
// strips (longer than the four input buffers can hold, so the stream is
// stalled), a short strip closed by in_last, then a pause long enough for
// slots to start empty, then more strips. Every result is checked in order
// against the reference kernel, bit for bit, and the steady rate is checked:
// within the continuous run, the result 2*STRIP items later comes exactly
// 12*STRIP cycles later.
// Phase 2 is the closest-hit search the kernel is meant for: two sets of
// STRIP rays are tested against a sequence of triangles, every result being
// fed back as the next (Told, Dold) of its ray, and the final closest hits
// are compared with a reference search.
// Each mechanism must occur at least once: stream stall, empty slot, short
// strip, both slots of a period in use, hit and miss, and every unit busy.
module tb_rti_top;
  import rti_pkg::*;
  import fp_ref_pkg::*;

  localparam int STRIP = 16;               // the design's default
  localparam int PER   = PERIOD * STRIP;
  localparam int RUN   = 8;                // strips in the continuous run
  localparam int NTRI  = 4;                // triangles per ray set in phase 2

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid = 1'b0, in_ready, in_last = 1'b0;
  fp32_t              in_words [N_IN];
  logic               out_valid, out_hit;
  logic [3:0]         out_flags;
  fp32_t              out_t, out_d;
  logic [N_UNITS-1:0] unit_busy, ever_busy = '0;
  logic               slot_bubble;

  rti_top dut (.*);

  always #5 clk = ~clk;

  int    checks = 0, failures = 0, cycle = 0, n_out = 0;
  int    n_stall = 0, n_bubble = 0, n_short = 0, n_hit = 0, n_miss = 0, n_dual = 0;
  kres_t exp_q [$];
  int    out_cycle [$];
  fp32_t got_t [$], got_d [$];
  int    last_row0_out = -1;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (slot_bubble) n_bubble++;
    ever_busy <= ever_busy | unit_busy;
  end

  // results of both slots in one period: row-0 results followed by row-2 results
  always @(posedge clk) if (rst_n && out_valid) begin
    kres_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected result");
    end else begin
      e = exp_q.pop_front();
      if (out_hit !== e.hit || out_flags !== e.flags || out_t !== e.out_t || out_d !== e.out_d) begin
        failures++;
        if (failures < 10)
          $display("FAIL: result %0d: hit %b/%b flags %b/%b T %h/%h D %h/%h", n_out, out_hit, e.hit,
                   out_flags, e.flags, out_t, e.out_t, out_d, e.out_d);
      end
      if (e.hit) n_hit++; else n_miss++;
    end
    out_cycle.push_back(cycle);
    got_t.push_back(out_t);
    got_d.push_back(out_d);
    n_out++;
    if (dut.row == 4'd1) last_row0_out = cycle;
    if (dut.row == 4'(B_OFS + 1) && last_row0_out >= 0 && cycle - last_row0_out < PER / 2) n_dual++;
  end

  task automatic send(input logic [31:0] w [17], input bit last);
    for (int k = 0; k < N_IN; k++) in_words[k] = w[k];
    in_valid = 1'b1;
    in_last  = last;
    exp_q.push_back(kernel_ref(w));
    do @(posedge clk); while (!in_ready);
    #1;
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  task automatic send_random_strip(input int n);
    logic [31:0] w [17];
    for (int i = 0; i < n; i++) begin
      rand_item(w, r2f(0.5 + real'($urandom % 1000) / 1000.0), 32'h3F80_0000);
      send(w, (n < STRIP) && (i == n - 1));
    end
    if (n < STRIP) n_short++;
  endtask

  task automatic wait_results(input int n);
    int t;
    t = 0;
    while (n_out < n && t < 4 * PER) begin
      @(posedge clk);
      t++;
    end
    #1;
  endtask

  initial begin
    repeat (30 * PER) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, sent;
    for (int k = 0; k < N_IN; k++) in_words[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- phase 1: continuous run, short strip, pause, more strips
    for (int s = 0; s < RUN; s++) send_random_strip(STRIP);
    send_random_strip(5);
    sent = RUN * STRIP + 5;
    wait_results(sent);
    repeat (2 * PER) @(posedge clk);
    #1;
    send_random_strip(STRIP);
    send_random_strip(STRIP);
    sent += 2 * STRIP;
    wait_results(sent);
    // steady rate over the continuous run (strips 2..RUN-1 are already queued
    // when their slots start)
    for (int j = 2 * STRIP; j + 2 * STRIP < RUN * STRIP; j++) begin
      checks++;
      if (out_cycle[j + 2 * STRIP] - out_cycle[j] != PER) begin
        failures++;
        if (failures < 10) $display("FAIL: rate at result %0d: %0d cycles per period", j,
                                    out_cycle[j + 2 * STRIP] - out_cycle[j]);
      end
    end

    // ---- phase 2: closest-hit search, two ray sets against NTRI triangles
    begin
      logic [31:0] rays [2][STRIP][17];
      logic [31:0] tris [2][NTRI][9];
      logic [31:0] told [2][STRIP], dold [2][STRIP];
      logic [31:0] rt [2][STRIP], rd [2][STRIP];
      logic [31:0] w [17];
      kres_t       e;
      for (int g = 0; g < 2; g++) begin
        for (int i = 0; i < STRIP; i++) begin
          rand_item(rays[g][i], 32'h7F00_0000, 32'h3F80_0000);   // far away, D = 1
          told[g][i] = 32'h7F00_0000; dold[g][i] = 32'h3F80_0000;
          rt[g][i] = told[g][i]; rd[g][i] = dold[g][i];
        end
        for (int k = 0; k < NTRI; k++) begin
          rand_item(w, 32'h0, 32'h0);
          for (int q = 0; q < 9; q++) tris[g][k][q] = w[q];
        end
      end
      for (int k = 0; k < NTRI; k++) begin
        for (int g = 0; g < 2; g++)
          for (int i = 0; i < STRIP; i++) begin
            w = rays[g][i];
            for (int q = 0; q < 9; q++) w[q] = tris[g][k][q];
            // reference search
            w[15] = rt[g][i]; w[16] = rd[g][i];
            e = kernel_ref(w);
            rt[g][i] = e.out_t; rd[g][i] = e.out_d;
            // the design's own previous result
            w[15] = told[g][i]; w[16] = dold[g][i];
            send(w, 1'b0);
          end
        base = n_out;
        wait_results(sent + 2 * STRIP);
        sent += 2 * STRIP;
        for (int g = 0; g < 2; g++)
          for (int i = 0; i < STRIP; i++) begin
            told[g][i] = got_t[base + g * STRIP + i];
            dold[g][i] = got_d[base + g * STRIP + i];
          end
      end
      for (int g = 0; g < 2; g++)
        for (int i = 0; i < STRIP; i++) begin
          checks++;
          if (told[g][i] !== rt[g][i] || dold[g][i] !== rd[g][i]) begin
            failures++;
            if (failures < 10) $display("FAIL: closest hit of ray %0d/%0d", g, i);
          end
        end
    end

    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("mechanisms: stalls %0d, empty slots %0d, short strips %0d, dual-slot periods %0d, hits %0d, misses %0d, units used %b",
             n_stall, n_bubble, n_short, n_dual, n_hit, n_miss, ever_busy);
    checks += 6;
    if (n_stall == 0)  begin failures++; $display("FAIL: stream never stalled"); end
    if (n_bubble == 0) begin failures++; $display("FAIL: no empty slot"); end
    if (n_short == 0)  begin failures++; $display("FAIL: no short strip"); end
    if (n_dual == 0)   begin failures++; $display("FAIL: never two strips in one period"); end
    if (n_hit == 0 || n_miss == 0) begin failures++; $display("FAIL: hits or misses missing"); end
    if (ever_busy != '1) begin failures++; $display("FAIL: some unit never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
