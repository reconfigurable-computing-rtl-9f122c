// rti_pkg: types, unit numbering and the static schedule of the ray-triangle
// intersection kernel.
//
// The kernel computes a division-free Moller-Trumbore test for one ray and
// one triangle per item:
//   S0 = T1-T0, S1 = T2-T0, S2 = P0-T0           (9 subtractions)
//   C0 = PD x S1, C1 = S2 x S0                    (12 products, 6 subtractions)
//   U = S2.C0, V = PD.C1, D = S0.C0, T = S1.C1    (12 products, 8 additions)
//   U+V, M0 = T*Dold, M1 = Told*D                 (1 addition, 2 products)
//   U<0, V<0, U+V>D, M0<M1                        (4 comparisons)
// That is 24 additions, 26 multiplications and 4 comparisons over 17 input
// words, as the kernel is specified. D is the determinant and T the scaled hit
// distance; the test is only valid for D > 0 (front-facing triangles).
//
// The datapath has 5 adders (A0..A4), 6 multipliers (M0..M5) and
// 4 comparators (C0..C3), numbered 0..14 in that order. Time is counted in
// stages of STRIP cycles: in every stage each unit takes one operation for
// each of the STRIP items of a strip, and its result comes out exactly one
// stage later. Two strips (iteration slots A and B) are interleaved with a
// period of 12 stages; slot B starts 2 stages after slot A. Both follow the
// same 13-stage program (stage 12 is the output stage), but where slot A's
// additions would collide with slot B's, slot B uses other adders. The row
// and unit of every operation follow the published two-iteration table.
//
// Operand routing ("chaining"): every unit output feeds a chain of one-stage
// delay memories. A value made in stage p is read in stage k from tap
// k-p-1 of its unit's chain. Sources are kernel input words, chain taps or
// the constant zero. The input words of the iteration that owns an
// operation are picked by its slot tag.
package rti_pkg;

  typedef logic [31:0] fp32_t;

  localparam int N_ADD   = 5;
  localparam int N_MUL   = 6;
  localparam int N_CMP   = 4;
  localparam int N_UNITS = N_ADD + N_MUL + N_CMP;
  localparam int N_IN    = 17;
  localparam int PERIOD  = 12;      // stages per schedule period
  localparam int B_OFS   = 2;       // slot B starts this many stages after slot A
  localparam int MAX_TAP = 8;       // chain length bound
  localparam int N_BANKS = 4;       // strip buffers

  // unit indices
  localparam int UA0 = 0, UA1 = 1, UA2 = 2, UA3 = 3, UA4 = 4;
  localparam int UM0 = 5, UM1 = 6, UM2 = 7, UM3 = 8, UM4 = 9, UM5 = 10;
  localparam int UC0 = 11, UC1 = 12, UC2 = 13, UC3 = 14;

  // input word indices within an item
  localparam int W_T0 = 0, W_T1 = 3, W_T2 = 6, W_P0 = 9, W_PD = 12;
  localparam int W_TOLD = 15, W_DOLD = 16;

  typedef enum logic [1:0] {SRC_ZERO = 2'd0, SRC_IN = 2'd1, SRC_TAP = 2'd2} src_kind_e;

  typedef struct packed {
    src_kind_e   kind;
    logic [3:0]  unit;   // SRC_TAP: producing unit
    logic [2:0]  tap;    // SRC_TAP: chain tap
    logic [4:0]  word;   // SRC_IN: input word
  } src_t;

  // which iteration an operation belongs to
  typedef enum logic [1:0] {TAG_ACUR = 2'd0, TAG_BCUR = 2'd1, TAG_APREV = 2'd2, TAG_BPREV = 2'd3} tag_e;

  typedef struct packed {
    logic  en;
    logic  sub;   // adders: a-b instead of a+b
    tag_e  tag;
    src_t  a;
    src_t  b;
  } op_t;

  function automatic src_t s_zero();
    src_t s;
    s.kind = SRC_ZERO; s.unit = '0; s.tap = '0; s.word = '0;
    return s;
  endfunction

  function automatic src_t s_in(int w);
    src_t s;
    s = s_zero();
    s.kind = SRC_IN; s.word = 5'(w);
    return s;
  endfunction

  function automatic src_t s_tap(int u, int t);
    src_t s;
    s = s_zero();
    s.kind = SRC_TAP; s.unit = 4'(u); s.tap = 3'(t);
    return s;
  endfunction

  function automatic op_t op(logic sub, src_t a, src_t b);
    op_t o;
    o.en = 1'b1; o.sub = sub; o.tag = TAG_ACUR; o.a = a; o.b = b;
    return o;
  endfunction

  function automatic op_t op_none();
    op_t o;
    o = '0;
    return o;
  endfunction

  // Operation of unit u in iteration stage k (0..11). is_b selects slot B's
  // adder assignment. Taps are k-p-1 for a value produced in stage p.
  function automatic op_t kernel_op(int k, int u, bit is_b);
    op_t o;
    // adders used by the cross-product subtractions and first dot additions
    int xa;   // first adder of the stage 4/5 subtractions
    int ua;   // adder of U's first addition in stage 7
    xa = is_b ? UA2 : UA0;
    ua = is_b ? UA3 : UA0;
    o = op_none();
    case (k)
      0: case (u)  // S0 = T1-T0, S1.xy = T2-T0
           UA0: o = op(1'b1, s_in(W_T1+0), s_in(W_T0+0));
           UA1: o = op(1'b1, s_in(W_T1+1), s_in(W_T0+1));
           UA2: o = op(1'b1, s_in(W_T1+2), s_in(W_T0+2));
           UA3: o = op(1'b1, s_in(W_T2+0), s_in(W_T0+0));
           UA4: o = op(1'b1, s_in(W_T2+1), s_in(W_T0+1));
           default: ;
         endcase
      1: case (u)  // S1.z = T2-T0, S2 = P0-T0
           UA0: o = op(1'b1, s_in(W_T2+2), s_in(W_T0+2));
           UA1: o = op(1'b1, s_in(W_P0+0), s_in(W_T0+0));
           UA2: o = op(1'b1, s_in(W_P0+1), s_in(W_T0+1));
           UA3: o = op(1'b1, s_in(W_P0+2), s_in(W_T0+2));
           default: ;
         endcase
      // C0 = PD x S1. S1.x on A3 (k0), S1.y on A4 (k0), S1.z on A0 (k1)
      2: case (u)
           UM0: o = op(1'b0, s_in(W_PD+1), s_tap(UA0, 0));  // PDy*S1z
           UM1: o = op(1'b0, s_in(W_PD+2), s_tap(UA4, 1));  // PDz*S1y
           UM2: o = op(1'b0, s_in(W_PD+2), s_tap(UA3, 1));  // PDz*S1x
           UM3: o = op(1'b0, s_in(W_PD+0), s_tap(UA0, 0));  // PDx*S1z
           UM4: o = op(1'b0, s_in(W_PD+0), s_tap(UA4, 1));  // PDx*S1y
           UM5: o = op(1'b0, s_in(W_PD+1), s_tap(UA3, 1));  // PDy*S1x
           default: ;
         endcase
      // C1 = S2 x S0. S2.xyz on A1..A3 (k1), S0.xyz on A0..A2 (k0)
      3: case (u)
           UM0: o = op(1'b0, s_tap(UA2, 1), s_tap(UA2, 2));  // S2y*S0z
           UM1: o = op(1'b0, s_tap(UA3, 1), s_tap(UA1, 2));  // S2z*S0y
           UM2: o = op(1'b0, s_tap(UA3, 1), s_tap(UA0, 2));  // S2z*S0x
           UM3: o = op(1'b0, s_tap(UA1, 1), s_tap(UA2, 2));  // S2x*S0z
           UM4: o = op(1'b0, s_tap(UA1, 1), s_tap(UA1, 2));  // S2x*S0y
           UM5: o = op(1'b0, s_tap(UA2, 1), s_tap(UA0, 2));  // S2y*S0x
           default: ;
         endcase
      4: begin     // C0 = differences of the stage 2 products
           if (u == xa + 0) o = op(1'b1, s_tap(UM0, 1), s_tap(UM1, 1));
           if (u == xa + 1) o = op(1'b1, s_tap(UM2, 1), s_tap(UM3, 1));
           if (u == xa + 2) o = op(1'b1, s_tap(UM4, 1), s_tap(UM5, 1));
         end
      5: begin     // C1 = differences of the stage 3 products
           if (u == xa + 0) o = op(1'b1, s_tap(UM0, 1), s_tap(UM1, 1));
           if (u == xa + 1) o = op(1'b1, s_tap(UM2, 1), s_tap(UM3, 1));
           if (u == xa + 2) o = op(1'b1, s_tap(UM4, 1), s_tap(UM5, 1));
         end
      // products of U = S2.C0 and V = PD.C1; C0 from stage 4, C1 from stage 5
      6: case (u)
           UM0: o = op(1'b0, s_tap(UA1, 4), s_tap(xa + 0, 1));  // S2x*C0x
           UM1: o = op(1'b0, s_tap(UA2, 4), s_tap(xa + 1, 1));  // S2y*C0y
           UM2: o = op(1'b0, s_tap(UA3, 4), s_tap(xa + 2, 1));  // S2z*C0z
           UM3: o = op(1'b0, s_in(W_PD+0),  s_tap(xa + 0, 0));  // PDx*C1x
           UM4: o = op(1'b0, s_in(W_PD+1),  s_tap(xa + 1, 0));  // PDy*C1y
           UM5: o = op(1'b0, s_in(W_PD+2),  s_tap(xa + 2, 0));  // PDz*C1z
           default: ;
         endcase
      // first additions of U and V; products of D = S0.C0 and T = S1.C1
      7: begin
           case (u)
             UM0: o = op(1'b0, s_tap(UA0, 6), s_tap(xa + 0, 2));  // S0x*C0x
             UM1: o = op(1'b0, s_tap(UA1, 6), s_tap(xa + 1, 2));  // S0y*C0y
             UM2: o = op(1'b0, s_tap(UA2, 6), s_tap(xa + 2, 2));  // S0z*C0z
             UM3: o = op(1'b0, s_tap(UA3, 6), s_tap(xa + 0, 1));  // S1x*C1x
             UM4: o = op(1'b0, s_tap(UA4, 6), s_tap(xa + 1, 1));  // S1y*C1y
             UM5: o = op(1'b0, s_tap(UA0, 5), s_tap(xa + 2, 1));  // S1z*C1z
             default: ;
           endcase
           if (u == ua + 0) o = op(1'b0, s_tap(UM0, 0), s_tap(UM1, 0));
           if (u == ua + 1) o = op(1'b0, s_tap(UM3, 0), s_tap(UM4, 0));
         end
      8: case (u)  // U, V complete; first additions of D and T
           UA0: o = op(1'b0, s_tap(ua + 0, 0), s_tap(UM2, 1));
           UA1: o = op(1'b0, s_tap(ua + 1, 0), s_tap(UM5, 1));
           UA2: o = op(1'b0, s_tap(UM0, 0), s_tap(UM1, 0));
           UA3: o = op(1'b0, s_tap(UM3, 0), s_tap(UM4, 0));
           default: ;
         endcase
      9: case (u)  // D, T complete; U+V
           UA0: o = op(1'b0, s_tap(UA2, 0), s_tap(UM2, 1));
           UA1: o = op(1'b0, s_tap(UA3, 0), s_tap(UM5, 1));
           UA2: o = op(1'b0, s_tap(UA0, 0), s_tap(UA1, 0));
           default: ;
         endcase
      10: case (u) // M0 = T*Dold, M1 = Told*D
           UM0: o = op(1'b0, s_tap(UA1, 0), s_in(W_DOLD));
           UM1: o = op(1'b0, s_in(W_TOLD), s_tap(UA0, 0));
           default: ;
         endcase
      11: case (u) // U<0, V<0, D<U+V, M0<M1
           UC0: o = op(1'b0, s_tap(UA0, 2), s_zero());
           UC1: o = op(1'b0, s_tap(UA1, 2), s_zero());
           UC2: o = op(1'b0, s_tap(UA0, 1), s_tap(UA2, 1));
           UC3: o = op(1'b0, s_tap(UM0, 0), s_tap(UM1, 0));
           default: ;
         endcase
      default: ;
    endcase
    return o;
  endfunction

  // Operation of unit u in period row r (0..11): slot A runs stage r,
  // slot B stage (r - B_OFS) mod PERIOD. The table never gives a unit to both.
  function automatic op_t sched(int r, int u);
    op_t oa, ob;
    int  kb;
    oa = kernel_op(r, u, 1'b0);
    oa.tag = TAG_ACUR;
    kb = (r - B_OFS + PERIOD) % PERIOD;
    ob = kernel_op(kb, u, 1'b1);
    ob.tag = (r < B_OFS) ? TAG_BPREV : TAG_BCUR;
    return oa.en ? oa : ob;
  endfunction

  // True if some row gives a unit to both slots (checked by testbenches).
  function automatic bit sched_conflict();
    bit c;
    c = 1'b0;
    for (int r = 0; r < PERIOD; r++)
      for (int u = 0; u < N_UNITS; u++)
        if (kernel_op(r, u, 1'b0).en && kernel_op((r - B_OFS + PERIOD) % PERIOD, u, 1'b1).en)
          c = 1'b1;
    return c;
  endfunction

  // Output stage (stage 12) sources: compare bits on C0..C3 tap 0,
  // T on A1 tap 2, D on A0 tap 2.
  localparam int OUT_T_UNIT = UA1, OUT_D_UNIT = UA0, OUT_TD_TAP = 2;

  // Number of chain elements behind unit u: one more than the deepest tap
  // any operation or the output stage reads.
  function automatic int chain_depth(int u);
    int d;
    op_t o;
    d = 0;
    for (int k = 0; k < PERIOD; k++)
      for (int v = 0; v < N_UNITS; v++)
        for (int b = 0; b < 2; b++) begin
          o = kernel_op(k, v, b[0]);
          if (o.en && o.a.kind == SRC_TAP && int'(o.a.unit) == u && int'(o.a.tap) + 1 > d)
            d = int'(o.a.tap) + 1;
          if (o.en && o.b.kind == SRC_TAP && int'(o.b.unit) == u && int'(o.b.tap) + 1 > d)
            d = int'(o.b.tap) + 1;
        end
    if ((u == OUT_T_UNIT || u == OUT_D_UNIT) && d < OUT_TD_TAP + 1) d = OUT_TD_TAP + 1;
    if (u >= UC0 && d < 1) d = 1;
    return d;
  endfunction

  function automatic int total_chain_elems();
    int n;
    n = 0;
    for (int u = 0; u < N_UNITS; u++) n += chain_depth(u);
    return n;
  endfunction

endpackage
