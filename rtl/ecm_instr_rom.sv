// ecm_instr_rom: the program of one ECM core and its two tables.
//
// Three read-only tables, all combinational:
//  * the program (PROG_LEN instructions), generated when the design is
//    elaborated from the bounds B1 and B2;
//  * the phase 1 scalar k, read one bit at a time (MSB first);
//  * the phase 2 masks, one 24-bit mask per giant step m.
// Replacing this module replaces the program, as the document intends with its
// exchangeable instruction ROM.
//
// Points are on a curve in Montgomery form and carry only X and Z. Two
// building blocks are used throughout, with four scratch cells T0..T3:
//   xADD(a, b, diff) = a + b, given a - b:  U = (Xa-Za)(Xb+Zb),
//       V = (Xa+Za)(Xb-Zb), X = Zdiff*(U+V)^2, Z = Xdiff*(U-V)^2;
//   xDBL(a) = 2a: X = (Xa+Za)^2 (Xa-Za)^2, Z = t*((Xa-Za)^2 + a24*t) with
//       t = (Xa+Za)^2 - (Xa-Za)^2.
//
// Program:
//  phase 1  a Montgomery ladder over the bits of k, R0 in cells 0/1, R1 in
//           2/3, base point in 52/53; a scalar bit of 1 swaps R0 and R1. One
//           ladder step is 11 multiplications and 8 additions/subtractions,
//           the two multipliers paired where the data flow allows. Q = k*P is
//           left in cells 0/1, which is table entry 1*Q.
//  phase 2  precomputation: 2Q, then every odd multiple 3Q..105Q by xADD
//           (each from the previous one and 2Q); those coprime to 210 are
//           written straight into their table entry (cells 2s, 2s+1), the
//           others into two scratch points. Then DQ = 2*105Q = 210Q (cells
//           52/53), R = DQ (48/49) and R' = 2DQ (50/51).
//           Main loop over giant steps m = 1 .. (B2+103)/210, R = m*DQ:
//           for every table entry j flagged in mask(m),
//               d = d * (X_R * Z_jQ - X_jQ * Z_R),
//           then R' + DQ (difference R) overwrites R and R, R' trade places.
//  d (cell 54) must hold the Montgomery form of 1 when the core starts; the
//  host takes gcd(d, N) at the end.
// The cell map follows the document's workspace figure (table rows, R, R', Q,
// d, two temporary points, four scratch cells); the curve constant a24 sits in
// cell 55, which the figure leaves unused. The formulas are the standard ones
// for Montgomery curves; the instruction set, the schedule and the loop
// structure are this design's own, as the document gives no program listing.
module ecm_instr_rom
  import ecm_pkg::*;
#(
  parameter int B1    = 960,
  parameter int B2    = 57000,
  parameter int KBITS = ecm_scalar_bits(B1),
  parameter int M_MAX = ecm_m_max(B2)
) (
  input  logic [PC_W-1:0]            pc,
  output instr_t                     instr,
  input  logic [$clog2(KBITS)-1:0]   bit_idx,
  output logic                       k_bit,
  input  logic [$clog2(M_LIM)-1:0]   m_idx,
  output mask_t                      mask
);

  // cell map
  localparam int R0 = 0, R1 = 2;                 // phase 1 ladder points
  localparam int PB = 52, DQ = 52;               // base point (phase 1), DQ (phase 2)
  localparam int CD = 54, A24 = 55;              // product d, curve constant
  localparam int RR = 48, RP = 50;               // R and R' (phase 2)
  localparam int TP1 = 56, TP2 = 58;             // temporary points
  localparam int T0 = 60, T1 = 61, T2 = 62, T3 = 63;
  localparam int TBL = 64;                       // operand code of the current table entry

  // a building block: up to 16 instructions, element 0 first
  typedef instr_t [15:0] macro_t;
  localparam int XADD_N = 16, XDBL_N = 15;

  function automatic instr_t ins(opcode_e op, int d, int a, int b);
    return '{op: op, dst: opnd_t'(d), src_a: opnd_t'(a), src_b: opnd_t'(b)};
  endfunction

  function automatic instr_t jmp(opcode_e op, int target);
    logic [2*(CELL_AW+1)-1:0] t;
    t = (2*(CELL_AW+1))'(target);
    return '{op: op, dst: '0, src_a: t[2*(CELL_AW+1)-1 -: CELL_AW+1], src_b: t[CELL_AW:0]};
  endfunction

  // o = a + b with difference d (o may be d)
  function automatic macro_t xadd(int a, int b, int d, int o);
    macro_t m;
    m = '0;
    m[0]  = ins(OP_ADD,  T0, a, a + 1);
    m[1]  = ins(OP_SUB,  T1, a, a + 1);
    m[2]  = ins(OP_ADD,  T2, b, b + 1);
    m[3]  = ins(OP_SUB,  T3, b, b + 1);
    m[4]  = ins(OP_SYNC, 0, 0, 0);
    m[5]  = ins(OP_MUL1, T2, T1, T2);          // U
    m[6]  = ins(OP_MUL2, T3, T0, T3);          // V
    m[7]  = ins(OP_SYNC, 0, 0, 0);
    m[8]  = ins(OP_ADD,  T0, T2, T3);          // U + V
    m[9]  = ins(OP_SUB,  T1, T2, T3);          // U - V
    m[10] = ins(OP_SYNC, 0, 0, 0);
    m[11] = ins(OP_MUL1, T0, T0, T0);
    m[12] = ins(OP_MUL2, T1, T1, T1);
    m[13] = ins(OP_SYNC, 0, 0, 0);
    // both multipliers read their operands before either writes
    m[14] = ins(OP_MUL1, o,     d + 1, T0);
    m[15] = ins(OP_MUL2, o + 1, d,     T1);
    return m;
  endfunction

  // o = 2a
  function automatic macro_t xdbl(int a, int o);
    macro_t m;
    m = '0;
    m[0]  = ins(OP_ADD,  T0, a, a + 1);
    m[1]  = ins(OP_SUB,  T1, a, a + 1);
    m[2]  = ins(OP_SYNC, 0, 0, 0);
    m[3]  = ins(OP_MUL1, T0, T0, T0);
    m[4]  = ins(OP_MUL2, T1, T1, T1);
    m[5]  = ins(OP_SYNC, 0, 0, 0);
    m[6]  = ins(OP_MUL1, o,  T0, T1);
    m[7]  = ins(OP_SUB,  T2, T0, T1);
    m[8]  = ins(OP_SYNC, 0, 0, 0);
    m[9]  = ins(OP_MUL2, T3, A24, T2);
    m[10] = ins(OP_SYNC, 0, 0, 0);
    m[11] = ins(OP_ADD,  T3, T1, T3);
    m[12] = ins(OP_SYNC, 0, 0, 0);
    m[13] = ins(OP_MUL1, o + 1, T2, T3);
    m[14] = ins(OP_SYNC, 0, 0, 0);
    return m;
  endfunction

  function automatic int slot_of(int j);
    for (int s = 0; s < N_J; s++)
      if (ecm_jval(s) == j) return s;
    return -1;
  endfunction

  function automatic prog_t build();
    prog_t  p;
    int     n;
    macro_t mc;
    int     cur, prev, nxt, l_j, l_b, l_jnext;
    for (int k = 0; k < PROG_LEN; k++) p[k] = iword_t'(ins(OP_END, 0, 0, 0));
    n = 0;
    // ---- phase 1: one ladder step per scalar bit (temporaries in cells 4..15)
    p[n++] = iword_t'(ins(OP_ADD,  4,  R0, R0 + 1));      // X0+Z0
    p[n++] = iword_t'(ins(OP_SUB,  5,  R0, R0 + 1));      // X0-Z0
    p[n++] = iword_t'(ins(OP_ADD,  6,  R1, R1 + 1));      // X1+Z1
    p[n++] = iword_t'(ins(OP_SUB,  7,  R1, R1 + 1));      // X1-Z1
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_MUL1, 8,  5,  6));           // U
    p[n++] = iword_t'(ins(OP_MUL2, 9,  4,  7));           // V
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_MUL1, 10, 4,  4));           // (X0+Z0)^2
    p[n++] = iword_t'(ins(OP_MUL2, 11, 5,  5));           // (X0-Z0)^2
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_ADD,  6,  8,  9));           // U+V
    p[n++] = iword_t'(ins(OP_MUL1, R0, 10, 11));          // X(2R0)
    p[n++] = iword_t'(ins(OP_SUB,  7,  8,  9));           // U-V
    p[n++] = iword_t'(ins(OP_SUB,  12, 10, 11));          // t
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_MUL1, 13, 6,  6));           // (U+V)^2
    p[n++] = iword_t'(ins(OP_MUL2, 14, 7,  7));           // (U-V)^2
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_MUL1, 15, A24, 12));         // a24*t
    p[n++] = iword_t'(ins(OP_MUL2, R1, PB + 1, 13));      // X(R0+R1)
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_ADD,  15, 11, 15));
    p[n++] = iword_t'(ins(OP_MUL2, R1 + 1, PB, 14));      // Z(R0+R1)
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_MUL1, R0 + 1, 12, 15));      // Z(2R0)
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(jmp(OP_LOOP, 0));
    // ---- phase 2 precomputation: 2Q into R', odd multiples up to 105Q
    mc = xdbl(0, RP);
    for (int k = 0; k < XDBL_N; k++) p[n++] = iword_t'(mc[k]);
    prev = 0;                                   // 1Q (table entry 0)
    cur  = -1;
    for (int j = 3; j <= 105; j += 2) begin
      if (slot_of(j) >= 0) nxt = 2 * slot_of(j);
      else nxt = (cur == TP1) ? TP2 : TP1;
      if (j == 3) mc = xadd(RP, prev, prev, nxt);   // 3Q = 2Q + Q, difference Q
      else        mc = xadd(cur, RP, prev, nxt);    // jQ = (j-2)Q + 2Q, difference (j-4)Q
      for (int k = 0; k < XADD_N; k++) p[n++] = iword_t'(mc[k]);
      p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
      if (j > 3) prev = cur;
      cur = nxt;
    end
    // DQ = 2 * 105Q, R = DQ, R' = 2 DQ
    mc = xdbl(cur, DQ);
    for (int k = 0; k < XDBL_N; k++) p[n++] = iword_t'(mc[k]);
    mc = xdbl(cur, RR);
    for (int k = 0; k < XDBL_N; k++) p[n++] = iword_t'(mc[k]);
    mc = xdbl(RR, RP);
    for (int k = 0; k < XDBL_N; k++) p[n++] = iword_t'(mc[k]);
    // ---- phase 2 main loop
    l_jnext = n;
    l_b     = n + 6 + XADD_N;                    // body after the giant step code
    p[n++] = iword_t'(jmp(OP_JNEXT, l_b));
    // giant step: R' + DQ overwrites R, then R and R' trade places
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    mc = xadd(RP, DQ, RR, RR);
    for (int k = 0; k < XADD_N; k++) p[n++] = iword_t'(mc[k]);
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_TOGGLE, 0, 0, 0));
    p[n++] = iword_t'(jmp(OP_MNEXT, l_jnext));
    p[n++] = iword_t'(ins(OP_END, 0, 0, 0));
    // body: d = d * (X_R Z_jQ - X_jQ Z_R)
    l_j = n;
    p[n++] = iword_t'(ins(OP_MUL1, T0, RR, TBL + 1));
    p[n++] = iword_t'(ins(OP_MUL2, T1, TBL, RR + 1));
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_SUB,  T2, T0, T1));
    p[n++] = iword_t'(ins(OP_SYNC, 0, 0, 0));
    p[n++] = iword_t'(ins(OP_MUL1, CD, CD, T2));
    p[n++] = iword_t'(jmp(OP_JMP, l_jnext));
    if (l_j != l_b) $error("program layout");
    if (n > PROG_LEN) $error("program does not fit the ROM");
    return p;
  endfunction

  localparam prog_t           PROG  = build();
  localparam logic [KMAX-1:0] K     = ecm_scalar(B1);

  // the bounds must fit the tables of the package
  if (KBITS > KMAX)  begin : g_k_too_long   $error("scalar k longer than KMAX bits");  end
  if (M_MAX >= M_LIM) begin : g_m_too_many  $error("more giant steps than M_LIM");     end

  // one constant per giant step, each computed on its own
  mask_t mask_rows [M_LIM];
  for (genvar m = 0; m < M_LIM; m++) begin : g_mask
    localparam mask_t ROW = ecm_p2_mask(B1, B2, m);
    assign mask_rows[m] = ROW;
  end

  assign instr = instr_t'(PROG[pc]);
  assign k_bit = K[bit_idx];
  assign mask  = (int'(m_idx) <= M_MAX) ? mask_rows[m_idx] : '0;

endmodule
