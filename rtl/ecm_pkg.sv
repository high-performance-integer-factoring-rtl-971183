// ecm_pkg: constants, types and table functions shared by the ECM (elliptic
// curve method) engine.
//
// Numbers are 17-bit words, least significant word first. A workspace cell holds
// 16 such words (272 bits); two cells (X and Z) hold one projective point. An
// operand uses B_WORDS words of its cell; the modulus may have up to
// 17*B_WORDS-19 bits. The word size, cell size and cell count follow the
// document's workspace description; the instruction encoding is this design's
// own.
//
// Table functions, evaluated when the design is elaborated:
//  * ecm_scalar(B1): the phase 1 scalar k, the product of the largest power of
//    every prime p <= B1 that does not exceed B1 (1374 bits for B1 = 960);
//  * ecm_jval(s): the s-th of the 24 numbers j < 105 coprime to 210 = 2*3*5*7
//    (1, 11, 13, ..., 103), the baby steps of phase 2;
//  * ecm_p2_mask(B1, B2, m): the 24-bit mask of giant step m, bit s set when
//    m*210 - j(s) or m*210 + j(s) is a prime in (B1, B2].
package ecm_pkg;

  localparam int W          = 17;   // word width (DSP operand width minus sign)
  localparam int CELL_WORDS = 16;   // words per workspace cell
  localparam int N_CELLS    = 64;   // 32 blocks of 2 cells
  localparam int CELL_AW    = 6;
  localparam int WORD_AW    = 4;
  localparam int MEM_AW     = CELL_AW + WORD_AW;

  localparam int D_STEP     = 210;  // giant step of phase 2
  localparam int N_J        = 24;   // baby steps: j < 105, gcd(j, 210) = 1
  localparam int M_LIM      = 320;  // most giant steps a mask table can hold
  localparam int PROG_LEN   = 1024; // instruction ROM depth
  localparam int PC_W       = 10;
  localparam int KMAX       = 1536; // largest phase 1 scalar, in bits

  typedef logic [W-1:0]       word_t;
  typedef logic [CELL_AW-1:0] cell_t;
  typedef logic [MEM_AW-1:0]  maddr_t;

  // Operand field of an instruction: a workspace cell, or (bit 6 set) the X
  // (bit 0 = 0) or Z (bit 0 = 1) cell of the current phase 2 table entry.
  typedef logic [CELL_AW:0]   opnd_t;

  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_ADD    = 4'd1,   // dst = a + b  (MADDSUB)
    OP_SUB    = 4'd2,   // dst = a - b  (MADDSUB)
    OP_MUL1   = 4'd3,   // dst = a * b  (MMUL1, Montgomery)
    OP_MUL2   = 4'd4,   // dst = a * b  (MMUL2, Montgomery)
    OP_SYNC   = 4'd5,   // wait until every unit is idle
    OP_LOOP   = 4'd6,   // phase 1: next scalar bit, jump to target while bits remain
    OP_JNEXT  = 4'd7,   // phase 2: next table entry of this giant step, jump to target if any
    OP_MNEXT  = 4'd8,   // phase 2: next giant step, jump to target while steps remain
    OP_TOGGLE = 4'd9,   // phase 2: R and R' trade places
    OP_JMP    = 4'd10,  // jump to target
    OP_END    = 4'd15   // program finished
  } opcode_e;

  // jump target = {src_a, src_b}[PC_W-1:0]
  typedef struct packed {
    opcode_e op;
    opnd_t   dst;
    opnd_t   src_a;
    opnd_t   src_b;
  } instr_t;

  typedef logic [$bits(instr_t)-1:0] iword_t;
  typedef iword_t prog_t [PROG_LEN];
  typedef logic [N_J-1:0] mask_t;

  // Unit commands issued by the controller (physical cells).
  typedef struct packed {
    logic  sub;     // MADDSUB: 1 = subtract
    cell_t dst;
    cell_t src_a;
    cell_t src_b;
  } ucmd_t;

  function automatic logic [KMAX-1:0] ecm_scalar(input int b1);
    logic [KMAX-1:0] k;
    int              pe;
    k = 1;
    for (int p = 2; p <= b1; p++) begin
      if (is_prime(p)) begin
        pe = p;
        while (pe * p <= b1) pe = pe * p;
        k = k * KMAX'(pe);
      end
    end
    return k;
  endfunction

  function automatic int ecm_scalar_bits(input int b1);
    logic [KMAX-1:0] k;
    k = ecm_scalar(b1);
    for (int i = KMAX - 1; i >= 0; i--)
      if (k[i]) return i + 1;
    return 0;
  endfunction

  function automatic bit is_prime(input int n);
    if (n < 2) return 1'b0;
    if (n % 2 == 0) return n == 2;
    for (int q = 3; q * q <= n; q += 2)
      if (n % q == 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int ecm_jval(input int s);
    int c;
    c = 0;
    for (int j = 1; j < D_STEP / 2; j += 2)
      if (j % 3 != 0 && j % 5 != 0 && j % 7 != 0) begin
        if (c == s) return j;
        c++;
      end
    return 0;
  endfunction

  // last giant step: m*210 - 103 <= B2
  function automatic int ecm_m_max(input int b2);
    return (b2 + 103) / D_STEP;
  endfunction

  // mask of giant step m: bit s set when m*210 - j_s or m*210 + j_s is a
  // prime in (b1, b2]
  function automatic mask_t ecm_p2_mask(input int b1, input int b2, input int m);
    mask_t v;
    int    lo, hi;
    v = '0;
    for (int s = 0; s < N_J; s++) begin
      lo = m * D_STEP - ecm_jval(s);
      hi = m * D_STEP + ecm_jval(s);
      if ((lo > b1 && lo <= b2 && is_prime(lo)) || (hi > b1 && hi <= b2 && is_prime(hi)))
        v[s] = 1'b1;
    end
    return v;
  endfunction

endpackage
