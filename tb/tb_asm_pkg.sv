// tb_asm_pkg: instruction encoders for the MIPS subset the in-order model
// executes, plus the test programs the testbenches load. Each program comes
// with the values a correct run must leave in data memory, worked out here
// with plain arithmetic rather than by the model.
//
// The programs are this design's own small test kernels, standing in for the
// benchmark programs of the published evaluation (median, multiply, quick
// sort, towers, vector add), whose binaries and sizes are not available.
// No timing: it only builds instruction words.
package tb_asm_pkg;
  import aports_pkg::*;

  typedef logic [31:0] prog_t [$];

  function automatic logic [31:0] rtype(logic [5:0] fn, int rs, int rt, int rd, int sh = 0);
    return {OPC_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] opc, int rs, int rt, int imm);
    return {opc, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] jtype(logic [5:0] opc, int word_target);
    return {opc, 26'(word_target)};
  endfunction
  // branch offset from the branch at word index `at` to word index `to`
  function automatic int boff(int at, int to);
    return to - (at + 1);
  endfunction

  localparam logic [31:0] I_BREAK = {OPC_SPECIAL, 20'h0, FN_BREAK};

  // ---------------------------------------------------------------------
  // Program "prefix": prefix sums of N words, a call and a return.
  //   A[i] at byte 0 + 4i, prefix sums to byte 256 + 4i, result to byte 512.
  //   Exercises load-use stalls, loop branches, JAL/JR, shifts and BREAK.
  // ---------------------------------------------------------------------
  function automatic prog_t prog_prefix(int n);
    prog_t p;
    p.push_back(itype(OPC_ADDIU, 0, 1, 0));          // 0  r1 = 0
    p.push_back(itype(OPC_ADDIU, 0, 2, n));          // 1  r2 = n
    p.push_back(itype(OPC_ADDIU, 0, 3, 0));          // 2  r3 = 0
    p.push_back(itype(OPC_LUI,   0, 8, 0));          // 3  r8 = 0
    p.push_back(itype(OPC_LW,    8, 4, 0));          // 4  loop: r4 = A[i]
    p.push_back(rtype(FN_ADDU,   3, 4, 3));          // 5  r3 += r4
    p.push_back(itype(OPC_SW,    8, 3, 256));        // 6  B[i] = r3
    p.push_back(itype(OPC_ADDIU, 8, 8, 4));          // 7  r8 += 4
    p.push_back(itype(OPC_ADDIU, 1, 1, 1));          // 8  r1 += 1
    p.push_back(itype(OPC_BNE,   1, 2, boff(9, 4))); // 9  if (r1 != r2) loop
    p.push_back(jtype(OPC_JAL, 13));                 // 10 call f
    p.push_back(itype(OPC_SW,    0, 5, 512));        // 11 M[512] = r5
    p.push_back(I_BREAK);                            // 12
    p.push_back(rtype(FN_SLL,    0, 3, 5, 2));       // 13 f: r5 = r3 << 2
    p.push_back(rtype(FN_XOR,    5, 1, 5));          // 14    r5 ^= r1
    p.push_back(rtype(FN_JR,    31, 0, 0));          // 15    return
    return p;
  endfunction
  function automatic int prefix_instret(int n);
    return 4 + 6 * n + 1 + 3 + 1 + 1;
  endfunction

  // ---------------------------------------------------------------------
  // Program "vvadd": C[i] = A[i] + B[i] for N words.
  //   A at byte 0, B at byte 1024, C at byte 2048.
  // ---------------------------------------------------------------------
  function automatic prog_t prog_vvadd(int n);
    prog_t p;
    p.push_back(itype(OPC_ADDIU, 0, 1, 0));          // 0 r1 = 0 (byte offset)
    p.push_back(itype(OPC_ADDIU, 0, 2, 4 * n));      // 1 r2 = 4n
    p.push_back(itype(OPC_LW,    1, 3, 0));          // 2 loop: r3 = A[i]
    p.push_back(itype(OPC_LW,    1, 4, 1024));       // 3 r4 = B[i]
    p.push_back(rtype(FN_ADDU,   3, 4, 5));          // 4 r5 = r3 + r4
    p.push_back(itype(OPC_SW,    1, 5, 2048));       // 5 C[i] = r5
    p.push_back(itype(OPC_ADDIU, 1, 1, 4));          // 6 r1 += 4
    p.push_back(itype(OPC_BNE,   1, 2, boff(7, 2))); // 7 if (r1 != r2) loop
    p.push_back(I_BREAK);                            // 8
    return p;
  endfunction
  function automatic int vvadd_instret(int n);
    return 2 + 6 * n + 1;
  endfunction

  // ---------------------------------------------------------------------
  // Program "multiply": C = A * B by shift-and-add for N pairs.
  //   A at byte 0, B at byte 1024, products to byte 2048.
  // ---------------------------------------------------------------------
  function automatic prog_t prog_multiply(int n);
    prog_t p;
    p.push_back(itype(OPC_ADDIU, 0, 1, 0));          // 0  r1 = 0 (byte offset)
    p.push_back(itype(OPC_ADDIU, 0, 2, 4 * n));      // 1  r2 = 4n
    p.push_back(itype(OPC_LW,    1, 3, 0));          // 2  outer: r3 = a
    p.push_back(itype(OPC_LW,    1, 4, 1024));       // 3  r4 = b
    p.push_back(itype(OPC_ADDIU, 0, 5, 0));          // 4  r5 = 0
    p.push_back(itype(OPC_BEQ,   4, 0, boff(5, 12)));// 5  inner: if b == 0 done
    p.push_back(itype(OPC_ANDI,  4, 6, 1));          // 6  r6 = b & 1
    p.push_back(itype(OPC_BEQ,   6, 0, boff(7, 9))); // 7  if !r6 skip
    p.push_back(rtype(FN_ADDU,   5, 3, 5));          // 8  r5 += a
    p.push_back(rtype(FN_SLL,    0, 3, 3, 1));       // 9  a <<= 1
    p.push_back(rtype(FN_SRL,    0, 4, 4, 1));       // 10 b >>= 1
    p.push_back(jtype(OPC_J, 5));                    // 11 goto inner
    p.push_back(itype(OPC_SW,    1, 5, 2048));       // 12 done: C[i] = r5
    p.push_back(itype(OPC_ADDIU, 1, 1, 4));          // 13 r1 += 4
    p.push_back(itype(OPC_BNE,   1, 2, boff(14, 2)));// 14 if (r1 != r2) outer
    p.push_back(I_BREAK);                            // 15
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // Program "median": 3-point median filter over N signed words.
  //   A at byte 0; B[i] = median(A[i-1], A[i], A[i+1]) for 0 < i < N-1,
  //   written to byte 1024 + 4i.
  // ---------------------------------------------------------------------
  function automatic prog_t prog_median(int n);
    prog_t p;
    p.push_back(itype(OPC_ADDIU, 0, 1, 4));            // 0  r1 = 4 (byte of A[1])
    p.push_back(itype(OPC_ADDIU, 0, 2, 4 * (n - 1)));  // 1  r2 = byte of A[n-1]
    p.push_back(itype(OPC_LW,    1, 3, -4));           // 2  loop: r3 = a
    p.push_back(itype(OPC_LW,    1, 4, 0));            // 3  r4 = b
    p.push_back(itype(OPC_LW,    1, 5, 4));            // 4  r5 = c
    p.push_back(rtype(FN_SLT,    4, 3, 6));            // 5  r6 = b < a
    p.push_back(itype(OPC_BEQ,   6, 0, boff(6, 10)));  // 6  ordered: skip swap
    p.push_back(rtype(FN_ADDU,   3, 0, 7));            // 7  swap a and b
    p.push_back(rtype(FN_ADDU,   4, 0, 3));            // 8
    p.push_back(rtype(FN_ADDU,   7, 0, 4));            // 9
    p.push_back(rtype(FN_SLT,    5, 4, 6));            // 10 r6 = c < b
    p.push_back(itype(OPC_BEQ,   6, 0, boff(11, 13))); // 11
    p.push_back(rtype(FN_ADDU,   5, 0, 4));            // 12 r4 = min(b, c)
    p.push_back(rtype(FN_SLT,    4, 3, 6));            // 13 r6 = r4 < a
    p.push_back(itype(OPC_BEQ,   6, 0, boff(14, 16))); // 14
    p.push_back(rtype(FN_ADDU,   3, 0, 4));            // 15 r4 = a
    p.push_back(itype(OPC_SW,    1, 4, 1024));         // 16 B[i] = r4
    p.push_back(itype(OPC_ADDIU, 1, 1, 4));            // 17
    p.push_back(itype(OPC_BNE,   1, 2, boff(18, 2)));  // 18
    p.push_back(I_BREAK);                              // 19
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // Program "towers": recursive Towers of Hanoi with N discs from peg 1 to
  //   peg 3. Each move is stored as (from << 4) | to at byte 1024 + 4k; the
  //   end pointer of the move list is stored at byte 0. Stack grows down
  //   from byte 4092 (r29), return addresses in r31.
  // ---------------------------------------------------------------------
  function automatic prog_t prog_towers(int n);
    prog_t p;
    p.push_back(itype(OPC_ADDIU, 0, 29, 4092));        // 0  sp
    p.push_back(itype(OPC_ADDIU, 0, 8, 1024));         // 1  move pointer
    p.push_back(itype(OPC_ADDIU, 0, 4, n));            // 2  discs
    p.push_back(itype(OPC_ADDIU, 0, 5, 1));            // 3  from
    p.push_back(itype(OPC_ADDIU, 0, 6, 3));            // 4  to
    p.push_back(itype(OPC_ADDIU, 0, 7, 2));            // 5  via
    p.push_back(jtype(OPC_JAL, 9));                    // 6  hanoi(n, 1, 3, 2)
    p.push_back(itype(OPC_SW,    0, 8, 0));            // 7  M[0] = end pointer
    p.push_back(I_BREAK);                              // 8
    p.push_back(itype(OPC_BEQ,   4, 0, boff(9, 34)));  // 9  hanoi: n == 0 -> return
    p.push_back(itype(OPC_ADDIU, 29, 29, -20));        // 10 push frame
    p.push_back(itype(OPC_SW,    29, 31, 0));          // 11
    p.push_back(itype(OPC_SW,    29, 4, 4));           // 12
    p.push_back(itype(OPC_SW,    29, 5, 8));           // 13
    p.push_back(itype(OPC_SW,    29, 6, 12));          // 14
    p.push_back(itype(OPC_SW,    29, 7, 16));          // 15
    p.push_back(itype(OPC_ADDIU, 4, 4, -1));           // 16 hanoi(n-1, from, via, to)
    p.push_back(rtype(FN_ADDU,   6, 0, 9));            // 17
    p.push_back(rtype(FN_ADDU,   7, 0, 6));            // 18
    p.push_back(rtype(FN_ADDU,   9, 0, 7));            // 19
    p.push_back(jtype(OPC_JAL, 9));                    // 20
    p.push_back(itype(OPC_LW,    29, 5, 8));           // 21 record move from -> to
    p.push_back(itype(OPC_LW,    29, 6, 12));          // 22
    p.push_back(rtype(FN_SLL,    0, 5, 9, 4));         // 23
    p.push_back(rtype(FN_OR,     9, 6, 9));            // 24
    p.push_back(itype(OPC_SW,    8, 9, 0));            // 25
    p.push_back(itype(OPC_ADDIU, 8, 8, 4));            // 26
    p.push_back(itype(OPC_LW,    29, 4, 4));           // 27 hanoi(n-1, via, to, from)
    p.push_back(itype(OPC_ADDIU, 4, 4, -1));           // 28
    p.push_back(itype(OPC_LW,    29, 5, 16));          // 29
    p.push_back(itype(OPC_LW,    29, 7, 8));           // 30
    p.push_back(jtype(OPC_JAL, 9));                    // 31
    p.push_back(itype(OPC_LW,    29, 31, 0));          // 32 pop frame
    p.push_back(itype(OPC_ADDIU, 29, 29, 20));         // 33
    p.push_back(rtype(FN_JR,     31, 0, 0));           // 34 return
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // Program "qsort": recursive quick sort (last element as pivot) of N
  //   signed words at byte 0, sorted in place. qs(lo, hi) takes byte
  //   addresses in r4/r5; stack from byte 4092 (r29).
  // ---------------------------------------------------------------------
  function automatic prog_t prog_qsort(int n);
    prog_t p;
    p.push_back(itype(OPC_ADDIU, 0, 29, 4092));        // 0  sp
    p.push_back(itype(OPC_ADDIU, 0, 4, 0));            // 1  lo
    p.push_back(itype(OPC_ADDIU, 0, 5, 4 * (n - 1)));  // 2  hi
    p.push_back(jtype(OPC_JAL, 5));                    // 3  qs(lo, hi)
    p.push_back(I_BREAK);                              // 4
    p.push_back(rtype(FN_SLT,    4, 5, 9));            // 5  qs: lo < hi ?
    p.push_back(itype(OPC_BEQ,   9, 0, boff(6, 36)));  // 6  no -> return
    p.push_back(itype(OPC_ADDIU, 29, 29, -16));        // 7  push frame
    p.push_back(itype(OPC_SW,    29, 31, 0));          // 8
    p.push_back(itype(OPC_SW,    29, 4, 4));           // 9
    p.push_back(itype(OPC_SW,    29, 5, 8));           // 10
    p.push_back(itype(OPC_LW,    5, 10, 0));           // 11 pivot = A[hi]
    p.push_back(rtype(FN_ADDU,   4, 0, 11));           // 12 i = lo
    p.push_back(rtype(FN_ADDU,   4, 0, 12));           // 13 j = lo
    p.push_back(itype(OPC_BEQ,   12, 5, boff(14, 24)));// 14 loop: j == hi -> end
    p.push_back(itype(OPC_LW,    12, 13, 0));          // 15 A[j]
    p.push_back(rtype(FN_SLT,    13, 10, 9));          // 16 A[j] < pivot ?
    p.push_back(itype(OPC_BEQ,   9, 0, boff(17, 22))); // 17
    p.push_back(itype(OPC_LW,    11, 14, 0));          // 18 swap A[i], A[j]
    p.push_back(itype(OPC_SW,    11, 13, 0));          // 19
    p.push_back(itype(OPC_SW,    12, 14, 0));          // 20
    p.push_back(itype(OPC_ADDIU, 11, 11, 4));          // 21 i++
    p.push_back(itype(OPC_ADDIU, 12, 12, 4));          // 22 j++
    p.push_back(jtype(OPC_J, 14));                     // 23
    p.push_back(itype(OPC_LW,    11, 14, 0));          // 24 end: swap A[i], A[hi]
    p.push_back(itype(OPC_SW,    11, 10, 0));          // 25
    p.push_back(itype(OPC_SW,    5, 14, 0));           // 26
    p.push_back(itype(OPC_SW,    29, 11, 12));         // 27 save pivot position
    p.push_back(itype(OPC_ADDIU, 11, 5, -4));          // 28 qs(lo, p-1)
    p.push_back(jtype(OPC_JAL, 5));                    // 29
    p.push_back(itype(OPC_LW,    29, 11, 12));         // 30
    p.push_back(itype(OPC_ADDIU, 11, 4, 4));           // 31 qs(p+1, hi)
    p.push_back(itype(OPC_LW,    29, 5, 8));           // 32
    p.push_back(jtype(OPC_JAL, 5));                    // 33
    p.push_back(itype(OPC_LW,    29, 31, 0));          // 34 pop frame
    p.push_back(itype(OPC_ADDIU, 29, 29, 16));         // 35
    p.push_back(rtype(FN_JR,     31, 0, 0));           // 36 return
    return p;
  endfunction

endpackage
