// program_memory: synthesized look-up table of 72-bit control vectors.
//
// The program memory is indexed directly by the PC and returns the full
// control vector for that cycle; there is no instruction word and no
// decoder in between (the published design found this smaller than a 16-bit program
// with a decoder). Its size (1662 entries of 72 bits) is the published design's.
// Read is combinational.
//
// The published design's ECDSA firmware is not published, so the table holds a
// program of this design's own, computed by the function build() below, that
// exercises the datapath the way the published design's field arithmetic does:
//   main   waits for a non-zero start word in I/O, copies two 192-bit
//          operands A and B from I/O to data RAM, CALLs FADD if the start
//          word is 2, FSUB if it is 3, MMUL if it is 4 and FMUL otherwise,
//          copies the result to the I/O outputs and writes a done word,
//          then halts.
//   FMUL   computes A*B mod p192 with fully unrolled loops:
//          - product scanning: per column k the pairs A[i]*B[k-i] are
//            accumulated with the load/MOVNF/MULACC overlap of the
//            published design's example code, the low word is stored and the accumulator
//            shifted right (STR Acc0 || RSACC in one vector);
//          - fast reduction for p192 = 2^192 - 2^64 - 1: with 64-bit
//            chunks c0..c5 of the product, R = (c2,c1,c0) + (0,c3,c3) +
//            (c4,c4,0) + (c5,c5,c5), summed word by word in the
//            accumulator (each word multiplied by W1 = 1);
//          - two folding passes adding carry*(2^64+1);
//          - D = R - p with SUB/SBC against p from the constant ROM, and a
//            branch on the final borrow choosing R or D; then RET.
//   FADD   (entry 660) A+B mod p for A, B < p: R = A + B with ADD/ADC, the
//          carry kept in W3, D = R - p; D is taken if the addition carried
//          or the subtraction did not borrow.
//   FSUB   (entry 780) A-B mod p for A, B < p: R = A - B with SUB/SBC, and
//          p is added back with ADD/ADC on a borrow.
//   MMUL   (entry 880) Montgomery product A*B*2^-192 mod n for A, B < n,
//          n the order of the base point, in the finely integrated product
//          scanning form the published design names for its arithmetic modulo n.
//          It is unrolled, where the published design loops to save entries.
//          -n^-1 mod 2^16 is an immediate computed here by Newton steps.
// Data RAM layout: A 0..11, B 12..23, product T 24..47 (MMUL: m words
// 24..35), R 48..59, D 60..71, carry 72, MMUL's saved accumulator words
// 73..74; the stack grows down from the top of RAM.
// Entries that the program does not use hold HALT.
// The table is driven by a continuous assignment of build(), which has no
// inputs, so synthesis folds it into a constant look-up table. It is not a
// localparam because Verilator 5 drops field writes to this 72-bit struct
// when it evaluates the function as a constant.
module program_memory
  import ecp_pkg::*;
#(
  parameter int unsigned DEPTH = PM_DEPTH
) (
  input  logic [PC_W-1:0] pc,
  output ctrl_t           ctrl
);
  localparam int unsigned A_AD = 0, B_AD = 12, T_AD = 24, R_AD = 48,
                          D_AD = 60, CT_AD = 72;
  localparam int unsigned FMUL_AD = 160, FADD_AD = 660, FSUB_AD = 780, MMUL_AD = 880;
  localparam int unsigned M_AD = 24, SV_AD = 73;  // MMUL: m words, saved ACC1/ACC2

  typedef ctrl_t [DEPTH-1:0] image_t;

  function automatic ctrl_t halt_w();
    ctrl_t x = CTRL_NOP;
    x.br_op = BR_HALT;
    return x;
  endfunction

  function automatic ctrl_t ld(ctrl_t x, addr_base_e b, int unsigned off);
    x.mem_op = MEM_LD; x.addr_base = b; x.addr_off = 8'(off);
    return x;
  endfunction

  function automatic ctrl_t st(ctrl_t x, addr_base_e b, int unsigned off, st_src_e s);
    x.mem_op = MEM_ST; x.addr_base = b; x.addr_off = 8'(off); x.st_src = s;
    return x;
  endfunction

  function automatic ctrl_t movnf(ctrl_t x, int unsigned r);
    x.movnf = 1'b1; x.movnf_reg = 2'(r);
    return x;
  endfunction

  function automatic ctrl_t mulacc(ctrl_t x, int unsigned ra, logic clr, logic shr);
    x.mac_op = MAC_ACC; x.mac_a = 2'(ra); x.mac_b = MB_RDATA;
    x.acc_clr = clr; x.acc_shr = shr;
    return x;
  endfunction

  function automatic ctrl_t aluop(ctrl_t x, alu_op_e op, alu_a_e a, alu_b_e b,
                                  word_t imm, logic wr, rd_sel_e rd, logic fl);
    x.alu_op = op; x.alu_a = a; x.alu_b = b; x.imm = imm;
    x.rd_we = wr; x.rd_sel = rd; x.flags_we = fl;
    return x;
  endfunction

  function automatic ctrl_t br(ctrl_t x, br_op_e op, int unsigned target);
    x.br_op = op; x.br_target = PC_W'(target);
    return x;
  endfunction

  // product words (chunk index) summed into output word w of the reduction
  function automatic int unsigned red_src(int unsigned w, int unsigned t);
    unique case (w / 4)
      0:       return (t == 0) ? 0 : (t == 1) ? 3 : 5;
      1:       return (t == 0) ? 1 : (t == 1) ? 3 : (t == 2) ? 4 : 5;
      default: return (t == 0) ? 2 : (t == 1) ? 4 : 5;
    endcase
  endfunction

  // -n^-1 mod 2^16 from the lowest word of n, by Newton steps
  // x <- x * (2 - n0 * x), each of which doubles the number of correct bits.
  function automatic word_t neg_inv16(word_t n0);
    word_t x = 16'd1;
    for (int unsigned i = 0; i < 5; i++) x = x * (16'd2 - n0 * x);
    return -x;
  endfunction

  // Builds the whole table. Every vector is written as r[wp] followed by
  // wp++; entries never written hold HALT.
  function automatic image_t build();
    image_t      r;
    int unsigned wp, poll, bc_at, n, ilo, ihi, np;
    int unsigned bz_at [3], jmp_at [3];
    addr_base_e  xb [24], yb [24];    // one column of MMUL: word pairs x*y
    int unsigned xo [24], yo [24];
    ctrl_t       x, y;  // y: helper result passed on to a second helper
    for (int unsigned i = 0; i < DEPTH; i++) r[i] = halt_w();
    wp = 0;

    // ---------------- main ----------------
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, IO_BASE, 1'b1, RD_B0, 1'b0); wp++;
    poll = wp;
    r[wp] = ld(CTRL_NOP, AB_B0, FW_IO_START); wp++;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b1, RD_W3, 1'b1); wp++;
    r[wp] = br(CTRL_NOP, BR_Z, poll); wp++;
    for (int unsigned i = 0; i < 24; i++) begin
      r[wp] = ld(CTRL_NOP, AB_B0, FW_IO_A + i); wp++;
      y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b0, RD_W0, 1'b0);
      r[wp] = st(y,
                 AB_ABS, A_AD + i, ST_ALU); wp++;
    end
    // dispatch on the start word: 2 add, 3 subtract, 4 Montgomery multiply
    // modulo n, anything else multiply modulo p
    for (int unsigned k = 0; k < 3; k++) begin
      r[wp] = aluop(CTRL_NOP, ALU_SUB, AA_W3, AB_IMM, 16'(k + 2), 1'b0, RD_W0, 1'b1); wp++;
      bz_at[k] = wp; wp++;                     // BZ, target filled in below
    end
    r[wp] = br(CTRL_NOP, BR_CALL, FMUL_AD); wp++;
    for (int unsigned k = 0; k < 3; k++) begin
      jmp_at[k] = wp; wp++;                    // JMP to the copy-out below
      r[bz_at[k]] = br(CTRL_NOP, BR_Z, wp);
      r[wp] = br(CTRL_NOP, BR_CALL, (k == 0) ? FADD_AD : (k == 1) ? FSUB_AD : MMUL_AD); wp++;
    end
    for (int unsigned k = 0; k < 3; k++) r[jmp_at[k]] = br(CTRL_NOP, BR_JMP, wp);
    for (int unsigned i = 0; i < 12; i++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, R_AD + i); wp++;
      y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b0, RD_W0, 1'b0);
      r[wp] = st(y,
                 AB_B0, IO_N_IN + FW_OUT_R + i, ST_ALU); wp++;
    end
    y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, 16'd1, 1'b0, RD_W0, 1'b0);
    r[wp] = st(y,
               AB_B0, IO_N_IN + FW_OUT_DONE, ST_ALU); wp++;
    r[wp] = halt_w(); wp++;

    // ---------------- FMUL ----------------
    wp = FMUL_AD;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, 16'd1, 1'b1, RD_W1, 1'b0); wp++;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, ROM_BASE, 1'b1, RD_B1, 1'b0); wp++;
    // product scanning, columns 0..22
    for (int unsigned k = 0; k < 23; k++) begin
      ilo = (k > 11) ? k - 11 : 0;
      ihi = (k < 11) ? k : 11;
      for (int unsigned i = ilo; i <= ihi; i++) begin
        if (i == ilo) x = CTRL_NOP;
        else          x = mulacc(CTRL_NOP, 0, 1'b0, 1'b0);
        r[wp] = ld(x, AB_ABS, A_AD + i); wp++;
        y = movnf(CTRL_NOP, 0);
        r[wp] = ld(y, AB_ABS, B_AD + k - i); wp++;
      end
      // column 0 starts the accumulator from zero
      y = mulacc(CTRL_NOP, 0, k == 0, 1'b1);
      r[wp] = st(y, AB_ABS, T_AD + k, ST_ACC0); wp++;
    end
    x = st(CTRL_NOP, AB_ABS, T_AD + 23, ST_ACC0);
    x.acc_shr = 1'b1;  // store the top word; the accumulator becomes 0
    r[wp] = x; wp++;
    // fast reduction, one output word at a time
    for (int unsigned w = 0; w < 12; w++) begin
      n = (w / 4 == 1) ? 4 : 3;
      r[wp] = ld(CTRL_NOP, AB_ABS, T_AD + 4*red_src(w, 0) + w % 4); wp++;
      for (int unsigned t = 1; t < n; t++) begin
        y = mulacc(CTRL_NOP, 1, 1'b0, 1'b0);
        r[wp] = ld(y, AB_ABS, T_AD + 4*red_src(w, t) + w % 4); wp++;
      end
      y = mulacc(CTRL_NOP, 1, 1'b0, 1'b1);
      r[wp] = st(y, AB_ABS, R_AD + w, ST_ACC0); wp++;
    end
    x = st(CTRL_NOP, AB_ABS, CT_AD, ST_ACC0);
    x.acc_shr = 1'b1;  // store the carry and clear the accumulator
    r[wp] = x; wp++;
    // two passes of R += carry * (2^64 + 1)
    for (int unsigned pass = 0; pass < 2; pass++) begin
      for (int unsigned w = 0; w < 12; w++) begin
        r[wp] = ld(CTRL_NOP, AB_ABS, R_AD + w); wp++;
        if (w == 0 || w == 4) begin
          y = mulacc(CTRL_NOP, 1, 1'b0, 1'b0);
          r[wp] = ld(y, AB_ABS, CT_AD); wp++;
        end
        y = mulacc(CTRL_NOP, 1, 1'b0, 1'b1);
        r[wp] = st(y, AB_ABS, R_AD + w, ST_ACC0); wp++;
      end
      x = st(CTRL_NOP, AB_ABS, CT_AD, ST_ACC0);
      x.acc_shr = 1'b1;
      r[wp] = x; wp++;
    end
    // D = R - p
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, R_AD + w); wp++;
      y = movnf(CTRL_NOP, 2);
      r[wp] = ld(y, AB_B1, ROM_P + w); wp++;
      y = aluop(CTRL_NOP, (w == 0) ? ALU_SUB : ALU_SBC, AA_W2, AB_RDATA, '0,
                       1'b0, RD_W0, 1'b1);
      r[wp] = st(y, AB_ABS, D_AD + w, ST_ALU); wp++;
    end
    bc_at = wp;
    wp++;                                      // BC, target filled in below
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, D_AD + w); wp++;
      y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b0, RD_W0, 1'b0);
      r[wp] = st(y,
                 AB_ABS, R_AD + w, ST_ALU); wp++;
    end
    r[bc_at] = br(CTRL_NOP, BR_C, wp);         // borrow: R < p, keep R
    r[wp] = br(CTRL_NOP, BR_RET, 0); wp++;

    // ---------------- FADD ----------------
    // R = A + B with the carry kept in W3, then D = R - p. D is the result
    // if the addition carried or if the subtraction did not borrow.
    wp = FADD_AD;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, ROM_BASE, 1'b1, RD_B1, 1'b0); wp++;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, '0, 1'b1, RD_W3, 1'b0); wp++;
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, A_AD + w); wp++;
      y = movnf(CTRL_NOP, 2);
      r[wp] = ld(y, AB_ABS, B_AD + w); wp++;
      y = aluop(CTRL_NOP, (w == 0) ? ALU_ADD : ALU_ADC, AA_W2, AB_RDATA, '0,
                1'b0, RD_W0, 1'b1);
      r[wp] = st(y, AB_ABS, R_AD + w, ST_ALU); wp++;
    end
    r[wp] = aluop(CTRL_NOP, ALU_ADC, AA_W3, AB_IMM, '0, 1'b1, RD_W3, 1'b0); wp++;
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, R_AD + w); wp++;
      y = movnf(CTRL_NOP, 2);
      r[wp] = ld(y, AB_B1, ROM_P + w); wp++;
      y = aluop(CTRL_NOP, (w == 0) ? ALU_SUB : ALU_SBC, AA_W2, AB_RDATA, '0,
                1'b0, RD_W0, 1'b1);
      r[wp] = st(y, AB_ABS, D_AD + w, ST_ALU); wp++;
    end
    r[wp] = br(CTRL_NOP, BR_NC, wp + 3); wp++;  // no borrow: R >= p, take D
    r[wp] = aluop(CTRL_NOP, ALU_PASSA, AA_W3, AB_IMM, '0, 1'b0, RD_W0, 1'b1); wp++;
    r[wp] = br(CTRL_NOP, BR_Z, wp + 25); wp++;  // no carry either: keep R
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, D_AD + w); wp++;
      y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b0, RD_W0, 1'b0);
      r[wp] = st(y, AB_ABS, R_AD + w, ST_ALU); wp++;
    end
    r[wp] = br(CTRL_NOP, BR_RET, 0); wp++;

    // ---------------- FSUB ----------------
    // R = A - B; on a borrow, R += p.
    wp = FSUB_AD;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, ROM_BASE, 1'b1, RD_B1, 1'b0); wp++;
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, A_AD + w); wp++;
      y = movnf(CTRL_NOP, 2);
      r[wp] = ld(y, AB_ABS, B_AD + w); wp++;
      y = aluop(CTRL_NOP, (w == 0) ? ALU_SUB : ALU_SBC, AA_W2, AB_RDATA, '0,
                1'b0, RD_W0, 1'b1);
      r[wp] = st(y, AB_ABS, R_AD + w, ST_ALU); wp++;
    end
    r[wp] = br(CTRL_NOP, BR_NC, wp + 37); wp++; // no borrow: R is the result
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, R_AD + w); wp++;
      y = movnf(CTRL_NOP, 2);
      r[wp] = ld(y, AB_B1, ROM_P + w); wp++;
      y = aluop(CTRL_NOP, (w == 0) ? ALU_ADD : ALU_ADC, AA_W2, AB_RDATA, '0,
                1'b0, RD_W0, 1'b1);
      r[wp] = st(y, AB_ABS, R_AD + w, ST_ALU); wp++;
    end
    r[wp] = br(CTRL_NOP, BR_RET, 0); wp++;

    // ---------------- MMUL ----------------
    // Montgomery product A*B*2^-192 mod n for A, B < n, in the finely
    // integrated product scanning form. Column i accumulates A[j]*B[i-j]
    // and M[j]*N[i-j]. For i < 12 the new word M[i] = ACC0 * (-n^-1) mod
    // 2^16 is formed with MUL after saving ACC1/ACC2, the accumulator is
    // restored, and M[i]*N[0] clears ACC0 before the shift. Columns 12..22
    // give result words 0..10; the rest of the accumulator gives word 11
    // and a carry. A final subtraction of n brings the result below n.
    wp = MMUL_AD;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_IMM, ROM_BASE, 1'b1, RD_B1, 1'b0); wp++;
    for (int unsigned i = 0; i < 23; i++) begin
      ilo = (i > 11) ? i - 11 : 0;
      ihi = (i < 11) ? i : 11;
      np = 0;
      for (int unsigned j = ilo; j <= ihi; j++) begin
        xb[np] = AB_ABS; xo[np] = A_AD + j; yb[np] = AB_ABS; yo[np] = B_AD + i - j; np++;
      end
      for (int unsigned j = ilo; j <= ihi; j++) begin
        if (j < i) begin
          xb[np] = AB_ABS; xo[np] = M_AD + j; yb[np] = AB_B1; yo[np] = ROM_N + i - j; np++;
        end
      end
      for (int unsigned q = 0; q < np; q++) begin
        if (q == 0) x = CTRL_NOP;
        else        x = mulacc(CTRL_NOP, 0, 1'b0, 1'b0);
        r[wp] = ld(x, xb[q], xo[q]); wp++;
        y = movnf(CTRL_NOP, 0);
        r[wp] = ld(y, yb[q], yo[q]); wp++;
      end
      if (i < 12) begin
        y = mulacc(CTRL_NOP, 0, i == 0, 1'b0);
        r[wp] = st(y, AB_ABS, SV_AD, ST_ACC1); wp++;
        y = aluop(CTRL_NOP, ALU_PASSA, AA_ACC0, AB_IMM, '0, 1'b1, RD_W3, 1'b0);
        r[wp] = st(y, AB_ABS, SV_AD + 1, ST_ACC2); wp++;
        x = st(CTRL_NOP, AB_ABS, M_AD + i, ST_ACC0);
        x.mac_op = MAC_LOAD; x.mac_a = 2'd3; x.mac_b = MB_IMM;
        x.imm = neg_inv16(P192_N[15:0]);     // ACC = W3 * (-n^-1); M[i] = ACC0
        r[wp] = x; wp++;
        y = aluop(CTRL_NOP, ALU_PASSA, AA_W3, AB_IMM, '0, 1'b1, RD_ACC0, 1'b0);
        r[wp] = ld(y, AB_ABS, SV_AD); wp++;
        y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b1, RD_ACC1, 1'b0);
        r[wp] = ld(y, AB_ABS, SV_AD + 1); wp++;
        y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b1, RD_ACC2, 1'b0);
        r[wp] = ld(y, AB_ABS, M_AD + i); wp++;
        y = movnf(CTRL_NOP, 0);
        r[wp] = ld(y, AB_B1, ROM_N); wp++;
        r[wp] = mulacc(CTRL_NOP, 0, 1'b0, 1'b1); wp++;  // ACC0 is now zero
      end else begin
        y = mulacc(CTRL_NOP, 0, 1'b0, 1'b1);
        r[wp] = st(y, AB_ABS, R_AD + i - 12, ST_ACC0); wp++;
      end
    end
    x = st(CTRL_NOP, AB_ABS, R_AD + 11, ST_ACC0);
    x.acc_shr = 1'b1;
    r[wp] = x; wp++;
    x = st(CTRL_NOP, AB_ABS, CT_AD, ST_ACC0);
    x.acc_shr = 1'b1;                          // carry word; accumulator now 0
    r[wp] = x; wp++;
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, R_AD + w); wp++;
      y = movnf(CTRL_NOP, 2);
      r[wp] = ld(y, AB_B1, ROM_N + w); wp++;
      y = aluop(CTRL_NOP, (w == 0) ? ALU_SUB : ALU_SBC, AA_W2, AB_RDATA, '0,
                1'b0, RD_W0, 1'b1);
      r[wp] = st(y, AB_ABS, D_AD + w, ST_ALU); wp++;
    end
    r[wp] = br(CTRL_NOP, BR_NC, wp + 4); wp++;  // no borrow: take D
    r[wp] = ld(CTRL_NOP, AB_ABS, CT_AD); wp++;
    r[wp] = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b0, RD_W0, 1'b1); wp++;
    r[wp] = br(CTRL_NOP, BR_Z, wp + 25); wp++;  // no carry either: keep R
    for (int unsigned w = 0; w < 12; w++) begin
      r[wp] = ld(CTRL_NOP, AB_ABS, D_AD + w); wp++;
      y = aluop(CTRL_NOP, ALU_PASSB, AA_W0, AB_RDATA, '0, 1'b0, RD_W0, 1'b0);
      r[wp] = st(y, AB_ABS, R_AD + w, ST_ALU); wp++;
    end
    r[wp] = br(CTRL_NOP, BR_RET, 0); wp++;
    return r;
  endfunction

  image_t image;
  assign image = build();

  if ($bits(ctrl_t) != CTRL_W) begin : g_width_check
    $error("program_memory: control vector is not CTRL_W bits");
  end

  assign ctrl = (int'(pc) < DEPTH) ? image[pc] : halt_w();
endmodule
