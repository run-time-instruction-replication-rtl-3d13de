// tb_workloads: runs ten kernels of the kinds the design is evaluated on
// (a multiplication-heavy 4x4 matrix multiply, a low-ILP bitwise CRC-32, an
// 8-tap FIR filter, a bit count of 16 words, the sum of absolute
// differences of a 16-pixel block as in motion estimation, and an 8-point
// DCT as a product with integer cosine coefficients, and an 8-point
// fixed-point radix-2 FFT driven by a butterfly table, and a bit-serial
// Huffman decode of 40 symbols, and a branch-free IMA-style ADPCM encoder
// and decoder of 32 samples) unprotected, with duplication and with triplication,
// each with p = 0..5 permanently faulty units.  It prints the cycle counts,
// the overhead of p faults relative to p = 0, and the gain over a scheme
// that re-executes the operations of faulty units in an added time slot,
// estimated from below as twice the fault-free cycles of the same mode.
// The faulty units are declared through fu_disable, one more per step
// (MUL2, ALU4, MEM1, MUL6, ALU0), which always leaves a healthy unit of
// every class.  Every run's results are checked against values computed
// here; the cycle counts must not drop as faults are added, and a
// replicated run with no fault must take fewer cycles than copies x the
// unprotected run.
module tb_workloads;
  import vliw_pkg::*;
  import tb_isa_pkg::*;

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_OFF;
  logic imem_we = 0;
  logic [PC_W-1:0] imem_waddr = '0;
  bundle_t imem_wdata = '0;
  logic dmem_dbg_we = 0;
  logic [9:0] dmem_dbg_addr = '0;
  logic [XLEN-1:0] dmem_dbg_wdata = '0, dmem_dbg_rdata;
  logic [RIDX_W-1:0] rf_dbg_addr = '0;
  logic [XLEN-1:0] rf_dbg_rdata;
  logic [ISSUE_W-1:0][NCLASS-1:0] fi_flip = '0, fu_disable = '0, fu_faulty;
  logic commit_valid, fetch_stall, ts_valid, ts_reexec, replay, redirect;
  logic [PC_W-1:0] commit_pc;
  logic err_detected, err_corrected, err_uncorrectable, perm_declared, out_of_service;

  vliw_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  bundle_t prog [$];
  int end_pc;

  task automatic emit(bundle_t b); prog.push_back(b); endtask

  task automatic load();
    for (int k = 0; k < prog.size(); k++) begin
      @(negedge clk) imem_we = 1; imem_waddr = PC_W'(k); imem_wdata = prog[k];
    end
    @(negedge clk) imem_we = 0;
  endtask

  task automatic dw(int a, logic [31:0] v);
    @(negedge clk) dmem_dbg_we = 1; dmem_dbg_addr = 10'(a); dmem_dbg_wdata = v;
    @(negedge clk) dmem_dbg_we = 0;
  endtask

  function automatic logic [31:0] dr(int a); return dut.u_wb.u_dmem.mem[a]; endfunction

  task automatic run(mode_e m, output int cycles);
    int start;
    mode = m;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = cyc;
    while (!(commit_valid && commit_pc == PC_W'(end_pc))) begin
      @(posedge clk);
      #1;
    end
    cycles = cyc - start;
  endtask

  // ---------------- matrix multiply 4x4 ----------------
  localparam int MA = 0, MB = 64, MC = 128;
  function automatic logic [31:0] ma(int i, int k); return 32'(i * 5 + k * 3 + 1); endfunction
  function automatic logic [31:0] mb(int k, int j); return 32'(k * 7 - j * 2 + 11); endfunction

  task automatic build_matmul();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[1] = op_i(OP_MOVI, 4, 0, 12); emit(b);
    for (int k = 0; k < 8; k++) begin                  // B into r20..r35
      b = '{default: NOP};
      b[1] = op_i(OP_LDW, 20 + 2*k, 0, MB + 2*k);
      b[5] = op_i(OP_LDW, 21 + 2*k, 0, MB + 2*k + 1);
      emit(b);
    end
    loop_pc = prog.size();
    for (int h = 0; h < 2; h++) begin                  // row of A into r10..r13
      b = '{default: NOP};
      b[1] = op_i(OP_LDW, 10 + 2*h, 1, MA + 2*h);
      b[5] = op_i(OP_LDW, 11 + 2*h, 1, MA + 2*h + 1);
      emit(b);
    end
    for (int j = 0; j < 4; j++) begin                  // products
      b = '{default: NOP};
      b[2] = op_r(OP_MUL, 40 + 4*j, 10, 20 + j);
      b[3] = op_r(OP_MUL, 41 + 4*j, 11, 24 + j);
      b[6] = op_r(OP_MUL, 42 + 4*j, 12, 28 + j);
      b[7] = op_r(OP_MUL, 43 + 4*j, 13, 32 + j);
      emit(b);
    end
    b = '{default: NOP};                               // pairwise sums
    for (int j = 0; j < 4; j++) begin
      b[2*j]   = op_r(OP_ADD, 56 + 2*j, 40 + 4*j, 41 + 4*j);
      b[2*j+1] = op_r(OP_ADD, 57 + 2*j, 42 + 4*j, 43 + 4*j);
    end
    emit(b);
    b = '{default: NOP};
    for (int j = 0; j < 4; j++) b[j] = op_r(OP_ADD, 16 + j, 56 + 2*j, 57 + 2*j);
    b[4] = op_i(OP_ADDI, 1, 1, 4);
    b[5] = op_r(OP_CMPNE, 3, 1, 4);
    emit(b);
    b = '{default: NOP};
    b[1] = op_st(16, 1, MC - 4); b[5] = op_st(17, 1, MC - 3);
    emit(b);
    b = '{default: NOP};
    b[0] = op_b(OP_BR, 3, loop_pc);
    b[1] = op_st(18, 1, MC - 2); b[5] = op_st(19, 1, MC - 1);
    emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_matmul();
    for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) begin
      dw(MA + 4*i + k, ma(i, k));
      dw(MB + 4*i + k, mb(i, k));
      dw(MC + 4*i + k, 0);
    end
  endtask

  task automatic check_matmul(string tag);
    int bad = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      logic [31:0] e = 0;
      for (int k = 0; k < 4; k++) e += ma(i, k) * mb(k, j);
      if (dr(MC + 4*i + j) !== e) bad++;
    end
    expect_true(bad == 0, {tag, " matrix result"});
  endtask

  // ---------------- CRC-32 over four words ----------------
  localparam int CD = 0, CP = 100, CR = 200;
  localparam logic [31:0] POLY = 32'hEDB8_8320;
  function automatic logic [31:0] cw(int i); return 32'h1234_5678 * (i + 1) ^ 32'(i * 77); endfunction

  task automatic build_crc();
    bundle_t b;
    int w0, b0;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 2, 0, 4);
    b[3] = op_i(OP_MOVI, 3, 0, -1); b[1] = op_i(OP_LDW, 4, 0, CP);
    emit(b);
    w0 = prog.size();
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 5, 1, CD); b[0] = op_i(OP_MOVI, 6, 0, 32); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 3, 3, 5); b[1] = op_i(OP_ADDI, 1, 1, 1); emit(b);
    b0 = prog.size();
    b = '{default: NOP}; b[0] = op_i(OP_ANDI, 7, 3, 1); b[1] = op_i(OP_SHRI, 8, 3, 1); b[2] = op_i(OP_ADDI, 6, 6, -1); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SUB, 9, 0, 7); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 9, 9, 4); emit(b);
    b = '{default: NOP}; b[1] = op_r(OP_XOR, 3, 8, 9); b[0] = op_b(OP_BR, 6, b0); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_CMPNE, 10, 1, 2); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BR, 10, w0); emit(b);
    b = '{default: NOP}; b[1] = op_st(3, 0, CR); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_crc();
    for (int i = 0; i < 4; i++) dw(CD + i, cw(i));
    dw(CP, POLY);
    dw(CR, 0);
  endtask

  task automatic check_crc(string tag);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < 4; i++) begin
      c ^= cw(i);
      for (int k = 0; k < 32; k++) c = (c >> 1) ^ ((c[0]) ? POLY : 32'h0);
    end
    expect_true(dr(CR) === c, {tag, " crc result"});
  endtask

  // ---------------- 8-tap FIR, 16 outputs ----------------
  localparam int FX = 0, FH = 40, FY = 80, NTAP = 8, NOUT = 16;
  function automatic logic [31:0] fx(int i); return 32'(i * 3 + (i ^ 5) - 20); endfunction
  function automatic logic [31:0] fh(int k); return 32'(k * k - 3 * k + 2); endfunction

  task automatic build_fir();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 4, 0, NOUT); emit(b);
    for (int k = 0; k < NTAP / 2; k++) begin          // taps into r20..r27
      b = '{default: NOP};
      b[1] = op_i(OP_LDW, 20 + 2*k, 0, FH + 2*k);
      b[5] = op_i(OP_LDW, 21 + 2*k, 0, FH + 2*k + 1);
      emit(b);
    end
    loop_pc = prog.size();
    for (int k = 0; k < NTAP / 2; k++) begin          // window into r10..r17
      b = '{default: NOP};
      b[1] = op_i(OP_LDW, 10 + 2*k, 1, FX + 2*k);
      b[5] = op_i(OP_LDW, 11 + 2*k, 1, FX + 2*k + 1);
      emit(b);
    end
    for (int h = 0; h < 2; h++) begin                  // products into r30..r37
      b = '{default: NOP};
      b[2] = op_r(OP_MUL, 30 + 4*h, 10 + 4*h, 20 + 4*h);
      b[3] = op_r(OP_MUL, 31 + 4*h, 11 + 4*h, 21 + 4*h);
      b[6] = op_r(OP_MUL, 32 + 4*h, 12 + 4*h, 22 + 4*h);
      b[7] = op_r(OP_MUL, 33 + 4*h, 13 + 4*h, 23 + 4*h);
      emit(b);
    end
    b = '{default: NOP};                               // adder tree
    for (int j = 0; j < 4; j++) b[j] = op_r(OP_ADD, 40 + j, 30 + 2*j, 31 + 2*j);
    b[4] = op_i(OP_ADDI, 1, 1, 1);
    b[5] = op_r(OP_CMPNE, 3, 1, 4);
    emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_ADD, 44, 40, 41); b[1] = op_r(OP_ADD, 45, 42, 43); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 46, 44, 45); emit(b);
    b = '{default: NOP};
    b[0] = op_b(OP_BR, 3, loop_pc); b[1] = op_st(46, 1, FY - 1); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_fir();
    for (int i = 0; i < NOUT + NTAP - 1; i++) dw(FX + i, fx(i));
    for (int k = 0; k < NTAP; k++) dw(FH + k, fh(k));
    for (int n = 0; n < NOUT; n++) dw(FY + n, 0);
  endtask

  task automatic check_fir(string tag);
    int bad = 0;
    for (int n = 0; n < NOUT; n++) begin
      logic [31:0] e = 0;
      for (int k = 0; k < NTAP; k++) e += fx(n + k) * fh(k);
      if (dr(FY + n) !== e) bad++;
    end
    expect_true(bad == 0, {tag, " fir result"});
  endtask

  // ---------------- bit count of 16 words, two per iteration ----------------
  localparam int BD = 0, BK = 40, BR_ = 60, NBW = 16;
  function automatic logic [31:0] bw(int i); return 32'h9E37_79B9 * (i + 3) ^ (32'hFFFF << i); endfunction

  task automatic build_bcnt();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};                               // r20..r23: masks, r24: 0x01010101
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 4, 0, NBW); b[3] = op_i(OP_MOVI, 2, 0, 0);
    b[1] = op_i(OP_LDW, 20, 0, BK); b[5] = op_i(OP_LDW, 21, 0, BK + 1); emit(b);
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 22, 0, BK + 2); b[5] = op_i(OP_LDW, 24, 0, BK + 3); emit(b);
    loop_pc = prog.size();
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 10, 1, BD); b[5] = op_i(OP_LDW, 11, 1, BD + 1);
    b[0] = op_i(OP_ADDI, 1, 1, 2); emit(b);
    b = '{default: NOP};                               // a = x - ((x >> 1) & m1)
    b[0] = op_i(OP_SHRI, 30, 10, 1); b[1] = op_i(OP_SHRI, 31, 11, 1); b[2] = op_r(OP_CMPNE, 3, 1, 4); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 30, 30, 20); b[1] = op_r(OP_AND, 31, 31, 20); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SUB, 32, 10, 30); b[1] = op_r(OP_SUB, 33, 11, 31); emit(b);
    b = '{default: NOP};                               // b = (a & m2) + ((a >> 2) & m2)
    b[0] = op_i(OP_SHRI, 34, 32, 2); b[1] = op_i(OP_SHRI, 35, 33, 2);
    b[2] = op_r(OP_AND, 36, 32, 21); b[3] = op_r(OP_AND, 37, 33, 21); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 34, 34, 21); b[1] = op_r(OP_AND, 35, 35, 21); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 38, 34, 36); b[1] = op_r(OP_ADD, 39, 35, 37); emit(b);
    b = '{default: NOP};                               // c = (b + (b >> 4)) & m4
    b[0] = op_i(OP_SHRI, 40, 38, 4); b[1] = op_i(OP_SHRI, 41, 39, 4); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 40, 40, 38); b[1] = op_r(OP_ADD, 41, 41, 39); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 40, 40, 22); b[1] = op_r(OP_AND, 41, 41, 22); emit(b);
    b = '{default: NOP};                               // d = (c * 0x01010101) >> 24
    b[2] = op_r(OP_MUL, 42, 40, 24); b[3] = op_r(OP_MUL, 43, 41, 24); emit(b);
    b = '{default: NOP}; b[0] = op_i(OP_SHRI, 42, 42, 24); b[1] = op_i(OP_SHRI, 43, 43, 24); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 44, 42, 43); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BR, 3, loop_pc); b[1] = op_r(OP_ADD, 2, 2, 44); emit(b);
    b = '{default: NOP}; b[1] = op_st(2, 0, BR_); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_bcnt();
    for (int i = 0; i < NBW; i++) dw(BD + i, bw(i));
    dw(BK, 32'h5555_5555); dw(BK + 1, 32'h3333_3333); dw(BK + 2, 32'h0F0F_0F0F); dw(BK + 3, 32'h0101_0101);
    dw(BR_, 0);
  endtask

  task automatic check_bcnt(string tag);
    int e = 0;
    for (int i = 0; i < NBW; i++) e += $countones(bw(i));
    expect_true(dr(BR_) === 32'(e), {tag, " bcnt result"});
  endtask

  // ---------------- motion estimation: SAD of a 16-pixel block ----------------
  localparam int SA = 0, SB = 20, SR = 40, NPIX = 16;
  function automatic logic [31:0] pa(int i); return 32'((i * 37 + 11) % 256); endfunction
  function automatic logic [31:0] pb(int i); return 32'((i * 91 + 200) % 256); endfunction

  task automatic build_motion();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 4, 0, NPIX); b[3] = op_i(OP_MOVI, 2, 0, 0); emit(b);
    loop_pc = prog.size();
    for (int h = 0; h < 4; h++) begin                  // 4 pixels of each block
      b = '{default: NOP};
      b[1] = op_i(OP_LDW, 10 + h, 1, SA + h);
      b[5] = op_i(OP_LDW, 14 + h, 1, SB + h);
      if (h == 3) b[0] = op_i(OP_ADDI, 1, 1, 4);
      emit(b);
    end
    b = '{default: NOP};                               // differences
    for (int h = 0; h < 4; h++) b[h] = op_r(OP_SUB, 20 + h, 10 + h, 14 + h);
    b[4] = op_r(OP_CMPNE, 3, 1, 4);
    emit(b);
    b = '{default: NOP};                               // sign masks
    for (int h = 0; h < 4; h++) b[h] = op_i(OP_SHRI, 24 + h, 20 + h, 31);
    emit(b);
    b = '{default: NOP};
    for (int h = 0; h < 4; h++) b[h] = op_r(OP_SUB, 24 + h, 0, 24 + h);
    emit(b);
    b = '{default: NOP};                               // |d| = (d ^ m) - m
    for (int h = 0; h < 4; h++) b[h] = op_r(OP_XOR, 28 + h, 20 + h, 24 + h);
    emit(b);
    b = '{default: NOP};
    for (int h = 0; h < 4; h++) b[h] = op_r(OP_SUB, 28 + h, 28 + h, 24 + h);
    emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 32, 28, 29); b[1] = op_r(OP_ADD, 33, 30, 31); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 34, 32, 33); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BR, 3, loop_pc); b[1] = op_r(OP_ADD, 2, 2, 34); emit(b);
    b = '{default: NOP}; b[1] = op_st(2, 0, SR); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_motion();
    for (int i = 0; i < NPIX; i++) begin dw(SA + i, pa(i)); dw(SB + i, pb(i)); end
    dw(SR, 0);
  endtask

  task automatic check_motion(string tag);
    int e = 0;
    for (int i = 0; i < NPIX; i++) e += (pa(i) > pb(i)) ? int'(pa(i) - pb(i)) : int'(pb(i) - pa(i));
    expect_true(dr(SR) === 32'(e), {tag, " motion result"});
  endtask

  // ---------------- 8-point DCT as coefficient multiply-accumulate ----------------
  localparam int DX = 0, DC = 16, DY = 90, NPT = 8;
  function automatic logic [31:0] dxv(int k); return 32'(k * 13 - 40 + (k % 3) * 7); endfunction
  // integer cosine coefficients, round(64 cos((2k+1) u pi / 16)), u = 0..7
  function automatic logic [31:0] dcf(int u, int k);
    int t [8] = '{64, 63, 59, 53, 45, 36, 24, 12};     // 64 cos(m pi / 16), m = 0..7
    int m = ((2 * k + 1) * u) % 32;
    int sg = 1;
    if (m > 16) m = 32 - m;
    if (m > 8) begin m = 16 - m; sg = -1; end
    return (m == 8) ? 32'(0) : 32'(sg * t[m]);
  endfunction

  task automatic build_dct();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 5, 0, 0); b[3] = op_i(OP_MOVI, 4, 0, NPT);
    b[1] = op_i(OP_LDW, 10, 0, DX); b[5] = op_i(OP_LDW, 11, 0, DX + 1); emit(b);
    for (int k = 1; k < NPT / 2; k++) begin           // samples into r10..r17
      b = '{default: NOP};
      b[1] = op_i(OP_LDW, 10 + 2*k, 0, DX + 2*k);
      b[5] = op_i(OP_LDW, 11 + 2*k, 0, DX + 2*k + 1);
      emit(b);
    end
    loop_pc = prog.size();
    for (int k = 0; k < NPT / 2; k++) begin           // row u of coefficients into r20..r27
      b = '{default: NOP};
      b[1] = op_i(OP_LDW, 20 + 2*k, 1, DC + 2*k);
      b[5] = op_i(OP_LDW, 21 + 2*k, 1, DC + 2*k + 1);
      if (k == NPT / 2 - 1) b[0] = op_i(OP_ADDI, 1, 1, NPT);
      emit(b);
    end
    for (int h = 0; h < 2; h++) begin
      b = '{default: NOP};
      b[2] = op_r(OP_MUL, 30 + 4*h, 10 + 4*h, 20 + 4*h);
      b[3] = op_r(OP_MUL, 31 + 4*h, 11 + 4*h, 21 + 4*h);
      b[6] = op_r(OP_MUL, 32 + 4*h, 12 + 4*h, 22 + 4*h);
      b[7] = op_r(OP_MUL, 33 + 4*h, 13 + 4*h, 23 + 4*h);
      emit(b);
    end
    b = '{default: NOP};
    for (int j = 0; j < 4; j++) b[j] = op_r(OP_ADD, 40 + j, 30 + 2*j, 31 + 2*j);
    b[4] = op_i(OP_ADDI, 5, 5, 1);
    emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_ADD, 44, 40, 41); b[1] = op_r(OP_ADD, 45, 42, 43); b[2] = op_r(OP_CMPNE, 3, 5, 4); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 46, 44, 45); emit(b);
    b = '{default: NOP};
    b[0] = op_b(OP_BR, 3, loop_pc); b[1] = op_st(46, 5, DY - 1); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_dct();
    for (int k = 0; k < NPT; k++) dw(DX + k, dxv(k));
    for (int u = 0; u < NPT; u++) for (int k = 0; k < NPT; k++) dw(DC + NPT * u + k, dcf(u, k));
    for (int u = 0; u < NPT; u++) dw(DY + u, 0);
  endtask

  task automatic check_dct(string tag);
    int bad = 0;
    for (int u = 0; u < NPT; u++) begin
      logic [31:0] e = 0;
      for (int k = 0; k < NPT; k++) e += dxv(k) * dcf(u, k);
      if (dr(DY + u) !== e) bad++;
    end
    expect_true(bad == 0, {tag, " dct result"});
  endtask

  // ---------------- 8-point fixed-point FFT, radix-2 ----------------
  // Data re[0..7] at FR, im[0..7] at FR + 8, in bit-reversed order; a table
  // of 12 butterflies (i, j, twiddle index) drives one loop; twiddles are
  // round(64 cos(2 pi m / 8)) and -round(64 sin(2 pi m / 8)), m = 0..3.
  localparam int FR = 0, FT = 20, FWR = 60, FWI = 64, NBF = 12;
  int bf_i [NBF] = '{0, 2, 4, 6, 0, 1, 4, 5, 0, 1, 2, 3};
  int bf_j [NBF] = '{1, 3, 5, 7, 2, 3, 6, 7, 4, 5, 6, 7};
  int bf_w [NBF] = '{0, 0, 0, 0, 0, 2, 0, 2, 0, 1, 2, 3};
  int tw_r [4] = '{64, 45, 0, -45};
  int tw_i [4] = '{0, -45, -64, -45};
  function automatic int fre(int k); return (k * 29) % 41 - 20; endfunction
  function automatic int fim(int k); return (k * 17) % 23 - 11; endfunction

  task automatic build_fft();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 4, 0, 3 * NBF); b[3] = op_i(OP_MOVI, 9, 0, 6); emit(b);
    loop_pc = prog.size();
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 11, 1, FT); b[5] = op_i(OP_LDW, 12, 1, FT + 1); emit(b);
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 13, 1, FT + 2); b[0] = op_i(OP_ADDI, 1, 1, 3); emit(b);
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 20, 11, FR); b[5] = op_i(OP_LDW, 21, 11, FR + 8);
    b[0] = op_r(OP_CMPNE, 3, 1, 4); emit(b);
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 22, 12, FR); b[5] = op_i(OP_LDW, 23, 12, FR + 8); emit(b);
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 24, 13, FWR); b[5] = op_i(OP_LDW, 25, 13, FWI); emit(b);
    b = '{default: NOP};                               // complex product x[j] * w
    b[2] = op_r(OP_MUL, 30, 22, 24); b[3] = op_r(OP_MUL, 31, 23, 25);
    b[6] = op_r(OP_MUL, 32, 22, 25); b[7] = op_r(OP_MUL, 33, 23, 24); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SUB, 34, 30, 31); b[1] = op_r(OP_ADD, 35, 32, 33); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SRA, 34, 34, 9); b[1] = op_r(OP_SRA, 35, 35, 9); emit(b);
    b = '{default: NOP};                               // butterfly
    b[0] = op_r(OP_ADD, 40, 20, 34); b[1] = op_r(OP_ADD, 41, 21, 35);
    b[2] = op_r(OP_SUB, 42, 20, 34); b[3] = op_r(OP_SUB, 43, 21, 35); emit(b);
    b = '{default: NOP}; b[1] = op_st(40, 11, FR); b[5] = op_st(41, 11, FR + 8); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BR, 3, loop_pc);
    b[1] = op_st(42, 12, FR); b[5] = op_st(43, 12, FR + 8); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_fft();
    for (int k = 0; k < 8; k++) begin dw(FR + k, 32'(fre(k))); dw(FR + 8 + k, 32'(fim(k))); end
    for (int n = 0; n < NBF; n++) begin
      dw(FT + 3*n, 32'(bf_i[n])); dw(FT + 3*n + 1, 32'(bf_j[n])); dw(FT + 3*n + 2, 32'(bf_w[n]));
    end
    for (int m = 0; m < 4; m++) begin dw(FWR + m, 32'(tw_r[m])); dw(FWI + m, 32'(tw_i[m])); end
  endtask

  task automatic check_fft(string tag);
    int re [8], im [8];
    int bad = 0;
    for (int k = 0; k < 8; k++) begin re[k] = fre(k); im[k] = fim(k); end
    for (int n = 0; n < NBF; n++) begin
      int i = bf_i[n], j = bf_j[n], m = bf_w[n];
      int tr = (re[j] * tw_r[m] - im[j] * tw_i[m]) >>> 6;
      int ti = (re[j] * tw_i[m] + im[j] * tw_r[m]) >>> 6;
      re[j] = re[i] - tr; im[j] = im[i] - ti;
      re[i] = re[i] + tr; im[i] = im[i] + ti;
    end
    for (int k = 0; k < 8; k++)
      if (dr(FR + k) !== 32'(re[k]) || dr(FR + 8 + k) !== 32'(im[k])) bad++;
    expect_true(bad == 0, {tag, " fft result"});
  endtask

  // ---------------- Huffman decode, bit-serial tree walk ----------------
  // Code: 0 -> 0, 10 -> 1, 110 -> 2, 111 -> 3, bits taken LSB first.  Tree
  // entry 2n + bit of internal node n is a child node or 256 + symbol.
  localparam int HIN = 0, HT = 10, HO = 20, NSYM = 40;
  function automatic int hsym(int k); return ((k * 7 + 3) % 11) % 4; endfunction

  task automatic build_huff();
    bundle_t b;
    prog.delete();
    b = '{default: NOP};                                                   // 0
    b[0] = op_i(OP_MOVI, 2, 0, 0); b[2] = op_i(OP_MOVI, 8, 0, 0); b[3] = op_i(OP_MOVI, 4, 0, NSYM);
    b[4] = op_i(OP_MOVI, 1, 0, 1); b[1] = op_i(OP_LDW, 6, 0, HIN); b[6] = op_i(OP_MOVI, 7, 0, 32); emit(b);
    b = '{default: NOP};                                                   // 1: next bit
    b[0] = op_i(OP_ANDI, 10, 6, 1); b[1] = op_i(OP_SHRI, 6, 6, 1);
    b[2] = op_i(OP_SHLI, 11, 2, 1); b[3] = op_i(OP_ADDI, 7, 7, -1); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 12, 11, 10); emit(b);         // 2
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 13, 12, HT); emit(b);         // 3: tree entry
    b = '{default: NOP};                                                   // 4
    b[0] = op_i(OP_ANDI, 14, 13, 256); b[1] = op_i(OP_ANDI, 15, 13, 255); b[2] = op_r(OP_CMPEQ, 16, 7, 0); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BRF, 14, 8); b[1] = op_i(OP_ADDI, 2, 15, 0); emit(b);  // 5
    b = '{default: NOP};                                                   // 6: leaf
    b[1] = op_st(15, 8, HO); b[0] = op_i(OP_ADDI, 8, 8, 1); b[2] = op_i(OP_MOVI, 2, 0, 0);
    b[3] = op_i(OP_ADDI, 4, 4, -1); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BRF, 4, 11); emit(b);              // 7: all decoded
    b = '{default: NOP}; b[0] = op_b(OP_BRF, 16, 1); emit(b);              // 8: bits left
    b = '{default: NOP};                                                   // 9: next word
    b[1] = op_i(OP_LDW, 6, 1, HIN); b[0] = op_i(OP_ADDI, 1, 1, 1); b[2] = op_i(OP_MOVI, 7, 0, 32); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, 1); emit(b);              // 10
    end_pc = prog.size();                                                  // 11
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_huff();
    logic [127:0] bits = '0;
    int n = 0;
    for (int k = 0; k < NSYM; k++) begin
      int sy = hsym(k);
      int len = (sy == 3) ? 3 : sy + 1;                // 0, 10, 110, 111
      for (int t = 0; t < len; t++) begin
        bits[n] = (t < sy) ? 1'b1 : 1'b0;
        if (sy == 3 && t == 2) bits[n] = 1'b1;
        n++;
      end
    end
    for (int w = 0; w < 4; w++) dw(HIN + w, bits[32*w +: 32]);
    dw(HT + 0, 256 + 0); dw(HT + 1, 1);
    dw(HT + 2, 256 + 1); dw(HT + 3, 2);
    dw(HT + 4, 256 + 2); dw(HT + 5, 256 + 3);
    for (int k = 0; k < NSYM; k++) dw(HO + k, 32'hFFFF);
  endtask

  task automatic check_huff(string tag);
    int bad = 0;
    for (int k = 0; k < NSYM; k++) if (dr(HO + k) !== 32'(hsym(k))) bad++;
    expect_true(bad == 0, {tag, " huff result"});
  endtask

  // ---------------- ADPCM encoder, IMA style, branch-free ----------------
  // 4-bit codes (sign + 3 magnitude bits); the predictor is clamped to 16
  // bits and the step index to 0..88.  The step table here is a geometric
  // series, step(0) = 7, step(i) = (11 step(i-1) + 9) / 10, not the standard
  // table; the index adjustments are the usual -1 -1 -1 -1 2 4 6 8.
  localparam int AX = 0, AOUT = 40, AST = 80, AIT = 170, AC = 180, AFIN = 190, NSMP = 32;
  int ait [8] = '{-1, -1, -1, -1, 2, 4, 6, 8};
  function automatic int ast(int i);
    int v = 7;
    for (int k = 0; k < i; k++) v = (v * 11 + 9) / 10;
    return v;
  endfunction
  function automatic int axs(int i); return ((i * 2731 + 977) % 40001) - 20000; endfunction

  task automatic build_adpcm();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 4, 0, NSMP); b[3] = op_i(OP_MOVI, 2, 0, 0);
    b[4] = op_i(OP_MOVI, 5, 0, 0); b[6] = op_i(OP_MOVI, 52, 0, 88);
    b[1] = op_i(OP_LDW, 50, 0, AC); b[5] = op_i(OP_LDW, 51, 0, AC + 1); emit(b);
    loop_pc = prog.size();
    b = '{default: NOP};                               // sample, step, code = 0
    b[1] = op_i(OP_LDW, 10, 1, AX); b[5] = op_i(OP_LDW, 6, 5, AST);
    b[0] = op_i(OP_ADDI, 1, 1, 1); b[2] = op_i(OP_MOVI, 21, 0, 0); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_SUB, 11, 10, 2); b[1] = op_i(OP_SHRI, 20, 6, 3); b[2] = op_r(OP_CMPNE, 3, 1, 4); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SLT, 12, 11, 0); emit(b);        // sign
    b = '{default: NOP}; b[0] = op_r(OP_SUB, 13, 0, 12); emit(b);        // sign mask
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 14, 11, 13); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SUB, 14, 14, 13); emit(b);       // |diff|
    for (int k = 0; k < 3; k++) begin                  // magnitude bits 4, 2, 1
      b = '{default: NOP}; b[0] = op_r(OP_SLT, 15, 14, 6); emit(b);
      b = '{default: NOP}; b[0] = op_i(OP_XORI, 15, 15, 1); emit(b);
      b = '{default: NOP}; b[0] = op_r(OP_SUB, 16, 0, 15);
      b[1] = (k == 2) ? op_i(OP_ADDI, 17, 15, 0) : op_i(OP_SHLI, 17, 15, 2 - k); emit(b);
      b = '{default: NOP}; b[0] = op_r(OP_AND, 18, 6, 16); b[1] = op_r(OP_OR, 21, 21, 17); emit(b);
      b = '{default: NOP};
      b[0] = op_r(OP_SUB, 14, 14, 18); b[1] = op_r(OP_ADD, 20, 20, 18); b[2] = op_i(OP_SHRI, 6, 6, 1); emit(b);
    end
    b = '{default: NOP}; b[0] = op_r(OP_SUB, 22, 0, 20); emit(b);        // signed difference
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 23, 20, 22); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 23, 23, 13); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 24, 20, 23); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 2, 2, 24); b[1] = op_i(OP_SHLI, 25, 12, 3); emit(b);
    b = '{default: NOP};                               // clamp the predictor
    b[0] = op_r(OP_OR, 21, 21, 25); b[1] = op_r(OP_SLT, 26, 50, 2); b[2] = op_r(OP_SLT, 27, 2, 51); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_SUB, 26, 0, 26); b[1] = op_r(OP_SUB, 27, 0, 27);
    b[2] = op_r(OP_XOR, 28, 2, 50); b[3] = op_r(OP_XOR, 29, 2, 51); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 28, 28, 26); b[1] = op_r(OP_AND, 29, 29, 27); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 2, 2, 28); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_XOR, 2, 2, 29); b[2] = op_i(OP_ANDI, 30, 21, 7); b[1] = op_st(21, 1, AOUT - 1); emit(b);
    b = '{default: NOP}; b[1] = op_i(OP_LDW, 31, 30, AIT); emit(b);      // index update
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 5, 5, 31); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SLT, 32, 5, 0); b[1] = op_r(OP_SLT, 33, 52, 5); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_SUB, 32, 0, 32); b[1] = op_r(OP_SUB, 33, 0, 33); b[2] = op_r(OP_XOR, 34, 5, 52); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 35, 5, 32); b[1] = op_r(OP_AND, 34, 34, 33); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 5, 5, 35); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BR, 3, loop_pc); b[1] = op_r(OP_XOR, 5, 5, 34); emit(b);
    b = '{default: NOP}; b[1] = op_st(2, 0, AFIN); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_adpcm();
    for (int i = 0; i < NSMP; i++) begin dw(AX + i, 32'(axs(i))); dw(AOUT + i, 32'hFFFF); end
    for (int i = 0; i <= 88; i++) dw(AST + i, 32'(ast(i)));
    for (int c = 0; c < 8; c++) dw(AIT + c, 32'(ait[c]));
    dw(AC, 32'(32767)); dw(AC + 1, 32'(-32768)); dw(AFIN, 0);
  endtask

  task automatic check_adpcm(string tag);
    int pred = 0, idx = 0, bad = 0;
    for (int i = 0; i < NSMP; i++) begin
      int step = ast(idx);
      int diff = axs(i) - pred;
      int code = 0;
      int vp = step >> 3;
      bit neg = diff < 0;
      if (neg) diff = -diff;
      for (int bv = 4; bv > 0; bv = bv >> 1) begin
        if (diff >= step) begin code |= bv; diff -= step; vp += step; end
        step = step >> 1;
      end
      pred += neg ? -vp : vp;
      if (pred > 32767) pred = 32767;
      if (pred < -32768) pred = -32768;
      idx += ait[code];
      if (idx < 0) idx = 0;
      if (idx > 88) idx = 88;
      if (neg) code |= 8;
      if (dr(AOUT + i) !== 32'(code)) bad++;
    end
    if (dr(AFIN) !== 32'(pred)) bad++;
    expect_true(bad == 0, {tag, " adpcm result"});
  endtask

  // ---------------- ADPCM decoder, same tables ----------------
  localparam int DIN = 0, DOUT = 40;
  function automatic int dcode(int i); return (i * 5 + 3 + (i / 7)) % 16; endfunction

  task automatic build_adpcm_dec();
    bundle_t b;
    int loop_pc;
    prog.delete();
    b = '{default: NOP};
    b[0] = op_i(OP_MOVI, 1, 0, 0); b[2] = op_i(OP_MOVI, 4, 0, NSMP); b[3] = op_i(OP_MOVI, 2, 0, 0);
    b[4] = op_i(OP_MOVI, 5, 0, 0); b[6] = op_i(OP_MOVI, 52, 0, 88);
    b[1] = op_i(OP_LDW, 50, 0, AC); b[5] = op_i(OP_LDW, 51, 0, AC + 1); emit(b);
    loop_pc = prog.size();
    b = '{default: NOP};                               // code, step
    b[1] = op_i(OP_LDW, 10, 1, DIN); b[5] = op_i(OP_LDW, 6, 5, AST); b[0] = op_i(OP_ADDI, 1, 1, 1); emit(b);
    b = '{default: NOP};
    b[0] = op_i(OP_SHRI, 20, 6, 3); b[1] = op_i(OP_SHRI, 7, 6, 1); b[2] = op_i(OP_SHRI, 8, 6, 2);
    b[3] = op_i(OP_ANDI, 11, 10, 4); b[4] = op_i(OP_ANDI, 12, 10, 2); b[5] = op_i(OP_ANDI, 13, 10, 1);
    b[6] = op_r(OP_CMPNE, 3, 1, 4); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_CMPNE, 11, 11, 0); b[1] = op_r(OP_CMPNE, 12, 12, 0);
    b[2] = op_i(OP_SHRI, 14, 10, 3); b[3] = op_i(OP_ANDI, 30, 10, 7); emit(b);
    b = '{default: NOP};                               // bit masks, index step
    b[0] = op_r(OP_SUB, 11, 0, 11); b[2] = op_r(OP_SUB, 12, 0, 12); b[3] = op_r(OP_SUB, 13, 0, 13);
    b[4] = op_r(OP_SUB, 15, 0, 14); b[1] = op_i(OP_LDW, 31, 30, AIT); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_AND, 21, 6, 11); b[1] = op_r(OP_AND, 22, 7, 12); b[2] = op_r(OP_AND, 23, 8, 13);
    b[3] = op_r(OP_ADD, 5, 5, 31); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_ADD, 20, 20, 21); b[1] = op_r(OP_ADD, 24, 22, 23);
    b[2] = op_r(OP_SLT, 32, 5, 0); b[3] = op_r(OP_SLT, 33, 52, 5); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_ADD, 20, 20, 24); b[1] = op_r(OP_SUB, 32, 0, 32);
    b[2] = op_r(OP_SUB, 33, 0, 33); b[3] = op_r(OP_XOR, 34, 5, 52); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_SUB, 22, 0, 20); b[1] = op_r(OP_AND, 35, 5, 32); b[2] = op_r(OP_AND, 34, 34, 33); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 23, 20, 22); b[1] = op_r(OP_XOR, 5, 5, 35); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 23, 23, 15); b[1] = op_r(OP_XOR, 5, 5, 34); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 24, 20, 23); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_ADD, 2, 2, 24); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_SLT, 26, 50, 2); b[1] = op_r(OP_SLT, 27, 2, 51); emit(b);
    b = '{default: NOP};
    b[0] = op_r(OP_SUB, 26, 0, 26); b[1] = op_r(OP_SUB, 27, 0, 27);
    b[2] = op_r(OP_XOR, 28, 2, 50); b[3] = op_r(OP_XOR, 29, 2, 51); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_AND, 28, 28, 26); b[1] = op_r(OP_AND, 29, 29, 27); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 2, 2, 28); emit(b);
    b = '{default: NOP}; b[0] = op_r(OP_XOR, 2, 2, 29); emit(b);
    b = '{default: NOP}; b[0] = op_b(OP_BR, 3, loop_pc); b[1] = op_st(2, 1, DOUT - 1); emit(b);
    end_pc = prog.size();
    b = '{default: NOP}; b[0] = op_b(OP_GOTO, 0, end_pc); emit(b);
  endtask

  task automatic init_adpcm_dec();
    for (int i = 0; i < NSMP; i++) begin dw(DIN + i, 32'(dcode(i))); dw(DOUT + i, 32'hFFFF); end
    for (int i = 0; i <= 88; i++) dw(AST + i, 32'(ast(i)));
    for (int c = 0; c < 8; c++) dw(AIT + c, 32'(ait[c]));
    dw(AC, 32'(32767)); dw(AC + 1, 32'(-32768));
  endtask

  task automatic check_adpcm_dec(string tag);
    int pred = 0, idx = 0, bad = 0;
    for (int i = 0; i < NSMP; i++) begin
      int c = dcode(i);
      int step = ast(idx);
      int vp = step >> 3;
      if ((c & 4) != 0) vp += step;
      if ((c & 2) != 0) vp += step >> 1;
      if ((c & 1) != 0) vp += step >> 2;
      pred += ((c & 8) != 0) ? -vp : vp;
      if (pred > 32767) pred = 32767;
      if (pred < -32768) pred = -32768;
      idx += ait[c & 7];
      if (idx < 0) idx = 0;
      if (idx > 88) idx = 88;
      if (dr(DOUT + i) !== 32'(pred)) bad++;
    end
    expect_true(bad == 0, {tag, " adpcm_dec result"});
  endtask

  // fault steps
  int fs [5] = '{2*NCLASS + int'(FU_MUL), 4*NCLASS + int'(FU_ALU), 1*NCLASS + int'(FU_MEM), 6*NCLASS + int'(FU_MUL), 0*NCLASS + int'(FU_ALU)};

  task automatic init_k(int kn);
    case (kn)
      0: init_matmul();
      1: init_crc();
      2: init_fir();
      3: init_bcnt();
      4: init_motion();
      5: init_dct();
      6: init_fft();
      7: init_huff();
      8: init_adpcm();
      default: init_adpcm_dec();
    endcase
  endtask

  task automatic check_k(int kn, string tag);
    case (kn)
      0: check_matmul(tag);
      1: check_crc(tag);
      2: check_fir(tag);
      3: check_bcnt(tag);
      4: check_motion(tag);
      5: check_dct(tag);
      6: check_fft(tag);
      7: check_huff(tag);
      8: check_adpcm(tag);
      default: check_adpcm_dec(tag);
    endcase
  endtask

  task automatic sweep(string name, int kn);
    int n, c [2][6];
    string line;
    fu_disable = '0;
    init_k(kn);
    run(MODE_OFF, n);
    check_k(kn, {name, " N"});
    for (int m = 0; m < 2; m++) begin
      fu_disable = '0;
      for (int p = 0; p <= 5; p++) begin
        if (p > 0) fu_disable[fs[p-1] / NCLASS][fs[p-1] % NCLASS] = 1;
        init_k(kn);
        run(m == 0 ? MODE_DMR : MODE_TMR, c[m][p]);
        check_k(kn, $sformatf("%s m%0d p%0d", name, m, p));
        if (p > 0) expect_true(c[m][p] >= c[m][p-1], $sformatf("%s cycles do not drop with faults", name));
      end
      expect_true(c[m][0] < (m + 2) * n, $sformatf("%s replicated run below %0dx unprotected", name, m + 2));
    end
    $display("%-10s N=%0d  DMR p0..5: %0d %0d %0d %0d %0d %0d  TMR p0..5: %0d %0d %0d %0d %0d %0d",
             name, n, c[0][0], c[0][1], c[0][2], c[0][3], c[0][4], c[0][5],
             c[1][0], c[1][1], c[1][2], c[1][3], c[1][4], c[1][5]);
    line = "";
    for (int m = 0; m < 2; m++)
      for (int p = 1; p <= 5; p++) line = {line, $sformatf(" %3d", (100 * (c[m][p] - c[m][0])) / c[m][0])};
    $display("%-10s overhead %% DMR p1..5 / TMR p1..5:%s", name, line);
    // Gain over re-executing every operation bound to a faulty unit in one
    // added time slot per bundle, estimated from below as twice the
    // fault-free cycles of the same mode: 1 - c[p] / (2 c[0]).
    line = "";
    for (int m = 0; m < 2; m++)
      for (int p = 1; p <= 5; p++) begin
        line = {line, $sformatf(" %3d", 100 - (100 * c[m][p]) / (2 * c[m][0]))};
        expect_true(c[m][p] <= 2 * c[m][0], $sformatf("%s gain not negative", name));
      end
    $display("%-10s lower-bound gain %% DMR p1..5 / TMR p1..5:%s", name, line);
    fu_disable = '0;
  endtask

  initial begin
    build_matmul(); load();
    sweep("matrix_mul", 0);
    build_crc(); load();
    sweep("crc", 1);
    build_fir(); load();
    sweep("fir", 2);
    build_bcnt(); load();
    sweep("bcnt", 3);
    build_motion(); load();
    sweep("motion", 4);
    build_dct(); load();
    sweep("dct", 5);
    build_fft(); load();
    sweep("fft", 6);
    build_huff(); load();
    sweep("huff", 7);
    build_adpcm(); load();
    sweep("adpcm_enc", 8);
    build_adpcm_dec(); load();
    sweep("adpcm_dec", 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
