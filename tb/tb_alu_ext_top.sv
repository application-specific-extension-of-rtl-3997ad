// tb_alu_ext_top: end-to-end test of the ALU functional unit with CUSTOM1.
//
// The testbench plays the rest of the core around the unit: it holds the integer
// register file, fetches instruction words from small programs, issues one per
// cycle, commits write-backs, follows branches using the unit's branch outcome,
// and executes remw itself as a stand-in for the multiply/divide unit (issue
// bubble for that cycle). Three phases:
//   1. the boot example "lui s3,4 ; lui s4,3 ; add s5,s3,s4" -> s5 = 0x7000;
//   2. the modular-multiplication loop (res = a*b mod m by shift-and-add), once
//      with the original "srliw ; addw" pairs and once with CUSTOM1 replacing both
//      pairs, for the two worked examples (225*17 mod 39 = 8, 11*14 mod 10 = 4)
//      and random small operands; the result must match, and the CUSTOM1 program
//      must issue exactly two fewer ALU instructions per loop iteration;
//   3. a random stream of ALU instructions (including CUSTOM1, writes to x0 and
//      words the unit must reject) checked word by word against a reference model.
// Every write-back must arrive exactly one cycle after issue with its tag. Each
// mechanism (CUSTOM1, taken and not-taken branch, rejected word, issue bubble,
// back-to-back issue, x0 write suppression) is counted and must occur.
module tb_alu_ext_top;
  import alu_pkg::*;

  localparam int unsigned N_RANDOM_MM  = 20;
  localparam int unsigned N_RANDOM_OPS = 4000;
  localparam int unsigned WATCHDOG     = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                     issue_valid, issue_ready;
  logic [31:0]              issue_instr;
  logic [TRANS_ID_BITS-1:0] issue_tid;
  logic [4:0]               rs1_addr, rs2_addr;
  logic [XLEN-1:0]          rs1_data, rs2_data;
  logic                     wb_valid, wb_we, wb_branch, wb_taken, wb_illegal;
  logic [TRANS_ID_BITS-1:0] wb_tid;
  logic [4:0]               wb_rd;
  logic [XLEN-1:0]          wb_result;

  alu_ext_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready), .issue_instr_i(issue_instr),
    .issue_trans_id_i(issue_tid), .rs1_addr_o(rs1_addr), .rs2_addr_o(rs2_addr),
    .rs1_data_i(rs1_data), .rs2_data_i(rs2_data),
    .wb_valid_o(wb_valid), .wb_trans_id_o(wb_tid), .wb_we_o(wb_we), .wb_rd_o(wb_rd),
    .wb_result_o(wb_result), .wb_branch_o(wb_branch), .wb_branch_taken_o(wb_taken),
    .wb_illegal_o(wb_illegal)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned n_custom = 0, n_taken = 0, n_not_taken = 0, n_illegal = 0, n_bubble = 0,
               n_b2b = 0, n_x0 = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- register file and issue model ----------------
  logic [XLEN-1:0] regs [32];
  assign rs1_data = regs[rs1_addr];
  assign rs2_data = regs[rs2_addr];

  // State of the instruction issued in the previous cycle.
  bit                       pend;
  logic [TRANS_ID_BITS-1:0] pend_tid;
  logic [31:0]              pend_word;
  int unsigned              tid_ctr = 0;

  // Advance one cycle: present (valid, word) at the negative edge, let the
  // positive edge capture it, then at the next negative edge commit the
  // write-back it produced. Returns that write-back's branch outcome.
  task automatic step(input bit valid, input logic [31:0] word, output bit taken,
                      output bit illegal, output logic [XLEN-1:0] result);
    issue_valid = valid;
    issue_instr = word;
    issue_tid   = TRANS_ID_BITS'(tid_ctr);
    if (valid && pend) n_b2b++;
    if (!valid) n_bubble++;
    @(posedge clk);
    check(!valid || issue_ready, "unit not ready");
    @(negedge clk);
    check(wb_valid == valid, $sformatf("wb_valid %b one cycle after issue %b", wb_valid, valid));
    taken = 0; illegal = 0; result = '0;
    if (valid) begin
      check(wb_tid == TRANS_ID_BITS'(tid_ctr), "trans id");
      tid_ctr++;
      taken   = wb_taken;
      illegal = wb_illegal;
      result  = wb_result;
      if (wb_illegal) n_illegal++;
      if (wb_branch) begin if (wb_taken) n_taken++; else n_not_taken++; end
      if (!wb_we && !wb_branch && !wb_illegal && word[11:7] == 5'd0) n_x0++;
      if (wb_we) regs[wb_rd] = wb_result;
    end
    pend = valid;
    issue_valid = 1'b0;
  endtask

  // ---------------- instruction encoders (RISC-V formats) ----------------
  function automatic logic [31:0] enc_r(logic [6:0] f7, int rs2, int rs1, logic [2:0] f3,
                                        int rd, logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_i(logic [11:0] imm, int rs1, logic [2:0] f3, int rd,
                                        logic [6:0] opc);
    return {imm, 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_b(int off, int rs2, int rs1, logic [2:0] f3);
    logic [12:0] o;
    o = 13'(off);
    return {o[12], o[10:5], 5'(rs2), 5'(rs1), f3, o[4:1], o[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] addi  (int rd, int rs1, int imm) ; return enc_i(12'(imm), rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] andi  (int rd, int rs1, int imm) ; return enc_i(12'(imm), rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] addiw (int rd, int rs1, int imm) ; return enc_i(12'(imm), rs1, 3'b000, rd, 7'b0011011); endfunction
  function automatic logic [31:0] slliw (int rd, int rs1, int sh)  ; return enc_i({7'b0000000, 5'(sh)}, rs1, 3'b001, rd, 7'b0011011); endfunction
  function automatic logic [31:0] srliw (int rd, int rs1, int sh)  ; return enc_i({7'b0000000, 5'(sh)}, rs1, 3'b101, rd, 7'b0011011); endfunction
  function automatic logic [31:0] sraiw (int rd, int rs1, int sh)  ; return enc_i({7'b0100000, 5'(sh)}, rs1, 3'b101, rd, 7'b0011011); endfunction
  function automatic logic [31:0] addw  (int rd, int rs1, int rs2) ; return enc_r(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0111011); endfunction
  function automatic logic [31:0] subw  (int rd, int rs1, int rs2) ; return enc_r(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0111011); endfunction
  function automatic logic [31:0] add   (int rd, int rs1, int rs2) ; return enc_r(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] remw  (int rd, int rs1, int rs2) ; return enc_r(7'b0000001, rs2, rs1, 3'b110, rd, 7'b0111011); endfunction
  function automatic logic [31:0] custom1(int rd, int rs1, int rs2); return enc_r(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0001011); endfunction
  function automatic logic [31:0] lui   (int rd, int imm20)        ; return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] blt   (int rs1, int rs2, int off); return enc_b(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] bne   (int rs1, int rs2, int off); return enc_b(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] jmp   (int off)                  ; return enc_b(off, 0, 0, 3'b000); endfunction // beq x0,x0

  function automatic bit is_remw(logic [31:0] w);
    return w[6:0] == 7'b0111011 && w[31:25] == 7'b0000001 && w[14:12] == 3'b110;
  endfunction
  function automatic int b_off(logic [31:0] w);
    return int'($signed({w[31], w[7], w[30:25], w[11:8], 1'b0}));
  endfunction

  // Run a program (word array, branch offsets in bytes) until the PC leaves it.
  // Returns the number of ALU instructions issued.
  task automatic run(input logic [31:0] prog [$], output int unsigned n_alu);
    int pc;
    bit taken, illegal;
    logic [XLEN-1:0] r;
    pc = 0; n_alu = 0;
    while (pc >= 0 && pc < prog.size()) begin
      logic [31:0] w;
      w = prog[pc];
      if (is_remw(w)) begin
        // Multiply/divide unit stand-in: the ALU slot sits idle this cycle.
        logic [31:0] x, y;
        step(1'b0, '0, taken, illegal, r);
        x = regs[w[19:15]][31:0]; y = regs[w[24:20]][31:0];
        if (w[11:7] != 0) regs[w[11:7]] = {{32{1'b0}}, 32'($signed(x) % $signed(y))};
        pc++;
      end else begin
        step(1'b1, w, taken, illegal, r);
        n_alu++;
        check(!illegal, $sformatf("word %h rejected", w));
        if (w[6:0] == 7'b0001011) n_custom++;
        if (w[6:0] == 7'b1100011 && taken) pc += b_off(w) / 4;
        else pc++;
      end
    end
  endtask

  // Modular multiplication program. Registers: x9 res, x11 a, x12 b, x13 mod,
  // x14/x15 temporaries. use_custom replaces the two "srliw ; addw" pairs.
  function automatic void build_modmul(input bit use_custom, ref logic [31:0] p [$]);
    int l_body, l_even, l_cond, i_jmp, i_bne, i_blt;
    p.delete();
    p.push_back(addi(9, 0, 0));                     // res = 0
    p.push_back(remw(11, 11, 13));                  // a = a % mod
    i_jmp = p.size(); p.push_back('0);              // j cond
    l_body = p.size();
    p.push_back(addi(14, 12, 0));                   // a4 = b
    p.push_back(sraiw(15, 14, 31));                 // a5 = b >> 31 (sign)
    if (use_custom) p.push_back(custom1(14, 15, 14));
    else begin
      p.push_back(srliw(15, 15, 31));
      p.push_back(addw(14, 14, 15));
    end
    p.push_back(andi(14, 14, 1));
    p.push_back(subw(15, 14, 15));                  // a5 = b % 2
    p.push_back(addiw(15, 15, 0));
    p.push_back(addi(14, 15, 0));
    p.push_back(addi(15, 0, 1));
    i_bne = p.size(); p.push_back('0);              // if (b % 2 != 1) skip
    p.push_back(addw(9, 9, 11));                    // res = (res + a) % mod
    p.push_back(remw(9, 9, 13));
    l_even = p.size();
    p.push_back(slliw(15, 11, 1));                  // a = (a * 2) % mod
    p.push_back(addiw(15, 15, 0));
    p.push_back(remw(11, 15, 13));
    p.push_back(addi(15, 12, 0));                   // b = b / 2 (signed)
    if (use_custom) p.push_back(custom1(15, 15, 15));
    else begin
      p.push_back(srliw(14, 15, 31));
      p.push_back(addw(15, 15, 14));
    end
    p.push_back(sraiw(15, 15, 1));
    p.push_back(addi(12, 15, 0));
    l_cond = p.size();
    i_blt = p.size(); p.push_back('0);              // while (b > 0)
    p.push_back(remw(9, 9, 13));                    // return res % mod
    p[i_jmp] = jmp((l_cond - i_jmp) * 4);
    p[i_bne] = bne(14, 15, (l_even - i_bne) * 4);
    p[i_blt] = blt(0, 12, (l_body - i_blt) * 4);
  endfunction

  task automatic modmul(input int a, input int b, input int m);
    logic [31:0] prog [$];
    int unsigned n_base, n_cust, iters, expv;
    iters = 0;
    for (int t = b; t > 0; t /= 2) iters++;
    expv = int'((longint'(a) * longint'(b)) % longint'(m));
    for (int v = 0; v < 2; v++) begin
      build_modmul(v == 1, prog);
      regs[11] = 64'(a); regs[12] = 64'(b); regs[13] = 64'(m);
      run(prog, (v == 0) ? n_base : n_cust);
      check(regs[9] == 64'(expv),
            $sformatf("modmul(%0d,%0d,%0d) custom=%0d got %0d exp %0d", a, b, m, v, regs[9], expv));
    end
    check(n_base - n_cust == 2 * iters,
          $sformatf("instruction saving %0d, expected %0d", n_base - n_cust, 2 * iters));
    $display("modmul %0d*%0d mod %0d = %0d: %0d loop iterations, %0d ALU instructions without CUSTOM1, %0d with",
             a, b, m, expv, iters, n_base, n_cust);
  endtask

  // ---------------- reference model for the random phase ----------------
  function automatic logic [XLEN-1:0] sx(logic [31:0] w); return {{32{w[31]}}, w}; endfunction

  function automatic bit ref_exec(logic [31:0] w, logic [XLEN-1:0] a, logic [XLEN-1:0] b,
                                  output logic [XLEN-1:0] r);
    logic [6:0] opc, f7; logic [2:0] f3; logic [XLEN-1:0] imm;
    opc = w[6:0]; f3 = w[14:12]; f7 = w[31:25]; imm = {{52{w[31]}}, w[31:20]};
    r = '0;
    case (opc)
      7'b0110011: case ({f7, f3})
        {7'h00, 3'd0}: r = a + b;   {7'h20, 3'd0}: r = a - b;
        {7'h00, 3'd1}: r = a << b[5:0];
        {7'h00, 3'd2}: r = 64'($signed(a) < $signed(b));
        {7'h00, 3'd3}: r = 64'(a < b);
        {7'h00, 3'd4}: r = a ^ b;   {7'h00, 3'd5}: r = a >> b[5:0];
        {7'h20, 3'd5}: r = $unsigned($signed(a) >>> b[5:0]);
        {7'h00, 3'd6}: r = a | b;   {7'h00, 3'd7}: r = a & b;
        default: return 0;
      endcase
      7'b0111011: case ({f7, f3})
        {7'h00, 3'd0}: r = sx(a[31:0] + b[31:0]);
        {7'h20, 3'd0}: r = sx(a[31:0] - b[31:0]);
        {7'h00, 3'd1}: r = sx(a[31:0] << b[4:0]);
        {7'h00, 3'd5}: r = sx(a[31:0] >> b[4:0]);
        {7'h20, 3'd5}: r = sx($unsigned($signed(a[31:0]) >>> b[4:0]));
        default: return 0;
      endcase
      7'b0010011: case (f3)
        3'd0: r = a + imm;  3'd4: r = a ^ imm;  3'd6: r = a | imm;  3'd7: r = a & imm;
        3'd2: r = 64'($signed(a) < $signed(imm));
        3'd3: r = 64'(a < imm);
        3'd1: if (w[31:26] == 0) r = a << w[25:20]; else return 0;
        3'd5: if (w[31:26] == 0) r = a >> w[25:20];
              else if (w[31:26] == 6'b010000) r = $unsigned($signed(a) >>> w[25:20]);
              else return 0;
        default: return 0;
      endcase
      7'b0011011: case (f3)
        3'd0: r = sx(a[31:0] + imm[31:0]);
        3'd1: if (f7 == 0) r = sx(a[31:0] << w[24:20]); else return 0;
        3'd5: if (f7 == 0) r = sx(a[31:0] >> w[24:20]);
              else if (f7 == 7'h20) r = sx($unsigned($signed(a[31:0]) >>> w[24:20]));
              else return 0;
        default: return 0;
      endcase
      7'b0110111: r = {{32{w[31]}}, w[31:12], 12'd0};
      7'b0001011: if (f3 == 0 && f7 == 0) r = b + 64'(a[31]); else return 0;
      default: return 0;
    endcase
    return 1;
  endfunction

  function automatic logic [31:0] rand_word();
    logic [31:0] w;
    logic [6:0] opcs [7] = '{7'b0110011, 7'b0111011, 7'b0010011, 7'b0011011, 7'b0110111,
                             7'b0001011, 7'b0000011};
    w = $urandom;
    w[6:0] = opcs[$urandom_range(6)];
    // Mostly well-formed funct7 fields so that most words are legal.
    if ($urandom_range(9) != 0 && w[6:0] != 7'b0110111 && !(w[6:0] == 7'b0010011 && w[14:12] inside {3'd0, 3'd2, 3'd3, 3'd4, 3'd6, 3'd7})
        && !(w[6:0] == 7'b0011011 && w[14:12] == 3'd0)) begin
      w[31:25] = ($urandom_range(1) == 0) ? 7'h00 : 7'h20;
      if (w[6:0] == 7'b0010011) w[25] = $urandom;   // shamt[5]
    end
    if (w[6:0] == 7'b0001011 && $urandom_range(3) != 0) begin w[31:25] = 0; w[14:12] = 0; end
    return w;
  endfunction

  initial begin
    logic [31:0] prog [$];
    int unsigned n;
    bit taken, illegal;
    logic [XLEN-1:0] r;

    issue_valid = 0; issue_instr = '0; issue_tid = '0; pend = 0;
    foreach (regs[i]) regs[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Phase 1: boot example.
    prog = '{lui(19, 4), lui(20, 3), add(21, 19, 20)};
    run(prog, n);
    check(regs[21] == 64'h7000, $sformatf("boot example s5 = %h", regs[21]));

    // Phase 2: modular multiplication.
    modmul(225, 17, 39);
    modmul(11, 14, 10);
    for (int k = 0; k < N_RANDOM_MM; k++)
      modmul(int'($urandom_range(100000)), int'($urandom_range(30000)), int'($urandom_range(1, 5000)));

    // Phase 3: random instruction stream against the reference model.
    foreach (regs[i]) regs[i] = (i == 0) ? '0 : {$urandom, $urandom};
    for (int k = 0; k < N_RANDOM_OPS; k++) begin
      logic [31:0]     w;
      logic [XLEN-1:0] a, b, exp_r, old_rd;
      bit              ok;
      w = rand_word();
      a = regs[w[19:15]]; b = regs[w[24:20]];
      ok = ref_exec(w, a, b, exp_r);
      old_rd = regs[w[11:7]];
      if ($urandom_range(15) == 0) step(1'b0, '0, taken, illegal, r);   // idle cycle
      step(1'b1, w, taken, illegal, r);
      check(illegal == !ok, $sformatf("word %h legality %b", w, !illegal));
      if (ok) begin
        if (w[6:0] == 7'b0001011) n_custom++;
        check(r == exp_r, $sformatf("word %h a=%h b=%h result %h exp %h", w, a, b, r, exp_r));
        check(regs[w[11:7]] == ((w[11:7] == 0) ? 64'd0 : exp_r), "register write");
      end else begin
        check(regs[w[11:7]] == old_rd, "rejected word wrote a register");
      end
      check(regs[0] == '0, "x0 modified");
    end

    check(n_custom > 0,    "CUSTOM1 never executed");
    check(n_taken > 0,     "no taken branch");
    check(n_not_taken > 0, "no not-taken branch");
    check(n_illegal > 0,   "no rejected word");
    check(n_bubble > 0,    "no issue bubble");
    check(n_b2b > 0,       "no back-to-back issue");
    check(n_x0 > 0,        "no write to x0");
    $display("events: custom1=%0d taken=%0d not_taken=%0d rejected=%0d bubbles=%0d back_to_back=%0d x0_writes=%0d cycles=%0d",
             n_custom, n_taken, n_not_taken, n_illegal, n_bubble, n_b2b, n_x0, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
