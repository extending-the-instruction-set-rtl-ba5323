// tb_ntru_ext_top: end-to-end test of the NTRU instruction extension at its
// default sizes.
//
// The testbench plays the part of the core: it holds a 32-entry register
// file and a 64 KiB single-port data RAM, presents instruction words to the
// decode port, stalls while stall_o is high and writes rd when rf_we_o is
// high. On top of that it runs the software wrappers that split an array
// operation of any length into custom instructions on groups of three plus
// one or two trailing elements done by plain loads and stores:
//   array_add(a1, a2, n)   a1[k] = a1[k] + a2[k]
//   array_mod(a1, m, n)    a1[k] = a1[k] mod m      (unsigned)
//   array_equ(a1, a2, n)   a1[k] = a2[k]
// Workloads:
//   1. the 17-element example: add, then mod 7, then copy, with the expected
//      arrays written out by hand;
//   2. a product of two degree-52 polynomials modulo q = 101 (N = 53, the
//      size of the NTRU parameter set used with this extension): the partial
//      product rows (105 words) are reduced with array_mod and accumulated
//      with array_add, the inputs are copied with array_equ, and the result
//      is compared with a directly computed convolution;
//   3. lengths 16 and 52 to exercise the one-element tail.
// Every custom instruction is checked for its occupancy of the decode stage
// (latency + 1 cycles, one more when it follows another custom instruction
// back to back) and for its rd value. Mechanisms counted, each must occur:
// stall cycles, ADD/EQU/MOD instructions, remainder waits (MOD), back-to-back
// issue, one- and two-element software tails, illegal CUSTOM_0 encodings and
// ALU / MUL-DIV results passed through the result select.
module tb_ntru_ext_top;
  import ntru_ext_pkg::*;

  localparam int unsigned AW = RAM_AW;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [31:0]       instr_rdata_i = 32'h0000_0013;   // nop
  logic              instr_valid_i = 1'b0;
  logic              illegal_insn_o, stall_o;
  logic [4:0]        rf_raddr_a_o, rf_raddr_b_o, rf_waddr_o;
  logic [31:0]       rf_rdata_a_i, rf_rdata_b_i;
  logic              rf_we_o;
  logic [31:0]       rf_wdata_o;
  logic [31:0]       alu_result_i = '0, multdiv_result_i = '0;
  logic              multdiv_sel_i = 1'b0;
  logic [31:0]       ex_result_o;
  logic              ram_req_o, ram_we_o;
  logic [AW-1:0]     ram_addr_o;
  logic [31:0]       ram_wdata_o, ram_rdata_i;

  ntru_ext_top dut (.*);

  ram_1p_model #(.AW(AW)) u_ram (
    .clk, .req(ram_req_o), .we(ram_we_o), .addr(ram_addr_o),
    .wdata(ram_wdata_o), .rdata(ram_rdata_i)
  );

  // register file of the modelled core
  logic [31:0] regs [32];
  assign rf_rdata_a_i = regs[rf_raddr_a_o];
  assign rf_rdata_b_i = regs[rf_raddr_b_o];
  always @(posedge clk) if (rf_we_o && rf_waddr_o != 0) regs[rf_waddr_o] <= rf_wdata_o;

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_stall = 0, n_add = 0, n_equ = 0, n_mod = 0, n_b2b = 0;
  int unsigned n_tail1 = 0, n_tail2 = 0, n_illegal = 0, n_pass_alu = 0, n_pass_md = 0;
  int unsigned n_rem_wait = 0;
  logic        prev_custom = 1'b0;

  always @(posedge clk) if (stall_o) n_stall++;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic logic [31:0] insn(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                       logic [4:0] rd);
    return {f7, rs2, rs1, FUNCT3_CUSTOM, rd, OPCODE_CUSTOM_0};
  endfunction

  // Issue one custom instruction "op a0, a0, a1" and wait until it retires.
  task automatic custom_insn(input custom_op_e op, input logic [31:0] a1b, input logic [31:0] b);
    int unsigned occ, exp_occ;
    @(negedge clk);
    regs[10] = a1b;
    regs[11] = b;
    regs[12] = 32'hDEAD_BEEF;
    instr_rdata_i = insn(op, 5'd11, 5'd10, 5'd12);
    instr_valid_i = 1'b1;
    #1;
    occ = 1;
    while (stall_o && occ < 1000) begin
      @(negedge clk);
      #1 occ++;
    end
    exp_occ = ((op == CUSTOM_OP_ADD) ? 25 : (op == CUSTOM_OP_EQU) ? 14 : 48) + 1 +
              (prev_custom ? 1 : 0);
    checks++;
    if (occ != exp_occ) fail($sformatf("op %0h occupied decode %0d cycles, expected %0d",
                                       op, occ, exp_occ));
    if (prev_custom) n_b2b++;
    if (op == CUSTOM_OP_MOD && occ > 14 + 1) n_rem_wait++;
    unique case (op)
      CUSTOM_OP_ADD: n_add++;
      CUSTOM_OP_EQU: n_equ++;
      default:       n_mod++;
    endcase
    checks++;
    if (!rf_we_o || rf_waddr_o != 5'd12 || rf_wdata_o !== a1b) fail("rd write");
    @(posedge clk);
    #1 checks++;
    if (regs[12] !== a1b) fail("rd value");
    prev_custom = 1'b1;
  endtask

  // A non-custom instruction: the ALU or MUL/DIV result must pass through.
  task automatic plain_insn();
    @(negedge clk);
    instr_rdata_i    = 32'h00B5_0533;    // add a0, a0, a1
    instr_valid_i    = 1'b1;
    alu_result_i     = $urandom;
    multdiv_result_i = $urandom;
    multdiv_sel_i    = $urandom % 2;
    #1 checks++;
    if (stall_o || rf_we_o || illegal_insn_o ||
        ex_result_o !== (multdiv_sel_i ? multdiv_result_i : alu_result_i))
      fail("plain instruction");
    else if (multdiv_sel_i) n_pass_md++;
    else n_pass_alu++;
    prev_custom = 1'b0;
  endtask

  task automatic illegal_insn(input logic [6:0] f7, input logic [2:0] f3);
    @(negedge clk);
    instr_rdata_i = {f7, 5'd11, 5'd10, f3, 5'd12, OPCODE_CUSTOM_0};
    instr_valid_i = 1'b1;
    #1 checks++;
    if (!illegal_insn_o || stall_o || ram_req_o) fail("illegal CUSTOM_0 not flagged");
    else n_illegal++;
    prev_custom = 1'b0;
  endtask

  // Software wrappers: groups of three through the instruction, the tail by hand.
  task automatic array_op(input custom_op_e op, input logic [31:0] a1b, input logic [31:0] b,
                          input int unsigned n);
    int unsigned groups, tail;
    groups = n / 3;
    tail   = n % 3;
    for (int g = 0; g < groups; g++)
      custom_insn(op, a1b + 12 * g, (op == CUSTOM_OP_MOD) ? b : b + 12 * g);
    plain_insn();     // the loop around the tail is ordinary code
    for (int k = n - tail; k < n; k++) begin
      unique case (op)
        CUSTOM_OP_ADD: u_ram.mem[a1b/4+k] = u_ram.mem[a1b/4+k] + u_ram.mem[b/4+k];
        CUSTOM_OP_EQU: u_ram.mem[a1b/4+k] = u_ram.mem[b/4+k];
        default:       u_ram.mem[a1b/4+k] = u_ram.mem[a1b/4+k] % b;
      endcase
    end
    if (tail == 1) n_tail1++;
    if (tail == 2) n_tail2++;
  endtask

  task automatic expect_array(input string what, input logic [31:0] a1b, input int unsigned n,
                              input logic [31:0] exp [], input logic [31:0] guard_word);
    checks++;
    for (int k = 0; k < n; k++)
      if (u_ram.mem[a1b/4+k] !== exp[k]) begin
        fail($sformatf("%s[%0d] = %0d, expected %0d", what, k, u_ram.mem[a1b/4+k], exp[k]));
        break;
      end
    checks++;
    if (u_ram.mem[a1b/4+n] !== guard_word) fail($sformatf("%s: word after the array changed", what));
  endtask

  // ---------------------------------------------------------------------
  localparam logic [31:0] ARR1 = 32'h0000_0400;   // byte addresses
  localparam logic [31:0] ARR2 = 32'h0000_0800;
  localparam int unsigned N    = 53;
  localparam int unsigned Q    = 101;
  localparam int          QI   = 101;
  localparam int unsigned LEN  = 2 * N - 1;        // 105 coefficients
  localparam logic [31:0] POLA = 32'h0000_2000;
  localparam logic [31:0] POLB = 32'h0000_2400;
  localparam logic [31:0] PA   = 32'h0000_2800;    // reduced copies
  localparam logic [31:0] PB   = 32'h0000_2C00;
  localparam logic [31:0] LINE = 32'h0000_3000;
  localparam logic [31:0] PROD = 32'h0000_3400;
  localparam logic [31:0] GUARD = 32'h5A5A_A5A5;

  initial begin
    static int a1_init [17] = '{-1, -2, -3, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 16, 1, 6};
    static int a2_init [17] = '{10, 11, 12, 13, 14, 15, 161, 162, 163, 164, 165, 166, 1, 2, 3, 2, 8};
    static logic [31:0] exp_add [] = '{9, 9, 9, 14, 16, 18, 165, 167, 169, 171, 173, 175, 11, 13, 19, 3, 14};
    static logic [31:0] exp_mod [] = '{2, 2, 2, 0, 2, 4, 4, 6, 1, 3, 5, 0, 4, 6, 5, 3, 0};
    logic [31:0] exp_equ [];
    int   pa [N], pb [N];
    logic [31:0] prod_ref [];
    logic [31:0] cp [];
    int unsigned t0;

    foreach (regs[k]) regs[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    plain_insn();

    // ---- workload 1: the 17-element example ----
    for (int k = 0; k < 17; k++) begin
      u_ram.mem[ARR1/4+k] = a1_init[k];
      u_ram.mem[ARR2/4+k] = a2_init[k];
    end
    u_ram.mem[ARR1/4+17] = GUARD;
    u_ram.mem[ARR2/4+17] = GUARD;
    array_op(CUSTOM_OP_ADD, ARR1, ARR2, 17);
    expect_array("add", ARR1, 17, exp_add, GUARD);
    array_op(CUSTOM_OP_MOD, ARR1, 32'd7, 17);
    expect_array("mod", ARR1, 17, exp_mod, GUARD);
    array_op(CUSTOM_OP_EQU, ARR1, ARR2, 17);
    exp_equ = new[17];
    foreach (exp_equ[k]) exp_equ[k] = a2_init[k];
    expect_array("equ", ARR1, 17, exp_equ, GUARD);
    illegal_insn(7'h04, 3'd7);
    illegal_insn(7'h03, 3'd0);

    // ---- workload 2: degree-52 polynomial product mod 101 ----
    for (int k = 0; k < N; k++) begin
      pa[k] = int'($urandom % 3) - 1;         // ternary, like f, g, r
      pb[k] = int'($urandom % Q);
      u_ram.mem[POLA/4+k] = pa[k];
      u_ram.mem[POLB/4+k] = pb[k];
    end
    for (int k = 0; k < LEN; k++) u_ram.mem[PROD/4+k] = 0;
    u_ram.mem[PROD/4+LEN] = GUARD;
    t0 = n_add + n_mod + n_equ;
    // copy the inputs and make them non-negative, then reduce them
    array_op(CUSTOM_OP_EQU, PA, POLA, N);
    array_op(CUSTOM_OP_EQU, PB, POLB, N);
    for (int k = 0; k < N; k++) begin                 // while (x < 0) x += q
      if (int'(u_ram.mem[PA/4+k]) < 0) u_ram.mem[PA/4+k] = u_ram.mem[PA/4+k] + Q;
      if (int'(u_ram.mem[PB/4+k]) < 0) u_ram.mem[PB/4+k] = u_ram.mem[PB/4+k] + Q;
    end
    array_op(CUSTOM_OP_MOD, PA, Q, N);
    array_op(CUSTOM_OP_MOD, PB, Q, N);
    // one partial-product row per coefficient of b, reduced and accumulated
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < LEN; k++) u_ram.mem[LINE/4+k] = 0;
      for (int k = 0; k < N; k++)
        u_ram.mem[LINE/4+k+j] = u_ram.mem[PA/4+k] * u_ram.mem[PB/4+j];
      array_op(CUSTOM_OP_MOD, LINE, Q, LEN);
      array_op(CUSTOM_OP_ADD, PROD, LINE, LEN);
    end
    array_op(CUSTOM_OP_MOD, PROD, Q, LEN);
    prod_ref = new[LEN];
    foreach (prod_ref[k]) prod_ref[k] = 0;
    for (int j = 0; j < N; j++)
      for (int k = 0; k < N; k++) begin
        int am, acc;
        am  = (pa[k] < 0) ? pa[k] + QI : pa[k];
        acc = (int'(prod_ref[k+j]) + am * pb[j]) % QI;
        prod_ref[k+j] = 32'(acc);
      end
    expect_array("product", PROD, LEN, prod_ref, GUARD);
    $display("polynomial product: %0d custom instructions", n_add + n_mod + n_equ - t0);

    // ---- workload 3: lengths with a one-element tail ----
    cp = new[52];
    for (int k = 0; k < 52; k++) begin
      cp[k] = $urandom;
      u_ram.mem[ARR2/4+k] = cp[k];
    end
    u_ram.mem[ARR1/4+52] = GUARD;
    array_op(CUSTOM_OP_EQU, ARR1, ARR2, 52);
    expect_array("copy52", ARR1, 52, cp, GUARD);
    for (int k = 0; k < 16; k++) cp[k] = cp[k] % 32'd12289;
    u_ram.mem[ARR1/4+16] = GUARD;
    array_op(CUSTOM_OP_MOD, ARR1, 32'd12289, 16);
    expect_array("mod16", ARR1, 16, cp, GUARD);
    plain_insn();

    // ---- every mechanism must have happened ----
    $display("stall cycles %0d, ADD %0d, EQU %0d, MOD %0d, remainder waits %0d, back-to-back %0d",
             n_stall, n_add, n_equ, n_mod, n_rem_wait, n_b2b);
    $display("tails 1/2: %0d/%0d, illegal %0d, ALU pass %0d, MUL/DIV pass %0d",
             n_tail1, n_tail2, n_illegal, n_pass_alu, n_pass_md);
    checks++; if (n_stall == 0)    fail("no stall");
    checks++; if (n_add == 0)      fail("no ADD");
    checks++; if (n_equ == 0)      fail("no EQU");
    checks++; if (n_mod == 0)      fail("no MOD");
    checks++; if (n_rem_wait == 0) fail("no remainder wait");
    checks++; if (n_b2b == 0)      fail("no back-to-back issue");
    checks++; if (n_tail1 == 0)    fail("no one-element tail");
    checks++; if (n_tail2 == 0)    fail("no two-element tail");
    checks++; if (n_illegal == 0)  fail("no illegal encoding");
    checks++; if (n_pass_alu == 0) fail("no ALU pass-through");
    checks++; if (n_pass_md == 0)  fail("no MUL/DIV pass-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
