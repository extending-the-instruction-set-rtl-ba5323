// tb_custom_ex_block: self-checking test of the execution-stage extension
// with its real remainder units. Random ADD, EQU and MOD instructions run
// against a behavioural RAM and a reference copy of memory. Checked: memory
// contents, rd value, instruction latency (25 ADD, 14 EQU, 48 MOD), the stall
// being high on every cycle of a custom instruction except the final one,
// and the result select passing the ALU or MUL/DIV result when no custom
// instruction is in execution.
module tb_custom_ex_block;
  import ntru_ext_pkg::*;

  localparam int unsigned L     = GROUP;
  localparam int unsigned AW    = RAM_AW;
  localparam int unsigned WORDS = 128;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          custom_en = 1'b0;
  custom_op_e    custom_op = CUSTOM_OP_ADD;
  logic [31:0]   operand_a = '0, operand_b = '0;
  logic [31:0]   alu_result = '0, multdiv_result = '0;
  logic          multdiv_sel = 1'b0;
  logic [31:0]   ex_result;
  logic          custom_final;
  logic          custom_stall;
  logic          ram_req_o, ram_we_o;
  logic [AW-1:0] ram_addr_o;
  logic [31:0]   ram_wdata_o, ram_rdata_i;

  int unsigned checks = 0, failures = 0;
  logic [31:0] ref_mem [WORDS];
  int          cycle = 0, last_final = -10;

  custom_ex_block dut (.*);

  ram_1p_model #(.AW(AW)) u_ram (
    .clk, .req(ram_req_o), .we(ram_we_o), .addr(ram_addr_o),
    .wdata(ram_wdata_o), .rdata(ram_rdata_i)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic passthrough();
    @(negedge clk);
    custom_en      = 1'b0;
    alu_result     = $urandom;
    multdiv_result = $urandom;
    multdiv_sel    = $urandom % 2;
    #1 checks++;
    if (ex_result !== (multdiv_sel ? multdiv_result : alu_result)) fail("result select");
    checks++;
    if (custom_stall) fail("stall without a custom instruction");
  endtask

  task automatic issue(input custom_op_e op, input int unsigned w1, input logic [31:0] b);
    int unsigned cyc, exp_cyc;
    logic [31:0] a1b;
    logic [31:0] snap_a [L], snap_b [L];
    a1b = w1 * 4;
    // the hardware reads all operands before it writes: use a snapshot
    for (int k = 0; k < L; k++) begin
      snap_a[k] = ref_mem[w1+k];
      snap_b[k] = ref_mem[b/4+k];
    end
    for (int k = 0; k < L; k++) begin
      unique case (op)
        CUSTOM_OP_ADD: ref_mem[w1+k] = snap_a[k] + snap_b[k];
        CUSTOM_OP_EQU: ref_mem[w1+k] = snap_b[k];
        default:       ref_mem[w1+k] = (b == 0) ? snap_a[k] : snap_a[k] % b;
      endcase
    end
    exp_cyc = (op == CUSTOM_OP_ADD) ? 25 : (op == CUSTOM_OP_EQU) ? 14 : 48;
    @(negedge clk);
    custom_en   = 1'b1;
    custom_op   = op;
    operand_a   = a1b;
    operand_b   = b;
    alu_result  = $urandom;
    #1;
    while (cycle < last_final + 2) @(negedge clk);
    cyc = 0;
    while (!custom_final && cyc < 500) begin
      checks++;
      if (!custom_stall) fail("stall low before the instruction ends");
      @(negedge clk);
      cyc++;
    end
    last_final = cycle;
    checks++;
    if (cyc != exp_cyc) fail($sformatf("op %0h took %0d cycles, expected %0d", op, cyc, exp_cyc));
    checks++;
    if (custom_stall) fail("stall high in the final cycle");
    checks++;
    if (ex_result !== a1b) fail($sformatf("rd = %08h, expected %08h", ex_result, a1b));
    @(negedge clk);
    custom_en = 1'b0;
    checks++;
    for (int k = 0; k < WORDS; k++)
      if (u_ram.mem[k] !== ref_mem[k]) begin
        fail($sformatf("mem[%0d] = %08h, expected %08h", k, u_ram.mem[k], ref_mem[k]));
        break;
      end
  endtask

  initial begin
    for (int k = 0; k < WORDS; k++) begin
      ref_mem[k] = (k % 4 == 0) ? 32'hFFFF_FFF0 + k : $urandom % 1000;
      u_ram.mem[k] = ref_mem[k];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      int unsigned sel, w1, w2;
      sel = $urandom % 3;
      w1  = $urandom % (WORDS - L);
      w2  = $urandom % (WORDS - L);
      passthrough();
      if (sel == 0)      issue(CUSTOM_OP_ADD, w1, w2 * 4);
      else if (sel == 1) issue(CUSTOM_OP_EQU, w1, w2 * 4);
      else               issue(CUSTOM_OP_MOD, w1, (n % 5 == 0) ? $urandom : ($urandom % 120) + 1);
    end
    passthrough();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
