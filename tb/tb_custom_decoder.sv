// tb_custom_decoder: self-checking test of the CUSTOM_0 decoder extension.
// Checks the three encodings the software uses (.insn r CUSTOM_0, 7, f7),
// every funct3/funct7 pair in CUSTOM_0, other opcodes and instr_valid low,
// against an independent reference written from the instruction format.
module tb_custom_decoder;
  import ntru_ext_pkg::*;

  logic [31:0] instr_rdata;
  logic        instr_valid;
  logic        custom_en;
  custom_op_e  custom_op;
  logic        rf_we;
  logic [4:0]  rf_raddr_a, rf_raddr_b, rf_waddr;
  logic        illegal_insn;
  int unsigned checks = 0, failures = 0;
  logic        clk = 1'b0;

  custom_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rtype(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  task automatic check(input logic [31:0] ins, input logic v);
    logic exp_en, exp_ill;
    logic is_c0, ok;
    instr_rdata = ins;
    instr_valid = v;
    #1;
    is_c0   = v && (ins[6:0] == 7'h0B);
    ok      = (ins[14:12] == 3'd7) &&
              (ins[31:25] == 7'd3 || ins[31:25] == 7'd5 || ins[31:25] == 7'd6);
    exp_en  = is_c0 && ok;
    exp_ill = is_c0 && !ok;
    checks++;
    if (custom_en !== exp_en || illegal_insn !== exp_ill || rf_we !== exp_en ||
        rf_raddr_a !== ins[19:15] || rf_raddr_b !== ins[24:20] || rf_waddr !== ins[11:7] ||
        (exp_en && custom_op !== custom_op_e'(ins[31:25]))) begin
      failures++;
      $display("FAIL instr %08h valid %0b: en %0b ill %0b op %0h", ins, v, custom_en,
               illegal_insn, custom_op);
    end
  endtask

  initial begin
    // the three instructions as the software encodes them
    check(rtype(7'd3, 5'd11, 5'd10, 3'd7, 5'd10, 7'h0B), 1'b1);
    check(rtype(7'd5, 5'd12, 5'd13, 3'd7, 5'd13, 7'h0B), 1'b1);
    check(rtype(7'd6, 5'd15, 5'd14, 3'd7, 5'd14, 7'h0B), 1'b1);
    // known encodings by value: ADD a0,a0,a1 = 0x06b5750b
    check(32'h06B5_750B, 1'b1);
    checks++;
    if (!custom_en || custom_op != CUSTOM_OP_ADD) begin
      failures++;
      $display("FAIL 0x06b5750b not decoded as ADD");
    end
    // every funct3/funct7 pair in CUSTOM_0, valid and not valid
    for (int f3 = 0; f3 < 8; f3++)
      for (int f7 = 0; f7 < 128; f7++) begin
        check(rtype(7'(f7), 5'($urandom), 5'($urandom), 3'(f3), 5'($urandom), 7'h0B), 1'b1);
        check(rtype(7'(f7), 5'($urandom), 5'($urandom), 3'(f3), 5'($urandom), 7'h0B), 1'b0);
      end
    // other opcodes: OP (0x33), CUSTOM_1 (0x2B), random
    check(rtype(7'd3, 5'd1, 5'd2, 3'd7, 5'd3, 7'h33), 1'b1);
    check(rtype(7'd5, 5'd1, 5'd2, 3'd7, 5'd3, 7'h2B), 1'b1);
    for (int n = 0; n < 2000; n++) check($urandom, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
