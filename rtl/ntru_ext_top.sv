// ntru_ext_top: NTRU array-instruction extension of a small RV32 core.
//
// The extension adds three R-type instructions in the CUSTOM_0 opcode space
// that each process three consecutive 32-bit array elements in memory:
// element-wise ADD (a1[k] += a2[k]), EQU (a1[k] = a2[k]) and MOD
// (a1[k] = a1[k] mod m). rs1 holds the byte address of a1, rs2 the byte
// address of a2 or the modulus m; rd receives the address of a1 back.
// Longer arrays are handled by software calling the instruction once per
// group of three and doing the last one or two elements itself.
//
// This top joins the two pieces the extension adds to a two-stage core:
// the decoder extension (custom_decoder) and the execution-stage extension
// (custom_ex_block: array driver, three remainder units, result select,
// stall). The core itself (fetch, register file, ALU, MUL/DIV, load/store)
// is outside; its signals are ports here:
//   - instr_rdata_i/instr_valid_i: the instruction in decode;
//   - rf_raddr_*_o / rf_rdata_*_i: register-file read of rs1 and rs2;
//   - alu_result_i, multdiv_result_i, multdiv_sel_i: results of the core's
//     own units, passed to ex_result_o when no custom instruction runs;
//   - stall_o: hold fetch/decode; high from the first cycle of a custom
//     instruction until the cycle before it finishes;
//   - rf_we_o/rf_waddr_o/rf_wdata_o: the rd write of a custom instruction,
//     one cycle, when it finishes;
//   - illegal_insn_o: an unknown funct3/funct7 in CUSTOM_0.
// The RAM port (req/we/addr/wdata/rdata) connects straight to a single-port
// data RAM with one-cycle read latency and a 14-bit word address (64 KiB).
//
// The partitioning and the instruction set follow the document; the port
// names towards the core are this design's own.
module ntru_ext_top
  import ntru_ext_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // decode stage
  input  logic [31:0]       instr_rdata_i,
  input  logic              instr_valid_i,
  output logic              illegal_insn_o,
  output logic              stall_o,
  // register file
  output logic [4:0]        rf_raddr_a_o,
  output logic [4:0]        rf_raddr_b_o,
  input  logic [XLEN-1:0]   rf_rdata_a_i,
  input  logic [XLEN-1:0]   rf_rdata_b_i,
  output logic              rf_we_o,
  output logic [4:0]        rf_waddr_o,
  output logic [XLEN-1:0]   rf_wdata_o,
  // the core's own execution units
  input  logic [XLEN-1:0]   alu_result_i,
  input  logic [XLEN-1:0]   multdiv_result_i,
  input  logic              multdiv_sel_i,
  output logic [XLEN-1:0]   ex_result_o,
  // data RAM
  output logic              ram_req_o,
  output logic              ram_we_o,
  output logic [RAM_AW-1:0] ram_addr_o,
  output logic [XLEN-1:0]   ram_wdata_o,
  input  logic [XLEN-1:0]   ram_rdata_i
);

  logic       custom_en;
  custom_op_e custom_op;
  logic       dec_rf_we;
  logic       custom_final;

  custom_decoder u_decoder (
    .instr_rdata (instr_rdata_i),
    .instr_valid (instr_valid_i),
    .custom_en,
    .custom_op,
    .rf_we       (dec_rf_we),
    .rf_raddr_a  (rf_raddr_a_o),
    .rf_raddr_b  (rf_raddr_b_o),
    .rf_waddr    (rf_waddr_o),
    .illegal_insn(illegal_insn_o)
  );

  custom_ex_block u_ex (
    .clk,
    .rst_n,
    .custom_en,
    .custom_op,
    .operand_a     (rf_rdata_a_i),
    .operand_b     (rf_rdata_b_i),
    .alu_result    (alu_result_i),
    .multdiv_result(multdiv_result_i),
    .multdiv_sel   (multdiv_sel_i),
    .ex_result     (ex_result_o),
    .custom_final,
    .custom_stall  (stall_o),
    .ram_req_o,
    .ram_we_o,
    .ram_addr_o,
    .ram_wdata_o,
    .ram_rdata_i
  );

  assign rf_we_o    = dec_rf_we && custom_final;
  assign rf_wdata_o = ex_result_o;

endmodule
