// custom_decoder: decoder extension for the NTRU array instructions.
//
// It looks at the instruction word held in the decode stage and recognises
// the R-type CUSTOM_0 instructions of the extension (opcode 0001011,
// funct3 = 111, funct7 = 0x03 ADD, 0x05 EQU, 0x06 MOD). For these it raises
// custom_en, hands the funct7 opcode to the execution stage and asks for a
// register-file write of rd. Any other funct3/funct7 in CUSTOM_0 is flagged
// as an illegal instruction. The rs1/rs2/rd fields are split out as for any
// R-type instruction. Purely combinational; custom_en is high for as long as
// the instruction sits in decode, which the core ensures by stalling until
// the execution stage reports custom_final.
//
// The opcode space, funct3 and funct7 values follow the document; the port
// set and the illegal-instruction rule are this design's choices.
module custom_decoder
  import ntru_ext_pkg::*;
(
  input  logic [31:0] instr_rdata,
  input  logic        instr_valid,
  output logic        custom_en,
  output custom_op_e  custom_op,
  output logic        rf_we,
  output logic [4:0]  rf_raddr_a,
  output logic [4:0]  rf_raddr_b,
  output logic [4:0]  rf_waddr,
  output logic        illegal_insn
);

  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic       is_custom0, legal;

  assign opcode = instr_rdata[6:0];
  assign funct3 = instr_rdata[14:12];
  assign funct7 = instr_rdata[31:25];

  assign is_custom0 = instr_valid && (opcode == OPCODE_CUSTOM_0);
  assign legal      = (funct3 == FUNCT3_CUSTOM) && custom_op_legal(funct7);

  assign custom_en    = is_custom0 && legal;
  assign illegal_insn = is_custom0 && !legal;
  assign custom_op    = custom_op_e'(funct7);
  assign rf_we        = custom_en;
  assign rf_raddr_a   = instr_rdata[19:15];
  assign rf_raddr_b   = instr_rdata[24:20];
  assign rf_waddr     = instr_rdata[11:7];

endmodule
