// ntru_ext_pkg: shared constants and types of the NTRU array-instruction
// extension.
//
// The three array instructions are R-type instructions in the RISC-V CUSTOM_0
// opcode space. funct3 is always 3'b111 (two source registers and one
// destination register) and funct7 selects the operation: 0x03 element-wise
// addition, 0x05 element-wise copy ("equalization") and 0x06 element-wise
// modulus. These encodings follow the document. The element width (32 bits),
// the group size (three elements per instruction) and the 14-bit RAM word
// address also follow it; the state names are this design's own.
package ntru_ext_pkg;

  // Word width of the core and of one array element.
  localparam int unsigned XLEN = 32;

  // Word address width of the data RAM the extension drives (16K words).
  localparam int unsigned RAM_AW = 14;

  // Elements handled by one custom instruction (hard-coded array length).
  localparam int unsigned GROUP = 3;

  localparam logic [6:0] OPCODE_CUSTOM_0 = 7'b000_1011;
  localparam logic [2:0] FUNCT3_CUSTOM   = 3'b111;

  // funct7 values of the three instructions.
  typedef enum logic [6:0] {
    CUSTOM_OP_ADD = 7'h03,
    CUSTOM_OP_EQU = 7'h05,
    CUSTOM_OP_MOD = 7'h06
  } custom_op_e;

  // The eight states of the array driver.
  typedef enum logic [2:0] {
    CM_IDLE  = 3'd0,  // wait for the enable, latch operands
    CM_ADDR  = 3'd1,  // present a RAM address (read or write)
    CM_WAIT1 = 3'd2,  // RAM read latency
    CM_WAIT2 = 3'd3,  // extra settling cycle on the first element of a pass
    CM_LOAD  = 3'd4,  // capture the RAM read data
    CM_CALC  = 3'd5,  // add, or run the remainder units
    CM_FIN1  = 3'd6,  // tell the core the instruction is finished
    CM_FIN2  = 3'd7   // clear the local registers
  } cm_state_e;

  // Which array a pass walks over.
  typedef enum logic [1:0] {
    PH_READ_A = 2'd0,  // read the first array (rs1) into data_reg1
    PH_READ_B = 2'd1,  // read the second array (rs2) into data_reg2 / data_reg3
    PH_WRITE  = 2'd2   // write data_reg3 back to the first array
  } cm_phase_e;

  function automatic logic custom_op_legal(logic [6:0] funct7);
    return funct7 inside {CUSTOM_OP_ADD, CUSTOM_OP_EQU, CUSTOM_OP_MOD};
  endfunction

endpackage
