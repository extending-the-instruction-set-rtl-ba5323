// custom_ex_block: the part of the execution stage added for the NTRU array
// instructions.
//
// It holds the array driver (custom_module) and GROUP (three) remainder units
// that reduce three elements in parallel. The remainder units take their
// operands from the driver and report back through one valid, the AND of
// their three valid outputs. The stage result is selected by the decoder's
// enable: custom_result while a custom instruction is in execution, otherwise
// the core's multiplier/divider or ALU result, which arrive as inputs. While
// a custom instruction runs, custom_stall holds the fetch and decode stages,
// in the same way a multi-cycle MUL/DIV instruction does; it drops in the
// cycle custom_final is high, when rd is written and the core moves on.
//
// Timing: see custom_module (25 cycles for ADD, 14 for EQU, 48 for MOD at
// the defaults, counted from the first cycle custom_en is high to
// custom_final). The RAM port expects a single-port RAM with one cycle read
// latency whose read data stays valid until the next access.
//
// The structure (driver, three remainder instances, AND of valids, result
// chosen by the enable, stall until the module is done) follows the document.
module custom_ex_block
  import ntru_ext_pkg::*;
#(
  parameter int unsigned ARRAY_LENGTH = GROUP,
  parameter int unsigned DATA_W       = XLEN,
  parameter int unsigned ADDR_W       = RAM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // from decode
  input  logic              custom_en,
  input  custom_op_e        custom_op,
  input  logic [DATA_W-1:0] operand_a,        // rs1 value
  input  logic [DATA_W-1:0] operand_b,        // rs2 value
  // results of the core's own execution units
  input  logic [DATA_W-1:0] alu_result,
  input  logic [DATA_W-1:0] multdiv_result,
  input  logic              multdiv_sel,
  // to writeback / fetch
  output logic [DATA_W-1:0] ex_result,
  output logic              custom_final,
  output logic              custom_stall,
  // data RAM
  output logic              ram_req_o,
  output logic              ram_we_o,
  output logic [ADDR_W-1:0] ram_addr_o,
  output logic [DATA_W-1:0] ram_wdata_o,
  input  logic [DATA_W-1:0] ram_rdata_i
);

  logic              custom_mod;
  logic [DATA_W-1:0] op_a [ARRAY_LENGTH];
  logic [DATA_W-1:0] op_b;
  logic [DATA_W-1:0] mod_result [ARRAY_LENGTH];
  logic [ARRAY_LENGTH-1:0] rem_valid;
  logic              mod_valid;
  logic [DATA_W-1:0] custom_result;

  custom_module #(
    .ARRAY_LENGTH(ARRAY_LENGTH),
    .DATA_W      (DATA_W),
    .ADDR_W      (ADDR_W)
  ) u_custom_module (
    .clk,
    .rst_n,
    .custom_en,
    .custom_op,
    .array1_addr      (operand_a),
    .array2_addr      (operand_b),
    .custom_result,
    .custom_final,
    .ram_req_o,
    .ram_addr_out     (ram_addr_o),
    .custom_valid     (ram_we_o),
    .custom_data      (ram_wdata_o),
    .ram_data_in      (ram_rdata_i),
    .custom_mod_o     (custom_mod),
    .custom_op_a_o    (op_a),
    .custom_op_b_o    (op_b),
    .custom_mod_result(mod_result),
    .mod_valid
  );

  for (genvar g = 0; g < ARRAY_LENGTH; g++) begin : g_rem
    remainder #(.WIDTH(DATA_W)) u_remainder (
      .clk,
      .rst_n,
      .enable  (custom_mod),
      .dividend(op_a[g]),
      .divisor (op_b),
      .result  (mod_result[g]),
      .valid   (rem_valid[g])
    );
  end

  assign mod_valid = &rem_valid;

  assign ex_result    = custom_en   ? custom_result  :
                        multdiv_sel ? multdiv_result : alu_result;
  assign custom_stall = custom_en && !custom_final;

endmodule
