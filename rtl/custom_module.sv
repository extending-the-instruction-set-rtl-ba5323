// custom_module: array driver of the NTRU instruction extension.
//
// One custom instruction works on GROUP (three) consecutive 32-bit elements.
// rs1 (array1_addr) is the byte address of the first array, which is also
// where the results go; rs2 (array2_addr) is the byte address of the second
// array, or the modulus for the MOD instruction. The module walks the RAM one
// word per access through the eight states of cm_state_e:
//
//   IDLE  latch operands and opcode when custom_en is high
//   ADDR  drive the RAM address (and, in the write pass, data and write enable)
//   WAIT1 RAM read latency (one cycle)
//   WAIT2 one more cycle, only for the first element of a read pass
//   LOAD  capture the read word into data_reg1 / data_reg2 / data_reg3
//   CALC  ADD: data_reg3 = data_reg1 + data_reg2;
//         MOD: enable the remainder units and wait for mod_valid
//   FIN1  custom_final = 1 for one cycle, custom_result = array1 address
//   FIN2  clear the local registers, back to IDLE
//
// Passes per instruction: ADD reads array1 then array2, adds, writes back;
// MOD reads array1, reduces every element modulo rs2, writes back; EQU reads
// array2 straight into data_reg3 and writes it to array1 (a1[k] = a2[k]).
// Each read costs ADDR, WAIT1, LOAD (plus WAIT2 for the first element); each
// write costs one ADDR cycle with custom_valid (the RAM write enable) high.
// With GROUP = 3: ADD ends (custom_final) 25 cycles after the IDLE cycle in
// which custom_en was seen, EQU 14 cycles after, and MOD 15 cycles plus the
// remainder latency (WIDTH+1 = 33 cycles at 32 bits) after.
//
// custom_en must stay high until custom_final; the core is stalled meanwhile.
// Addresses are word aligned: the low two address bits are dropped.
//
// The states, registers, ports and the self-returning result follow the
// document. The separate one-cycle write, the ram_req_o read/write request,
// the reset and the use of custom_final (not custom_valid) as the end-of-
// instruction signal are this design's choices.
module custom_module
  import ntru_ext_pkg::*;
#(
  parameter int unsigned ARRAY_LENGTH = GROUP,
  parameter int unsigned DATA_W       = XLEN,
  parameter int unsigned ADDR_W       = RAM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the decoder / register file
  input  logic              custom_en,
  input  custom_op_e        custom_op,
  input  logic [DATA_W-1:0] array1_addr,        // rs1 value
  input  logic [DATA_W-1:0] array2_addr,        // rs2 value (modulus for MOD)
  output logic [DATA_W-1:0] custom_result,      // rd value: array1 address
  output logic              custom_final,       // instruction finished
  // data RAM
  output logic              ram_req_o,
  output logic [ADDR_W-1:0] ram_addr_out,
  output logic              custom_valid,       // RAM write enable
  output logic [DATA_W-1:0] custom_data,        // RAM write data
  input  logic [DATA_W-1:0] ram_data_in,        // RAM read data
  // remainder units
  output logic              custom_mod_o,
  output logic [DATA_W-1:0] custom_op_a_o [ARRAY_LENGTH],
  output logic [DATA_W-1:0] custom_op_b_o,
  input  logic [DATA_W-1:0] custom_mod_result [ARRAY_LENGTH],
  input  logic              mod_valid
);

  localparam int unsigned IW = (ARRAY_LENGTH > 1) ? $clog2(ARRAY_LENGTH) : 1;

  cm_state_e         state_q;
  cm_phase_e         phase_q;
  custom_op_e        op_q;
  logic [IW-1:0]     i_q;
  logic [ADDR_W-1:0] a1_q, a2_q;             // word addresses
  logic [DATA_W-1:0] mod_q;
  logic [DATA_W-1:0] data_reg1 [ARRAY_LENGTH];
  logic [DATA_W-1:0] data_reg2 [ARRAY_LENGTH];
  logic [DATA_W-1:0] data_reg3 [ARRAY_LENGTH];

  logic last;
  assign last = (i_q == IW'(ARRAY_LENGTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= CM_IDLE;
      phase_q <= PH_READ_A;
      op_q    <= CUSTOM_OP_ADD;
      i_q     <= '0;
      a1_q    <= '0;
      a2_q    <= '0;
      mod_q   <= '0;
      for (int k = 0; k < ARRAY_LENGTH; k++) begin
        data_reg1[k] <= '0;
        data_reg2[k] <= '0;
        data_reg3[k] <= '0;
      end
    end else begin
      unique case (state_q)
        CM_IDLE: if (custom_en) begin
          a1_q    <= array1_addr[ADDR_W+1:2];
          a2_q    <= array2_addr[ADDR_W+1:2];
          mod_q   <= array2_addr;
          op_q    <= custom_op;
          i_q     <= '0;
          phase_q <= (custom_op == CUSTOM_OP_EQU) ? PH_READ_B : PH_READ_A;
          state_q <= CM_ADDR;
        end

        CM_ADDR: begin
          if (phase_q == PH_WRITE) begin
            if (last) begin
              i_q     <= '0;
              state_q <= CM_FIN1;
            end else begin
              i_q <= i_q + 1'b1;
            end
          end else begin
            state_q <= CM_WAIT1;
          end
        end

        CM_WAIT1: state_q <= (i_q == '0) ? CM_WAIT2 : CM_LOAD;
        CM_WAIT2: state_q <= CM_LOAD;

        CM_LOAD: begin
          if (phase_q == PH_READ_A)        data_reg1[i_q] <= ram_data_in;
          else if (op_q == CUSTOM_OP_EQU)  data_reg3[i_q] <= ram_data_in;
          else                             data_reg2[i_q] <= ram_data_in;
          if (!last) begin
            i_q     <= i_q + 1'b1;
            state_q <= CM_ADDR;
          end else begin
            i_q <= '0;
            unique case (op_q)
              CUSTOM_OP_EQU: begin
                phase_q <= PH_WRITE;
                state_q <= CM_ADDR;
              end
              CUSTOM_OP_MOD: state_q <= CM_CALC;
              default: begin
                if (phase_q == PH_READ_A) begin
                  phase_q <= PH_READ_B;
                  state_q <= CM_ADDR;
                end else begin
                  state_q <= CM_CALC;
                end
              end
            endcase
          end
        end

        CM_CALC: begin
          if (op_q == CUSTOM_OP_MOD) begin
            if (mod_valid) begin
              for (int k = 0; k < ARRAY_LENGTH; k++) data_reg3[k] <= custom_mod_result[k];
              phase_q <= PH_WRITE;
              state_q <= CM_ADDR;
            end
          end else begin
            for (int k = 0; k < ARRAY_LENGTH; k++) data_reg3[k] <= data_reg1[k] + data_reg2[k];
            phase_q <= PH_WRITE;
            state_q <= CM_ADDR;
          end
        end

        CM_FIN1: state_q <= CM_FIN2;

        CM_FIN2: begin
          for (int k = 0; k < ARRAY_LENGTH; k++) begin
            data_reg1[k] <= '0;
            data_reg2[k] <= '0;
            data_reg3[k] <= '0;
          end
          phase_q <= PH_READ_A;
          state_q <= CM_IDLE;
        end

        default: state_q <= CM_IDLE;
      endcase
    end
  end

  // RAM side: the address comes from the array the current pass walks.
  always_comb begin
    ram_req_o    = (state_q == CM_ADDR);
    ram_addr_out = (phase_q == PH_READ_B) ? a2_q + ADDR_W'(i_q) : a1_q + ADDR_W'(i_q);
    custom_valid = (state_q == CM_ADDR) && (phase_q == PH_WRITE);
    custom_data  = custom_valid ? data_reg3[i_q] : '0;
  end

  // Remainder side: all units see the same modulus, one element each.
  assign custom_mod_o  = (state_q == CM_CALC) && (op_q == CUSTOM_OP_MOD);
  assign custom_op_b_o = mod_q;
  always_comb begin
    for (int k = 0; k < ARRAY_LENGTH; k++) custom_op_a_o[k] = data_reg1[k];
  end

  // Core side: self-returning instruction, rd receives the array1 address.
  assign custom_final  = (state_q == CM_FIN1);
  assign custom_result = custom_final ? {{(DATA_W-ADDR_W-2){1'b0}}, a1_q, 2'b00} : '0;

endmodule
