// tb_custom_module: self-checking test of the array driver on its own.
// The driver is connected to a behavioural RAM and to a behavioural model of
// the three remainder units (result a % b, valid REM_LAT cycles after their
// enable rises). Random ADD, EQU and MOD instructions, some issued back to
// back, are checked against a reference copy of memory: the three target
// words must hold the expected values and no other word may change. The
// cycle count from the first enable cycle to custom_final is checked against
// 25 (ADD), 14 (EQU) and 15 + REM_LAT (MOD), and rd against the rs1 address.
module tb_custom_module;
  import ntru_ext_pkg::*;

  localparam int unsigned L       = GROUP;
  localparam int unsigned AW      = RAM_AW;
  localparam int unsigned REM_LAT = 33;
  localparam int unsigned WORDS   = 256;     // region the test uses

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              custom_en = 1'b0;
  custom_op_e        custom_op = CUSTOM_OP_ADD;
  logic [31:0]       array1_addr = '0, array2_addr = '0;
  logic [31:0]       custom_result;
  logic              custom_final;
  logic              ram_req_o;
  logic [AW-1:0]     ram_addr_out;
  logic              custom_valid;
  logic [31:0]       custom_data;
  logic [31:0]       ram_data_in;
  logic              custom_mod_o;
  logic [31:0]       custom_op_a_o [L];
  logic [31:0]       custom_op_b_o;
  logic [31:0]       custom_mod_result [L];
  logic              mod_valid;

  int unsigned checks = 0, failures = 0;
  logic [31:0] ref_mem [WORDS];
  int unsigned rem_cnt;
  int          cycle = 0, last_final = -10;

  always @(posedge clk) cycle <= cycle + 1;

  custom_module dut (.*);

  ram_1p_model #(.AW(AW)) u_ram (
    .clk, .req(ram_req_o), .we(custom_valid), .addr(ram_addr_out),
    .wdata(custom_data), .rdata(ram_data_in)
  );

  // behavioural remainder units
  always_ff @(posedge clk) rem_cnt <= custom_mod_o ? rem_cnt + 1 : 0;
  assign mod_valid = custom_mod_o && (rem_cnt == REM_LAT);
  always_comb
    for (int k = 0; k < L; k++)
      custom_mod_result[k] = (custom_op_b_o == 0) ? custom_op_a_o[k]
                                                  : custom_op_a_o[k] % custom_op_b_o;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writes must only ever go inside the test region
  always @(posedge clk) if (rst_n && custom_valid && ram_addr_out >= WORDS) begin
    failures++;
    $display("FAIL write outside the region at %0d", ram_addr_out);
  end

  // Issue one instruction. keep_en leaves custom_en high after the final
  // cycle so that the next call starts back to back.
  task automatic issue(input custom_op_e op, input int unsigned w1, input logic [31:0] b);
    int unsigned cyc, exp_cyc;
    logic [31:0] a1b;
    logic [31:0] snap_a [L], snap_b [L];
    a1b = w1 * 4;
    // reference update
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
    exp_cyc = (op == CUSTOM_OP_ADD) ? 25 : (op == CUSTOM_OP_EQU) ? 14 : 15 + REM_LAT;
    @(negedge clk);
    custom_en   = 1'b1;
    custom_op   = op;
    array1_addr = a1b;
    array2_addr = b;
    // a back-to-back instruction waits for the driver to return to IDLE
    // (FIN1 is followed by FIN2, so IDLE comes two cycles after custom_final)
    while (cycle < last_final + 2) @(negedge clk);
    cyc = 0;
    while (!custom_final && cyc < 500) begin
      @(negedge clk);
      cyc++;
    end
    last_final = cycle;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL op %0h took %0d cycles, expected %0d", op, cyc, exp_cyc);
    end
    checks++;
    if (custom_result !== a1b) begin
      failures++;
      $display("FAIL rd = %08h, expected %08h", custom_result, a1b);
    end
    @(posedge clk);   // final cycle retires; custom_en changes here
  endtask

  task automatic compare_mem(input string what);
    checks++;
    for (int k = 0; k < WORDS; k++)
      if (u_ram.mem[k] !== ref_mem[k]) begin
        failures++;
        $display("FAIL %s: mem[%0d] = %08h, expected %08h", what, k, u_ram.mem[k], ref_mem[k]);
        break;
      end
  endtask

  initial begin
    for (int k = 0; k < WORDS; k++) begin
      ref_mem[k] = (k % 5 == 0) ? 32'hFFFF_FFFF - k : $urandom;
      u_ram.mem[k] = ref_mem[k];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      int unsigned sel, w1, w2;
      sel = $urandom % 3;
      w1  = $urandom % (WORDS - L);
      w2  = $urandom % (WORDS - L);
      if (sel == 0)      issue(CUSTOM_OP_ADD, w1, w2 * 4);
      else if (sel == 1) issue(CUSTOM_OP_EQU, w1, w2 * 4);
      else               issue(CUSTOM_OP_MOD, w1, (n % 4 == 0) ? $urandom : ($urandom % 300) + 1);
      // every third instruction follows the previous one back to back
      if (n % 3 != 0) begin
        @(negedge clk);
        custom_en = 1'b0;
        repeat ($urandom % 3) @(negedge clk);
      end
      compare_mem($sformatf("instr %0d", n));
    end
    // the Figure-style example: a1 = {9,...} mod 7 and copies
    issue(CUSTOM_OP_MOD, 10, 32'd7);
    @(negedge clk);
    custom_en = 1'b0;
    @(negedge clk);
    compare_mem("mod 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
