// tb_remainder: self-checking test of the non-restoring remainder unit.
// Drives directed corner cases and random operand pairs, compares the result
// with the % operator, checks that valid rises exactly WIDTH+1 cycles after
// enable and stays high with a stable result while enable is held.
module tb_remainder;
  localparam int unsigned W = 32;
  localparam int unsigned LAT = W + 1;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         enable = 1'b0;
  logic [W-1:0] dividend = '0, divisor = '0;
  logic [W-1:0] result;
  logic         valid;
  int unsigned  checks = 0, failures = 0;

  remainder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] exp;
    int unsigned  cyc;
    exp = (b == 0) ? a : a % b;
    @(negedge clk);
    dividend = a;
    divisor  = b;
    enable   = 1'b1;
    cyc = 0;
    do begin
      @(posedge clk);
      #1 cyc++;
    end while (!valid && cyc < 200);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL %0d mod %0d = %0d, expected %0d", a, b, result, exp);
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, LAT);
    end
    // inputs change while held: result must not move
    dividend = ~a;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!valid || result !== exp) begin
      failures++;
      $display("FAIL result not held");
    end
    @(negedge clk);
    enable = 1'b0;
    @(posedge clk);
    #1 checks++;
    if (valid) begin
      failures++;
      $display("FAIL valid stays high after enable drops");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(32'd9, 32'd7);
    run(32'd170, 32'd7);
    run(32'd5, 32'd7);
    run(32'd0, 32'd13);
    run(32'd100, 32'd1);
    run(32'd1234, 32'd0);
    run(32'hFFFF_FFFF, 32'd101);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run(32'h8000_0000, 32'h8000_0001);
    run(32'hFFFF_FFFE, 32'h7FFF_FFFF);
    run(32'd101 * 32'd77 + 32'd100, 32'd101);
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] a, b;
      a = $urandom;
      b = (n % 3 == 0) ? ($urandom % 200) + 1 : $urandom >> ($urandom % 32);
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
