// remainder: multi-cycle unsigned modulo unit (dividend mod divisor).
//
// It runs the non-restoring division algorithm one quotient bit per clock.
// The partial remainder r is kept in two's complement: each step shifts the
// next dividend bit into r and subtracts the divisor when r is non-negative,
// or adds it when r is negative. After WIDTH steps a negative r is corrected
// by one final addition of the divisor (done combinationally on the output).
// Only the remainder is brought out; the quotient bits are not kept.
//
// Interface: enable is a level. While the unit is idle, a high enable loads
// dividend and divisor. The result is valid WIDTH+1 cycles after the cycle in
// which enable was first seen high, and valid and result then stay put for
// as long as enable stays high. Dropping enable returns the unit to idle, so
// the next operation needs enable low for at least one cycle in between.
// A zero divisor gives the dividend as result (the RISC-V REM convention).
//
// The algorithm, the unsigned 32-bit operands and the enable/valid ports
// follow the document; the exact handshake (level enable, held valid) and
// the reset are this design's choices.
module remainder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] result,
  output logic             valid
);

  typedef enum logic [1:0] {R_IDLE, R_RUN, R_DONE} rem_state_e;

  localparam int unsigned CW = $clog2(WIDTH);

  rem_state_e             state_q;
  logic signed [WIDTH+1:0] rem_q;     // partial remainder, two spare bits
  logic [WIDTH-1:0]       dvd_q;      // dividend bits still to shift in
  logic [WIDTH-1:0]       dvs_q;      // latched divisor
  logic [CW-1:0]          cnt_q;

  logic signed [WIDTH+1:0] rem_shift;
  logic signed [WIDTH+1:0] rem_next;
  logic signed [WIDTH+1:0] dvs_ext;

  assign dvs_ext   = $signed({2'b00, dvs_q});
  assign rem_shift = {rem_q[WIDTH:0], dvd_q[WIDTH-1]};
  assign rem_next  = rem_q[WIDTH+1] ? rem_shift + dvs_ext : rem_shift - dvs_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= R_IDLE;
      rem_q   <= '0;
      dvd_q   <= '0;
      dvs_q   <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        R_IDLE: if (enable) begin
          rem_q   <= '0;
          dvd_q   <= dividend;
          dvs_q   <= divisor;
          cnt_q   <= '0;
          state_q <= R_RUN;
        end
        R_RUN: begin
          rem_q <= rem_next;
          dvd_q <= {dvd_q[WIDTH-2:0], 1'b0};
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(WIDTH - 1)) state_q <= R_DONE;
          if (!enable) state_q <= R_IDLE;
        end
        R_DONE: if (!enable) state_q <= R_IDLE;
        default: state_q <= R_IDLE;
      endcase
    end
  end

  // Final correction step of the non-restoring algorithm.
  assign result  = rem_q[WIDTH+1] ? WIDTH'(rem_q + dvs_ext) : rem_q[WIDTH-1:0];
  assign valid   = (state_q == R_DONE) && enable;

endmodule
