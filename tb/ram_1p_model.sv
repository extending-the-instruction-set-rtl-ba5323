// ram_1p_model: behavioural single-port data RAM for the testbenches.
// One access per cycle when req is high: a write when we is high, otherwise
// a read whose data appears on rdata after the clock edge and stays there
// until the next read. Word addressed; contents start at zero.
module ram_1p_model #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  int unsigned   n_reads, n_writes;

  initial begin
    foreach (mem[k]) mem[k] = '0;
    rdata    = '0;
    n_reads  = 0;
    n_writes = 0;
  end

  always @(posedge clk) begin
    if (req) begin
      if (we) begin
        mem[addr] <= wdata;
        n_writes  <= n_writes + 1;
      end else begin
        rdata   <= mem[addr];
        n_reads <= n_reads + 1;
      end
    end
  end
endmodule
