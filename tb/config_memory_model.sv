// config_memory_model: behavioural model of the off-chip configuration
// memory (testbench only, not synthesizable hardware of the design).
//
// A byte-wide memory of 2**ADDR_W bytes.  A read (rd) or write (wr)
// request is held by the configuration controller until ready; the
// model answers WAIT cycles after it sees the request, with a one-cycle
// ready strobe and, for a read, the byte on rdata in that cycle.
// Testbenches may also load mem[] directly (the host fills the memory
// before the system runs).
module config_memory_model #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned WAIT   = 2
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              rd,
  input  logic              wr,
  input  logic [7:0]        wdata,
  output logic [7:0]        rdata,
  output logic              ready
);
  logic [7:0] mem [2**ADDR_W];
  int unsigned cnt = 0;
  int unsigned reads = 0, writes = 0;

  initial begin
    ready = 1'b0;
    rdata = '0;
  end

  always @(posedge clk) begin
    ready <= 1'b0;
    if ((rd || wr) && !ready) begin
      if (cnt >= WAIT) begin
        cnt   <= 0;
        ready <= 1'b1;
        if (wr) begin mem[addr] <= wdata; writes++; end
        else    begin rdata <= mem[addr]; reads++; end
      end else begin
        cnt <= cnt + 1;
      end
    end else begin
      cnt <= 0;
    end
  end
endmodule
