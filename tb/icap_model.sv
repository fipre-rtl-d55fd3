// icap_model: behavioural model of the FPGA's internal configuration
// access port (testbench only).
//
// Counts the configuration bytes written (ce high while busy is low),
// keeps a running checksum of them (sum = sum*31 + byte) so that a
// testbench can compare the stream with the bitstream it stored, and
// raises busy pseudo-randomly for busy_pct (initially BUSY_PCT) percent of the cycles to
// exercise the controller's flow control.
module icap_model #(
  parameter int unsigned BUSY_PCT = 0
) (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] data,
  output logic       busy
);
  int unsigned bytes = 0;
  int unsigned sum   = 0;
  int unsigned busy_cycles = 0;
  int unsigned busy_pct = BUSY_PCT;   // may be changed by a testbench at run time

  initial busy = 1'b0;

  always @(posedge clk) begin
    if (ce && !busy) begin
      bytes <= bytes + 1;
      sum   <= sum * 31 + 32'(data);
    end
    if (busy) busy_cycles <= busy_cycles + 1;
    busy <= (busy_pct != 0) && (($urandom % 100) < busy_pct);
  end

  a_no_write_when_busy: assert property (@(posedge clk) !(ce && busy));
endmodule
