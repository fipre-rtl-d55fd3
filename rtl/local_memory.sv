// local_memory: instruction and data memory of the R8R processor.
//
// A word-wide RAM with two ports: port A belongs to the processor (its
// instruction fetches and loads/stores), port B is a slave on the system
// bus, through which the host loads programs and data over the serial
// link.  The description names the memory and shows both connections;
// its size, the port timing and the write-collision rule are this
// design's choices.
//
// Port A: synchronous, a_rdata is valid the cycle after a_en (read or
// write-first is not needed: a write returns the old word).
// Port B: a request held on bus_req.valid is answered with a one-cycle
// bus_rsp.ready one cycle later, rdata valid in that cycle.  If both
// ports write the same word in one cycle, port A wins.
module local_memory
  import fipre_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // port A: processor
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  word_t             a_wdata,
  output word_t             a_rdata,
  // port B: system bus slave
  input  bus_req_t          bus_req,
  output bus_rsp_t          bus_rsp
);

  word_t mem [2**ADDR_W];

  logic              b_go;
  logic              b_ready_q;
  logic [ADDR_W-1:0] b_addr;
  word_t             b_rdata_q;

  assign b_go   = bus_req.valid && !b_ready_q;
  assign b_addr = bus_req.addr[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (b_go && bus_req.we) mem[b_addr] <= bus_req.wdata;
    if (a_en && a_we)       mem[a_addr] <= a_wdata;
    if (a_en)               a_rdata     <= mem[a_addr];
    if (b_go)               b_rdata_q   <= mem[b_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_ready_q <= 1'b0;
    else        b_ready_q <= b_go;
  end

  assign bus_rsp.ready = b_ready_q;
  assign bus_rsp.rdata = b_ready_q ? b_rdata_q : '0;

endmodule
