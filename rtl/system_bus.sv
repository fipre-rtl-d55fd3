// system_bus: the shared bus of the fixed region.
//
// Masters (the R8R's bus port and the serial interface) place requests;
// the bus arbiter chooses one and the request is routed by address to
// the local memory's second port or to the configuration controller.
// The slave's answer goes back to the granted master only.  Addresses
// outside both windows are answered one cycle later with zero data, so
// no master can hang the bus.  The address map (see fipre_pkg) and the
// request/response handshake are this design's choices; the description
// only shows a bus controlled by an arbiter linking these blocks.
module system_bus
  import fipre_pkg::*;
#(
  parameter int unsigned N_MASTERS = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  bus_req_t [N_MASTERS-1:0] m_req,
  output bus_rsp_t [N_MASTERS-1:0] m_rsp,
  output bus_req_t                 mem_req,
  input  bus_rsp_t                 mem_rsp,
  output bus_req_t                 cc_req,
  input  bus_rsp_t                 cc_rsp
);

  logic [N_MASTERS-1:0] req_v, grant;
  logic                 busy, done;

  for (genvar m = 0; m < N_MASTERS; m++) begin : g_req
    assign req_v[m] = m_req[m].valid;
  end

  bus_arbiter #(.N_MASTERS(N_MASTERS)) u_arbiter (
    .clk, .rst_n, .req(req_v), .done, .grant, .busy
  );

  // request of the granted master
  bus_req_t cur;
  always_comb begin
    cur = '0;
    for (int m = 0; m < N_MASTERS; m++)
      if (grant[m]) cur = m_req[m];
    cur.valid = cur.valid && busy;
  end

  logic to_mem, to_cc;
  assign to_mem = (cur.addr[15] == MEM_BASE[15]);
  assign to_cc  = (cur.addr[15:CC_SPAN_W] == CC_BASE[15:CC_SPAN_W]);

  always_comb begin
    mem_req       = cur;
    mem_req.valid = cur.valid && to_mem;
    cc_req        = cur;
    cc_req.valid  = cur.valid && to_cc;
  end

  // default slave for unmapped addresses
  logic dflt_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dflt_q <= 1'b0;
    else        dflt_q <= cur.valid && !to_mem && !to_cc && !dflt_q;
  end

  bus_rsp_t rsp;
  always_comb begin
    rsp = '0;
    if (mem_rsp.ready)     rsp = mem_rsp;
    else if (cc_rsp.ready) rsp = cc_rsp;
    else if (dflt_q)       rsp.ready = 1'b1;
  end
  assign done = rsp.ready;

  for (genvar m = 0; m < N_MASTERS; m++) begin : g_rsp
    assign m_rsp[m].ready = rsp.ready && grant[m];
    assign m_rsp[m].rdata = grant[m] ? rsp.rdata : '0;
  end

endmodule
