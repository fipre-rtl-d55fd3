// bus_arbiter: grants the system bus to one master at a time.
//
// The description places an arbiter on the system bus shared by the R8R
// and the serial interface (the host's path into the system).  It gives
// no policy; this arbiter is round-robin and holds a grant for one whole
// transaction: from the cycle after a request is granted until the
// cycle in which the addressed slave answers (done).  Masters must drop
// their request in the cycle after they see their response.
//
// grant is one-hot and registered; busy says a transaction is open.
module bus_arbiter #(
  parameter int unsigned N_MASTERS = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MASTERS-1:0] req,
  input  logic                 done,
  output logic [N_MASTERS-1:0] grant,
  output logic                 busy
);

  localparam int unsigned IDX_W = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1;

  logic [IDX_W-1:0]     last_q;
  logic [N_MASTERS-1:0] grant_q;
  logic                 busy_q;

  // round-robin pick, starting after the last master served
  logic                 found;
  logic [IDX_W-1:0]     pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= N_MASTERS; k++) begin
      int unsigned m;
      m = (int'(last_q) + k) % N_MASTERS;
      if (!found && req[m]) begin
        found = 1'b1;
        pick  = IDX_W'(m);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q  <= IDX_W'(N_MASTERS - 1);
      grant_q <= '0;
      busy_q  <= 1'b0;
    end else if (busy_q) begin
      if (done) begin
        busy_q  <= 1'b0;
        grant_q <= '0;
      end
    end else if (found) begin
      busy_q        <= 1'b1;
      grant_q       <= '0;
      grant_q[pick] <= 1'b1;
      last_q        <= pick;
    end
  end

  assign grant = grant_q;
  assign busy  = busy_q;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_q));

endmodule
