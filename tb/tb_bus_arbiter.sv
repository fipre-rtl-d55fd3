// tb_bus_arbiter: self-checking testbench for bus_arbiter.
//
// Three masters request at random and hold their request until their
// transaction ends; the transaction ends (done) a random number of
// cycles after the grant.  Checks: at most one grant, grants only to a
// requester, grant held until done, every request served, and strict
// round-robin order while all three request all the time.
module tb_bus_arbiter;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] req = '0, grant; logic done = 1'b0, busy;

  bus_arbiter #(.N_MASTERS(N)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int served [N] = '{0, 0, 0};
  int last = -1;
  logic all_mode = 1'b0;
  int lat = 0;

  // the bus: answer a granted master after 0..3 extra cycles
  initial begin
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      if (cyc == 15000) all_mode = 1'b1;
      // new requests
      for (int m = 0; m < N; m++)
        if (!req[m] && (all_mode || ($urandom % 4 == 0))) req[m] = 1'b1;
      done = 1'b0;
      if (busy) begin
        check("one grant", $countones(grant), 1);
        check("grant to a requester", |(grant & req), 1);
        if (lat == 0) begin
          done = 1'b1;
          for (int m = 0; m < N; m++) if (grant[m]) begin
            served[m]++;
            if (all_mode && last >= 0) check("round robin", m, (last + 1) % N);
            last = m;
          end
          lat = $urandom % 4;
        end else lat--;
      end else check("no grant when idle", grant, 0);
      @(posedge clk); #1;
      if (done) begin
        req = req & ~grant_at_done;
      end
    end
    for (int m = 0; m < N; m++) check("every master served", served[m] > 1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] grant_at_done;
  always @(posedge clk) if (done) grant_at_done <= grant;
endmodule
