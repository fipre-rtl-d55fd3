// tb_serial_interface: self-checking testbench for serial_interface.
//
// Plays the host on the RS232 line (8N1, CLKS_PER_BIT = 16) and a bus
// slave holding a small memory.  Sends random write commands (checks the
// bus write and the 'K' answer) and read commands (checks the two answer
// bytes against the slave's memory), slips junk bytes between commands
// (they must be ignored), checks the bit time of the transmitter and that
// the bus request is held until the slave answers.
module tb_serial_interface;
  import fipre_pkg::*;

  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b1;
  logic rxd = 1'b1, txd;
  bus_req_t bus_req; bus_rsp_t bus_rsp;

  serial_interface #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endfunction

  // bus slave: 256-word memory, answers after 0..5 cycles
  word_t smem [256];
  int    swait = 0, nwrites = 0;
  initial bus_rsp = '0;
  always @(posedge clk) begin
    bus_rsp <= '0;
    if (bus_req.valid && !bus_rsp.ready) begin
      if (swait == 0) begin
        bus_rsp.ready <= 1'b1;
        if (bus_req.we) begin smem[bus_req.addr[7:0]] <= bus_req.wdata; nwrites++; end
        else bus_rsp.rdata <= smem[bus_req.addr[7:0]];
        swait <= $urandom % 6;
      end else swait <= swait - 1;
    end
  end

  task automatic send(input logic [7:0] b);
    rxd = 1'b0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1'b1; repeat (CPB) @(posedge clk);
  endtask

  // receive one byte; checks the start-to-stop frame length
  task automatic recv(output logic [7:0] b);
    int t;
    while (txd) @(posedge clk);
    t = 0;
    repeat (CPB / 2) @(posedge clk);
    check("start bit", txd, 0);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd; end
    repeat (CPB) @(posedge clk);
    check("stop bit", txd, 1);
  endtask

  initial begin
    logic [7:0] r0, r1; word_t a, d; word_t model [256];
    for (int i = 0; i < 256; i++) begin smem[i] = word_t'($urandom); model[i] = smem[i]; end
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      if (n % 7 == 3) send(8'h33);                     // junk, ignored
      a = word_t'($urandom % 256); d = word_t'($urandom);
      if ($urandom % 2) begin
        send(8'h57); send(a[15:8]); send(a[7:0]); send(d[15:8]); send(d[7:0]);
        recv(r0);
        check("write answered K", r0, 8'h4B);
        model[a[7:0]] = d;
        check("write reached the bus", smem[a[7:0]], d);
      end else begin
        send(8'h52); send(a[15:8]); send(a[7:0]);
        recv(r0); recv(r1);
        check("read data", {r0, r1}, model[a[7:0]]);
      end
    end
    check("bus request released", bus_req.valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a request stays up until answered
  always @(posedge clk) if (rst_n && $past(bus_req.valid) && !$past(bus_rsp.ready))
    check("request held until answered", bus_req.valid, 1);
endmodule
