// tb_copro_div: self-checking testbench for copro_div.
//
// Drives the coprocessor directly through its IO signal set the way the
// R8R does (command write, data write; command write, read), compares
// results with values computed here, checks the cycle count from the
// start write to the acknowledged result read (33 cycles), checks the
// status register while busy, and checks that a reset (INTR) aborts a
// computation and that an unselected coprocessor never answers.
module tb_copro_div;
  import fipre_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b1, soft_rst = 1'b0, sel = 1'b1;
  logic  io_ce = 1'b0, io_rw = 1'b0, io_ack;
  word_t io_data_out = '0, io_data_in;
  int    checks = 0, failures = 0;

  copro_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // one transfer; returns the word read and the cycles until IOack
  task automatic xfer(input logic rw, input word_t d, output word_t r, output int cyc);
    io_ce = 1'b1; io_rw = rw; io_data_out = d; cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!io_ack && cyc < 1000);
    r = io_data_in;
    io_ce = 1'b0;
  endtask

  task automatic wrr(input word_t cmd, input word_t d);
    word_t r; int c;
    xfer(1'b1, cmd, r, c);
    xfer(1'b1, d, r, c);
  endtask

  task automatic rdr(input word_t cmd, output word_t r, output int cyc);
    int c;
    xfer(1'b1, cmd, r, c);
    xfer(1'b0, '0, r, cyc);
    cyc += c;
  endtask

  initial begin
    word_t r, ql, qh, rm, st; int cyc, c2;
    logic [31:0] x; logic [15:0] d;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      x = (i == 0) ? 32'hFFFFFFFF : $urandom;
      d = (i == 1) ? 16'd1 : (i < 20) ? 16'($urandom % 256 + 1) : 16'($urandom | 1);
      wrr(16'd0, x[31:16]);
      wrr(16'd1, x[15:0]);
      xfer(1'b1, 16'd2, r, c2);
      xfer(1'b1, d, r, c2);
      rdr(16'd0, ql, cyc);
      check("div latency", cyc, 33);
      rdr(16'd1, qh, c2);
      rdr(16'd2, rm, c2);
      rdr(16'd3, st, c2);
      check("quotient", {qh, ql}, x / 32'(d));
      check("remainder", rm, 16'(x % 32'(d)));
      check("no divide-by-zero flag", st, 0);
    end
    // division by zero
    wrr(16'd0, 16'h1234); wrr(16'd1, 16'h5678); wrr(16'd2, 16'h0);
    rdr(16'd0, ql, cyc); rdr(16'd1, qh, cyc); rdr(16'd3, st, cyc);
    check("div by zero quotient", {qh, ql}, 32'hFFFFFFFF);
    check("div by zero flag", st, 2);
    rdr(16'd2, rm, cyc);
    check("div by zero remainder", rm, 16'h5678);
    // INTR aborts the computation
    wrr(16'd0, 16'h0); wrr(16'd1, 16'd100); wrr(16'd2, 16'd7);
    rdr(16'd3, st, cyc); check("busy status", st, 1);
    @(posedge clk); #1 soft_rst = 1'b1; @(posedge clk); #1 soft_rst = 1'b0;
    rdr(16'd3, st, cyc); check("idle after reset", st, 0);

    // an unselected coprocessor does not answer
    sel = 1'b0;
    io_ce = 1'b1; io_rw = 1'b1; io_data_out = 16'h0;
    repeat (5) begin @(posedge clk); #1; check("no ack when not selected", io_ack, 0); end
    io_ce = 1'b0; sel = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
