// tb_copro_sqrt: self-checking testbench for copro_sqrt.
//
// Drives the coprocessor directly through its IO signal set the way the
// R8R does (command write, data write; command write, read), compares
// results with values computed here, checks the cycle count from the
// start write to the acknowledged result read (17 cycles), checks the
// status register while busy, and checks that a reset (INTR) aborts a
// computation and that an unselected coprocessor never answers.
module tb_copro_sqrt;
  import fipre_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b1, soft_rst = 1'b0, sel = 1'b1;
  logic  io_ce = 1'b0, io_rw = 1'b0, io_ack;
  word_t io_data_out = '0, io_data_in;
  int    checks = 0, failures = 0;

  copro_sqrt dut (.*);

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

  function automatic logic [15:0] isqrt(input logic [31:0] x);
    logic [31:0] r = 0;
    for (int b = 15; b >= 0; b--) begin
      logic [31:0] t = r | (32'd1 << b);
      if (64'(t) * 64'(t) <= 64'(x)) r = t;
    end
    return r[15:0];
  endfunction

  initial begin
    word_t r, rt, rl, rh; int cyc, c2;
    logic [31:0] x;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 80; i++) begin
      x = (i == 0) ? 32'hFFFFFFFF : (i == 1) ? 32'd0 : (i == 2) ? 32'd1 :
          (i == 3) ? 32'hFFFE0001 : (i < 20) ? ($urandom % 100000) : $urandom;
      wrr(16'd0, x[31:16]);
      xfer(1'b1, 16'd1, r, c2);
      xfer(1'b1, x[15:0], r, c2);
      rdr(16'd0, rt, cyc);
      check("sqrt latency", cyc, 17);
      rdr(16'd1, rl, c2);
      rdr(16'd2, rh, c2);
      check("root", rt, isqrt(x));
      check("remainder", {rh[0], rl}, 17'(x - 32'(isqrt(x)) * 32'(isqrt(x))));
    end
    wrr(16'd0, 16'h7FFF); wrr(16'd1, 16'h1);
    rdr(16'd3, r, cyc); check("busy status", r, 1);
    @(posedge clk); #1 soft_rst = 1'b1; @(posedge clk); #1 soft_rst = 1'b0;
    rdr(16'd3, r, cyc); check("idle after reset", r, 0);

    // an unselected coprocessor does not answer
    sel = 1'b0;
    io_ce = 1'b1; io_rw = 1'b1; io_data_out = 16'h0;
    repeat (5) begin @(posedge clk); #1; check("no ack when not selected", io_ack, 0); end
    io_ce = 1'b0; sel = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
