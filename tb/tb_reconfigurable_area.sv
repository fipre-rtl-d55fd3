// tb_reconfigurable_area: self-checking testbench for reconfigurable_area.
//
// Configures the area with each coprocessor in turn through the
// cfg_clear / cfg_load strobes and checks that: an empty area never
// answers; only the configured coprocessor answers, and only to its own
// IOaddress; it computes correctly (product, quotient, root); a new
// configuration starts from reset state; IOreset with a matching address
// aborts a computation while IOreset to another address does not.
module tb_reconfigurable_area;
  import fipre_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic cfg_clear = 1'b0, cfg_load = 1'b0; copro_id_t cfg_id = '0, loaded_id;
  logic io_ce = 1'b0, io_rw = 1'b0, io_reset = 1'b0, io_ack;
  copro_id_t io_address = '0;
  word_t io_data_out = '0, io_data_in;

  reconfigurable_area dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
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

  // returns 0 if no acknowledge came within 100 cycles
  task automatic xfer(input logic rw, input word_t d, output word_t r, output logic acked);
    int cyc = 0;
    io_ce = 1'b1; io_rw = rw; io_data_out = d;
    do begin @(posedge clk); #1; cyc++; end while (!io_ack && cyc < 100);
    acked = io_ack; r = io_data_in;
    io_ce = 1'b0;
    @(posedge clk); #1;
  endtask
  task automatic wrr(input word_t c, input word_t d, output logic ok);
    word_t r; logic a1, a2;
    xfer(1'b1, c, r, a1); if (a1) xfer(1'b1, d, r, a2); else a2 = 1'b0;
    ok = a1 && a2;
  endtask
  task automatic rdr(input word_t c, output word_t r, output logic ok);
    logic a1, a2;
    xfer(1'b1, c, r, a1); if (a1) xfer(1'b0, '0, r, a2); else a2 = 1'b0;
    ok = a1 && a2;
  endtask
  task automatic configure(input copro_id_t id);
    @(posedge clk); #1 cfg_clear = 1'b1; @(posedge clk); #1 cfg_clear = 1'b0;
    repeat (3) @(posedge clk);
    #1 cfg_id = id; cfg_load = 1'b1; @(posedge clk); #1 cfg_load = 1'b0;
  endtask

  initial begin
    word_t r, h; logic ok;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;

    io_address = COPRO_MULT;
    wrr(16'd0, 16'd3, ok); check("empty area does not answer", ok, 0);
    check("empty area id", loaded_id, COPRO_NONE);

    configure(COPRO_MULT);
    check("loaded id mult", loaded_id, COPRO_MULT);
    io_address = COPRO_DIV;
    wrr(16'd0, 16'd3, ok); check("mult ignores the divider's address", ok, 0);
    io_address = COPRO_MULT;
    wrr(16'd0, 16'd1234, ok); check("mult write A", ok, 1);
    wrr(16'd1, 16'd4321, ok); check("mult write B", ok, 1);
    rdr(16'd0, r, ok); rdr(16'd1, h, ok);
    check("mult product", {h, r}, 32'd1234 * 32'd4321);

    // INTR to another address must not disturb, matching address aborts
    wrr(16'd1, 16'd7, ok);
    @(posedge clk); #1 io_address = COPRO_SQRT; io_reset = 1'b1; @(posedge clk); #1 io_reset = 1'b0;
    io_address = COPRO_MULT;
    rdr(16'd3, r, ok); check("other-address reset ignored (still busy)", r, 1);
    @(posedge clk); #1 io_reset = 1'b1; @(posedge clk); #1 io_reset = 1'b0;
    rdr(16'd3, r, ok); check("matching reset aborts", r, 0);

    configure(COPRO_DIV);
    check("loaded id div", loaded_id, COPRO_DIV);
    wrr(16'd0, 16'd1, ok); check("old mult gone after reconfiguration", ok, 0);
    io_address = COPRO_DIV;
    rdr(16'd0, r, ok); check("fresh divider starts from reset", r, 0);
    wrr(16'd0, 16'h0001, ok); wrr(16'd1, 16'h86A0, ok); wrr(16'd2, 16'd7, ok);
    rdr(16'd0, r, ok); check("quotient 100000/7", r, 16'(100000 / 7));
    rdr(16'd2, r, ok); check("remainder 100000%7", r, 16'(100000 % 7));

    configure(COPRO_SQRT);
    io_address = COPRO_SQRT;
    wrr(16'd0, 16'h0000, ok); wrr(16'd1, 16'd10000, ok);
    rdr(16'd0, r, ok); check("sqrt 10000", r, 100);
    check("sqrt ok", ok, 1);

    @(posedge clk); #1 cfg_clear = 1'b1; @(posedge clk); #1 cfg_clear = 1'b0;
    rdr(16'd0, r, ok); check("cleared area does not answer", ok, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
