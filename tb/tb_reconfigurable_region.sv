// tb_reconfigurable_region: self-checking testbench for reconfigurable_region.
//
// Two areas: area 0 is given the multiplier and area 1 the square root.
// Checks that each coprocessor answers on the shared IO lines to its own
// address only, that results of both come back intact through the OR of
// the return lines while both compute at once, that loaded_id reports
// each area's occupant, and that an address held by no area gets no
// answer.
module tb_reconfigurable_region;
  import fipre_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [1:0] cfg_clear = '0, cfg_load = '0; copro_id_t cfg_id = '0;
  copro_id_t [1:0] loaded_id;
  logic io_ce = 1'b0, io_rw = 1'b0, io_reset = 1'b0, io_ack;
  copro_id_t io_address = '0;
  word_t io_data_out = '0, io_data_in;

  reconfigurable_region #(.N_AREAS(2)) dut (.*);

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

  task automatic xfer(input logic rw, input word_t d, output word_t r, output logic acked);
    int cyc = 0;
    io_ce = 1'b1; io_rw = rw; io_data_out = d;
    do begin @(posedge clk); #1; cyc++; end while (!io_ack && cyc < 100);
    acked = io_ack; r = io_data_in;
    io_ce = 1'b0;
    @(posedge clk); #1;
  endtask
  task automatic wrr(input copro_id_t a, input word_t c, input word_t d, output logic ok);
    word_t r; logic a1, a2;
    io_address = a;
    xfer(1'b1, c, r, a1); if (a1) xfer(1'b1, d, r, a2); else a2 = 1'b0;
    ok = a1 && a2;
  endtask
  task automatic rdr(input copro_id_t a, input word_t c, output word_t r, output logic ok);
    logic a1, a2;
    io_address = a;
    xfer(1'b1, c, r, a1); if (a1) xfer(1'b0, '0, r, a2); else a2 = 1'b0;
    ok = a1 && a2;
  endtask

  initial begin
    word_t r, h; logic ok; logic [15:0] a, b; logic [31:0] x;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    cfg_id = COPRO_MULT; cfg_load = 2'b01; @(posedge clk); #1 cfg_load = '0;
    cfg_id = COPRO_SQRT; cfg_load = 2'b10; @(posedge clk); #1 cfg_load = '0;
    check("area 0 occupant", loaded_id[0], COPRO_MULT);
    check("area 1 occupant", loaded_id[1], COPRO_SQRT);
    for (int i = 0; i < 20; i++) begin
      a = 16'($urandom); b = 16'($urandom); x = $urandom;
      wrr(COPRO_MULT, 16'd0, a, ok);
      wrr(COPRO_MULT, 16'd1, b, ok);        // multiplier running
      wrr(COPRO_SQRT, 16'd0, x[31:16], ok);
      wrr(COPRO_SQRT, 16'd1, x[15:0], ok);  // both running
      rdr(COPRO_MULT, 16'd0, r, ok); rdr(COPRO_MULT, 16'd1, h, ok);
      check("product via region", {h, r}, 32'(a) * 32'(b));
      rdr(COPRO_SQRT, 16'd0, r, ok);
      check("root via region", 32'(r) * 32'(r) <= x && (33'(r) + 1) * (33'(r) + 1) > 33'(x), 1);
    end
    wrr(COPRO_DIV, 16'd0, 16'd1, ok);
    check("absent coprocessor gets no answer", ok, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
