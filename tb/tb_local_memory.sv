// tb_local_memory: self-checking testbench for local_memory.
//
// Random reads and writes on both ports against a reference array:
// port A data is checked one cycle after the access, port B (bus slave)
// is checked for its one-cycle response time and data, and a same-cycle
// write of both ports to one word must leave port A's value.
module tb_local_memory;
  import fipre_pkg::*;

  localparam int unsigned AW = 12;
  logic clk = 1'b0, rst_n = 1'b1;
  logic a_en = 1'b0, a_we = 1'b0; logic [AW-1:0] a_addr = '0; word_t a_wdata = '0, a_rdata;
  bus_req_t bus_req = '0; bus_rsp_t bus_rsp;

  local_memory dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  word_t ref_mem [2**AW];

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

  initial begin
    logic [AW-1:0] ad; word_t d, exp; int cyc;
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    // initialise through both ports
    for (int i = 0; i < 2**AW; i++) begin
      d = word_t'($urandom); ref_mem[i] = d;
      if (i % 2 == 0) begin
        a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = d; @(posedge clk); #1; a_en = 0; a_we = 0;
      end else begin
        bus_req = '{valid: 1'b1, we: 1'b1, addr: word_t'(i), wdata: d};
        @(posedge clk); #1; check("bus write ready after one cycle", bus_rsp.ready, 1);
        bus_req = '0; @(posedge clk); #1;
      end
    end
    for (int n = 0; n < 3000; n++) begin
      ad = AW'($urandom); d = word_t'($urandom);
      case ($urandom % 4)
        0: begin a_en = 1; a_we = 1; a_addr = ad; a_wdata = d; ref_mem[ad] = d;
                 @(posedge clk); #1; a_en = 0; a_we = 0; end
        1: begin a_en = 1; a_we = 0; a_addr = ad; @(posedge clk); #1; a_en = 0;
                 check("port A read", a_rdata, ref_mem[ad]); end
        2: begin bus_req = '{valid: 1'b1, we: 1'b1, addr: word_t'(ad), wdata: d}; ref_mem[ad] = d;
                 @(posedge clk); #1; check("bus write ready", bus_rsp.ready, 1);
                 bus_req = '0; @(posedge clk); #1; end
        default: begin
          bus_req = '{valid: 1'b1, we: 1'b0, addr: word_t'(ad), wdata: '0}; cyc = 0;
          do begin @(posedge clk); #1; cyc++; end while (!bus_rsp.ready && cyc < 10);
          check("bus read latency", cyc, 1);
          check("bus read data", bus_rsp.rdata, ref_mem[ad]);
          bus_req = '0; @(posedge clk); #1;
        end
      endcase
    end
    // both ports write one word in the same cycle: port A wins
    ad = AW'(77);
    a_en = 1; a_we = 1; a_addr = ad; a_wdata = 16'hAAAA;
    bus_req = '{valid: 1'b1, we: 1'b1, addr: word_t'(ad), wdata: 16'hBBBB};
    @(posedge clk); #1; a_en = 0; a_we = 0; bus_req = '0;
    @(posedge clk); #1;
    a_en = 1; a_addr = ad; @(posedge clk); #1; a_en = 0;
    check("collision: port A wins", a_rdata, 16'hAAAA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
