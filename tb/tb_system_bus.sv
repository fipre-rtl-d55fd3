// tb_system_bus: self-checking testbench for system_bus.
//
// Two masters issue random reads and writes to random addresses in the
// memory window, the configuration-controller window and unmapped space.
// Two slave models answer after random delays; a memory slave returns
// addr ^ 0x5A5A and the CC slave addr ^ 0x0F0F, so a response from the
// wrong slave is visible.  Checks: writes reach the right slave with the
// right data, reads return the right slave's word to the right master,
// unmapped addresses are answered with 0, no master ever sees a response
// it did not ask for, and both masters are served.
module tb_system_bus;
  import fipre_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  bus_req_t [1:0] m_req = '0; bus_rsp_t [1:0] m_rsp;
  bus_req_t mem_req, cc_req; bus_rsp_t mem_rsp, cc_rsp;

  system_bus #(.N_MASTERS(2)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // slave models
  int mem_wait = 0, cc_wait = 0;
  word_t last_mem_waddr, last_mem_wdata, last_cc_waddr, last_cc_wdata;
  int mem_writes = 0, cc_writes = 0;
  initial begin mem_rsp = '0; cc_rsp = '0; end
  always @(posedge clk) begin
    mem_rsp <= '0; cc_rsp <= '0;
    if (mem_req.valid && !mem_rsp.ready) begin
      if (mem_wait == 0) begin
        mem_rsp.ready <= 1'b1;
        mem_rsp.rdata <= mem_req.we ? '0 : (mem_req.addr ^ 16'h5A5A);
        if (mem_req.we) begin last_mem_waddr <= mem_req.addr; last_mem_wdata <= mem_req.wdata; mem_writes++; end
        mem_wait <= $urandom % 4;
      end else mem_wait <= mem_wait - 1;
    end
    if (cc_req.valid && !cc_rsp.ready) begin
      if (cc_wait == 0) begin
        cc_rsp.ready <= 1'b1;
        cc_rsp.rdata <= cc_req.we ? '0 : (cc_req.addr ^ 16'h0F0F);
        if (cc_req.we) begin last_cc_waddr <= cc_req.addr; last_cc_wdata <= cc_req.wdata; cc_writes++; end
        cc_wait <= $urandom % 4;
      end else cc_wait <= cc_wait - 1;
    end
  end

  // unsolicited responses
  always @(posedge clk) if (rst_n)
    for (int m = 0; m < 2; m++)
      if (m_rsp[m].ready && !m_req[m].valid) check("response without request", 1, 0);

  int served [2] = '{0, 0};

  function automatic word_t rand_addr();
    case ($urandom % 3)
      0: return word_t'($urandom % 16'h8000);
      1: return CC_BASE + word_t'($urandom % 64);
      default: return 16'h9000 + word_t'($urandom % 16'h7000);
    endcase
  endfunction

  task automatic master(input int m);
    word_t a, d; logic we; int mw0, cw0;
    for (int n = 0; n < 400; n++) begin
      a = rand_addr(); d = word_t'($urandom); we = $urandom % 2;
      mw0 = mem_writes; cw0 = cc_writes;
      m_req[m] = '{valid: 1'b1, we: we, addr: a, wdata: d};
      do begin @(posedge clk); #1; end while (!m_rsp[m].ready);
      if (!we) begin
        if (a[15] == 1'b0)             check("read from memory", m_rsp[m].rdata, a ^ 16'h5A5A);
        else if (a[15:6] == 10'h200)   check("read from CC", m_rsp[m].rdata, a ^ 16'h0F0F);
        else                           check("unmapped read is 0", m_rsp[m].rdata, 0);
      end else begin
        if (a[15] == 1'b0) begin
          check("write reached memory", {last_mem_waddr, last_mem_wdata}, {a, d});
        end else if (a[15:6] == 10'h200) begin
          check("write reached CC", {last_cc_waddr, last_cc_wdata}, {a, d});
        end
      end
      served[m]++;
      @(posedge clk); #1;
      m_req[m] = '0;
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    fork
      master(0);
      master(1);
    join
    check("master 0 served", served[0], 400);
    check("master 1 served", served[1], 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
