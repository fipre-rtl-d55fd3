// tb_r82r_image: an image-filter workload on the R82R system at its
// default sizes.
//
// A point filter over an 800 x 600 image needs 480,000 operations, one
// per pixel, enough to repay a reconfiguration many times over.  Here
// the filter is a brightness gain, out = (pixel * gain) >> 8, computed
// by the multiplier coprocessor: the core loads the gain once, then per
// pixel writes the pixel (which starts the multiplication) and reads the
// product.  Pixels are generated by a formula, pixel(x, y) = (x * 3 +
// y * 5) mod 256, as if streamed from wherever the image is stored.  The
// multiplier's bitstream is 46 KB.  Every output pixel is checked and the
// total cycle count is printed.
module tb_r82r_image;
  import fipre_pkg::*;

  localparam int unsigned W = 800, H = 600, BS_LEN = 47104;
  localparam logic [15:0] GAIN = 16'd180;

  logic clk = 1'b0, rst_n = 1'b1;
  logic instr_valid = 1'b0; reconf_op_e instr_op = OP_SELR; copro_id_t instr_addr = '0;
  word_t instr_rs1 = '0, instr_rs2 = '0; logic instr_busy, instr_done; word_t rt_data;
  logic mem_en = 1'b0, mem_we = 1'b0; logic [11:0] mem_addr = '0; word_t mem_wdata = '0, mem_rdata;
  bus_req_t cpu_bus_req = '0; bus_rsp_t cpu_bus_rsp;
  logic uart_rxd = 1'b1, uart_txd;
  logic [19:0] cm_addr; logic cm_rd, cm_wr, cm_ready; logic [7:0] cm_wdata, cm_rdata;
  logic icap_ce, icap_busy; logic [7:0] icap_data;
  copro_id_t [1:0] area_occupant;

  r82r_top dut (.*);

  config_memory_model #(.ADDR_W(20), .WAIT(2)) u_cm (
    .clk, .addr(cm_addr), .rd(cm_rd), .wr(cm_wr), .wdata(cm_wdata), .rdata(cm_rdata), .ready(cm_ready));
  icap_model #(.BUSY_PCT(0)) u_icap (.clk, .ce(icap_ce), .data(icap_data), .busy(icap_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(input reconf_op_e op, input copro_id_t a, input word_t r1, input word_t r2);
    instr_valid = 1'b1; instr_op = op; instr_addr = a; instr_rs1 = r1; instr_rs2 = r2;
    @(posedge clk); #1; instr_valid = 1'b0;
    while (!instr_done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask
  task automatic cpu_bus(input logic we, input word_t a, input word_t d);
    cpu_bus_req = '{valid: 1'b1, we: we, addr: a, wdata: d};
    do begin @(posedge clk); #1; end while (!cpu_bus_rsp.ready);
    @(posedge clk); #1;
    cpu_bus_req = '0;
  endtask

  initial begin
    longint t0, t1, t2; logic [7:0] pix; word_t exp_out;
    for (int i = 0; i < BS_LEN; i++) u_cm.mem[i] = 8'(i * 11);
    #1 rst_n = 1'b0; repeat (3) @(posedge clk); #1 rst_n = 1'b1;
    cpu_bus(1'b1, CC_BASE + CC_REG_DIR + 4*1 + 0, 16'h0);
    cpu_bus(1'b1, CC_BASE + CC_REG_DIR + 4*1 + 2, word_t'(BS_LEN));
    t0 = $time;
    exec(OP_SELR, COPRO_MULT, '0, '0);
    exec(OP_WRR, '0, 16'd0, GAIN);            // waits for the load to finish
    t1 = $time;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        pix = 8'((x * 3 + y * 5) % 256);
        exec(OP_WRR, '0, 16'd1, {8'h0, pix});
        exec(OP_RDR, '0, 16'd0, '0);
        exp_out = word_t'((32'(pix) * 32'(GAIN)) >> 8);
        checks++;
        if ((rt_data >> 8) !== exp_out) begin
          failures++;
          if (failures < 10) $display("FAIL pixel (%0d,%0d): got %0d expected %0d", x, y, rt_data >> 8, exp_out);
        end
      end
    t2 = $time;
    $display("reconfiguration + first access: %0d cycles; %0d pixels: %0d cycles (%0d per pixel, %0.1f ms at 24 MHz)",
             (t1 - t0) / 10, W * H, (t2 - t1) / 10, (t2 - t1) / 10 / (W * H), real'(t2 - t1) / 10.0 / 24.0e3);
    checks++;
    if (u_icap.bytes != BS_LEN) begin failures++; $display("FAIL bitstream bytes %0d", u_icap.bytes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
