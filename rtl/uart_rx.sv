// uart_rx: RS232 receiver, 8 data bits, no parity, 1 stop bit.
//
// The line idles high.  A falling edge starts a frame; the bit is
// sampled in the middle of each bit time, CLKS_PER_BIT clock cycles
// long.  A received byte is presented on data with a one-cycle valid
// strobe once its stop bit has been sampled high; a frame with a low
// stop bit is dropped.  The input is passed through two flip-flops
// before use.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;
  rstate_e      st_q;
  logic [1:0]   sync_q;
  logic [CW-1:0] cnt_q;
  logic [2:0]   bit_q;
  logic [7:0]   sh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= R_IDLE; sync_q <= 2'b11; cnt_q <= '0; bit_q <= '0; sh_q <= '0;
      valid <= 1'b0; data <= '0;
    end else begin
      sync_q <= {sync_q[0], rxd};
      valid  <= 1'b0;
      unique case (st_q)
        R_IDLE: if (!sync_q[1]) begin
          st_q  <= R_START;
          cnt_q <= CW'(CLKS_PER_BIT / 2);
        end
        R_START: if (cnt_q == 0) begin
          if (!sync_q[1]) begin
            st_q  <= R_DATA;
            cnt_q <= CW'(CLKS_PER_BIT - 1);
            bit_q <= '0;
          end else begin
            st_q <= R_IDLE;                // glitch, not a start bit
          end
        end else cnt_q <= cnt_q - 1'b1;
        R_DATA: if (cnt_q == 0) begin
          sh_q  <= {sync_q[1], sh_q[7:1]}; // LSB first
          cnt_q <= CW'(CLKS_PER_BIT - 1);
          bit_q <= bit_q + 1'b1;
          if (bit_q == 3'd7) st_q <= R_STOP;
        end else cnt_q <= cnt_q - 1'b1;
        R_STOP: if (cnt_q == 0) begin
          st_q <= R_IDLE;
          if (sync_q[1]) begin
            valid <= 1'b1;
            data  <= sh_q;
          end
        end else cnt_q <= cnt_q - 1'b1;
        default: st_q <= R_IDLE;
      endcase
    end
  end

endmodule
