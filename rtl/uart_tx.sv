// uart_tx: RS232 transmitter, 8 data bits, no parity, 1 stop bit.
//
// start loads a byte when ready is high; the frame (start bit, eight
// data bits LSB first, stop bit) is shifted out with CLKS_PER_BIT clock
// cycles per bit.  ready returns high after the stop bit.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame_q;
  logic [3:0]    left_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '1; left_q <= '0; cnt_q <= '0;
    end else if (left_q == 0) begin
      if (start) begin
        frame_q <= {1'b1, data, 1'b0};
        left_q  <= 4'd10;
        cnt_q   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (cnt_q == 0) begin
      frame_q <= {1'b1, frame_q[9:1]};
      left_q  <= left_q - 1'b1;
      cnt_q   <= CW'(CLKS_PER_BIT - 1);
    end else begin
      cnt_q <= cnt_q - 1'b1;
    end
  end

  assign ready = (left_q == 0);
  assign txd   = (left_q == 0) ? 1'b1 : frame_q[0];

endmodule
