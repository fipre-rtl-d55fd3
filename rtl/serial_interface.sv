// serial_interface: RS232 link between the host computer and the system.
//
// The host reaches the system only through this peripheral: it loads the
// processor's program and data into local memory and fills the
// configuration memory (through the configuration controller's
// registers) before the application starts.  The peripheral is therefore
// a master on the system bus, driven by a small command protocol on the
// serial line (this design's choice; the description only says the
// block is an RS232 interface to the host):
//
//   host -> 0x57 'W', addr[15:8], addr[7:0], data[15:8], data[7:0]
//           bus write; answer 0x4B 'K' once the slave has accepted it
//   host -> 0x52 'R', addr[15:8], addr[7:0]
//           bus read;  answer data[15:8], data[7:0]
//   other first bytes are ignored.
//
// Frames are 8N1, CLKS_PER_BIT clock cycles per bit (208 = 115200 baud at
// the 24 MHz system clock; the baud rate is not given in the description).
module serial_interface
  import fipre_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 208
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rxd,
  output logic     txd,
  output bus_req_t bus_req,
  input  bus_rsp_t bus_rsp
);

  localparam logic [7:0] CMD_WRITE = 8'h57;
  localparam logic [7:0] CMD_READ  = 8'h52;
  localparam logic [7:0] RSP_OK    = 8'h4B;

  logic       rx_valid;
  logic [7:0] rx_data;
  logic       tx_start, tx_ready;
  logic [7:0] tx_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .valid(rx_valid), .data(rx_data)
  );
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(tx_data), .ready(tx_ready), .txd
  );

  typedef enum logic [2:0] {H_CMD, H_ARG, H_BUS, H_TX, H_TXWAIT} hstate_e;
  hstate_e     st_q;
  logic        is_write_q;
  logic [2:0]  nargs_q;       // argument bytes still expected
  logic [31:0] args_q;        // addr (and data) shifted in MSB first
  logic [15:0] txbuf_q;
  logic [1:0]  ntx_q;         // bytes still to send

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= H_CMD; is_write_q <= 1'b0; nargs_q <= '0; args_q <= '0;
      txbuf_q <= '0; ntx_q <= '0; bus_req <= '0;
    end else begin
      unique case (st_q)
        H_CMD: if (rx_valid) begin
          if (rx_data == CMD_WRITE || rx_data == CMD_READ) begin
            is_write_q <= (rx_data == CMD_WRITE);
            nargs_q    <= (rx_data == CMD_WRITE) ? 3'd4 : 3'd2;
            st_q       <= H_ARG;
          end
        end
        H_ARG: if (rx_valid) begin
          args_q  <= {args_q[23:0], rx_data};
          nargs_q <= nargs_q - 1'b1;
          if (nargs_q == 3'd1) begin
            bus_req.valid <= 1'b1;
            bus_req.we    <= is_write_q;
            bus_req.addr  <= is_write_q ? args_q[23:8] : {args_q[7:0], rx_data};
            bus_req.wdata <= is_write_q ? {args_q[7:0], rx_data} : '0;
            st_q          <= H_BUS;
          end
        end
        H_BUS: if (bus_rsp.ready) begin
          bus_req.valid <= 1'b0;
          txbuf_q       <= is_write_q ? {RSP_OK, 8'h00} : bus_rsp.rdata;
          ntx_q         <= is_write_q ? 2'd1 : 2'd2;
          st_q          <= H_TX;
        end
        H_TX: if (tx_ready) begin
          txbuf_q <= {txbuf_q[7:0], 8'h00};
          ntx_q   <= ntx_q - 1'b1;
          st_q    <= H_TXWAIT;
        end
        H_TXWAIT: if (!tx_ready) st_q <= (ntx_q == 0) ? H_CMD : H_TX;
        default: st_q <= H_CMD;
      endcase
    end
  end

  assign tx_start = (st_q == H_TX) && tx_ready;
  assign tx_data  = txbuf_q[15:8];

endmodule
