// uart_tx: UART transmitter, 8 data bits, no parity, one stop bit.
//
// A byte offered with `send` while `busy` is low is shifted out LSB first
// after a start bit (0) and followed by a stop bit (1); each bit lasts
// CLKS_PER_BIT clocks. The line idles high. `busy` stays high for the ten
// bit times of the frame. The default divider gives 115200 baud from the
// 10 MHz programmable-logic clock.
//
// Origin: a UART transmitter is part of each node of the hopping system; the
// 8N1 format and the baud rate are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 87
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);

  logic [9:0]  shreg;
  logic [3:0]  nbits;
  localparam int unsigned TW = $clog2(CLKS_PER_BIT + 1);
  localparam logic [TW-1:0] T_LAST = TW'(CLKS_PER_BIT - 1);
  localparam logic [TW-1:0] T_HALF = TW'((CLKS_PER_BIT - 1) / 2);
  logic [TW-1:0] tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1; nbits <= '0; tick <= '0; busy <= 1'b0; txd <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (send) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        tick  <= '0;
        busy  <= 1'b1;
      end
    end else begin
      txd <= shreg[0];
      if (tick == T_LAST) begin
        tick  <= '0;
        shreg <= {1'b1, shreg[9:1]};
        nbits <= nbits - 4'd1;
        if (nbits == 4'd1) busy <= 1'b0;
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end

endmodule
