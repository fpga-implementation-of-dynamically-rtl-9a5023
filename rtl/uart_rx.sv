// uart_rx: UART receiver, 8 data bits, no parity, one stop bit.
//
// The asynchronous rxd line first passes two flip-flops (metastability
// guard between the two nodes' clock domains). A falling edge starts a
// frame; the start bit is re-checked at its middle and each data bit is
// sampled in the middle of its bit time, LSB first. With a valid stop bit
// the byte appears on `data` with a one-cycle `valid` pulse; a frame with
// a low stop bit raises a one-cycle `frame_err` instead, and the receiver waits for the line
// to return high before it looks for the next start bit.
//
// Origin: a UART receiver with a double-registered input is part of each node of
// the hopping system; the 8N1 format and the baud rate are this design's
// choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 87
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [2:0] {R_IDLE, R_START, R_DATA, R_STOP, R_BREAK} rst_t;
  rst_t st;
  logic       sync1, sync2;
  logic [7:0] shreg;
  logic [2:0] nbit;
  localparam int unsigned TW = $clog2(CLKS_PER_BIT + 1);
  localparam logic [TW-1:0] T_LAST = TW'(CLKS_PER_BIT - 1);
  localparam logic [TW-1:0] T_HALF = TW'((CLKS_PER_BIT - 1) / 2);
  logic [TW-1:0] tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= 1'b1; sync2 <= 1'b1;
      st <= R_IDLE; shreg <= '0; nbit <= '0; tick <= '0;
      data <= '0; valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      sync1     <= rxd;
      sync2     <= sync1;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (st)
        R_IDLE: if (!sync2) begin
          tick <= '0;
          st   <= R_START;
        end
        R_START: begin
          if (tick == T_HALF) begin
            tick <= '0;
            nbit <= '0;
            st   <= sync2 ? R_IDLE : R_DATA;   // glitch: back to idle
          end else tick <= tick + 1'b1;
        end
        R_DATA: begin
          if (tick == T_LAST) begin
            tick  <= '0;
            shreg <= {sync2, shreg[7:1]};
            nbit  <= nbit + 3'd1;
            if (nbit == 3'd7) st <= R_STOP;
          end else tick <= tick + 1'b1;
        end
        R_STOP: begin
          if (tick == T_LAST) begin
            tick <= '0;
            st   <= R_IDLE;
            if (sync2) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
              st        <= R_BREAK;
            end
          end else tick <= tick + 1'b1;
        end
        R_BREAK: if (sync2) st <= R_IDLE;          // wait for the line to go idle
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
