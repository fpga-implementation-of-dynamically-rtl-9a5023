// fwft_fifo: first-word-fall-through FIFO used for the PDI, SDI and DO
// data paths.
//
// A circular buffer of DEPTH words with read and write pointers one bit
// wider than the address. The word at the head is always present on
// rdata while `empty` is low, so a reader takes it without first issuing a
// read strobe; `rd` only pops it. Writes to a full FIFO and reads of an
// empty one are ignored. The defaults (256-bit words, 32 deep) are the
// size given for the PDI/DO FIFOs; the nodes instantiate it at their
// 64-bit word width. `count` gives the fill level. DEPTH must be a power of two.
//
// Origin: first-word-fall-through FIFOs of 256 bits x 32 are those of the hopping
// system; the pointer-based implementation is this design's choice.
module fwft_fifo #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,
  input  logic [WIDTH-1:0]           wdata,
  output logic                       full,
  input  logic                       rd,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign empty = (wp == rp);
  assign full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign rdata = mem[rp[AW-1:0]];
  assign count = ($clog2(DEPTH+1))'(wp - rp);

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr && !full) wp <= wp + 1'b1;
      if (rd && !empty) rp <= rp + 1'b1;
    end
  end

  // the fill level never exceeds the depth
  a_fill: assert property (@(posedge clk) disable iff (!rst_n) (wp - rp) <= (AW+1)'(DEPTH));

endmodule
