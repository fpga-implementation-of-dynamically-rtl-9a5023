// hopping_link: the complete algorithm-hopping security link, an
// encryption node and a decryption node joined by a UART in each
// direction.
//
// Both nodes run the same 5-bit hopping LFSR from the same secret seed,
// so each session uses the next algorithm of the shared pseudo-random
// sequence: ASCON, COLM, Deoxys, OCB or AEGIS. The sender encrypts the
// message its host placed in its PDI FIFO with the current algorithm, then
// sends the algorithm ID and the formatted cipher text over the UART; the
// receiver switches its partition to that algorithm, decrypts and
// verifies, keeps the plaintext and a status word for its host, and sends
// the status back, which lets the sender hop to the next algorithm.
//
// Ports: a host interface for each node (FIFO write/read ports, seeds),
// the sender's hop_start, session status from both nodes, and the slots
// of the COLM and Deoxys modules of both nodes (not part of this RTL).
// Timing: one clock for both nodes (10 MHz in the reference system); the
// UART runs at CLKS_PER_BIT clocks per bit.
module hopping_link
  import hop_pkg::*;
#(
  parameter int unsigned RECONFIG_CYCLES = 16700,
  parameter int unsigned CLKS_PER_BIT    = 87,
  parameter int unsigned FIFO_DEPTH      = 32,
  parameter int unsigned MSG_WORDS       = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // sender host
  input  logic         tx_seed_load,
  input  logic [4:0]   tx_seed,
  input  logic         iv_seed_load,
  input  logic [127:0] iv_seed,
  input  logic [63:0]  tx_pdi_wdata,
  input  logic         tx_pdi_wr,
  output logic         tx_pdi_full,
  input  logic [63:0]  tx_sdi_wdata,
  input  logic         tx_sdi_wr,
  output logic         tx_sdi_full,
  input  logic         hop_start,
  output logic         tx_session_done,
  output logic         tx_session_ok,
  output logic         tx_busy,
  output alg_t         tx_alg,
  output logic [4:0]   tx_lfsr,
  output logic         tx_proto_err,
  // receiver host
  input  logic         rx_seed_load,
  input  logic [4:0]   rx_seed,
  input  logic [63:0]  rx_pdi_wdata,
  input  logic         rx_pdi_wr,
  output logic         rx_pdi_full,
  input  logic [63:0]  rx_sdi_wdata,
  input  logic         rx_sdi_wr,
  output logic         rx_sdi_full,
  output logic [63:0]  rx_do_rdata,
  input  logic         rx_do_rd,
  output logic         rx_do_empty,
  output logic         rx_session_done,
  output logic         rx_session_ok,
  output logic         rx_id_mismatch,
  output logic         rx_busy,
  output alg_t         rx_alg,
  output logic [4:0]   rx_lfsr,
  output logic         rx_proto_err,
  // COLM / Deoxys module slots of the two nodes
  output core_in_t     tx_ext_cin,
  output logic         tx_ext_rst_n,
  input  core_out_t    tx_colm_cout,
  input  core_out_t    tx_deoxys_cout,
  output core_in_t     rx_ext_cin,
  output logic         rx_ext_rst_n,
  input  core_out_t    rx_colm_cout,
  input  core_out_t    rx_deoxys_cout
);

  logic line_fwd, line_back;    // sender -> receiver, receiver -> sender

  hop_node #(
    .IS_SENDER(1'b1), .RECONFIG_CYCLES(RECONFIG_CYCLES), .CLKS_PER_BIT(CLKS_PER_BIT),
    .FIFO_DEPTH(FIFO_DEPTH), .MSG_WORDS(MSG_WORDS)
  ) u_sender (
    .clk(clk), .rst_n(rst_n),
    .seed_load(tx_seed_load), .seed(tx_seed),
    .iv_seed_load(iv_seed_load), .iv_seed(iv_seed),
    .pdi_wdata(tx_pdi_wdata), .pdi_wr(tx_pdi_wr), .pdi_full(tx_pdi_full),
    .sdi_wdata(tx_sdi_wdata), .sdi_wr(tx_sdi_wr), .sdi_full(tx_sdi_full),
    .do_rdata(), .do_rd(1'b0), .do_empty(),
    .hop_start(hop_start), .session_done(tx_session_done), .session_ok(tx_session_ok),
    .id_mismatch(), .busy(tx_busy), .active_alg(tx_alg), .lfsr_state(tx_lfsr),
    .proto_err(tx_proto_err),
    .uart_txd(line_fwd), .uart_rxd(line_back),
    .ext_cin(tx_ext_cin), .ext_rst_n(tx_ext_rst_n),
    .colm_cout(tx_colm_cout), .deoxys_cout(tx_deoxys_cout)
  );

  hop_node #(
    .IS_SENDER(1'b0), .RECONFIG_CYCLES(RECONFIG_CYCLES), .CLKS_PER_BIT(CLKS_PER_BIT),
    .FIFO_DEPTH(FIFO_DEPTH), .MSG_WORDS(MSG_WORDS)
  ) u_receiver (
    .clk(clk), .rst_n(rst_n),
    .seed_load(rx_seed_load), .seed(rx_seed),
    .iv_seed_load(1'b0), .iv_seed('0),
    .pdi_wdata(rx_pdi_wdata), .pdi_wr(rx_pdi_wr), .pdi_full(rx_pdi_full),
    .sdi_wdata(rx_sdi_wdata), .sdi_wr(rx_sdi_wr), .sdi_full(rx_sdi_full),
    .do_rdata(rx_do_rdata), .do_rd(rx_do_rd), .do_empty(rx_do_empty),
    .hop_start(1'b0), .session_done(rx_session_done), .session_ok(rx_session_ok),
    .id_mismatch(rx_id_mismatch), .busy(rx_busy), .active_alg(rx_alg), .lfsr_state(rx_lfsr),
    .proto_err(rx_proto_err),
    .uart_txd(line_back), .uart_rxd(line_fwd),
    .ext_cin(rx_ext_cin), .ext_rst_n(rx_ext_rst_n),
    .colm_cout(rx_colm_cout), .deoxys_cout(rx_deoxys_cout)
  );

endmodule
