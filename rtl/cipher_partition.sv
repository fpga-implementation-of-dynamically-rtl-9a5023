// cipher_partition: the reconfigurable partition that holds the active
// cipher core, with the key and message hand-over of the core controller.
//
// In the FPGA the partition is filled with one reconfigurable module at a
// time by loading its partial bitstream. Here every module that exists as
// RTL is instantiated and only the selected one is released from reset;
// a reconfiguration request holds the partition in reset for
// RECONFIG_CYCLES clocks (the partial-bitstream load time) and then makes
// the requested algorithm active. COLM and Deoxys modules are not part of
// this RTL: their slots are brought out as ports (ext_cin to both, their
// outputs on colm_cout / deoxys_cout). Most of ext_cin (block data, nonce,
// expected tag) is wired straight from this module's inputs, as the bus
// into a partition slot is.
//
// Controller (key-load / process-data chart): between messages, if
// key_needs_update is high the controller waits for key_ready, copies the
// key into the active-key register and raises key_updated, which stays
// high until the end of the next message. Otherwise a decoded message
// (bdi_proc) starts the core with the active key (proc_ack pulse). The
// message ends with the tag hand-over (encryption) or auth_done
// (decryption); msg_done pulses then.
//
// Origin: the five reconfigurable cipher modules behind one interface, the key
// handshake (key_ready / key_needs_update / key_updated / bdi_proc) and the
// 1.67 ms reconfiguration time come from the hopping system. Instantiating the
// modules side by side, selecting one by reset, and modelling the partial
// bitstream load as a fixed delay are this design's choices.
module cipher_partition
  import hop_pkg::*;
#(
  parameter int unsigned RECONFIG_CYCLES = 16700
) (
  input  logic         clk,
  input  logic         rst_n,
  // reconfiguration
  input  logic         reconfig_req,
  input  alg_t         reconfig_alg,
  output logic         reconfig_busy,
  output alg_t         active_alg,
  // key handshake with the pre-processor
  input  logic [127:0] key_in,
  input  logic         key_ready,
  input  logic         key_needs_update,
  output logic         key_updated,
  // message start
  input  logic         bdi_proc,
  input  logic         decrypt,
  input  logic [127:0] npub,
  output logic         proc_ack,
  output logic         msg_done,
  // data to / from the active core
  input  bdi_t         bdi,
  input  logic         bdi_valid,
  input  logic [127:0] exp_tag,
  input  logic         exp_tag_valid,
  input  logic         bdo_ready,
  output core_out_t    cout,
  // slots of the modules that are not in this RTL
  output core_in_t     ext_cin,
  output logic         ext_rst_n,
  input  core_out_t    colm_cout,
  input  core_out_t    deoxys_cout
);

  typedef enum logic [1:0] {C_IDLE, C_KEY, C_RUN, C_RECONF} cst_t;
  cst_t cst;

  logic [127:0] active_key;
  logic [$clog2(RECONFIG_CYCLES+1)-1:0] rcnt;
  logic         start;
  alg_t         target;
  logic [4:0]   rm_rst_n;          // one per algorithm ID 0..4

  core_in_t  cin;
  core_out_t co_ascon, co_ocb, co_aegis;

  always_comb begin
    cin.key           = active_key;
    cin.npub          = npub;
    cin.start         = start;
    cin.decrypt       = decrypt;
    cin.bdi           = bdi;
    cin.bdi_valid     = bdi_valid && (cst == C_RUN);
    cin.exp_tag       = exp_tag;
    cin.exp_tag_valid = exp_tag_valid;
    cin.bdo_ready     = bdo_ready;
  end

  ascon128_core u_ascon (.clk(clk), .rst_n(rm_rst_n[ALG_ASCON]), .cin(cin), .cout(co_ascon));
  ocb3_core     u_ocb   (.clk(clk), .rst_n(rm_rst_n[ALG_OCB]),   .cin(cin), .cout(co_ocb));
  aegis128_core u_aegis (.clk(clk), .rst_n(rm_rst_n[ALG_AEGIS]), .cin(cin), .cout(co_aegis));

  assign ext_cin   = cin;
  assign ext_rst_n = rm_rst_n[ALG_COLM] | rm_rst_n[ALG_DEOXYS];

  always_comb begin
    unique case (active_alg)
      ALG_ASCON:  cout = co_ascon;
      ALG_COLM:   cout = colm_cout;
      ALG_DEOXYS: cout = deoxys_cout;
      ALG_OCB:    cout = co_ocb;
      default:    cout = co_aegis;
    endcase
  end

  logic finish;
  assign finish = (cst == C_RUN) &&
                  (decrypt ? cout.auth_done
                           : (cout.tag_valid && bdo_ready && !cout.bdo_valid));

  assign reconfig_busy = (cst == C_RECONF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE;
      active_key <= '0; key_updated <= 1'b0; proc_ack <= 1'b0; msg_done <= 1'b0;
      start <= 1'b0; rcnt <= '0; target <= ALG_AEGIS; active_alg <= ALG_AEGIS;
      rm_rst_n <= '0;
    end else begin
      start    <= 1'b0;
      proc_ack <= 1'b0;
      msg_done <= 1'b0;
      // only the active module is out of reset
      for (int i = 0; i < 5; i++)
        rm_rst_n[i] <= (cst != C_RECONF) && (i == int'(active_alg));
      unique case (cst)
        C_IDLE: begin
          if (reconfig_req) begin
            target <= reconfig_alg;
            rcnt   <= '0;
            cst    <= C_RECONF;
          end else if (key_needs_update) begin
            if (key_ready) begin
              active_key  <= key_in;
              key_updated <= 1'b1;
              cst         <= C_KEY;
            end
          end else if (bdi_proc && !proc_ack) begin
            start    <= 1'b1;
            proc_ack <= 1'b1;
            cst      <= C_RUN;
          end
        end
        C_KEY: if (!key_needs_update) cst <= C_IDLE;   // pre-processor has seen key_updated
        C_RUN: if (finish) begin
          key_updated <= 1'b0;
          msg_done    <= 1'b1;
          cst         <= C_IDLE;
        end
        C_RECONF: begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == ($clog2(RECONFIG_CYCLES+1))'(RECONFIG_CYCLES - 1)) begin
            active_alg <= target;
            cst        <= C_IDLE;
          end
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

endmodule
