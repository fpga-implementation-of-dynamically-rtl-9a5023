// hop_pkg: types and constants shared by the algorithm-hopping security module.
//
// Algorithm IDs come from the three low bits of the hopping LFSR; any value
// of 4 or more selects AEGIS. The instruction, segment-header and status
// word layouts describe the 64-bit words carried on the PDI, SDI and DO
// ports and sent between the two nodes. core_in_t / core_out_t bundle the
// common port set that every cipher core (reconfigurable module) presents
// to the static part: 128-bit blocks from the pre-processor, output
// blocks and the tag to the post-processor, and the authentication result.
//
// Origin: the word and segment structure follows the CAESAR hardware API used by
// the hopping system; the exact bit positions and codes are this design's
// choice.
package hop_pkg;

  // ---- algorithm IDs (LFSR[2:0]) -------------------------------------
  typedef enum logic [2:0] {
    ALG_ASCON  = 3'd0,
    ALG_COLM   = 3'd1,
    ALG_DEOXYS = 3'd2,
    ALG_OCB    = 3'd3,
    ALG_AEGIS  = 3'd4
  } alg_t;

  function automatic alg_t alg_of_id(input logic [2:0] id);
    return (id >= 3'd4) ? ALG_AEGIS : alg_t'(id);
  endfunction

  // ---- word formats (64-bit PDI/SDI/DO words) ------------------------

  // instruction word: [63:56] message id, [55:48] opcode, rest zero
  localparam logic [7:0] OP_ENC     = 8'h02;
  localparam logic [7:0] OP_DEC     = 8'h03;
  localparam logic [7:0] OP_LDKEY   = 8'h04;
  localparam logic [7:0] OP_ACTKEY  = 8'h05;

  // segment header: [63:56] message id, [55:52] type, [49] EOI, [48] EOT,
  // [15:0] size in bytes; data words follow, bytes packed MSB first
  localparam logic [3:0] ST_NPUB = 4'h1;
  localparam logic [3:0] ST_AD   = 4'h2;
  localparam logic [3:0] ST_MSG  = 4'h4;
  localparam logic [3:0] ST_CT   = 4'h5;
  localparam logic [3:0] ST_KEY  = 4'h6;
  localparam logic [3:0] ST_TAG  = 4'h8;

  // status word: [63:56] message id, [55:48] status code
  localparam logic [7:0] STATUS_OK   = 8'hE0;
  localparam logic [7:0] STATUS_FAIL = 8'hF0;

  function automatic logic [63:0] ins_word(input logic [7:0] id, input logic [7:0] op);
    return {id, op, 48'h0};
  endfunction

  function automatic logic [63:0] hdr_word(input logic [7:0] id, input logic [3:0] st,
                                           input logic eoi, input logic eot,
                                           input logic [15:0] size);
    return {id, st, 2'b00, eoi, eot, 32'h0, size};
  endfunction

  // ---- link framing over UART ----------------------------------------
  localparam logic [7:0] SYNC_DATA   = 8'hA5;  // enable + ID + word count + words
  localparam logic [7:0] SYNC_STATUS = 8'h5A;  // status byte back to the sender

  // ---- cipher core port bundle ---------------------------------------
  typedef struct packed {
    logic [127:0] data;   // block, byte 0 in [127:120], unused bytes zero
    logic [4:0]   bytes;  // valid bytes, 0..16 (0 only for an empty segment)
    logic         ad;     // block is associated data
    logic         eot;    // last block of its type
    logic         eoi;    // last block of the input
  } bdi_t;

  typedef struct packed {
    logic [127:0] key;          // active key
    logic [127:0] npub;         // public message number (nonce / IV)
    logic         start;        // one-cycle pulse: begin a message
    logic         decrypt;      // 1: authenticated decryption
    bdi_t         bdi;
    logic         bdi_valid;
    logic [127:0] exp_tag;      // tag to verify (decryption)
    logic         exp_tag_valid;
    logic         bdo_ready;    // post-processor can take bdo / tag
  } core_in_t;

  typedef struct packed {
    logic         bdi_read;     // block taken (one cycle, with bdi_valid)
    logic [127:0] bdo;          // output block, unused bytes zero
    logic [4:0]   bdo_bytes;
    logic         bdo_valid;    // held until bdo_ready
    logic [127:0] tag;
    logic         tag_valid;    // held until bdo_ready (encryption)
    logic         auth_done;    // one-cycle pulse (decryption)
    logic         auth_valid;   // tag matched, with auth_done
    logic         busy;
  } core_out_t;

  // keep the first n bytes of a block, clear the rest
  function automatic logic [127:0] keep_bytes(input logic [127:0] b, input logic [4:0] n);
    logic [127:0] m;
    for (int k = 0; k < 16; k++) m[127-8*k -: 8] = (k < int'(n)) ? 8'hff : 8'h00;
    return b & m;
  endfunction

  // 10* padding byte 0x80 placed right after the first n bytes (n < 16)
  function automatic logic [127:0] pad_bit(input logic [4:0] n);
    logic [127:0] m;
    m = '0;
    for (int k = 0; k < 16; k++) if (k == int'(n)) m[127-8*k -: 8] = 8'h80;
    return m;
  endfunction

endpackage
