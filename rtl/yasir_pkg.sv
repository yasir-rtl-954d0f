// yasir_pkg: types and constants shared by the YASIR bump-in-the-wire blocks.
//
// A serial SCADA line is seen by the YASIR blocks as a stream of tokens. A token is
// either the protocol's start symbol S, its ending symbol E, or one content octet.
// Recognising S and E on the wire is protocol specific and happens before these
// blocks; the token stream is their interface to the outside. The sizes below are
// the ones the YASIR construction fixes: a 10-octet truncated HMAC-SHA-1 tag, a
// 4-octet sequence number, 16-octet AES blocks, 64-octet SHA-1 blocks and a
// 2-octet err string. The request/response structs are the bundles through which
// the Transmitter and Receiver controllers drive the AES core and the SHA-1/HMAC
// unit, which lets the BITW top share one of each between the two roles.
package yasir_pkg;

  localparam int unsigned L_M   = 10;  // octets of HMAC-SHA-1-80 tag
  localparam int unsigned L_S   = 4;   // octets of sequence number
  localparam int unsigned L_E   = 16;  // octets per AES block (keystream block)
  localparam int unsigned L_B   = 64;  // octets per SHA-1 message block
  localparam int unsigned L_H   = 20;  // octets of SHA-1 digest
  localparam int unsigned L_ERR = 2;   // octets of err

  typedef enum logic [1:0] {
    TOK_DATA  = 2'd0,
    TOK_START = 2'd1,  // start symbol S
    TOK_END   = 2'd2   // ending symbol E
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e  kind;
    logic [7:0] data;  // content octet, meaningful for TOK_DATA only
  } token_t;

  // AES-128 keystream request: counter block to encrypt under the role's key.
  typedef struct packed {
    logic         start;
    logic [127:0] key;
    logic [127:0] block;
  } aes_req_t;

  typedef struct packed {
    logic         busy;
    logic         done;    // one-cycle pulse, result valid from then on
    logic [127:0] result;
  } aes_rsp_t;

  // SHA-1 / HMAC-SHA-1-80 unit commands.
  typedef struct packed {
    logic         init;        // Hash.init()
    logic         upd_valid;   // Hash.update() with one octet
    logic [7:0]   upd_data;
    logic         fin;         // Hash.final(): pad, finish, latch digest
    logic         mac_start;   // HMAC_HK(mac_seq || digest)
    logic [31:0]  mac_seq;
    logic [159:0] mac_key;
  } auth_req_t;

  typedef struct packed {
    logic         busy;
    logic         digest_done; // pulse: digest register valid
    logic [159:0] digest;
    logic         mac_done;    // pulse: mac register valid
    logic [79:0]  mac;
  } auth_rsp_t;

endpackage
