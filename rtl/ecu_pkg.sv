// ecu_pkg -- types and constants shared by the fault-tolerant cryptographic module (FT CM).
//
// The FT CM runs two functions, AES (index FN_AES) and the SHA-3 HMAC (index FN_MAC), each
// on three physical copies: the DMR pair M1, M2 and a spare MS. The input interfaces pick,
// per function, which copy drives comparator side A and side B (src_t). Reconfiguration
// requests name one of the four DMR copies by a one-hot bit (RC_* positions).
package ecu_pkg;

  localparam int AES_W  = 128;  // AES block and key width
  localparam int MAC_W  = 256;  // SHA3-256 HMAC digest width
  localparam int MSG_W  = 64;   // original message M
  localparam int CTR_W  = 64;   // anti-replay counter C
  localparam int PAYLOAD_W = MAC_W + AES_W;  // 384-bit (48-byte) secure CAN FD payload

  localparam int NFN    = 2;
  localparam int FN_AES = 0;
  localparam int FN_MAC = 1;

  typedef enum logic [1:0] {SRC_M1 = 2'd0, SRC_M2 = 2'd1, SRC_MS = 2'd2} src_t;

  // one-hot positions in reconfiguration request / done vectors
  localparam int RC_AES1 = 0;
  localparam int RC_AES2 = 1;
  localparam int RC_MAC1 = 2;
  localparam int RC_MAC2 = 3;
  localparam int NRC     = 4;

  // one-cycle pulses from the fault handler, one per recovery mechanism of Algorithm 1
  typedef struct packed {
    logic mismatch;       // DMR copies disagreed (after the vote)
    logic recompute;      // a recomputation on the DMR pair was launched
    logic spare_on;       // spare copy activated after NUM_SOFT_ERR failed attempts
    logic m1_faulty;      // localisation found M1 faulty (M1 replaced by the spare)
    logic m2_faulty;      // localisation found M2 faulty (M2 replaced by the spare)
    logic both_faulty;    // both DMR copies faulty: spare runs alone until reconfigured
    logic scv_fault;      // the self-checking voter flagged itself
    logic restored;       // a reconfigured copy returned to service
    logic unrecoverable;  // mismatch with no spare left: the result is withheld
  } scfh_events_t;

endpackage
