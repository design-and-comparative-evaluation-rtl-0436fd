// red_pkg: types and constants shared by the fault-tolerant cryptographic module of the
// reconfigurable ECU (FT-SR-DMR: dual modular redundancy with a spare, self-checking voter
// and self-reconfiguration).
//
// Both module kinds, AES-128 and the SHA-3 HMAC, deliver their result as a 256-bit word
// (AES in the low 128 bits) so that interfaces, comparators and the buffer treat them alike.
// Index T_AES / T_MAC selects the kind. A regular module sits on the left or the right input
// interface; the spare of each kind can stand in for either.
package red_pkg;

  localparam int unsigned NKIND = 2;
  localparam int unsigned T_AES = 0;
  localparam int unsigned T_MAC = 1;
  localparam int unsigned NCMP  = 3;   // comparators in TMR

  typedef logic [255:0] res_t;

  // which regular module of a kind the spare currently replaces
  typedef enum logic [1:0] {SUB_NONE = 2'd0, SUB_LEFT = 2'd1, SUB_RIGHT = 2'd2} sub_e;

  // Module identifiers for partial reconfiguration: {kind, side}, side 0 = left, 1 = right.
  typedef logic [1:0] mod_id_t;

  // Status reported with every result.
  typedef struct packed {
    logic             fail;        // no two results could be made to agree
    logic             integrity;   // receiver: local digest equals the received one
    logic [NKIND-1:0] spare_used;  // this result came from a spare module
    logic [NKIND-1:0] mismatch;    // the regular DMR pair disagreed in this operation
    logic [NCMP-1:0]  cmp_fault;   // comparator outvoted by the other two
    logic             voter_err;   // Berger check of the voter failed at least once
    logic [3:0]       retries;     // recomputations done for this result
  } status_t;

endpackage
