// smile_pkg: constants and types shared by the SMILE node logic.
//
// The CBIR coprocessor compares a 42-word query signature with a stream of
// database signatures, two 32-bit words per bus beat, and keeps the 15 best
// matches. The SMILE Communication Element (SCE) moves packets between three
// serial links and the local processor. Signature length, word width, the
// 64-bit beat and the 15-entry result buffer come from the SMILE design;
// the identifier width, distance width, node address width and packet beat
// format are this design's own choices (see the modules that use them).
package smile_pkg;

  // ---------------- CBIR coprocessor ----------------
  localparam int unsigned SIG_WORDS = 42;          // words per signature
  localparam int unsigned WORD_W    = 32;          // fixed-point word width
  localparam int unsigned BEAT_W    = 64;          // DMA beat: two words
  localparam int unsigned SIG_BEATS = SIG_WORDS / 2;
  localparam int unsigned TOPK      = 15;          // best results kept
  // Squared Euclidean distance: each squared difference is below 2^64,
  // the sum of 42 of them below 2^70.
  localparam int unsigned DIST_W    = 2 * WORD_W + $clog2(SIG_WORDS);
  // 128 MB signature buffer / 168 bytes per signature < 2^20 signatures.
  localparam int unsigned ID_W      = 20;

  typedef logic [DIST_W-1:0] dist_t;
  typedef logic [ID_W-1:0]   img_id_t;

  typedef struct packed {
    logic    valid;
    dist_t   distance;
    img_id_t id;
  } result_t;

  // ---------------- SCE network ----------------
  localparam int unsigned NODE_W  = 5;             // 32 nodes
  localparam int unsigned LINK_W  = 32;            // link data word
  localparam int unsigned NLINKS  = 3;             // three SATA connectors
  localparam int unsigned SBE_SIZE = 4;            // nodes per SBE
  localparam int unsigned SBE_LSB = $clog2(SBE_SIZE);

  typedef logic [NODE_W-1:0] node_addr_t;
  typedef logic [1:0]        port_t;               // 0..2 link, 3 = local

  localparam port_t PORT_LOCAL = 2'd3;

  // One word of a packet stream. The first word of a packet (sof) is the
  // header; its low NODE_W bits hold the destination node address.
  typedef struct packed {
    logic              sof;
    logic              eof;
    logic [LINK_W-1:0] data;
  } beat_t;

  // Routing set-up written by the driver at start-up.
  typedef struct packed {
    node_addr_t node_addr;    // this node
    port_t      port_prev;    // link to the lower-addressed SBE neighbour
    port_t      port_next;    // link to the higher-addressed SBE neighbour
    port_t      port_sbe_dn;  // link leading towards lower-numbered SBEs
    port_t      port_sbe_up;  // link leading towards higher-numbered SBEs
  } sce_cfg_t;

endpackage
