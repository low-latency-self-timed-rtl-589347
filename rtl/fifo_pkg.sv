// fifo_pkg: constants and types shared by the self-timed flow-through FIFOs.
//
// Every FIFO in this library moves words of DATA_W bits over two-phase
// bundled-data channels (a request wire, an acknowledge wire and a data bus
// that is stable before the request toggles). The comparison configuration
// is a sixteen-word, eight-bit FIFO built in five organizations; the enum
// below names them and indexes the channels of the top level.
//
// Origin: the eight-bit width and sixteen-word depth are the published
// sizes; the enumeration is this design's.
package fifo_pkg;
  parameter int DATA_W = 8;       // bits per word
  parameter int FIFO_DEPTH = 16;  // words per FIFO in the comparison set

  typedef enum logic [2:0] {
    ORG_LINEAR   = 3'd0,
    ORG_PARALLEL = 3'd1,
    ORG_TREE     = 3'd2,
    ORG_SQUARE   = 3'd3,
    ORG_FOLDED   = 3'd4
  } fifo_org_e;

  parameter int N_ORGS = 5;
endpackage
