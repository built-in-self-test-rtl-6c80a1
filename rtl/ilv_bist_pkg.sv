// Shared types of the inter-layer-via (ILV) built-in self-test.
//
// The BIST compresses the response of one ILV bus into a 2-bit signature
// {Y1, Y2}: Y1 from the XOR/AND compactor (BIST-A), Y2 from its dual
// XNOR/OR compactor (BIST-B). A bus and its BIST are fault-free when
// Y1 = 1 and Y2 = 0 in both test cycles. The diagnosis classes below
// follow the fault-detection arguments of the method (a hard short pulls
// Y1 low in both cycles, an open or stuck-at in one cycle only, a Y2 of 1
// exposes a fault that BIST-A masked or a fault in BIST-B); their
// encoding is this design's choice.
package ilv_bist_pkg;

  // Signature of one bus for one test cycle.
  typedef struct packed {
    logic y1;  // XOR/AND compactor, 1 = all adjacent pairs differ
    logic y2;  // XNOR/OR compactor, 0 = all adjacent pairs differ
  } sig_t;

  localparam sig_t SIG_GOOD = '{y1: 1'b1, y2: 1'b0};

  typedef enum logic [1:0] {
    DIAG_PASS       = 2'd0,  // Y1=1, Y2=0 in both cycles
    DIAG_ONE_CYCLE  = 2'd1,  // Y1=0 in exactly one cycle: open or stuck-at
    DIAG_BOTH_CYCLE = 2'd2,  // Y1=0 in both cycles: short (or several faults)
    DIAG_Y2_ONLY    = 2'd3   // Y1=1 in both cycles but Y2=1: masked fault / BIST fault
  } diag_e;

  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,  // functional mode, results held
    ST_CYC1  = 2'd1,  // Launch=1, Vin=1
    ST_CYC2  = 2'd2   // Launch=1, Vin=0
  } state_e;

  // Grade one bus from its two captured signatures.
  function automatic diag_e grade(sig_t c1, sig_t c2);
    if (!c1.y1 && !c2.y1)       return DIAG_BOTH_CYCLE;
    else if (!c1.y1 || !c2.y1)  return DIAG_ONE_CYCLE;
    else if (c1 == SIG_GOOD && c2 == SIG_GOOD) return DIAG_PASS;
    else                        return DIAG_Y2_ONLY;
  endfunction

endpackage
