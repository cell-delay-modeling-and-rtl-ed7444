// atm_pkg: types and constants shared by the IRRM-MC input-queued ATM switch.
//
// A cell is carried whole, one cell per port per time slot, as a CELL_W-bit word
// with the 5-byte UNI header in the top 40 bits (GFC, VPI, VCI, PT, CLP, HEC) and
// the 48-byte payload below it. The five service classes are numbered in priority
// order, class 0 (CBR) highest and class 4 (UBR) lowest, as the scheduler runs its
// planes in that order. The cell layout is the standard ATM UNI format; the class
// numbering follows the priority order of the switch.
package atm_pkg;

  // 53-byte ATM cell
  localparam int unsigned CELL_W  = 424;
  localparam int unsigned VPI_W   = 8;     // UNI VPI width
  localparam int unsigned VPI_MSB = CELL_W - 5;   // bits after the 4-bit GFC
  localparam int unsigned VPI_LSB = VPI_MSB - VPI_W + 1;

  // Service classes, highest priority first.
  localparam int unsigned NUM_SVC = 5;
  typedef enum logic [2:0] {
    CLS_CBR    = 3'd0,
    CLS_RTVBR  = 3'd1,
    CLS_NRTVBR = 3'd2,
    CLS_ABR    = 3'd3,
    CLS_UBR    = 3'd4
  } svc_class_e;

endpackage
