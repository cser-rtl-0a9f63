// cser_pkg: types shared by the CSER cells, the robust scan design and the top.
//
// latch_ctrl_t bundles the control inputs of one latch-based CSER cell (Figs. 2-5
// and the combined Figs. 4/5 cell). Fields a given cell does not have (shift, load,
// select_o2) are simply left unused by that cell. latch_io_in_t / latch_io_out_t
// are the data pins of such a cell. scan_ctrl_t holds the global signals of the
// MUX-based robust scan design, mux_ctrl_t those of the extended MUX-based cell.
// cell_e names the latch-based cells in the top.
// All of these are 1-bit, level-sensitive signals; the grouping is this design's
// own packaging choice, the signal names follow the CSER cell pin names.
package cser_pkg;

  typedef struct packed {
    logic clk;        // functional clock CLK
    logic sca;        // scan clock SCA (LA, scan-in port)
    logic scb;        // scan clock SCB (LB)
    logic update;     // UPDATE clock (LB -> PH1)
    logic capture;    // CAPTURE: couple the scan portion to CLK
    logic test;       // TEST: C-element acts as an inverter of O1
    logic shift;      // SHIFT (Figs. 3, 4)
    logic load;       // LOAD (Fig. 4)
    logic select_o2;  // SELECT_O2 (Fig. 5)
  } latch_ctrl_t;

  typedef struct packed {
    logic d;          // functional data D
    logic si;         // SI / SDI
  } latch_io_in_t;

  typedef struct packed {
    logic q;          // cell output Q
    logic so;         // SO / SDO
  } latch_io_out_t;

  typedef struct packed {
    logic clk;        // functional clock CLK
    logic sck;        // scan clock SCK
    logic se;         // global scan enable SE
    logic debug;      // global debug mode DEBUG
    logic update;     // enhanced-scan UPDATE
    logic test;       // global test mode TEST
  } scan_ctrl_t;

  typedef struct packed {
    logic clk;        // functional clock CLK
    logic sck;        // scan clock SCK
    logic se;         // scan enable SE
    logic debug;      // DEBUG (also ends a signature capture)
    logic update;     // enhanced-scan UPDATE
    logic test;       // TEST
    logic shift;      // SHIFT: signature compression on capture
    logic select_o2;  // SELECT_O2: bypass the system flip-flop
  } mux_ctrl_t;

  typedef enum logic [2:0] {
    CELL_SNAPSHOT = 3'd0,  // Fig. 2
    CELL_MBISER   = 3'd1,  // Fig. 3
    CELL_CBISER   = 3'd2,  // Fig. 4
    CELL_DT       = 3'd3,  // Fig. 5
    CELL_FULL     = 3'd4   // Figs. 4/5
  } cell_e;

  localparam int unsigned NUM_LATCH_CELLS = 5;

endpackage
