// napa_pkg: widths, types and constants shared by the NAPA cellular array.
//
// A NAPA cell evaluates one step of a discrete-time digital cellular neural
// network: x(n+1) = sum over the cell and its four nearest neighbours of
// a_i*y_i(n) + b_i*u_i, plus a constant C; the cell output y is the MSB of x.
// The template values a_i, b_i and C are global and are delivered to every
// cell on shared template rails, one neighbour direction at a time.
//
// The document states that state, templates and input "may all be multi-bit"
// but gives no widths; the widths below are this design's choice. X_W is wide
// enough that the sum of five partial sums and C can never overflow.
// The 28 dynamic phases per iteration match the ratio of the output-generation
// delay to the template delay in the document's array timing table; the split
// into 5 x (template precharge, template evaluate, partial-sum precharge,
// partial-sum evaluate) + 4 x (accumulator precharge, evaluate) is this
// design's reading of it.
package napa_pkg;

  localparam int unsigned T_W  = 4;   // template a, b width (signed)
  localparam int unsigned C_W  = 8;   // template constant C width (signed)
  localparam int unsigned U_W  = 4;   // pixel input u width (signed)
  localparam int unsigned PS_W = 10;  // partial-sum width (signed)
  localparam int unsigned X_W  = 12;  // state width (signed); y = x[X_W-1]

  localparam int unsigned N_TMPL = 5;          // self + four neighbours
  localparam int unsigned N_NBR  = 4;          // neighbours
  localparam int unsigned PS_PHASES  = 4;      // phases per partial sum
  localparam int unsigned ACC_PHASES = 2;      // phases per accumulator
  localparam int unsigned PHASES_PER_ITER = N_TMPL * PS_PHASES + N_NBR * ACC_PHASES; // 28

  // Template / partial-sum index. A partial sum with index d is computed by
  // a cell from its own y and u with template (a_d, b_d) and is sent to the
  // neighbour that sees the sender in direction d.
  typedef enum logic [2:0] {
    DIR_SELF = 3'd0,
    DIR_N    = 3'd1,   // sender is the receiver's north neighbour (row - 1)
    DIR_E    = 3'd2,   // sender is the receiver's east neighbour  (col + 1)
    DIR_S    = 3'd3,   // sender is the receiver's south neighbour (row + 1)
    DIR_W    = 3'd4    // sender is the receiver's west neighbour  (col - 1)
  } dir_e;

  typedef logic signed [T_W-1:0]  tval_t;
  typedef logic signed [C_W-1:0]  cval_t;
  typedef logic signed [U_W-1:0]  pix_t;
  typedef logic signed [PS_W-1:0] ps_t;
  typedef logic signed [X_W-1:0]  state_t;

  // Value carried on the template rails during one partial-sum step.
  typedef struct packed {
    tval_t a;
    tval_t b;
    cval_t c;
  } tmpl_t;

  // A complete programmed task: one (a, b) pair per direction and C.
  typedef struct packed {
    tval_t [N_TMPL-1:0] a;   // indexed by dir_e
    tval_t [N_TMPL-1:0] b;   // indexed by dir_e
    cval_t              c;
  } tmpl_set_t;

  // Global control lines from the peripheral CMOS to every cell.
  typedef struct packed {
    logic       ps_pre;     // precharge partial-sum register ps_dir
    logic       ps_eva;     // evaluate partial-sum register ps_dir
    dir_e       ps_dir;
    logic       acc_pre;    // precharge accumulator acc_idx
    logic       acc_eva;    // evaluate accumulator acc_idx
    logic [1:0] acc_idx;
    logic       io_shift;   // input rails move one cell away from the IO controller
    logic       u_load;     // cells take their input from the rail; y(0) = MSB(u)
    logic       out_capture;// output rails take every cell's y
    logic       out_shift;  // output rails move one cell toward the IO controller
  } cell_ctrl_t;

  // Anticlockwise accumulation order (N, W, S, E); entry k is the partial-sum
  // direction added by accumulator k.
  function automatic dir_e acc_dir(input logic [1:0] k);
    case (k)
      2'd0:    return DIR_N;
      2'd1:    return DIR_W;
      2'd2:    return DIR_S;
      default: return DIR_E;
    endcase
  endfunction

endpackage
