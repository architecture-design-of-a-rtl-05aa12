// adsp_pkg - shared types and the application configuration of the
// data-driven DSP chip.
//
// A token is a data word plus a tag. The tag names the logical operation
// that produced the data (parent identification), so one tag identifies the
// datum, the bus it travels on and every operation that consumes it. The tag
// width is ceil(log2(N_op)); the data width of 16 bits is the upper end of the
// 12..16 bit range the architecture suggests for real-time DSP.
//
// The architecture is generic: an application is a data flow graph whose
// logical operations are mapped onto shared functional units (FUs). The
// tables below are that mapping, indexed by tag. They hold the example
// application of this design, a complex multiplication followed by a real
// gain (z = (a*b)*g), the kind of complex-multiply kernel an FFT chip uses:
//
//   tag  op   kind   executes on      operand A      operand B   result bus
//    0   ar   input  input block      -              -           0
//    1   ai   input  input block      -              -           1
//    2   br   input  input block      -              -           0
//    3   bi   input  input block      -              -           1
//    4   g    input  input block      -              -           0
//    5   p1   mul    FU0 (MUL0)       ar  (RA 0)     br (RB 0)   0
//    6   p2   mul    FU1 (MUL1)       ai  (RA 0)     bi (RB 0)   1
//    7   p3   mul    FU0 (MUL0)       ar  (RA 1)     bi (RB 1)   0
//    8   p4   mul    FU1 (MUL1)       ai  (RA 1)     br (RB 1)   1
//    9   yr   sub    FU2 (SUB)        p1  (RA 0)     p2 (RB 0)   0
//   10   yi   add    FU3 (ADD)        p3  (RA 0)     p4 (RB 0)   1
//   11   zr   mul    FU0 (MUL0)       yr  (RA 0)     g  (RB 2)   0
//   12   zi   mul    FU1 (MUL1)       g   (RA 2)     yi (RB 1)   1
//
// RA/RB give the register of the FU's RF_A/RF_B that holds the operand. In
// MUL0 the A registers of p1 and zr are one shared register (yr cannot exist
// before p1 has consumed ar); in MUL1 the B registers of p4 and zi are one
// (yi cannot exist before p4 has consumed br). Each multiplier executes
// three operations.
//
// The chip has two input ports, each with its own input block: port 0
// takes a data set's ar, ai and port 1 its br, bi, g, in that order. When
// ar arrives after br and bi it makes p1 and p3 ready together (and ai p2
// and p4), which the matching blocks' priority resolves. One output block
// emits zr, zi in that order. All of this mapping is this design's example;
// the architecture itself fixes none of it.
package adsp_pkg;

  // ---- widths ------------------------------------------------------------
  localparam int W_D    = 16;          // data width
  localparam int N_OP   = 13;          // logical operations of the example
  localparam int W_T    = $clog2(N_OP); // tag width, ceil(log2 N_op) = 4
  localparam int NT     = 1 << W_T;    // size of the tag-indexed tables

  localparam int NB     = 2;           // buses
  localparam int NF     = 4;           // functional units
  localparam int NREG   = 4;           // registers per RF_A / RF_B
  localparam int N_IBLK = 2;           // input blocks (chip input ports)
  localparam int N_OBLK = 1;           // output blocks (chip output ports)
  localparam int FIFO_DEPTH = 8;       // input and output FIFO depth
  localparam int MAX_SETS   = 1;       // data sets allowed in flight

  typedef logic [W_D-1:0] data_t;
  typedef logic [W_T-1:0] tag_t;

  typedef struct packed {
    tag_t  tag;
    data_t data;
  } token_t;

  typedef enum logic [1:0] {
    FU_ADD = 2'd0,
    FU_SUB = 2'd1,
    FU_MUL = 2'd2
  } fu_kind_e;

  typedef int        tab_t  [NT];
  typedef fu_kind_e  kind_t [NF];
  typedef int        flist_t[NF];

  // ---- example application (see table above); -1 marks "none" ------------
  localparam tab_t CFG_OP_FU  = '{-1, -1, -1, -1, -1, 0, 1, 0, 1, 2, 3, 0, 1, -1, -1, -1};
  localparam tab_t CFG_SRC_A  = '{-1, -1, -1, -1, -1, 0, 1, 0, 1, 5, 7, 9,  4, -1, -1, -1};
  localparam tab_t CFG_SRC_B  = '{-1, -1, -1, -1, -1, 2, 3, 3, 2, 6, 8, 4, 10, -1, -1, -1};
  localparam tab_t CFG_REG_A  = '{ 0,  0,  0,  0,  0, 0, 0, 1, 1, 0, 0, 0, 2,  0,  0,  0};
  localparam tab_t CFG_REG_B  = '{ 0,  0,  0,  0,  0, 0, 0, 1, 1, 0, 0, 2, 1,  0,  0,  0};
  localparam tab_t CFG_BUS_OF = '{ 0,  1,  0,  1,  0, 0, 1, 0, 1, 0, 1, 0, 1,  0,  0,  0};

  localparam kind_t CFG_FU_KIND = '{FU_MUL, FU_MUL, FU_SUB, FU_ADD};
  localparam flist_t CFG_FU_BUS  = '{0, 1, 0, 1};

  // I/O mapping, also by tag: the input block that tags an input operation
  // and the word's position in that block's data set; the output block that
  // emits an output and its position in that block's output order.
  localparam tab_t CFG_IN_BLK  = '{ 0,  0,  1,  1,  1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1};
  localparam tab_t CFG_IN_POS  = '{ 0,  1,  0,  1,  2, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1};
  localparam tab_t CFG_OUT_BLK = '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1};
  localparam tab_t CFG_OUT_POS = '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  1, -1, -1, -1};

  // number of tags a block handles (words per data set at that port)
  function automatic int count_of(input tab_t blk_of, input int blk);
    int n = 0;
    for (int t = 0; t < NT; t++) if (blk_of[t] == blk) n++;
    return n;
  endfunction

  // tag at position pos of block blk, -1 if none
  function automatic int tag_at(input tab_t blk_of, input tab_t pos_of,
                                input int blk, input int pos);
    int r = -1;
    for (int t = 0; t < NT; t++)
      if (blk_of[t] == blk && pos_of[t] == pos) r = t;
    return r;
  endfunction

endpackage
