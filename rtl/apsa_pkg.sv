// apsa_pkg -- shared types and constants of the APSA data-structure memory.
//
// The APSA memory is a row of cells, each holding one word plus a few flags,
// with a path to each neighbour (for shifts) and a binary tree of
// combinational nodes above them whose root is the controller port (for
// sweeps). This package defines the word that travels along the shift paths,
// the instruction the controller issues, and the two records that travel up
// and down the sweep tree.
//
// From the source architecture: the cell holds a type field, one data word and
// the flags "attached", "select" and "mark"; the instructions match,
// mark-to-select, insert, index and last; a 64-bit shift path. Design choices
// of this implementation: the 2-bit type code, the 64-bit split of the word into
// type, attached flag and value, the opcode encoding, and the extra
// instructions delete, read and whole-memory shifts spelled out below.
package apsa_pkg;

  // Width of the word moved between neighbouring cells on a shift.
  localparam int WORD_W = 64;
  // Type field width and value width (WORD_W = TYPE_W + 1 + VAL_W).
  localparam int TYPE_W = 2;
  localparam int VAL_W  = WORD_W - TYPE_W - 1;
  // Width of the list-position counter carried by the index sweep. Counts
  // saturate at 2**CNT_W-1, so memories of up to 65,535 cells index exactly.
  localparam int CNT_W  = 16;

  typedef enum logic [TYPE_W-1:0] {
    CT_FREE  = 2'd0,   // cell belongs to the available-space pool
    CT_VAL   = 2'd1,   // cell holds a list/vector element value
    CT_RSV2  = 2'd2,   // reserved for other data kinds (environments, ...)
    CT_RSV3  = 2'd3
  } cell_type_e;

  // The word a cell stores and passes to its neighbours on a shift.
  typedef struct packed {
    cell_type_e        typ;
    logic              att;   // attached: the list continues in the next cell
    logic [VAL_W-1:0]  val;
  } cell_word_t;

  localparam cell_word_t FREE_WORD = '{typ: CT_FREE, att: 1'b0, val: '0};

  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_MATCH    = 4'd1,  // select := cell is a value equal to operand.val
    OP_MARK_SEL = 4'd2,  // mark   := some cell to the right is selected
    OP_INSERT   = 4'd3,  // marked cells take right neighbour, selected cell takes operand
    OP_DELETE   = 4'd4,  // marked and selected cells take left neighbour, cell 0 takes operand
    OP_INDEX    = 4'd5,  // select := cell is element n of a list whose head is selected
    OP_LAST     = 4'd6,  // select := cell is the last element of a list whose head is selected
    OP_READ     = 4'd7,  // return the word of the leftmost selected cell
    OP_SHIFT_R  = 4'd8,  // every cell takes left neighbour, cell 0 takes operand
    OP_SHIFT_L  = 4'd9   // every cell takes right neighbour, last cell takes operand
  } opcode_e;

  typedef struct packed {
    opcode_e           op;
    cell_word_t        opd;   // operand word (value for match/insert, fill word for shifts)
    logic [CNT_W-1:0]  n;     // element number for OP_INDEX
  } instr_t;

  // A list-position carry: "the cell receiving this is element k of a list
  // whose head is selected", or nothing (vld = 0).
  typedef struct packed {
    logic             vld;
    logic [CNT_W-1:0] k;
  } pos_t;

  // A carry transfer function, as composed by the tree: either a constant
  // (cnst = 1: output is {vld, k}) or "add k to a valid input".
  typedef struct packed {
    logic             cnst;
    logic             vld;
    logic [CNT_W-1:0] k;
  } pos_fn_t;

  // Record sent up the sweep tree: summary of one subtree.
  typedef struct packed {
    logic       any_sel;     // some cell of the subtree is selected
    cell_word_t first_word;  // word of the leftmost selected cell (valid if any_sel)
    pos_fn_t    fn;          // how the subtree transforms an incoming position carry
  } up_t;

  // Record sent down the sweep tree: context of one subtree.
  typedef struct packed {
    pos_t cin;        // position carry arriving from the cells to the left
    logic sel_right;  // some cell to the right of the subtree is selected
  } dn_t;

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a, logic [CNT_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  // Apply a carry transfer function to an incoming carry.
  function automatic pos_t pos_apply(pos_fn_t f, pos_t c);
    pos_t r;
    if (f.cnst) begin
      r.vld = f.vld;
      r.k   = f.k;
    end else begin
      r.vld = c.vld;
      r.k   = c.vld ? sat_add(c.k, f.k) : '0;
    end
    return r;
  endfunction

  // Compose two transfer functions: first f (left part), then g (right part).
  function automatic pos_fn_t pos_compose(pos_fn_t f, pos_fn_t g);
    pos_fn_t r;
    if (g.cnst) begin
      r = g;
    end else begin
      r.cnst = f.cnst;
      r.vld  = f.cnst ? f.vld : 1'b0;
      r.k    = (f.cnst && !f.vld) ? '0 : sat_add(f.k, g.k);
    end
    return r;
  endfunction

endpackage
