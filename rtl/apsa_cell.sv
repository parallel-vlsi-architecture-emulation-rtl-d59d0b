// apsa_cell -- one storage cell of the APSA memory, with its own logic.
//
// The cell stores one word (type, attached flag, value) and the select and
// mark flags. Every clock it executes the instruction broadcast by the
// controller, using only its own state, its two neighbours' words and the
// context the sweep tree delivers to it:
//   match     select := (type is value) and (value = operand value)
//   mark-sel  mark   := some cell to the right is selected (from the tree)
//   insert    marked cell takes the right neighbour's word, the selected cell
//             takes the operand value; a marked cell whose right neighbour is
//             selected sets attached, since the inserted value follows it
//   delete    marked cell takes the left neighbour's word; the selected cell
//             takes it too, with attached = both cells' attached flags ANDed
//   index n   select := this cell is element n (0 = head) of a list whose
//             head is selected; the position arrives from the tree
//   last      select := this cell is the last element of such a list
//   shift r/l every cell takes its left/right neighbour's word
// Flags stay in their cells; only words move. Results are written at the
// rising clock edge, so each instruction takes one cycle. Active-low
// synchronous reset empties the cell (free word, flags clear).
//
// The instruction meanings for match, mark-to-select, insert and index, and
// the attached/select/mark flags, follow the source architecture; the
// flag rules at the ends of a list, delete, last, and the reset are this
// implementation's reading of what they must do.
//
// leaf_up is the cell's summary for the tree: its select bit, its word, and
// its position-carry function (not attached: the chain ends here; selected:
// a new chain starts, next cell is element 1; otherwise add 1).
module apsa_cell
  import apsa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  instr_t     ins,
  input  cell_word_t left_word,   // word of cell i-1 (controller fill word at cell 0)
  input  cell_word_t right_word,  // word of cell i+1 (controller fill word at the last cell)
  input  logic       right_sel,   // select flag of cell i+1 (0 at the last cell)
  input  dn_t        ctx,         // context from the sweep tree
  output up_t        leaf_up,     // summary to the sweep tree
  output cell_word_t word,
  output logic       sel,
  output logic       mark
);

  cell_word_t word_d;
  logic       sel_d, mark_d;
  pos_t       pos;        // this cell's position in a list whose head is selected
  logic       is_val;

  assign is_val = (word.typ == CT_VAL);

  always_comb begin
    leaf_up.any_sel    = sel;
    leaf_up.first_word = word;
    leaf_up.fn.cnst    = !word.att || sel;
    leaf_up.fn.vld     = word.att && sel;
    leaf_up.fn.k       = word.att ? CNT_W'(1) : '0;
  end

  always_comb begin
    if (sel) begin
      pos.vld = 1'b1;
      pos.k   = '0;
    end else begin
      pos = ctx.cin;
    end
  end

  always_comb begin
    word_d = word;
    sel_d  = sel;
    mark_d = mark;
    unique case (ins.op)
      OP_MATCH:    sel_d  = is_val && (word.val == ins.opd.val);
      OP_MARK_SEL: mark_d = ctx.sel_right;
      OP_INSERT: begin
        if (sel) begin
          word_d.typ = CT_VAL;
          word_d.val = ins.opd.val;
        end else if (mark) begin
          word_d = right_word;
          if (right_sel) word_d.att = 1'b1;
        end
      end
      OP_DELETE: begin
        if (sel) begin
          word_d     = left_word;
          word_d.att = left_word.att & word.att;
        end else if (mark) begin
          word_d = left_word;
        end
      end
      OP_INDEX:    sel_d = pos.vld && (pos.k == ins.n);
      OP_LAST:     sel_d = pos.vld && is_val && !word.att;
      OP_SHIFT_R:  word_d = left_word;
      OP_SHIFT_L:  word_d = right_word;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word <= FREE_WORD;
      sel  <= 1'b0;
      mark <= 1'b0;
    end else begin
      word <= word_d;
      sel  <= sel_d;
      mark <= mark_d;
    end
  end

endmodule
